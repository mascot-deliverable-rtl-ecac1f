// Testbench of the symbol reordering: random permutations and symbols; every
// stream position must receive the decision of the layer that carried it.
module tb_symbol_reorder;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  svec_t s_in, s_out;
  pvec_t perm;

  symbol_reorder dut (.s_in(s_in), .perm(perm), .s_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int p[NT];
      for (int k = 0; k < NT; k++) p[k] = k;
      p.shuffle();
      for (int k = 0; k < NT; k++) begin
        perm[k] = 2'(p[k]);
        s_in[k] = rand_sym(MOD_QAM64);
      end
      #1;
      for (int k = 0; k < NT; k++) begin
        checks++;
        if (s_out[p[k]] !== s_in[k]) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
