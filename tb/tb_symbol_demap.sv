// Testbench of the Gray demapper: every point of every modulation on every
// stream, compared with lookup tables of the Gray labels; also checks that
// neighbouring 64-QAM levels differ in exactly one bit.
module tb_symbol_demap;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  svec_t s;
  modv_t mods;
  vbits_t bits;
  logic [NT-1:0][2:0] nbits;

  symbol_demap dut (.s(s), .mods(mods), .bits(bits), .nbits(nbits));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int k = 0; k < 64; k++) begin
        if (k >= npoints(mod_e'(m))) continue;
        for (int st = 0; st < NT; st++) begin
          mods[st] = mod_e'(m);
          s[st] = point(mod_e'(m), (k + st) % npoints(mod_e'(m)));
        end
        #1;
        for (int st = 0; st < NT; st++) begin
          checks++;
          if (bits[st] !== bits_ref(s[st], mod_e'(m)) ||
              int'(nbits[st]) != int'(bits_per_sym(mod_e'(m)))) begin
            failures++;
            if (failures < 10) $display("mod %0d point %0d,%0d: %b", m, s[st].re, s[st].im, bits[st]);
          end
        end
        #1;
      end
    // Gray property along one dimension of 64-QAM
    mods = {NT{MOD_QAM64}};
    for (int x = -7; x < 7; x += 2) begin
      logic [5:0] a, b2;
      s[0].re = lvl_t'(x);     s[0].im = 4'sd1; #1; a  = bits[0];
      s[0].re = lvl_t'(x + 2); #1; b2 = bits[0];
      checks++;
      if ($countones(a ^ b2) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
