// Testbench of the Q^H y rotation: random matrices and vectors, back to back;
// each output is compared with the product computed in integer arithmetic,
// rounded to FRAC fraction bits, and must appear one cycle after its input.
module tb_qhy_mult;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [SCW-1:0] in_sc, out_sc;
  cvec_t in_y, out_y;
  cmat_t in_qh;

  qhy_mult dut (.*);

  cvec_t exp_y [NSC];
  int t_in [NSC];
  int cyc = 0, n_out = 0;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (in_valid) t_in[in_sc] <= cyc;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_y !== exp_y[out_sc] || cyc - t_in[out_sc] != 1) begin
      failures++;
      if (failures < 5) $display("sc %0d mismatch", out_sc);
    end
    n_out++;
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NSC; n++) begin
      for (int i = 0; i < NT; i++) begin
        in_y[i].re = comp_t'(rand_range(-8000, 8000));
        in_y[i].im = comp_t'(rand_range(-8000, 8000));
        for (int j = 0; j < NT; j++) begin
          in_qh[i][j].re = comp_t'(rand_range(-2896, 2896));
          in_qh[i][j].im = comp_t'(rand_range(-2896, 2896));
        end
      end
      for (int i = 0; i < NT; i++) begin
        longint ar, ai;
        ar = 0; ai = 0;
        for (int j = 0; j < NT; j++) begin
          ar += longint'(in_qh[i][j].re) * in_y[j].re - longint'(in_qh[i][j].im) * in_y[j].im;
          ai += longint'(in_qh[i][j].re) * in_y[j].im + longint'(in_qh[i][j].im) * in_y[j].re;
        end
        ar = (ar + 2048) >>> 12;
        ai = (ai + 2048) >>> 12;
        if (ar > 32767) ar = 32767;
        if (ar < -32768) ar = -32768;
        if (ai > 32767) ai = 32767;
        if (ai < -32768) ai = -32768;
        exp_y[n][i].re = comp_t'(ar);
        exp_y[n][i].im = comp_t'(ai);
      end
      in_sc = SCW'(n);
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != NSC) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
