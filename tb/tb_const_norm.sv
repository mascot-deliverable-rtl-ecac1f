// Testbench of the constellation-point normalization: random Q^H, R,
// permutations and stream modulations; each output element is compared with
// C_ii Q^H_ij and C_ii / (C_jj B_jj) R_ij computed in floating point
// (C_ii = exp(j pi/4) for BPSK layers, 1 otherwise; B = sqrt(2), sqrt(2),
// sqrt(10), sqrt(42)), within 2 LSB. Back-to-back inputs check that the unit
// is fully pipelined with a latency of 6 cycles.
module tb_const_norm;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [SCW-1:0] in_sc, out_sc;
  cmat_t in_qh, in_r, out_qh, out_r;
  pvec_t in_perm, out_perm;
  modv_t mods;

  const_norm dut (.*);

  localparam int N = 40;
  cmat_t q_s [N], r_s [N];
  pvec_t p_s [N];
  int t_in [N];
  int cyc = 0, n_out = 0;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (in_valid) t_in[in_sc] <= cyc;

  function automatic real bsc(mod_e m);
    case (m)
      MOD_QAM16: return $sqrt(10.0);
      MOD_QAM64: return $sqrt(42.0);
      default:   return $sqrt(2.0);
    endcase
  endfunction

  // complex multiply of (a + jb) by exp(j*phi)
  task automatic rot(input real a, input real b, input real phi, output real o_re, output real o_im);
    o_re = a * $cos(phi) - b * $sin(phi);
    o_im = a * $sin(phi) + b * $cos(phi);
  endtask

  function automatic bit near(comp_t got, real expv);
    real e;
    if (expv > 32767.0) expv = 32767.0;
    if (expv < -32768.0) expv = -32768.0;
    e = real'(got) - expv;
    return (e <= 2.0) && (e >= -2.0);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int n;
    real ph_i, ph_j, er, ei;
    mod_e lm[NT];
    n = int'(out_sc);
    checks++;
    if (cyc - t_in[n] != 6) begin failures++; $display("latency %0d", cyc - t_in[n]); end
    checks++;
    if (out_perm !== p_s[n]) failures++;
    for (int k = 0; k < NT; k++) lm[k] = mods[p_s[n][k]];
    for (int i = 0; i < NT; i++) begin
      ph_i = (lm[i] == MOD_BPSK) ? 3.14159265358979 / 4.0 : 0.0;
      for (int j = 0; j < NT; j++) begin
        ph_j = (lm[j] == MOD_BPSK) ? 3.14159265358979 / 4.0 : 0.0;
        rot(real'(q_s[n][i][j].re), real'(q_s[n][i][j].im), ph_i, er, ei);
        checks++;
        if (!near(out_qh[i][j].re, er) || !near(out_qh[i][j].im, ei)) begin
          failures++;
          if (failures < 8) $display("Q %0d %0d: %0d,%0d exp %f,%f", i, j, out_qh[i][j].re, out_qh[i][j].im, er, ei);
        end
        if (j >= i) begin
          rot(real'(r_s[n][i][j].re), real'(r_s[n][i][j].im), ph_i - ph_j, er, ei);
          er = er / bsc(lm[j]);
          ei = (i == j) ? 0.0 : ei / bsc(lm[j]);
          checks++;
          if (!near(out_r[i][j].re, er) || !near(out_r[i][j].im, ei)) begin
            failures++;
            if (failures < 8) $display("R %0d %0d: %0d,%0d exp %f,%f", i, j, out_r[i][j].re, out_r[i][j].im, er, ei);
          end
        end
      end
    end
    n_out++;
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      int p[NT];
      for (int k = 0; k < NT; k++) p[k] = k;
      p.shuffle();
      if (n % 10 == 0) for (int k = 0; k < NT; k++) mods[k] = rand_mod();
      for (int k = 0; k < NT; k++) in_perm[k] = 2'(p[k]);
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          in_qh[i][j].re = comp_t'(rand_range(-4096, 4096));
          in_qh[i][j].im = comp_t'(rand_range(-4096, 4096));
          in_r[i][j].re  = comp_t'((i == j) ? rand_range(0, 12000) : rand_range(-8000, 8000));
          in_r[i][j].im  = comp_t'((i == j) ? 0 : rand_range(-8000, 8000));
        end
      in_sc = SCW'(n);
      q_s[n] = in_qh; r_s[n] = in_r; p_s[n] = in_perm;
      in_valid = (n % 10 != 9) ? 1'b1 : 1'b0;   // a few gaps
      @(negedge clk);
      if (!in_valid) n_out++;                    // gaps produce nothing
      // keep modulations stable while their vectors are in flight
      if (n % 10 == 9) begin in_valid = 0; repeat (8) @(negedge clk); end
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
