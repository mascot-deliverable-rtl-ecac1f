// Testbench of the sphere decoder subsystem. Two OFDM symbols of 48 random
// vectors each (mixed modulations, random permutations, a mix of light and
// heavy noise) are pushed into the input FIFO; R~ and the permutation come
// from a memory model with one cycle of read latency on each channel. Checks:
// results leave in subcarrier order; complete searches return the
// maximum-likelihood distance (exhaustive search); aborted searches return
// valid constellation points; bits follow the Gray tables; both cores work;
// the abort rule fires; and the light-noise symbol finishes within the 320
// cycles (4 us at 80 MHz) available per OFDM symbol.
module tb_sd_system;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modv_t mods;
  logic in_valid, in_ready;
  logic [$clog2(NSC):0] fifo_level;
  logic [SCW-1:0] in_sc;
  cvec_t in_y;
  logic [1:0] rd_en;
  logic [1:0][SCW-1:0] rd_addr;
  cmat_t [1:0] rd_r;
  pvec_t [1:0] rd_perm;
  logic out_valid, out_aborted;
  logic [SCW-1:0] out_sc;
  svec_t out_sym;
  vbits_t out_bits;
  logic [NT-1:0][2:0] out_nbits;
  logic [15:0] n_aborted;
  logic [15:0] n_core_used [2];

  sd_system #(.MAX_CYCLES(32)) dut (.*);

  cmat_t r_mem [NSC];
  pvec_t p_mem [NSC];
  cvec_t y_mem [NSC];
  longint ml [NSC];

  always @(posedge clk)
    for (int k = 0; k < 2; k++)
      if (rd_en[k]) begin
        rd_r[k]    <= r_mem[rd_addr[k]];
        rd_perm[k] <= p_mem[rd_addr[k]];
      end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, expect_sc = 0, n_out = 0, n_ab_seen = 0, t_first = 0, t_last = 0;
  always @(negedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    svec_t lay;
    mod_e lm[NT];
    for (int k = 0; k < NT; k++) begin
      lay[k] = out_sym[p_mem[out_sc][k]];
      lm[k]  = mods[p_mem[out_sc][k]];
    end
    checks++;
    if (int'(out_sc) != expect_sc) failures++;
    expect_sc = (expect_sc + 1) % NSC;
    for (int k = 0; k < NT; k++) begin
      checks += 2;
      if (!sym_ok(mods[k], out_sym[k])) failures++;
      if (out_bits[k] !== bits_ref(out_sym[k], mods[k])) failures++;
    end
    if (out_aborted) n_ab_seen++;
    else begin
      checks++;
      if (full_metric(y_mem[out_sc], r_mem[out_sc], lay) != ml[out_sc]) begin
        failures++;
        if (failures < 5) $display("sc %0d not ML", out_sc);
      end
    end
    n_out++;
    t_last = cyc;
  end

  task automatic ofdm_symbol(input int noise);
    for (int n = 0; n < NSC; n++) begin
      svec_t sv;
      mod_e lm[NT];
      int p[NT];
      for (int k = 0; k < NT; k++) p[k] = k;
      p.shuffle();
      for (int k = 0; k < NT; k++) begin
        p_mem[n][k] = 2'(p[k]);
        lm[k] = mods[p[k]];
        sv[k] = rand_sym(lm[k]);
      end
      r_mem[n] = rand_r(300, 1500, 600);
      y_mem[n] = make_y(r_mem[n], sv, (n % 8 == 0) ? 2 * noise : noise);
      ml[n] = ml_metric(y_mem[n], r_mem[n], lm);
    end
    t_first = cyc;
    for (int n = 0; n < NSC; n++) begin
      in_sc = SCW'(n);
      in_y = y_mem[n];
      in_valid = 1;
      while (!in_ready) @(negedge clk);   // in_ready is stable at the falling edge
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (n_out % NSC != 0 || n_out == 0 || expect_sc != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    in_valid = 0;
    mods[0] = MOD_QAM16; mods[1] = MOD_QPSK; mods[2] = MOD_BPSK; mods[3] = MOD_QAM16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ofdm_symbol(200);
    $display("light noise: 48 subcarriers in %0d cycles", t_last - t_first);
    checks++;
    if (t_last - t_first > 320) failures++;
    ofdm_symbol(1600);
    $display("heavy noise: %0d aborted, cores used %0d / %0d", n_aborted,
             n_core_used[0], n_core_used[1]);
    checks += 4;
    if (n_out != 2 * NSC) failures++;
    if (n_aborted == 0 || int'(n_aborted) != n_ab_seen) failures++;
    if (n_core_used[0] == 0 || n_core_used[1] == 0) failures++;
    if (int'(n_core_used[0]) + int'(n_core_used[1]) != 2 * NSC) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
