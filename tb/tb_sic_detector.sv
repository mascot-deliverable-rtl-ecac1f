// Testbench of the SIC detector: 48 vectors (one OFDM symbol) with random
// channels, mixed modulations and permutations, fed as fast as the detector
// accepts them. Decisions must equal an exhaustive-search SIC reference put
// back in stream order, bits must equal the Gray tables, the result must be
// registered NT + 1 edges after the accepting edge (sampled NT + 2 edges later) and the 48 vectors must fit into the 320 cycles of one OFDM
// symbol at 80 MHz.
module tb_sic_detector;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modv_t mods;
  logic in_valid, in_ready;
  logic [SCW-1:0] in_sc;
  cvec_t in_y;
  cmat_t in_r;
  pvec_t in_perm;
  logic out_valid;
  logic [SCW-1:0] out_sc;
  svec_t out_sym;
  vbits_t out_bits;
  logic [NT-1:0][2:0] out_nbits;

  sic_detector dut (.*);

  svec_t exp_sym [NSC];
  int    t_in    [NSC];
  int    cyc = 0;
  always @(negedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0, first_in = -1, last_out = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_sym !== exp_sym[out_sc]) begin
      failures++;
      if (failures < 10) $display("sc %0d symbol mismatch", out_sc);
    end
    for (int k = 0; k < NT; k++) begin
      checks++;
      if (out_bits[k] !== bits_ref(out_sym[k], mods[k])) failures++;
    end
    checks++;
    if (cyc - t_in[out_sc] != NT + 2) begin
      failures++;
      $display("sc %0d latency %0d", out_sc, cyc - t_in[out_sc]);
    end
    n_out++;
    last_out = cyc;
  end

  initial begin
    in_valid = 0;
    for (int k = 0; k < NT; k++) mods[k] = rand_mod();
    mods[0] = MOD_BPSK; mods[1] = MOD_QAM64;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NSC; n++) begin
      cmat_t r;
      svec_t sv, ref_l;
      mod_e lm[NT];
      int p[NT];
      for (int k = 0; k < NT; k++) p[k] = k;
      p.shuffle();
      for (int k = 0; k < NT; k++) begin
        in_perm[k] = 2'(p[k]);
        lm[k] = mods[p[k]];
        sv[k] = rand_sym(lm[k]);
      end
      r = rand_r(300, 1500, 500);
      in_r = r;
      in_y = make_y(r, sv, (n % 2) ? 900 : 100);
      in_sc = SCW'(n);
      ref_l = sic_ref(in_y, r, lm);
      for (int k = 0; k < NT; k++) exp_sym[n][p[k]] = ref_l[k];
      in_valid = 1;
      while (!in_ready) @(negedge clk);   // in_ready is stable at the falling edge
      @(posedge clk);
      t_in[n] = cyc;
      if (first_in < 0) first_in = cyc;
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != NSC) failures++;
    checks++;
    $display("48 vectors in %0d cycles", last_out - first_in);
    if (last_out - first_in > 320) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
