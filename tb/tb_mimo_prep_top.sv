// Self-checking testbench of mimo_prep_top (preprocessing with two QR ASICs).
//
// Two behavioural ASIC models are attached to the two channels, and a channel
// estimation memory with random well-conditioned matrices is read through the
// memory ports while est_count rises gradually. For every result the
// testbench checks, independently of the ASIC model, that Q^H times the
// prescaled channel matrix with its columns permuted by perm equals R (upper
// triangular, real non-negative diagonal) within a small tolerance, that the
// subcarrier parity matches the channel, and that all 48 subcarriers of each
// of two frames arrive exactly once and done is raised.
module tb_mimo_prep_top;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0, frame_start = 0;
  logic [SCW:0] est_count = '0;
  logic signed [3:0] prescale_shift = 4'sd0;
  logic [15:0] sigma_n = 16'd100, asic_cfg = 16'h0001;
  logic [1:0] ce_rd;
  logic [1:0][SCW-1:0] ce_addr;
  cmat_t [1:0] ce_data;
  logic [1:0] ld_req, ld_ack, rt_req, rt_ack;
  logic [1:0][31:0] ld_data, rt_data;
  logic [1:0] sq_valid;
  logic [1:0][SCW-1:0] sq_sc;
  cmat_t [1:0] sq_qh, sq_r;
  pvec_t [1:0] sq_perm;
  logic done;
  cmat_t mem [NSC];
  int checks = 0, failures = 0;
  logic [NSC-1:0] seen;

  mimo_prep_top dut (.*);

  for (genvar k = 0; k < 2; k++) begin : g_asic
    sqrd_asic_model #(.LAT(20)) u_asic (
      .clk (clk), .ld_req (ld_req[k]), .ld_ack (ld_ack[k]), .ld_data (ld_data[k]),
      .rt_req (rt_req[k]), .rt_ack (rt_ack[k]), .rt_data (rt_data[k]));
    always @(posedge clk) if (ce_rd[k]) ce_data[k] <= mem[ce_addr[k]];
  end

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fx(comp_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) if (sq_valid[k]) begin
      int sc;
      real err;
      sc = int'(sq_sc[k]);
      checks++;
      if (sc % 2 != k || seen[sc]) begin
        failures++;
        $display("channel %0d delivered sc %0d (seen before: %b)", k, sc, seen[sc]);
      end
      seen[sc] = 1'b1;
      err = 0.0;
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          real ar, ai, d;
          ar = 0.0; ai = 0.0;
          // (Q^H H P)_ij = sum_m QH_im H_m,perm[j]
          for (int m = 0; m < NT; m++) begin
            real qr, qi, hr, hi;
            qr = fx(sq_qh[k][i][m].re); qi = fx(sq_qh[k][i][m].im);
            hr = fx(mem[sc][m][sq_perm[k][j]].re); hi = fx(mem[sc][m][sq_perm[k][j]].im);
            ar += qr * hr - qi * hi;
            ai += qr * hi + qi * hr;
          end
          d = (ar - fx(sq_r[k][i][j].re)) ** 2 + (ai - fx(sq_r[k][i][j].im)) ** 2;
          if (d > err) err = d;
        end
      checks++;
      if (err > 1e-5) begin
        failures++;
        if (failures < 10) $display("sc %0d: Q^H H P differs from R (max squared error %g)", sc, err);
      end
      for (int i = 0; i < NT; i++) begin
        checks++;
        if (sq_r[k][i][i].im != '0 || sq_r[k][i][i].re < 0) begin
          failures++;
          $display("sc %0d: diagonal R(%0d) not real non-negative", sc, i);
        end
      end
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int s = 0; s < NSC; s++)
        for (int i = 0; i < NT; i++)
          for (int j = 0; j < NT; j++) begin
            // entries of about +-1 plus a strong diagonal keep the matrix well conditioned
            mem[s][i][j].re = comp_t'(int'($urandom_range(0, 4096)) - 2048 + ((i == j) ? 3000 : 0));
            mem[s][i][j].im = comp_t'(int'($urandom_range(0, 4096)) - 2048);
          end
      seen = '0;
      est_count = '0;
      frame_start = 1; @(negedge clk); frame_start = 0;
      t0 = $time;
      for (int c = 0; c < 20000 && seen != '1; c++) begin
        if (c % 4 == 0 && est_count < (SCW+1)'(NSC)) est_count = est_count + 1'b1;
        @(negedge clk);
      end
      t1 = $time;
      repeat (5) @(negedge clk);
      checks++;
      if (seen != '1 || !done) begin
        failures++;
        $display("frame %0d: subcarriers seen %h, done %b", f, seen, done);
      end
      $display("frame %0d: 48 decompositions in %0d cycles", f, (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
