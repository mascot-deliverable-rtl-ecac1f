// End-to-end testbench of the testbed top level, at the default parameters.
//
// Real-time receiver: 48 random, well-conditioned 4x4 channels are placed in
// a channel estimation memory model whose completed-subcarrier count grows
// slowly (so preprocessing starts early), decomposed by two QR ASIC models,
// normalized and stored. Received vectors y = H s (normalized constellation,
// streams with BPSK, QPSK, 16-QAM and 64-QAM) are then detected once with the
// SIC detector and once with the sphere decoder; every decision must equal
// the transmitted symbol, and the bits the Gray labels. A third pass with
// heavy noise must make the sphere decoder abort searches. Offline testbed:
// a frame written into stream 0's Tx buffer is sent through the FPGA
// loop-back and recorded by the Rx buffer when the RSSI rises; stream 1 runs
// with its upsampling path switched in; the multi-user counter starts the
// streams of the transmit mask after the programmed delay.
// Every mechanism is counted and must occur at least once.
module tb_mimo_testbed_top;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 4, DEPTH = 4096, SW = 10;

  int checks = 0, failures = 0;
  logic pclk = 0, clk = 0, rst_n = 1;
  // reset falls at 1 ns so that the asynchronous resets act before the first clock edge
  initial #1 rst_n = 0;
  always #5 pclk = ~pclk;
  always #6 clk = ~clk;

  modv_t mods;
  logic det_sel;
  logic signed [3:0] prescale_shift;
  logic [15:0] sigma_n, asic_cfg;
  logic frame_start;
  logic [SCW:0] est_count;
  logic [1:0] ce_rd;
  logic [1:0][SCW-1:0] ce_addr;
  cmat_t [1:0] ce_data;
  logic prep_done;
  logic [1:0] ld_req, ld_ack, rt_req, rt_ack, sq_written;
  logic [1:0][31:0] ld_data, rt_data;
  logic y_valid, y_ready;
  logic [SCW-1:0] y_sc;
  cvec_t y_vec;
  logic det_valid, det_aborted;
  logic [SCW-1:0] det_sc;
  svec_t det_sym;
  vbits_t det_bits;
  logic [NT-1:0][2:0] det_nbits;
  logic [15:0] sd_n_aborted, sd_n_core0, sd_n_core1;
  logic sample_en;
  logic [1:0] host_stream;
  logic reg_we;
  logic [1:0] reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic buf_sel, buf_we;
  logic [11:0] buf_addr;
  logic [2*SW-1:0] buf_wdata, buf_rdata;
  logic [NS-1:0][2*SW-1:0] ups_in, ups_out, dns_in, dns_out, dac_data, adc_data;
  logic [NS-1:0][SW-1:0] rssi;
  logic [NS-1:0] tx_active, rx_active, rx_started, tx_stream_mask, rf_enable;
  logic mu_frame_rx, mu_tx_start;
  logic [19:0] mu_delay;

  mimo_testbed_top dut (.*);

  for (genvar k = 0; k < 2; k++) begin : g_asic
    sqrd_asic_model u_asic (
      .clk (pclk), .ld_req (ld_req[k]), .ld_ack (ld_ack[k]), .ld_data (ld_data[k]),
      .rt_req (rt_req[k]), .rt_ack (rt_ack[k]), .rt_data (rt_data[k])
    );
  end

  // simple upsampling-filter stand-in on every stream: adds one to each part
  for (genvar k = 0; k < NS; k++) begin : g_ups
    assign ups_out[k] = {ups_in[k][2*SW-1:SW] + 1'b1, ups_in[k][SW-1:0] + 1'b1};
    assign dns_out[k] = dns_in[k];
    assign adc_data[k] = '0;
  end

  // ---- channel estimation memory model --------------------------------------------
  cmat_t h_mem [NSC];
  always @(posedge pclk)
    for (int k = 0; k < 2; k++) if (ce_rd[k]) ce_data[k] <= h_mem[ce_addr[k]];

  // ---- mechanism counters -----------------------------------------------------------------
  int n_early = 0, n_written = 0, n_sic = 0, n_sd = 0, n_abort = 0, n_loop = 0,
      n_rssi = 0, n_ups = 0, n_mu = 0, n_mask_ok = 0;
  always @(posedge pclk) if (rst_n) begin
    for (int k = 0; k < 2; k++) if (ce_rd[k] && est_count < (SCW+1)'(NSC)) n_early++;
    n_written += int'(sq_written[0]) + int'(sq_written[1]);
  end

  int cyc = 0;
  always @(negedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  svec_t  s_tx [NSC];
  cvec_t  y_clean [NSC];
  int     n_det = 0, n_bad = 0;
  logic   check_exact = 1'b1;

  always @(posedge clk) if (rst_n && det_valid) begin
    n_det++;
    for (int k = 0; k < NT; k++) begin
      checks++;
      if (!sym_ok(mods[k], det_sym[k]) || det_bits[k] !== bits_ref(det_sym[k], mods[k])) failures++;
    end
    if (check_exact) begin
      checks++;
      if (det_sym !== s_tx[det_sc]) begin
        failures++;
        if (n_bad++ < 5) $display("sc %0d detected wrongly (mode %0d)", det_sc, det_sel);
      end
    end
  end

  function automatic real bsc(mod_e m);
    case (m)
      MOD_QAM16: return $sqrt(10.0);
      MOD_QAM64: return $sqrt(42.0);
      default:   return $sqrt(2.0);
    endcase
  endfunction

  task automatic make_frame();
    for (int n = 0; n < NSC; n++) begin
      real sr [NT], si [NT];
      for (int j = 0; j < NT; j++) begin
        s_tx[n][j] = rand_sym(mods[j]);
        if (mods[j] == MOD_BPSK) begin sr[j] = real'(s_tx[n][j].re); si[j] = 0.0; end
        else begin
          sr[j] = real'(s_tx[n][j].re) / bsc(mods[j]);
          si[j] = real'(s_tx[n][j].im) / bsc(mods[j]);
        end
      end
      for (int i = 0; i < NT; i++) begin
        real ar, ai;
        for (int j = 0; j < NT; j++) begin
          h_mem[n][i][j].re = comp_t'(((i == j) ? 3000 : 0) + rand_range(-700, 700));
          h_mem[n][i][j].im = comp_t'(rand_range(-700, 700));
        end
      end
      for (int i = 0; i < NT; i++) begin
        real ar, ai;
        ar = 0.0; ai = 0.0;
        for (int j = 0; j < NT; j++) begin
          ar += real'(h_mem[n][i][j].re) * sr[j] - real'(h_mem[n][i][j].im) * si[j];
          ai += real'(h_mem[n][i][j].re) * si[j] + real'(h_mem[n][i][j].im) * sr[j];
        end
        y_clean[n][i].re = comp_t'(int'(ar));
        y_clean[n][i].im = comp_t'(int'(ai));
      end
    end
  endtask

  task automatic push_vectors(input int noise, output int span);
    int t0, d0;
    d0 = n_det;
    @(negedge clk);
    t0 = cyc;
    for (int n = 0; n < NSC; n++) begin
      y_sc = SCW'(n);
      for (int i = 0; i < NT; i++) begin
        y_vec[i].re = y_clean[n][i].re + comp_t'(rand_range(-noise, noise));
        y_vec[i].im = y_clean[n][i].im + comp_t'(rand_range(-noise, noise));
      end
      y_valid = 1;
      // inputs change at the falling edge; y_ready is stable there
      while (!y_ready) @(negedge clk);
      @(negedge clk);
      y_valid = 0;
    end
    while (n_det - d0 < NSC) @(negedge clk);
    span = cyc - t0;
    repeat (5) @(negedge clk);
  endtask

  task automatic host_reg(input int s, input int a, input int d);
    @(negedge clk);
    host_stream = 2'(s); reg_addr = 2'(a); reg_wdata = 16'(d); reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  initial begin
    int span;
    det_sel = 0; prescale_shift = 0; sigma_n = 16'd100; asic_cfg = 16'h0002;
    frame_start = 0; est_count = '0; y_valid = 0; y_sc = '0; y_vec = '0;
    sample_en = 0; host_stream = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0;
    buf_sel = 0; buf_we = 0; buf_addr = 0; buf_wdata = 0; rssi = '0;
    mu_frame_rx = 0; mu_delay = 20'd50; tx_stream_mask = '0;
    mods[0] = MOD_QAM16; mods[1] = MOD_QPSK; mods[2] = MOD_BPSK; mods[3] = MOD_QAM64;
    make_frame();
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- preprocessing: channel estimates become available gradually ----
    @(negedge pclk);
    frame_start = 1;
    @(negedge pclk);
    frame_start = 0;
    for (int n = 1; n <= NSC; n++) begin
      est_count = (SCW+1)'(n);
      repeat (10) @(negedge pclk);
    end
    while (n_written < NSC) @(negedge pclk);
    repeat (5) @(negedge pclk);
    checks++;
    if (!prep_done) failures++;

    // ---- SIC ----
    det_sel = 0;
    push_vectors(0, span);
    n_sic = n_det;
    $display("SIC: 48 subcarriers in %0d cycles", span);
    checks++;
    if (span > 320) failures++;

    // ---- sphere decoding ----
    det_sel = 1;
    push_vectors(0, span);
    n_sd = n_det - n_sic;
    $display("SD: 48 subcarriers in %0d cycles, cores %0d/%0d", span, sd_n_core0, sd_n_core1);

    // ---- sphere decoding under heavy noise: aborts ----
    check_exact = 0;
    push_vectors(6000, span);
    n_abort = int'(sd_n_aborted);
    $display("SD heavy noise: %0d aborted", n_abort);

    // ---- offline stream 0: FPGA loop-back, RSSI-triggered recording ----
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      host_stream = 0; buf_sel = 0; buf_we = 1; buf_addr = 12'(i);
      buf_wdata = {10'(i + 1), 10'(3 * i + 5)};
    end
    @(negedge clk); buf_we = 0;
    host_reg(0, 2, 32);                  // length
    host_reg(0, 1, 100);                 // RSSI threshold
    host_reg(0, 0, 32'h17);              // loop-back, both bypasses, arm
    host_reg(0, 0, 32'h0f);              // transmit
    rssi[0] = 10'd300;
    fork
      forever begin @(negedge clk); sample_en = ~sample_en; end
    join_none
    while (!rx_started[0]) @(negedge clk);
    n_rssi++;
    while (rx_active[0] || tx_active[0]) @(negedge clk);
    begin
      int d;
      @(negedge clk);
      host_stream = 0; buf_sel = 1; buf_addr = 0;
      @(negedge clk); @(negedge clk);
      d = int'(buf_rdata[SW-1:0] - 10'd5) / 3;
      $display("loop-back delay %0d samples", d);
      checks++;
      if (d < 0 || d > 10) failures++;
      for (int i = 0; i < 32; i++) begin
        logic [2*SW-1:0] e;
        buf_addr = 12'(i);
        @(negedge clk); @(negedge clk);
        e = (i + d < 32) ? {10'(i + d + 1), 10'(3 * (i + d) + 5)} : '0;
        checks++;
        if (buf_rdata !== e) begin
          failures++;
          if (failures < 10) $display("rx[%0d] = %h, expected %h", i, buf_rdata, e);
        end else n_loop++;
      end
    end

    // ---- stream 1 with the upsampling path switched in, MU start ----
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      host_stream = 1; buf_sel = 0; buf_we = 1; buf_addr = 12'(i);
      buf_wdata = {10'(i), 10'(i)};
    end
    @(negedge clk); buf_we = 0;
    host_reg(1, 2, 8);
    host_reg(1, 0, 32'h0);               // no bypass, no loop-back
    tx_stream_mask = 4'b0010;
    @(negedge clk);
    mu_frame_rx = 1;
    begin
      int t0;
      t0 = cyc;
      @(negedge clk);
      mu_frame_rx = 0;
      while (!mu_tx_start) @(negedge clk);
      checks++;
      // frame_rx is sampled one edge after t0
      if (cyc - t0 != 51) begin failures++; $display("MU start after %0d", cyc - t0); end
      n_mu++;
    end
    @(negedge clk);
    checks++;
    if (tx_active !== 4'b0010 || rf_enable !== 4'b0010) failures++; else n_mask_ok++;
    while (tx_active[1]) begin
      @(negedge clk);
      if (ups_in[1] != '0) begin
        checks++;
        if (dac_data[1] !== {ups_in[1][19:10] + 10'd1, ups_in[1][9:0] + 10'd1}) failures++;
        else n_ups++;
      end
    end

    $display("mechanisms: early-start reads %0d, QR results %0d, SIC %0d, SD %0d, aborts %0d, cores %0d/%0d,",
             n_early, n_written, n_sic, n_sd, n_abort, sd_n_core0, sd_n_core1);
    $display("            RSSI triggers %0d, loop-back samples %0d, upsampling path %0d, MU starts %0d, mask %0d",
             n_rssi, n_loop, n_ups, n_mu, n_mask_ok);
    checks += 12;
    if (n_early == 0) failures++;
    if (n_written != NSC) failures++;
    if (n_sic != NSC) failures++;
    if (n_sd != NSC) failures++;
    if (n_abort == 0) failures++;
    if (sd_n_core0 == 0) failures++;
    if (sd_n_core1 == 0) failures++;
    if (n_rssi == 0) failures++;
    if (n_loop == 0) failures++;
    if (n_ups == 0) failures++;
    if (n_mu == 0) failures++;
    if (n_mask_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
