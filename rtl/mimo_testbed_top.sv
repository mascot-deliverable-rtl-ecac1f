// Top level of the MIMO testbed FPGA logic.
//
// Two designs stand side by side:
//  * The real-time receiver's QR-based MIMO processing: the preprocessing top
//    (channel estimation memory readers, ASIC load and retrieve units for two
//    QR decomposition ASICs, one for the even and one for the odd tones) feeds
//    mimo_rx_top (normalization, Config/Q/R memories, Q^H y, SIC detector and
//    sphere decoder subsystem). The channel estimation memory, the two ASICs
//    and the received-vector buffer are outside; their connections are ports.
//  * The offline testbed's four streams (Tx/Rx buffers, frame start detection,
//    loop-back and bypass paths), reached from the host over one register and
//    buffer port with a stream select, plus the multi-user transmit
//    synchronization counter, whose expiry starts transmission on the streams
//    enabled in tx_stream_mask (also the RF chain enables).
// Clocks: pclk for the preprocessing domain, clk for detection and for the
// offline streams.
// The partition into preprocessing, detection, offline streams and
// synchronization follows the document's block diagrams; grouping them in one
// top with a shared host port and stream select is this design's choice.
// Lint notes: the counter's "counting" status is left open, and rf_enable is
// the stream mask itself (an output driven straight from an input).
module mimo_testbed_top
  import mimo_pkg::*;
#(
  parameter int unsigned NSTREAM   = 4,
  parameter int unsigned BUF_DEPTH = 4096,
  parameter int unsigned SW        = 10
) (
  input  logic                 pclk,
  input  logic                 clk,
  input  logic                 rst_n,
  // ---- real-time receiver: configuration ----
  input  modv_t                mods,
  input  logic                 det_sel,
  input  logic signed [3:0]    prescale_shift,
  input  logic [15:0]          sigma_n,
  input  logic [15:0]          asic_cfg,
  // channel estimation
  input  logic                 frame_start,
  input  logic [SCW:0]         est_count,
  output logic [1:0]           ce_rd,
  output logic [1:0][SCW-1:0]  ce_addr,
  input  cmat_t [1:0]          ce_data,
  output logic                 prep_done,
  // QR decomposition ASIC links
  output logic [1:0]           ld_req,
  input  logic [1:0]           ld_ack,
  output logic [1:0][31:0]     ld_data,
  input  logic [1:0]           rt_req,
  output logic [1:0]           rt_ack,
  input  logic [1:0][31:0]     rt_data,
  output logic [1:0]           sq_written,
  // received vectors and detection results
  input  logic                 y_valid,
  output logic                 y_ready,
  input  logic [SCW-1:0]       y_sc,
  input  cvec_t                y_vec,
  output logic                 det_valid,
  output logic [SCW-1:0]       det_sc,
  output svec_t                det_sym,
  output vbits_t               det_bits,
  output logic [NT-1:0][2:0]   det_nbits,
  output logic                 det_aborted,
  output logic [15:0]          sd_n_aborted,
  output logic [15:0]          sd_n_core0,
  output logic [15:0]          sd_n_core1,
  // ---- offline streams ----
  input  logic                 sample_en,
  input  logic [$clog2(NSTREAM)-1:0] host_stream,
  input  logic                 reg_we,
  input  logic [1:0]           reg_addr,
  input  logic [15:0]          reg_wdata,
  output logic [15:0]          reg_rdata,
  input  logic                 buf_sel,
  input  logic                 buf_we,
  input  logic [$clog2(BUF_DEPTH)-1:0] buf_addr,
  input  logic [2*SW-1:0]      buf_wdata,
  output logic [2*SW-1:0]      buf_rdata,
  output logic [NSTREAM-1:0][2*SW-1:0] ups_in,
  input  logic [NSTREAM-1:0][2*SW-1:0] ups_out,
  output logic [NSTREAM-1:0][2*SW-1:0] dns_in,
  input  logic [NSTREAM-1:0][2*SW-1:0] dns_out,
  output logic [NSTREAM-1:0][2*SW-1:0] dac_data,
  input  logic [NSTREAM-1:0][2*SW-1:0] adc_data,
  input  logic [NSTREAM-1:0][SW-1:0]   rssi,
  output logic [NSTREAM-1:0]   tx_active,
  output logic [NSTREAM-1:0]   rx_active,
  output logic [NSTREAM-1:0]   rx_started,
  // ---- multi-user transmit synchronization ----
  input  logic                 mu_frame_rx,
  input  logic [19:0]          mu_delay,
  input  logic [NSTREAM-1:0]   tx_stream_mask,
  output logic [NSTREAM-1:0]   rf_enable,
  output logic                 mu_tx_start
);

  // ---- real-time receiver ----------------------------------------------------------
  logic [1:0]          sq_valid;
  logic [1:0][SCW-1:0] sq_sc;
  cmat_t [1:0]         sq_qh, sq_r;
  pvec_t [1:0]         sq_perm;

  mimo_prep_top u_prep (
    .clk            (pclk),
    .rst_n          (rst_n),
    .frame_start    (frame_start),
    .est_count      (est_count),
    .prescale_shift (prescale_shift),
    .sigma_n        (sigma_n),
    .asic_cfg       (asic_cfg),
    .ce_rd          (ce_rd),
    .ce_addr        (ce_addr),
    .ce_data        (ce_data),
    .ld_req         (ld_req),
    .ld_ack         (ld_ack),
    .ld_data        (ld_data),
    .rt_req         (rt_req),
    .rt_ack         (rt_ack),
    .rt_data        (rt_data),
    .sq_valid       (sq_valid),
    .sq_sc          (sq_sc),
    .sq_qh          (sq_qh),
    .sq_r           (sq_r),
    .sq_perm        (sq_perm),
    .done           (prep_done)
  );

  mimo_rx_top u_rx (
    .pclk         (pclk),
    .clk          (clk),
    .rst_n        (rst_n),
    .mods         (mods),
    .det_sel      (det_sel),
    .sq_valid     (sq_valid),
    .sq_sc        (sq_sc),
    .sq_qh        (sq_qh),
    .sq_r         (sq_r),
    .sq_perm      (sq_perm),
    .sq_written   (sq_written),
    .y_valid      (y_valid),
    .y_ready      (y_ready),
    .y_sc         (y_sc),
    .y_vec        (y_vec),
    .det_valid    (det_valid),
    .det_sc       (det_sc),
    .det_sym      (det_sym),
    .det_bits     (det_bits),
    .det_nbits    (det_nbits),
    .det_aborted  (det_aborted),
    .sd_n_aborted (sd_n_aborted),
    .sd_n_core0   (sd_n_core0),
    .sd_n_core1   (sd_n_core1)
  );

  // ---- multi-user transmit synchronization ------------------------------------------
  tx_sync_counter #(.CW(20)) u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .frame_rx (mu_frame_rx),
    .delay    (mu_delay),
    .tx_start (mu_tx_start),
    .counting ()
  );

  assign rf_enable = tx_stream_mask;

  // ---- offline streams ------------------------------------------------------------------
  logic [NSTREAM-1:0][15:0]     s_reg_rdata;
  logic [NSTREAM-1:0][2*SW-1:0] s_buf_rdata;

  for (genvar k = 0; k < NSTREAM; k++) begin : g_stream
    offline_stream #(.DEPTH(BUF_DEPTH), .SW(SW)) u_stream (
      .clk          (clk),
      .rst_n        (rst_n),
      .sample_en    (sample_en),
      .reg_we       (reg_we && host_stream == k),
      .reg_addr     (reg_addr),
      .reg_wdata    (reg_wdata),
      .reg_rdata    (s_reg_rdata[k]),
      .buf_sel      (buf_sel),
      .buf_we       (buf_we && host_stream == k),
      .buf_addr     (buf_addr),
      .buf_wdata    (buf_wdata),
      .buf_rdata    (s_buf_rdata[k]),
      .ext_tx_start (mu_tx_start),
      .tx_en        (tx_stream_mask[k]),
      .ups_in       (ups_in[k]),
      .ups_out      (ups_out[k]),
      .dns_in       (dns_in[k]),
      .dns_out      (dns_out[k]),
      .dac_data     (dac_data[k]),
      .adc_data     (adc_data[k]),
      .rssi         (rssi[k]),
      .tx_active    (tx_active[k]),
      .rx_active    (rx_active[k]),
      .rx_started   (rx_started[k])
    );
  end

  logic [$clog2(NSTREAM)-1:0] host_stream_q;
  always_ff @(posedge clk) host_stream_q <= host_stream;

  assign reg_rdata = s_reg_rdata[host_stream];
  assign buf_rdata = s_buf_rdata[host_stream_q];

endmodule
