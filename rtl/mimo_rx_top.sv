// MIMO processing of the receiver: preprocessing memories, rotation of the
// received vectors and QR-based detection (SIC or sphere decoding).
//
// The QR decomposition results of the two channels (even and odd tones) are
// normalized for the streams' modulations (const_norm) and written into the
// Config (permutation), Q and R memories in the preprocessing clock domain
// pclk. In the detection domain clk, every buffered received vector y reads
// Q~^H of its subcarrier, is rotated to y^ = Q~^H y (qhy_mult) and handed to
// the detector chosen by det_sel: the SIC detector (det_sel = 0), which reads
// R~ and the permutation over read channel 0, or the sphere decoder subsystem
// (det_sel = 1), which owns both read channels. The structure follows the
// document's system overview; the interfaces and the mode switch are this
// design's. det_sel must only change while the detectors are idle.
//
// Interface: sq_* are the two QR result channels (one subcarrier per valid).
// y_valid/y_ready accept one received vector; in SIC mode one vector every NT
// cycles, in sphere mode as long as the sphere decoder FIFO has room.
// Results leave on det_valid with stream-ordered symbols and Gray bits.
// Timing: QR results are readable 7 pclk cycles after sq_valid (6 for the
// normalization, 1 for the write); a vector reaches the detector 2 cycles
// after it was accepted.
// Lint note: the Q memory's second read channel is not used (only the
// rotation reads Q), so its data output is unconnected logic.
module mimo_rx_top
  import mimo_pkg::*;
#(
  parameter int unsigned SD_MAX_CYCLES = 32
) (
  input  logic                 pclk,
  input  logic                 clk,
  input  logic                 rst_n,
  input  modv_t                mods,
  input  logic                 det_sel,
  // QR decomposition results, [0] even tones, [1] odd tones
  input  logic [1:0]           sq_valid,
  input  logic [1:0][SCW-1:0]  sq_sc,
  input  cmat_t [1:0]          sq_qh,
  input  cmat_t [1:0]          sq_r,
  input  pvec_t [1:0]          sq_perm,
  output logic [1:0]           sq_written,
  // received vectors
  input  logic                 y_valid,
  output logic                 y_ready,
  input  logic [SCW-1:0]       y_sc,
  input  cvec_t                y_vec,
  // detected vectors
  output logic                 det_valid,
  output logic [SCW-1:0]       det_sc,
  output svec_t                det_sym,
  output vbits_t               det_bits,
  output logic [NT-1:0][2:0]   det_nbits,
  output logic                 det_aborted,
  output logic [15:0]          sd_n_aborted,
  output logic [15:0]          sd_n_core0,
  output logic [15:0]          sd_n_core1
);

  localparam int unsigned QW = $bits(cmat_t);
  localparam int unsigned PW = $bits(pvec_t);

  // ---- normalization and memory writes (pclk) ----------------------------------
  logic [1:0]           n_valid;
  logic [1:0][SCW-1:0]  n_sc;
  cmat_t [1:0]          n_qh, n_r;
  pvec_t [1:0]          n_perm;

  for (genvar k = 0; k < 2; k++) begin : g_norm
    const_norm u_norm (
      .clk       (pclk),
      .rst_n     (rst_n),
      .in_valid  (sq_valid[k]),
      .in_sc     (sq_sc[k]),
      .in_qh     (sq_qh[k]),
      .in_r      (sq_r[k]),
      .in_perm   (sq_perm[k]),
      .mods      (mods),
      .out_valid (n_valid[k]),
      .out_sc    (n_sc[k]),
      .out_qh    (n_qh[k]),
      .out_r     (n_r[k]),
      .out_perm  (n_perm[k])
    );
  end

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) sq_written <= '0;
    else        sq_written <= n_valid;
  end

  logic [1:0]           q_rd_en, r_rd_en;
  logic [1:0][SCW-1:0]  q_rd_addr, r_rd_addr;
  logic [1:0][QW-1:0]   q_rd_data, r_rd_data;
  logic [1:0][PW-1:0]   p_rd_data;

  prep_mem #(.WIDTH(QW)) u_qmem (
    .wclk (pclk), .wr_en (n_valid), .wr_addr (n_sc), .wr_data (n_qh),
    .rclk (clk),  .rd_en (q_rd_en), .rd_addr (q_rd_addr), .rd_data (q_rd_data)
  );
  prep_mem #(.WIDTH(QW)) u_rmem (
    .wclk (pclk), .wr_en (n_valid), .wr_addr (n_sc), .wr_data (n_r),
    .rclk (clk),  .rd_en (r_rd_en), .rd_addr (r_rd_addr), .rd_data (r_rd_data)
  );
  prep_mem #(.WIDTH(PW)) u_cfgmem (
    .wclk (pclk), .wr_en (n_valid), .wr_addr (n_sc), .wr_data (n_perm),
    .rclk (clk),  .rd_en (r_rd_en), .rd_addr (r_rd_addr), .rd_data (p_rd_data)
  );

  // ---- front end: read Q~^H, rotate (clk) ----------------------------------------
  logic                 acc, v1, v2;
  logic [SCW-1:0]       sc1, sc2;
  cvec_t                y1, yh;
  logic [$clog2(NT):0]  cool;
  logic [$clog2(NSC):0] sd_level;
  logic                 sd_in_ready;

  // SIC: one vector per NT cycles. Sphere: room for the two vectors in flight.
  assign y_ready = det_sel ? (sd_in_ready && (int'(sd_level) + 3 <= int'(NSC)))
                           : (cool == '0);
  assign acc     = y_valid && y_ready;

  assign q_rd_en[0]   = acc;
  assign q_rd_addr[0] = y_sc;
  assign q_rd_en[1]   = 1'b0;
  assign q_rd_addr[1] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      cool <= '0;
    end else begin
      v1 <= acc;
      if (acc && !det_sel)  cool <= ($clog2(NT)+1)'(NT - 1);
      else if (cool != '0)  cool <= cool - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    sc1 <= y_sc;
    y1  <= y_vec;
  end

  qhy_mult u_qhy (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .in_sc     (sc1),
    .in_y      (y1),
    .in_qh     (q_rd_data[0]),
    .out_valid (v2),
    .out_sc    (sc2),
    .out_y     (yh)
  );

  // ---- SIC detector ----------------------------------------------------------------
  logic [1:0]           sd_rd_en;
  logic [1:0][SCW-1:0]  sd_rd_addr;
  cmat_t                r_hold;
  pvec_t                p_hold;
  logic                 sic_ready_unused;
  logic                 sic_v;
  logic [SCW-1:0]       sic_sc;
  svec_t                sic_sym;
  vbits_t               sic_bits;
  logic [NT-1:0][2:0]   sic_nbits;

  always_comb begin
    if (det_sel) begin
      r_rd_en   = sd_rd_en;
      r_rd_addr = sd_rd_addr;
    end else begin
      r_rd_en   = {1'b0, acc};
      r_rd_addr = {SCW'(0), y_sc};
    end
  end

  // R~ and the permutation arrive with y1; hold them one cycle to meet y^
  always_ff @(posedge clk) begin
    r_hold <= r_rd_data[0];
    p_hold <= p_rd_data[0];
  end

  sic_detector u_sic (
    .clk       (clk),
    .rst_n     (rst_n),
    .mods      (mods),
    .in_valid  (v2 && !det_sel),
    .in_ready  (sic_ready_unused),
    .in_sc     (sc2),
    .in_y      (yh),
    .in_r      (r_hold),
    .in_perm   (p_hold),
    .out_valid (sic_v),
    .out_sc    (sic_sc),
    .out_sym   (sic_sym),
    .out_bits  (sic_bits),
    .out_nbits (sic_nbits)
  );

  // ---- sphere decoder subsystem ------------------------------------------------------
  logic                 sd_v, sd_ab;
  logic [SCW-1:0]       sd_sc;
  svec_t                sd_sym;
  vbits_t               sd_bits;
  logic [NT-1:0][2:0]   sd_nbits;
  logic [15:0]          sd_used [2];

  sd_system #(.MAX_CYCLES(SD_MAX_CYCLES)) u_sd (
    .clk         (clk),
    .rst_n       (rst_n),
    .mods        (mods),
    .in_valid    (v2 && det_sel),
    .in_ready    (sd_in_ready),
    .fifo_level  (sd_level),
    .in_sc       (sc2),
    .in_y        (yh),
    .rd_en       (sd_rd_en),
    .rd_addr     (sd_rd_addr),
    .rd_r        ({cmat_t'(r_rd_data[1]), cmat_t'(r_rd_data[0])}),
    .rd_perm     ({pvec_t'(p_rd_data[1]), pvec_t'(p_rd_data[0])}),
    .out_valid   (sd_v),
    .out_sc      (sd_sc),
    .out_sym     (sd_sym),
    .out_bits    (sd_bits),
    .out_nbits   (sd_nbits),
    .out_aborted (sd_ab),
    .n_aborted   (sd_n_aborted),
    .n_core_used (sd_used)
  );

  assign sd_n_core0 = sd_used[0];
  assign sd_n_core1 = sd_used[1];

  // ---- result select ----------------------------------------------------------------
  always_comb begin
    if (det_sel) begin
      det_valid   = sd_v;
      det_sc      = sd_sc;
      det_sym     = sd_sym;
      det_bits    = sd_bits;
      det_nbits   = sd_nbits;
      det_aborted = sd_ab;
    end else begin
      det_valid   = sic_v;
      det_sc      = sic_sc;
      det_sym     = sic_sym;
      det_bits    = sic_bits;
      det_nbits   = sic_nbits;
      det_aborted = 1'b0;
    end
  end

  // the SIC detector never has to refuse a vector under this schedule
  always_ff @(posedge clk) begin
    if (v2 && !det_sel) assert (sic_ready_unused) else $error("SIC detector overrun");
  end

endmodule
