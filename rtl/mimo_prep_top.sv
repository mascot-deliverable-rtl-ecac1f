// MIMO preprocessing top: FPGA side of the QR decomposition.
//
// Two identical channels run side by side, channel 0 for the even and
// channel 1 for the odd subcarriers, each with its own QR decomposition ASIC.
// A Channel Estimation Memory Read unit fetches and prescales the estimated
// channel matrices as soon as they are available, an SQRD Load unit sends
// each matrix with the noise level and the ASIC configuration word to the
// ASIC, and an SQRD Retrieve unit collects Q^H, R and the column permutation
// and labels them with their subcarrier. The results go on to the
// normalization and the preprocessing memories (see mimo_rx_top). This
// arrangement follows the document's block diagram of the preprocessing unit;
// the ASICs themselves are outside (their ports are brought out), and the
// built-in self-test of the FPGA-ASIC link is not part of this RTL.
//
// Interface: frame_start (one cycle) starts a frame; est_count is the number
// of subcarriers the channel estimation has completed; each channel has its
// own port into the channel estimation memory (one cycle read latency) and its
// own ASIC link pair. Results leave on sq_valid, one subcarrier per cycle and
// channel at most; there is no back-pressure from the normalization.
module mimo_prep_top
  import mimo_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  input  logic [SCW:0]         est_count,
  input  logic signed [3:0]    prescale_shift,
  input  logic [15:0]          sigma_n,
  input  logic [15:0]          asic_cfg,
  // channel estimation memory ports
  output logic [1:0]           ce_rd,
  output logic [1:0][SCW-1:0]  ce_addr,
  input  cmat_t [1:0]          ce_data,
  // ASIC links
  output logic [1:0]           ld_req,
  input  logic [1:0]           ld_ack,
  output logic [1:0][31:0]     ld_data,
  input  logic [1:0]           rt_req,
  output logic [1:0]           rt_ack,
  input  logic [1:0][31:0]     rt_data,
  // QR results
  output logic [1:0]           sq_valid,
  output logic [1:0][SCW-1:0]  sq_sc,
  output cmat_t [1:0]          sq_qh,
  output cmat_t [1:0]          sq_r,
  output pvec_t [1:0]          sq_perm,
  output logic                 done
);

  logic [1:0] ch_done;

  for (genvar k = 0; k < 2; k++) begin : g_ch
    logic           h_valid, h_ready, tag_valid, tag_full;
    logic [SCW-1:0] h_sc, tag_sc;
    cmat_t          h_mat;

    chest_mem_read #(.PARITY(k[0])) u_read (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (frame_start),
      .est_count (est_count),
      .shift     (prescale_shift),
      .mem_rd    (ce_rd[k]),
      .mem_addr  (ce_addr[k]),
      .mem_data  (ce_data[k]),
      .h_valid   (h_valid),
      .h_ready   (h_ready),
      .h_sc      (h_sc),
      .h_mat     (h_mat),
      .done      (ch_done[k])
    );

    sqrd_load u_load (
      .clk       (clk),
      .rst_n     (rst_n),
      .job_valid (h_valid),
      .job_ready (h_ready),
      .job_sc    (h_sc),
      .job_h     (h_mat),
      .job_sigma (sigma_n),
      .job_cfg   (asic_cfg),
      .tag_full  (tag_full),
      .tag_valid (tag_valid),
      .tag_sc    (tag_sc),
      .asic_req  (ld_req[k]),
      .asic_ack  (ld_ack[k]),
      .asic_data (ld_data[k])
    );

    sqrd_retrieve u_retrieve (
      .clk       (clk),
      .rst_n     (rst_n),
      .tag_valid (tag_valid),
      .tag_sc    (tag_sc),
      .tag_full  (tag_full),
      .asic_req  (rt_req[k]),
      .asic_ack  (rt_ack[k]),
      .asic_data (rt_data[k]),
      .res_valid (sq_valid[k]),
      .res_ready (1'b1),
      .res_sc    (sq_sc[k]),
      .res_qh    (sq_qh[k]),
      .res_r     (sq_r[k]),
      .res_perm  (sq_perm[k])
    );
  end

  assign done = &ch_done;

endmodule
