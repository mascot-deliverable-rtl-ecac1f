// SQRD Load unit: sends channel matrices to a QR decomposition ASIC.
//
// A job (channel matrix H, noise standard deviation sigma, a configuration
// word and the subcarrier index) is accepted with job_valid/job_ready and sent
// to the ASIC word by word: first the NT x NT entries of H in row order, one
// complex entry (16-bit real part in the upper half, imaginary part in the
// lower half) per 32-bit word, then one word {cfg, sigma}. Every word uses a
// four-phase handshake: the unit drives the word and raises req, waits for
// ack, drops req and waits for ack to fall. The subcarrier index of each
// accepted job is announced on tag_valid/tag_sc so the retrieve unit can label
// the result; no job is accepted while the retrieve unit's tag FIFO is full
// (tag_full), which bounds the number of matrices inside the ASIC. The document names the unit and states that the handshake needs
// a combinational input-to-output path on the receiving side; the word
// format, the four-phase protocol and the 32-bit width (with a 32-bit return
// bus and the handshake lines this matches the 68 I/O signals per ASIC) are
// this design's assumptions.
//
// Timing: with an ASIC that acknowledges combinationally, one word takes two
// cycles, so a job occupies the link for 2 * (NT*NT + 1) = 34 cycles.
module sqrd_load
  import mimo_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           job_valid,
  output logic           job_ready,
  input  logic [SCW-1:0] job_sc,
  input  cmat_t          job_h,
  input  logic [15:0]    job_sigma,
  input  logic [15:0]    job_cfg,
  input  logic           tag_full,
  output logic           tag_valid,
  output logic [SCW-1:0] tag_sc,
  // ASIC input link
  output logic           asic_req,
  input  logic           asic_ack,
  output logic [31:0]    asic_data
);

  localparam int unsigned NW = NT * NT + 1;
  localparam int unsigned CW = $clog2(NW + 1);

  typedef enum logic [1:0] {L_IDLE, L_REQ, L_REL} lst_e;
  lst_e            st;
  logic [CW-1:0]   widx;
  cmat_t           h_q;
  logic [31:0]     last_w;
  logic [15:0]     sigma_q, job_cfg_q;

  assign job_ready = (st == L_IDLE) && !tag_full;
  assign tag_valid = job_valid && job_ready;
  assign tag_sc    = job_sc;
  assign last_w    = {job_cfg_q, sigma_q};


  always_comb begin
    int r, c;
    r = int'(widx) / NT;
    c = int'(widx) % NT;
    if (int'(widx) < NT * NT) asic_data = {h_q[r][c].re, h_q[r][c].im};
    else                      asic_data = last_w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= L_IDLE;
      asic_req <= 1'b0;
      widx     <= '0;
    end else begin
      case (st)
        L_IDLE: if (job_valid && !tag_full) begin
                  st       <= L_REQ;
                  asic_req <= 1'b1;
                  widx     <= '0;
                end
        L_REQ:  if (asic_ack) begin
                  st       <= L_REL;
                  asic_req <= 1'b0;
                end
        default: if (!asic_ack) begin
                  if (widx == CW'(NW - 1)) st <= L_IDLE;
                  else begin
                    widx     <= widx + 1'b1;
                    asic_req <= 1'b1;
                    st       <= L_REQ;
                  end
                end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (job_valid && job_ready) begin
      h_q       <= job_h;
      sigma_q   <= job_sigma;
      job_cfg_q <= job_cfg;
    end
  end

endmodule
