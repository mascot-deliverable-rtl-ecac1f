// Channel Estimation Memory Read unit.
//
// Fetches the estimated channel matrices of one parity of subcarriers (even
// or odd tones, set by PARITY) from the channel estimation memory, prescales
// them (data_prescale) and hands them on, one matrix with its subcarrier index
// per valid/ready transfer. Reading starts as soon as START_AT subcarriers
// (four, as in the document) are completely estimated, and each later read
// waits until its own subcarrier is estimated (sc < est_count), so
// preprocessing overlaps the channel estimation instead of waiting for all 48.
// The early start, the split into even and odd tones and the prescaling
// follow the document; the memory port (one matrix per read, one cycle of
// latency) and the handshakes are this design's.
//
// Interface: start (one cycle) begins a new OFDM frame; est_count is the
// number of subcarriers estimated so far (monotonic within a frame).
// Timing: one read per accepted matrix; a matrix is presented one cycle after
// its read, and the unit is done after the last subcarrier of its parity.
module chest_mem_read
  import mimo_pkg::*;
#(
  parameter bit          PARITY   = 1'b0,
  parameter int unsigned START_AT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [SCW:0]      est_count,
  input  logic signed [3:0] shift,
  // channel estimation memory port
  output logic              mem_rd,
  output logic [SCW-1:0]    mem_addr,
  input  cmat_t             mem_data,
  // matrices towards the QR decomposition
  output logic              h_valid,
  input  logic              h_ready,
  output logic [SCW-1:0]    h_sc,
  output cmat_t             h_mat,
  output logic              done
);

  logic [SCW:0]   next_sc;
  logic           active, pend;
  logic [SCW-1:0] pend_sc;

  // issue a read when the next subcarrier is estimated and the output is free
  assign mem_rd   = active && (est_count >= (SCW+1)'(START_AT)) &&
                    (next_sc < est_count) && (next_sc < (SCW+1)'(NSC)) &&
                    (!pend || h_ready);
  assign mem_addr = next_sc[SCW-1:0];
  assign done     = !active && !pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pend    <= 1'b0;
      next_sc <= '0;
      pend_sc <= '0;
    end else begin
      if (start) begin
        active  <= 1'b1;
        next_sc <= (SCW+1)'(PARITY);
      end else if (mem_rd) begin
        next_sc <= next_sc + (SCW+1)'(2);
        if (next_sc + (SCW+1)'(2) >= (SCW+1)'(NSC)) active <= 1'b0;
      end
      if (mem_rd) begin
        pend    <= 1'b1;
        pend_sc <= next_sc[SCW-1:0];
      end else if (h_ready) begin
        pend <= 1'b0;
      end
    end
  end

  // memory data arrives one cycle after the read and is held by the memory
  // until the next read, which only happens once this matrix is taken
  data_prescale u_scale (
    .h_in  (mem_data),
    .shift (shift),
    .h_out (h_mat)
  );

  assign h_valid = pend;
  assign h_sc    = pend_sc;

endmodule
