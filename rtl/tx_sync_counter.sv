// Transmit synchronization counter of a multi-user uplink terminal.
//
// All users must transmit at almost the same time so that their signals reach
// the base station within the guard interval. Each user therefore starts
// this counter when it receives a frame from the base station (frame_rx) and
// starts its own transmission (tx_start, one cycle) when the counter expires
// after delay cycles; meanwhile the MAC layer prepares the response. The
// mechanism is the document's; the programmable delay and the restart on a
// new frame are this design's choices.
module tx_sync_counter #(
  parameter int unsigned CW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_rx,
  input  logic [CW-1:0] delay,
  output logic          tx_start,
  output logic          counting
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      counting <= 1'b0;
      tx_start <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      if (frame_rx) begin
        cnt      <= delay;
        counting <= 1'b1;
      end else if (counting) begin
        if (cnt <= 1) begin
          counting <= 1'b0;
          tx_start <= 1'b1;
        end else cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
