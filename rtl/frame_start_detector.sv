// Frame start detector of one receive stream.
//
// Watches the received signal strength indication (RSSI) from the RF
// transceiver and, once armed, asserts rx_start for one cycle when the RSSI
// has stayed at or above a threshold for HOLD consecutive samples; it then
// disarms until armed again. The document states that the detector starts the
// receive buffer based on the RSSI signal; the threshold-and-hold rule, the
// 10-bit RSSI width and the arming are this design's choices.
module frame_start_detector #(
  parameter int unsigned RW   = 10,
  parameter int unsigned HOLD = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arm,
  input  logic          sample_en,
  input  logic [RW-1:0] rssi,
  input  logic [RW-1:0] threshold,
  output logic          rx_start,
  output logic          armed
);

  localparam int unsigned HW = $clog2(HOLD + 1);
  logic [HW-1:0] run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed    <= 1'b0;
      run      <= '0;
      rx_start <= 1'b0;
    end else begin
      rx_start <= 1'b0;
      if (arm) begin
        armed <= 1'b1;
        run   <= '0;
      end else if (armed && sample_en) begin
        if (rssi >= threshold) begin
          if (run == HW'(HOLD - 1)) begin
            rx_start <= 1'b1;
            armed    <= 1'b0;
            run      <= '0;
          end else run <= run + 1'b1;
        end else run <= '0;
      end
    end
  end

endmodule
