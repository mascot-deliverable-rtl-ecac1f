// Preprocessing memory (used as the Config, Q and R memories).
//
// Holds one word per subcarrier. The preprocessing side writes it through two
// channels, one for the even and one for the odd tones, each processed by its
// own QR decomposition core; the detection side reads it through two
// independent channels, which gives the detectors the bandwidth they need.
// The memory is also where the preprocessing clock domain meets the detection
// clock domain: writes use wclk, reads use rclk. The two-channel write and
// read structure and the clock-domain crossing follow the document. The
// address translation is this design's choice: subcarrier n goes to bank
// n mod 2 at row n/2, so each write channel owns one bank and never collides
// with the other. Handing over between the domains (only read a subcarrier
// once it has been written) is left to the system schedule.
//
// Timing: a write is stored at the wclk edge where wr_en is high; a read
// returns the word one rclk edge after rd_en.
module prep_mem
  import mimo_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic                  wclk,
  input  logic [1:0]            wr_en,      // [0] even tones, [1] odd tones
  input  logic [1:0][SCW-1:0]   wr_addr,    // subcarrier index
  input  logic [1:0][WIDTH-1:0] wr_data,
  input  logic                  rclk,
  input  logic [1:0]            rd_en,
  input  logic [1:0][SCW-1:0]   rd_addr,
  output logic [1:0][WIDTH-1:0] rd_data
);

  localparam int unsigned ROWS = 1 << (SCW - 1);   // 2 x ROWS >= NSC words

  logic [WIDTH-1:0] bank0 [ROWS];
  logic [WIDTH-1:0] bank1 [ROWS];

  always_ff @(posedge wclk) begin
    if (wr_en[0]) bank0[wr_addr[0][SCW-1:1]] <= wr_data[0];
    if (wr_en[1]) bank1[wr_addr[1][SCW-1:1]] <= wr_data[1];
  end

  for (genvar k = 0; k < 2; k++) begin : g_rd
    always_ff @(posedge rclk) begin
      if (rd_en[k])
        rd_data[k] <= rd_addr[k][0] ? bank1[rd_addr[k][SCW-1:1]] : bank0[rd_addr[k][SCW-1:1]];
    end
  end

  // each write channel serves one parity of subcarriers
  always_ff @(posedge wclk) begin
    if (wr_en[0]) assert (wr_addr[0][0] == 1'b0) else $error("even channel wrote odd tone");
    if (wr_en[1]) assert (wr_addr[1][0] == 1'b1) else $error("odd channel wrote even tone");
  end

endmodule
