// Sample buffer of the offline testbed (used as Tx buffer and as Rx buffer).
//
// A memory of DEPTH complex baseband samples (I and Q of SW bits each, the
// width of the testbed's converters). The host side reads and writes it word
// by word (the PC accesses it through the USB interface). The stream side
// either plays the first len samples out, one per sample_en, after play
// (Tx buffer), or records len samples after rec (Rx buffer, started by the
// frame start detector). Buffers on the FPGA for every stream, filled and
// read from the PC, and recording started by the frame start detector are
// from the document; the depth and the port details are this design's.
//
// Timing: a host read returns data one cycle later. Playing: sample k is on
// play_data with play_valid in the sample_en cycle after the one that read it
// (one cycle of memory latency). Recording: every sample_en cycle writes one
// sample until len samples are stored.
module sample_buffer #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned SW    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host port
  input  logic                     h_we,
  input  logic [$clog2(DEPTH)-1:0] h_addr,
  input  logic [2*SW-1:0]          h_wdata,
  output logic [2*SW-1:0]          h_rdata,
  // stream port
  input  logic [$clog2(DEPTH):0]   len,
  input  logic                     sample_en,
  input  logic                     play,
  input  logic                     rec,
  output logic                     play_valid,
  output logic [2*SW-1:0]          play_data,
  input  logic [2*SW-1:0]          rec_data,
  output logic                     busy
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [2*SW-1:0] mem [DEPTH];
  logic [AW:0]     ptr;
  logic            playing, recording;

  assign busy = playing || recording;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      playing    <= 1'b0;
      recording  <= 1'b0;
      ptr        <= '0;
      play_valid <= 1'b0;
    end else begin
      if (sample_en) play_valid <= 1'b0;
      if (play && !busy) begin
        playing <= (len != '0);
        ptr     <= '0;
      end else if (rec && !busy) begin
        recording <= (len != '0);
        ptr       <= '0;
      end else if (sample_en && busy) begin
        if (playing) play_valid <= 1'b1;
        ptr <= ptr + 1'b1;
        if (ptr + 1'b1 == len) begin
          playing   <= 1'b0;
          recording <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (recording && sample_en) mem[ptr[AW-1:0]] <= rec_data;
    else if (h_we)              mem[h_addr]      <= h_wdata;
    if (playing && sample_en)   play_data <= mem[ptr[AW-1:0]];
    h_rdata <= mem[h_addr];
  end

endmodule
