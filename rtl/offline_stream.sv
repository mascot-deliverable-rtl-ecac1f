// One stream of the offline testbed FPGA design.
//
// The PC writes a complete time-domain frame into the Tx buffer and reads the
// received samples back from the Rx buffer; everything else happens offline.
// On the FPGA, a transmission plays the Tx buffer out towards the DAC, through
// the upsampling filter or around it (upsampling bypass). On the receive side
// the samples from the ADC, or in FPGA loop-back mode the stream's own
// transmit samples, pass the downsampling filter or its bypass into the Rx
// buffer, which starts recording when the frame start detector sees the RSSI
// rise. Each stream has its own configuration registers. The structure, the
// loop-back and bypass paths and the RSSI-triggered recording follow the
// document. The up- and downsampling filters are not part of this RTL (their
// rate and filters are not specified): the stream brings their connections out
// (ups_*, dns_*) and selects them when the bypass is off. The register map is
// this design's:
//   0: control  bit0 fpga_loopback, bit1 ups_bypass, bit2 dns_bypass,
//               bit3 write 1 to transmit, bit4 write 1 to arm the receiver
//   1: RSSI threshold   2: frame length in samples
// Host buffer accesses use buf_sel (0 Tx buffer, 1 Rx buffer).
// Lint notes: the Rx buffer's play port and the detector's armed output are
// left open, and register bits above those the map defines are ignored.
module offline_stream #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned SW    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample_en,
  // host register port
  input  logic                     reg_we,
  input  logic [1:0]               reg_addr,
  input  logic [15:0]              reg_wdata,
  output logic [15:0]              reg_rdata,
  // host buffer port
  input  logic                     buf_sel,
  input  logic                     buf_we,
  input  logic [$clog2(DEPTH)-1:0] buf_addr,
  input  logic [2*SW-1:0]          buf_wdata,
  output logic [2*SW-1:0]          buf_rdata,
  // external transmit trigger (multi-user synchronization), gated by tx_en
  input  logic                     ext_tx_start,
  input  logic                     tx_en,
  // upsampling / downsampling filters (outside)
  output logic [2*SW-1:0]          ups_in,
  input  logic [2*SW-1:0]          ups_out,
  output logic [2*SW-1:0]          dns_in,
  input  logic [2*SW-1:0]          dns_out,
  // converters and RF
  output logic [2*SW-1:0]          dac_data,
  input  logic [2*SW-1:0]          adc_data,
  input  logic [SW-1:0]            rssi,
  output logic                     tx_active,
  output logic                     rx_active,
  output logic                     rx_started
);

  typedef struct packed {
    logic dns_bypass;
    logic ups_bypass;
    logic fpga_loopback;
  } ctrl_t;

  ctrl_t              ctrl;
  logic [SW-1:0]      threshold;
  logic [$clog2(DEPTH):0] len;
  logic               go_tx, go_arm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl      <= '0;
      threshold <= '1;
      len       <= '0;
      go_tx     <= 1'b0;
      go_arm    <= 1'b0;
    end else begin
      go_tx  <= 1'b0;
      go_arm <= 1'b0;
      if (reg_we) begin
        case (reg_addr)
          2'd0: begin
                  ctrl   <= ctrl_t'(reg_wdata[2:0]);
                  go_tx  <= reg_wdata[3];
                  go_arm <= reg_wdata[4];
                end
          2'd1: threshold <= reg_wdata[SW-1:0];
          2'd2: len       <= reg_wdata[$clog2(DEPTH):0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (reg_addr)
      2'd0:    reg_rdata = 16'({rx_active, tx_active, ctrl});
      2'd1:    reg_rdata = 16'(threshold);
      2'd2:    reg_rdata = 16'(len);
      default: reg_rdata = '0;
    endcase
  end

  // ---- transmit path ------------------------------------------------------------
  logic            tx_valid;
  logic [2*SW-1:0] tx_samp, tx_rdata, rx_rdata;

  sample_buffer #(.DEPTH(DEPTH), .SW(SW)) u_txbuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .h_we       (buf_we && !buf_sel),
    .h_addr     (buf_addr),
    .h_wdata    (buf_wdata),
    .h_rdata    (tx_rdata),
    .len        (len),
    .sample_en  (sample_en),
    .play       (go_tx || (ext_tx_start && tx_en)),
    .rec        (1'b0),
    .play_valid (tx_valid),
    .play_data  (tx_samp),
    .rec_data   ('0),
    .busy       (tx_active)
  );

  assign ups_in   = tx_valid ? tx_samp : '0;
  assign dac_data = ctrl.ups_bypass ? ups_in : ups_out;

  // ---- receive path -------------------------------------------------------------
  logic [2*SW-1:0] rx_src;
  logic            start_rec;

  assign rx_src  = ctrl.fpga_loopback ? dac_data : adc_data;
  assign dns_in  = rx_src;

  frame_start_detector #(.RW(SW)) u_fsd (
    .clk       (clk),
    .rst_n     (rst_n),
    .arm       (go_arm),
    .sample_en (sample_en),
    .rssi      (rssi),
    .threshold (threshold),
    .rx_start  (start_rec),
    .armed     ()
  );

  sample_buffer #(.DEPTH(DEPTH), .SW(SW)) u_rxbuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .h_we       (buf_we && buf_sel),
    .h_addr     (buf_addr),
    .h_wdata    (buf_wdata),
    .h_rdata    (rx_rdata),
    .len        (len),
    .sample_en  (sample_en),
    .play       (1'b0),
    .rec        (start_rec),
    .play_valid (),
    .play_data  (),
    .rec_data   (ctrl.dns_bypass ? dns_in : dns_out),
    .busy       (rx_active)
  );

  assign rx_started = start_rec;

  logic buf_sel_q;
  always_ff @(posedge clk) buf_sel_q <= buf_sel;
  assign buf_rdata = buf_sel_q ? rx_rdata : tx_rdata;

endmodule
