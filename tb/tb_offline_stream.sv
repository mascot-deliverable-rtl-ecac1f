// Self-checking testbench of offline_stream (one stream of the offline
// testbed).
//
// Checks, with a sample strobe every second clock:
//  - the configuration registers read back what was written;
//  - transmission: a frame written into the Tx buffer comes out at the DAC
//    in order, once through the (modelled) upsampling filter and once through
//    its bypass;
//  - an external transmit trigger starts a transmission only when tx_en is
//    set;
//  - reception: ADC samples (a counting sequence) pass the modelled
//    downsampling filter into the Rx buffer; recording starts a few samples
//    after the RSSI rises above the threshold and stores consecutive samples;
//  - FPGA loop-back: the Rx buffer records the stream's own transmission.
// The filter models are combinational stand-ins (fixed offsets), which makes
// it visible whether a sample took the filter or the bypass.
module tb_offline_stream;
  localparam int DEPTH = 4096, SW = 10, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic reg_we = 0;
  logic [1:0] reg_addr = '0;
  logic [15:0] reg_wdata = '0, reg_rdata;
  logic buf_sel = 0, buf_we = 0;
  logic [AW-1:0] buf_addr = '0;
  logic [2*SW-1:0] buf_wdata = '0, buf_rdata;
  logic ext_tx_start = 0, tx_en = 0;
  logic [2*SW-1:0] ups_in, ups_out, dns_in, dns_out, dac_data, adc_data;
  logic [SW-1:0] rssi = '0;
  logic tx_active, rx_active, rx_started;
  int checks = 0, failures = 0;

  offline_stream #(.DEPTH(DEPTH), .SW(SW)) dut (.*);

  // filter stand-ins
  assign ups_out = ups_in + 20'h00101;
  assign dns_out = dns_in + 20'h00202;

  always #5 clk = ~clk;
  always @(negedge clk) sample_en <= ~sample_en;

  // ADC: counting sequence, one new sample per strobe
  int adc_k = 0;
  assign adc_data = {10'(adc_k), 10'(adc_k * 7)};
  always @(posedge clk) if (sample_en) adc_k <= adc_k + 1;

  // DAC capture: one sample per strobe while transmitting
  logic [2*SW-1:0] dac_seen [$];
  logic capture = 0;
  always @(posedge clk) if (capture && sample_en && dut.tx_valid) dac_seen.push_back(dac_data);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    reg_addr = 2'(a); reg_wdata = 16'(d); reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [2*SW-1:0] frame(int i);
    return {10'(3 * i + 1), 10'(5 * i + 2)};
  endfunction

  task automatic transmit_and_check(logic [2*SW-1:0] add, string what, logic use_ext);
    dac_seen.delete();
    capture = 1;
    if (use_ext) begin
      @(negedge clk); ext_tx_start = 1; @(negedge clk); ext_tx_start = 0;
    end else wr(0, 16'h0008 | int'(dut.ctrl));
    @(negedge clk);
    while (tx_active) @(negedge clk);
    repeat (4) @(negedge clk);
    capture = 0;
    checks++;
    if (dac_seen.size() != 40) begin failures++; $display("%s: %0d samples at the DAC", what, dac_seen.size()); end
    for (int i = 0; i < dac_seen.size() && i < 40; i++) chk(dac_seen[i], frame(i) + add, what);
  endtask

  // read the Rx buffer and return the offset of its contents in the source sequence
  task automatic check_record(int n, bit loop, output int first);
    logic [2*SW-1:0] rd;
    first = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      buf_sel = 1; buf_addr = AW'(i);
      @(negedge clk);
      rd = buf_rdata;
      if (loop) begin
        // loop-back through ups (+101) and dns (+202) of frame sample f
        if (i == 0) begin
          first = -1;
          for (int f = 0; f < 40; f++) if (rd == frame(f) + 20'h00303) first = f;
        end
        chk(rd, (first + i < 40) ? frame(first + i) + 20'h00303 : 20'h00303, "loop-back record");
      end else begin
        if (i == 0) first = int'(rd - 20'h00202) >> SW;
        chk(rd, {10'(first + i), 10'((first + i) * 7)} + 20'h00202, "ADC record");
      end
    end
    buf_sel = 0;
  endtask

  initial begin
    int first, t_rise;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // registers
    wr(1, 200); wr(2, 40); wr(0, 16'h0005);
    reg_addr = 2'd1; #1; chk(32'(reg_rdata), 32'd200, "threshold");
    reg_addr = 2'd2; #1; chk(32'(reg_rdata), 32'd40, "length");
    reg_addr = 2'd0; #1; chk(32'(reg_rdata[2:0]), 32'd5, "control");
    // Tx buffer contents
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); buf_sel = 0; buf_we = 1; buf_addr = AW'(i); buf_wdata = frame(i);
    end
    @(negedge clk); buf_we = 0;
    for (int i = 0; i < 40; i += 7) begin
      buf_addr = AW'(i); @(negedge clk); @(negedge clk);
      chk(buf_rdata, frame(i), "Tx buffer host read");
    end
    // transmissions: through the filter, then bypassed
    wr(0, 16'h0000);
    transmit_and_check(20'h00101, "upsampling filter", 0);
    wr(0, 16'h0002);
    transmit_and_check(20'h00000, "upsampling bypass", 0);
    // external trigger, blocked and allowed
    tx_en = 0;
    @(negedge clk); ext_tx_start = 1; @(negedge clk); ext_tx_start = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (tx_active) begin failures++; $display("external trigger not gated by tx_en"); end
    tx_en = 1;
    transmit_and_check(20'h00000, "external trigger", 1);
    // reception from the ADC: arm, then raise the RSSI
    wr(0, 16'h0010);
    repeat (20) @(negedge clk);
    checks++;
    if (rx_active) begin failures++; $display("recording started without RSSI"); end
    rssi = 10'd300;
    t_rise = adc_k;
    while (!rx_started) @(negedge clk);
    @(negedge clk);
    while (rx_active) @(negedge clk);
    check_record(40, 0, first);
    $display("ADC recording starts %0d samples after the RSSI rise", first - t_rise);
    checks++;
    if (first - t_rise < 3 || first - t_rise > 6) failures++;
    // FPGA loop-back through both filters
    rssi = 10'd0;
    wr(0, 16'h0019);
    rssi = 10'd300;
    @(negedge clk);
    while (tx_active || rx_active) @(negedge clk);
    check_record(40, 1, first);
    $display("loop-back recording starts at frame sample %0d", first);
    checks++;
    if (first < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
