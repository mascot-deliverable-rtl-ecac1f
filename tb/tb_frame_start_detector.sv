// Self-checking testbench of frame_start_detector.
//
// Drives a random RSSI sequence with random sample strobes and random arming
// and runs a cycle-exact reference alongside: rx_start must pulse in the cycle
// after the HOLD-th consecutive qualifying sample while armed, and the
// detector must then disarm. Inputs change on the falling clock edge. Also
// counts that triggers and interrupted runs both happened.
module tb_frame_start_detector;
  localparam int unsigned RW = 10, HOLD = 4;
  logic clk = 0, rst_n = 0, arm = 0, sample_en = 0;
  logic [RW-1:0] rssi = '0, threshold = 10'd300;
  logic rx_start, armed;
  int checks = 0, failures = 0, n_trig = 0, n_broken = 0;

  frame_start_detector #(.RW(RW), .HOLD(HOLD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic r_armed = 0, r_start = 0;
  int   r_run = 0;

  always @(posedge clk) if (rst_n) begin
    r_start <= 0;
    if (arm) begin r_armed <= 1; r_run <= 0; end
    else if (r_armed && sample_en) begin
      if (rssi >= threshold) begin
        if (r_run == HOLD - 1) begin r_start <= 1; r_armed <= 0; r_run <= 0; end
        else r_run <= r_run + 1;
      end else begin
        if (r_run > 0) n_broken++;
        r_run <= 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      checks++;
      if (rx_start !== r_start || armed !== r_armed) begin
        failures++;
        if (failures < 10) $display("cycle %0d: rx_start %b/%b armed %b/%b", c, rx_start, r_start, armed, r_armed);
      end
      if (rx_start) n_trig++;
      arm       = ($urandom_range(0, 199) == 0);
      sample_en = ($urandom_range(0, 3) != 0);
      rssi      = ($urandom_range(0, 9) < 7) ? RW'($urandom_range(300, 1023)) : RW'($urandom_range(0, 299));
      if (c % 997 == 0) threshold = RW'($urandom_range(100, 600));
    end
    $display("triggers %0d, interrupted runs %0d", n_trig, n_broken);
    checks++;
    if (n_trig == 0 || n_broken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
