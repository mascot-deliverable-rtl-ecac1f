// Self-checking testbench of tx_sync_counter.
//
// Sends frame_rx pulses with random delays and checks that tx_start is high
// exactly delay clock edges after the edge that took frame_rx (one edge for a
// delay of 0 or 1), and at no other time. Sampled at the falling edge, that
// is delay+1 falling edges after frame_rx was applied. A second frame during a count restarts it, which
// is checked as well. Inputs change on the falling edge.
module tb_tx_sync_counter;
  localparam int unsigned CW = 20;
  logic clk = 0, rst_n = 0, frame_rx = 0;
  logic [CW-1:0] delay = '0;
  logic tx_start, counting;
  int checks = 0, failures = 0, n_restart = 0;
  int cyc = 0;

  tx_sync_counter #(.CW(CW)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expect_at = -1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      int d, t0;
      d = $urandom_range(0, 400);
      @(negedge clk);
      frame_rx = 1; delay = CW'(d);
      t0 = cyc;
      @(negedge clk);
      frame_rx = 0;
      expect_at = t0 + ((d <= 1) ? 1 : d) + 1;
      // sometimes restart the count with a new frame
      if (f % 7 == 3 && d > 20) begin
        repeat (5) @(negedge clk);
        d = $urandom_range(2, 100);
        frame_rx = 1; delay = CW'(d);
        t0 = cyc;
        @(negedge clk);
        frame_rx = 0;
        expect_at = t0 + d + 1;
        n_restart++;
      end
      while (cyc < expect_at + 3) begin
        checks++;
        if (tx_start !== (cyc == expect_at)) begin
          failures++;
          if (failures < 10) $display("frame %0d: tx_start=%b at %0d, expected at %0d", f, tx_start, cyc, expect_at);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
