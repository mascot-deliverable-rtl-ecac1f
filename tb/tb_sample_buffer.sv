// Self-checking testbench of sample_buffer.
//
// Host writes random samples, reads them back (one-cycle read latency), then
// plays len of them out with a random sample strobe and checks that exactly
// those len samples appear, in order. Then it records a random stream of len
// samples and reads the buffer back through the host port. The default
// depth of 4096 is used. Inputs change on the falling edge.
module tb_sample_buffer;
  localparam int unsigned DEPTH = 4096, SW = 10, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic h_we = 0;
  logic [AW-1:0] h_addr = '0;
  logic [2*SW-1:0] h_wdata = '0, h_rdata, play_data, rec_data = '0;
  logic [AW:0] len = '0;
  logic sample_en = 0, play = 0, rec = 0, play_valid, busy;
  int checks = 0, failures = 0;
  logic [2*SW-1:0] model [DEPTH];

  sample_buffer #(.DEPTH(DEPTH), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [2*SW-1:0] got, logic [2*SW-1:0] exp, string what, int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s %0d: got %h expected %h", what, k, got, exp);
    end
  endtask

  // collect played samples
  int n_play = 0;
  logic [2*SW-1:0] played [DEPTH];
  always @(posedge clk) if (sample_en && play_valid) begin
    played[n_play] = play_data;
    n_play++;
  end

  initial begin
    int L;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // host fill of the whole buffer
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      h_we = 1; h_addr = AW'(a); h_wdata = (2*SW)'($urandom); model[a] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    // host read-back of random addresses
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      h_addr = AW'(a);
      @(negedge clk);
      check(h_rdata, model[a], "host read", a);
    end
    // playback of the first L samples, twice with different lengths
    for (int rep = 0; rep < 2; rep++) begin
      L = (rep == 0) ? 700 : DEPTH;
      len = (AW+1)'(L);
      n_play = 0;
      play = 1; @(negedge clk); play = 0;
      checks++;
      if (!busy) begin failures++; $display("not busy after play"); end
      while (busy || play_valid) begin
        sample_en = ($urandom_range(0, 2) == 0);
        @(negedge clk);
      end
      sample_en = 0;
      checks++;
      if (n_play != L) begin failures++; $display("played %0d samples, expected %0d", n_play, L); end
      for (int k = 0; k < L && k < n_play; k++) check(played[k], model[k], "play", k);
    end
    // recording of L samples
    L = 1500;
    len = (AW+1)'(L);
    rec = 1; @(negedge clk); rec = 0;
    begin
      int k;
      k = 0;
      while (busy) begin
        sample_en = ($urandom_range(0, 1) == 0);
        rec_data = (2*SW)'($urandom);
        if (sample_en) begin model[k] = rec_data; k++; end
        @(negedge clk);
      end
      sample_en = 0;
      checks++;
      if (k != L) begin failures++; $display("recorded %0d samples, expected %0d", k, L); end
    end
    for (int a = 0; a < L + 5; a++) begin
      h_addr = AW'(a);
      @(negedge clk);
      check(h_rdata, model[a], "recorded", a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
