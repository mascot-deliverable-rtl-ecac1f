// Self-checking testbench of sqrd_load.
//
// Random jobs are offered to the unit; the testbench plays the ASIC input
// link. In the first phase it acknowledges combinationally (ack = req), as
// the ASIC does, and the time a job occupies the link is checked against
// 2*(NT*NT+1) cycles. In the second phase the acknowledge rises and falls
// after random delays. Every received word is compared with the word format
// (H entries in row order as {re, im}, then {cfg, sigma}); the tag output must
// name each accepted subcarrier once, and no job may be accepted while
// tag_full is high.
module tb_sqrd_load;
  import mimo_pkg::*;
  localparam int NW = NT * NT + 1;
  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready, tag_full = 0, tag_valid;
  logic [SCW-1:0] job_sc = '0, tag_sc;
  cmat_t job_h;
  logic [15:0] job_sigma = '0, job_cfg = '0;
  logic asic_req, asic_ack;
  logic [31:0] asic_data;
  logic comb_ack = 1, slow_ack = 0;
  int checks = 0, failures = 0, cyc = 0;

  sqrd_load dut (.*);

  assign asic_ack = comb_ack ? asic_req : slow_ack;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slow receiver: random delays in both phases
  initial begin
    forever begin
      @(posedge clk);
      if (!comb_ack) begin
        if (asic_req && !slow_ack) begin
          repeat ($urandom_range(0, 3)) @(posedge clk);
          slow_ack <= 1'b1;
        end else if (!asic_req && slow_ack) begin
          repeat ($urandom_range(0, 3)) @(posedge clk);
          slow_ack <= 1'b0;
        end
      end
    end
  end

  // expected words and tags
  logic [31:0] exp_w [$];
  int          exp_tag [$];
  int          n_words = 0, n_jobs_seen = 0, n_full_block = 0;
  logic        req_q = 0;
  int          first_cyc = 0;
  int          job_cycles [$];

  always @(posedge clk) begin
    if (asic_req && asic_ack && !req_q) begin
      logic [31:0] e;
      if (n_words % NW == 0) first_cyc = cyc;
      e = exp_w.pop_front();
      checks++;
      if (asic_data !== e) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h expected %h", n_words, asic_data, e);
      end
      n_words++;
      if (n_words % NW == 0) job_cycles.push_back(cyc - first_cyc);
    end
    req_q <= asic_req && asic_ack;
    if (tag_valid) begin
      checks++;
      if (int'(tag_sc) != exp_tag.pop_front()) begin
        failures++;
        $display("tag mismatch");
      end
    end
    if (tag_full && job_valid) begin
      n_full_block++;
      checks++;
      if (job_ready) begin failures++; $display("job accepted while tag_full"); end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 60; j++) begin
      if (j == 30) comb_ack = 0;
      job_sc = SCW'($urandom_range(0, NSC - 1));
      job_sigma = 16'($urandom);
      job_cfg = 16'($urandom);
      for (int r = 0; r < NT; r++)
        for (int c = 0; c < NT; c++) begin
          job_h[r][c].re = comp_t'($urandom);
          job_h[r][c].im = comp_t'($urandom);
        end
      tag_full = ($urandom_range(0, 3) == 0);
      job_valid = 1;
      #1;
      while (!job_ready) begin
        @(negedge clk);
        tag_full = ($urandom_range(0, 3) == 0);
        #1;
      end
      for (int r = 0; r < NT; r++)
        for (int c = 0; c < NT; c++) exp_w.push_back({job_h[r][c].re, job_h[r][c].im});
      exp_w.push_back({job_cfg, job_sigma});
      exp_tag.push_back(int'(job_sc));
      @(negedge clk);
      job_valid = 0;
      tag_full = 0;
      // scramble the inputs while the job is being sent: the unit must hold its copy
      job_h = '0; job_sigma = '1; job_cfg = '1;
      #1;
      while (!job_ready) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_words != 60 * NW || exp_tag.size() != 0) begin
      failures++;
      $display("words %0d, tags left %0d", n_words, exp_tag.size());
    end
    // link time of a job with a combinational acknowledge
    for (int j = 0; j < 29; j++) begin
      checks++;
      if (job_cycles[j] != 2 * (NW - 1)) begin
        failures++;
        $display("job %0d took %0d cycles from first to last word, expected %0d", j, job_cycles[j], 2 * (NW - 1));
      end
    end
    checks++;
    if (n_full_block == 0) failures++;
    $display("jobs held back by tag_full: %0d cycles", n_full_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
