// Self-checking testbench of sqrd_retrieve.
//
// The testbench plays the ASIC output link: for each result it sends the
// NT*NT words of Q^H, the NR words of the upper triangle of R and the
// permutation word, each with a four-phase handshake and random gaps, after
// pushing the subcarrier tag as the load unit would. res_ready is random.
// Checks: the acknowledge is combinational (ack equals req in the same cycle
// whenever the unit has room, and stays low while a finished result waits),
// every result carries the right tag, Q^H, R (lower triangle zero) and
// permutation, in order. The sender keeps req low for at least one clock edge
// between words, which the unit needs to see each new request.
module tb_sqrd_retrieve;
  import mimo_pkg::*;
  localparam int NQ = NT * NT, NW = NQ + NR + 1, TAGS = 4;
  logic clk = 0, rst_n = 0;
  logic tag_valid = 0, tag_full;
  logic [SCW-1:0] tag_sc = '0, res_sc;
  logic asic_req = 0, asic_ack;
  logic [31:0] asic_data = '0;
  logic res_valid, res_ready = 0;
  cmat_t res_qh, res_r;
  pvec_t res_perm;
  int checks = 0, failures = 0, n_res = 0, n_stall = 0, n_tagfull = 0;

  sqrd_retrieve #(.TAGS(TAGS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int sc; cmat_t qh; cmat_t r; pvec_t perm; } res_t;
  res_t exp_q [$];

  // consumer with random back-pressure
  always @(negedge clk) res_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n) begin
    // combinational acknowledge
    checks++;
    if (asic_ack && !asic_req) begin failures++; $display("ack without req"); end
    if (tag_full) n_tagfull++;
    if (res_valid && !res_ready) n_stall++;
    if (res_valid && res_ready) begin
      res_t e;
      e = exp_q.pop_front();
      checks++;
      if (int'(res_sc) != e.sc || res_qh != e.qh || res_r != e.r || res_perm != e.perm) begin
        failures++;
        if (failures < 10) $display("result %0d (sc %0d) wrong", n_res, e.sc);
      end
      n_res++;
    end
  end

  task automatic send_word(logic [31:0] w);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    asic_data = w;
    asic_req = 1;
    #1;
    if (!asic_ack) begin
      // must only wait while a finished result is still held
      while (!asic_ack) begin
        checks++;
        if (!res_valid) begin failures++; $display("ack withheld with no result pending"); end
        @(negedge clk);
        #1;
      end
    end
    checks++;
    @(negedge clk);
    asic_req = 0;
    asic_data = '1;
    #1;
    checks++;
    if (asic_ack) begin failures++; $display("ack did not follow req low"); end
    // req stays low for at least one clock edge, so the release is seen
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      res_t e;
      e.sc = $urandom_range(0, NSC - 1);
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          e.qh[i][j].re = comp_t'($urandom);
          e.qh[i][j].im = comp_t'($urandom);
          e.r[i][j].re = (j >= i) ? comp_t'($urandom) : '0;
          e.r[i][j].im = (j >= i) ? comp_t'($urandom) : '0;
        end
      for (int k = 0; k < NT; k++) e.perm[k] = 2'($urandom);
      // tags of up to TAGS jobs may be in flight: push a tag unless full
      while (tag_full) @(negedge clk);
      tag_valid = 1; tag_sc = SCW'(e.sc);
      @(negedge clk);
      tag_valid = 0;
      exp_q.push_back(e);
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) send_word({e.qh[i][j].re, e.qh[i][j].im});
      for (int i = 0; i < NT; i++)
        for (int j = i; j < NT; j++) send_word({e.r[i][j].re, e.r[i][j].im});
      begin
        logic [31:0] pw;
        pw = '0;
        for (int k = 0; k < NT; k++) pw[2*k +: 2] = e.perm[k];
        send_word(pw);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_res != 100) begin failures++; $display("%0d results", n_res); end
    $display("cycles with a result stalled by res_ready: %0d", n_stall);
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
