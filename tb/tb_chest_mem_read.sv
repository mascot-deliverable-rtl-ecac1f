// Self-checking testbench of chest_mem_read.
//
// Models the channel estimation memory (one matrix per read, data one cycle
// later and held until the next read) and a channel estimation that completes
// one more subcarrier every few cycles. Both parity instances run side by
// side with random back-pressure. Checks: every matrix of its parity arrives
// exactly once, in order, with the prescaled contents of its memory row; no
// subcarrier is read before it is estimated, and nothing before four
// subcarriers are; reading starts before the last
// subcarrier is estimated (early start); done is raised at the end.
module tb_chest_mem_read;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [SCW:0] est_count = '0;
  logic signed [3:0] shift = 4'sd1;
  logic [1:0] mem_rd, h_valid, h_ready = '0, done;
  logic [SCW-1:0] mem_addr [2], h_sc [2];
  cmat_t mem_data [2], h_mat [2];
  cmat_t mem [NSC];
  int checks = 0, failures = 0;
  int n_got [2], n_early = 0;

  for (genvar k = 0; k < 2; k++) begin : g_dut
    chest_mem_read #(.PARITY(1'(k))) dut (
      .clk, .rst_n, .start, .est_count, .shift,
      .mem_rd(mem_rd[k]), .mem_addr(mem_addr[k]), .mem_data(mem_data[k]),
      .h_valid(h_valid[k]), .h_ready(h_ready[k]), .h_sc(h_sc[k]), .h_mat(h_mat[k]),
      .done(done[k]));
    always @(posedge clk) if (mem_rd[k]) mem_data[k] <= mem[mem_addr[k]];
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic comp_t ref_scale(comp_t v, int sh);
    int x;
    x = int'(v);
    if (sh >= 0) x = x * (1 << sh);
    else x = (x + (1 << (-sh - 1))) >>> (-sh);
    if (x > 32767) x = 32767;
    if (x < -32768) x = -32768;
    return comp_t'(x);
  endfunction

  // read-side checks
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (mem_rd[k]) begin
        checks++;
        if (int'(mem_addr[k]) >= int'(est_count) || mem_addr[k][0] != 1'(k) || est_count < 4) begin
          failures++;
          $display("core %0d read sc %0d with est_count %0d", k, mem_addr[k], est_count);
        end
        if (est_count < (SCW+1)'(NSC)) n_early++;
      end
      if (h_valid[k] && h_ready[k]) begin
        int exp_sc;
        exp_sc = 2 * n_got[k] + k;
        checks++;
        if (int'(h_sc[k]) != exp_sc) begin
          failures++;
          $display("parity %0d: got sc %0d expected %0d", k, h_sc[k], exp_sc);
        end
        for (int i = 0; i < NT; i++)
          for (int j = 0; j < NT; j++) begin
            checks++;
            if (h_mat[k][i][j].re != ref_scale(mem[exp_sc][i][j].re, int'(shift)) ||
                h_mat[k][i][j].im != ref_scale(mem[exp_sc][i][j].im, int'(shift))) begin
              failures++;
              if (failures < 10) $display("parity %0d sc %0d entry %0d,%0d wrong", k, exp_sc, i, j);
            end
          end
        n_got[k]++;
      end
    end
  end

  initial begin
    for (int f = 0; f < 3; f++) begin
      for (int s = 0; s < NSC; s++)
        for (int i = 0; i < NT; i++)
          for (int j = 0; j < NT; j++) begin
            mem[s][i][j].re = comp_t'(int'($urandom_range(0, 8000)) - 4000);
            mem[s][i][j].im = comp_t'(int'($urandom_range(0, 8000)) - 4000);
          end
      shift = 4'(int'($urandom_range(0, 4)) - 2);
      n_got[0] = 0; n_got[1] = 0;
      est_count = '0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      start = 1; @(negedge clk); start = 0;
      for (int c = 0; c < 2000 && !(n_got[0] == NSC/2 && n_got[1] == NSC/2); c++) begin
        if (c % 3 == 0 && est_count < (SCW+1)'(NSC)) est_count = est_count + 1'b1;
        h_ready = 2'($urandom);
        @(negedge clk);
      end
      h_ready = '0;
      @(negedge clk);
      checks++;
      if (n_got[0] != NSC/2 || n_got[1] != NSC/2 || done != 2'b11) begin
        failures++;
        $display("frame %0d: got %0d/%0d matrices, done=%b", f, n_got[0], n_got[1], done);
      end
    end
    $display("reads issued before the estimation finished: %0d", n_early);
    checks++;
    if (n_early == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
