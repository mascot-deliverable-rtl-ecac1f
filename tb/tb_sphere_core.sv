// Testbench of the sphere decoder core. Random channels, mixed modulations
// and permutations at several noise levels:
//  - a search that runs to the end must return a vector whose Euclidean
//    distance equals the maximum-likelihood distance found by exhaustive
//    search, and report that distance;
//  - a search aborted right after its first leaf (NT + 1 cycles) must return
//    the SIC solution, which checks the depth-first, smallest-child-first order;
//  - a search aborted after one cycle must report that no leaf was found.
module tb_sphere_core;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modv_t mods;
  logic in_valid, in_ready, abort_req, busy;
  logic [SCW-1:0] in_sc, out_sc;
  cvec_t in_y;
  cmat_t in_r;
  pvec_t in_perm;
  logic out_valid, out_found, out_aborted;
  svec_t out_sym;
  logic [MW-1:0] out_metric;
  logic [15:0] out_nodes;

  sphere_core dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int total_nodes = 0, n_full = 0, max_nodes = 0;

  initial begin
    in_valid = 0; abort_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      cmat_t r;
      svec_t sv, lay, sic_l;
      mod_e lm[NT];
      int p[NT];
      int mode, total;
      longint ml;
      mode = t % 3;                          // 0 full, 1 abort after first leaf, 2 abort at once
      for (int k = 0; k < NT; k++) p[k] = k;
      p.shuffle();
      do begin
        total = 1;
        for (int k = 0; k < NT; k++) begin mods[k] = rand_mod(); total *= npoints(mods[k]); end
      end while (total > 20000);
      for (int k = 0; k < NT; k++) begin
        in_perm[k] = 2'(p[k]);
        lm[k] = mods[p[k]];
        sv[k] = rand_sym(lm[k]);
      end
      r = rand_r(300, 1500, 600);
      in_r = r;
      in_y = make_y(r, sv, (t % 4 == 0) ? 1500 : 600);
      in_sc = SCW'(t % NSC);
      ml = ml_metric(in_y, r, lm);
      sic_l = sic_ref(in_y, r, lm);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if (mode == 1) begin
        repeat (NT) @(negedge clk);
        abort_req = 1;
      end else if (mode == 2) begin
        abort_req = 1;
      end
      while (!out_valid) @(negedge clk);
      abort_req = 0;
      for (int k = 0; k < NT; k++) lay[k] = out_sym[p[k]];   // back to layer order
      if (mode == 0) begin
        checks += 3;
        if (full_metric(in_y, r, lay) != ml) begin
          failures++;
          if (failures < 5) $display("t %0d: metric %0d, ML %0d", t, full_metric(in_y, r, lay), ml);
        end
        if (longint'(out_metric) != ml) failures++;
        if (!out_found || out_aborted) failures++;
        total_nodes += int'(out_nodes);
        if (int'(out_nodes) > max_nodes) max_nodes = int'(out_nodes);
        n_full++;
      end else if (mode == 1) begin
        checks += 2;
        if (!out_found || !out_aborted) failures++;
        if (full_metric(in_y, r, lay) != full_metric(in_y, r, sic_l)) begin
          failures++;
          if (failures < 5) $display("t %0d: first leaf is not the SIC solution", t);
        end
      end else begin
        checks++;
        if (out_found || !out_aborted) failures++;
      end
      @(negedge clk);
    end
    $display("complete searches: %0d, average nodes %0d, max %0d", n_full,
             total_nodes / n_full, max_nodes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
