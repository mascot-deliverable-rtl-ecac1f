// Depth-first sphere decoder core (hard output).
//
// Detection is a tree search: layer NT-1 is the root level, every node on
// level i fixes the symbol of layer i, and the partial Euclidean distance
// (PED) of a node is T_i = T_{i+1} + |b_i - R_ii s_i|^2 with
// b_i = y_i - sum_{j>i} R_ij s_j. Starting at the root, the core always
// descends to the unvisited child with the smallest PED (Schnorr-Euchner
// order), so the first leaf it reaches is the SIC solution. Every leaf whose
// distance is below the current radius r^2 becomes the new best solution and
// shrinks the radius; a node whose smallest remaining child violates
// T < r^2 is left and the search moves up one level. The search ends when the
// root has no child left inside the sphere; the result is the maximum-likelihood
// vector. This algorithm follows the document.
//
// Datapath: in each cycle the core visits one node. The partial distance part
// computes |b_i - R_ii c|^2 for every point c of the layer's constellation
// (8 squares per real dimension, summed pairwise), the metric enumeration part
// picks the smallest one not yet visited, an adder forms the child's PED and
// the radius check decides between descend, update and ascend; when
// descending, b for the next level is formed from the new path. The document's
// core spreads these steps over a 5-stage pipeline that interleaves 5
// subcarriers; this core is one non-interleaved stage that visits one node per
// cycle, which is this design's simplification. The enumeration by exhaustive
// comparison is also this design's choice.
//
// Interface: a vector is accepted when in_valid && in_ready; abort_req ends the
// current search at once and returns the best leaf found so far (out_aborted
// set; out_found clear if no leaf was reached). out_valid pulses for one cycle
// with the decisions in stream order, the squared distance of the result and
// the number of nodes visited. Timing: NT cycles to the first leaf, then one
// cycle per visited node plus one to finish.
module sphere_core
  import mimo_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  modv_t          mods,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [SCW-1:0] in_sc,
  input  cvec_t          in_y,
  input  cmat_t          in_r,
  input  pvec_t          in_perm,
  input  logic           abort_req,
  output logic           busy,
  output logic           out_valid,
  output logic [SCW-1:0] out_sc,
  output svec_t          out_sym,
  output logic [MW-1:0]  out_metric,
  output logic [15:0]    out_nodes,
  output logic           out_found,
  output logic           out_aborted
);

  localparam int unsigned LW = $clog2(NT);
  localparam int unsigned NC = 64;                 // points of the 64-QAM grid
  localparam int unsigned DFW = BW + 2;            // width of b - R_ii c

  typedef logic signed [DFW-1:0] diff_t;
  typedef logic [MW-1:0] met_t;

  logic [LW-1:0]         level;
  logic [SCW-1:0]        sc_q;
  cvec_t                 y_q;
  cmat_t                 r_q;
  pvec_t                 perm_q;
  mod_e  [NT-1:0]        lmod_q;
  bcplx_t [NT-1:0]       b_lvl;
  met_t  [NT-1:0]        t_lvl;                    // PED of the parent path
  logic  [NT-1:0][NC-1:0] visited;
  svec_t                 path, best;
  met_t                  r2;
  logic                  found;
  logic  [15:0]          nodes;

  // grid level of index k (0..7): -7, -5, ..., 7
  function automatic lvl_t lvl_of(int k);
    return lvl_t'(2 * k - 7);
  endfunction

  // ---- partial distances of all candidates of the current level ----------
  met_t [7:0] dre, dim_;
  met_t       dmin;
  logic [5:0] cmin;
  logic       any;
  sym_t       cbest;
  met_t       t_new;

  always_comb begin
    bcplx_t b;
    bcomp_t rii;
    b   = b_lvl[level];
    rii = bcomp_t'(r_q[level][level].re);
    for (int k = 0; k < 8; k++) begin
      diff_t e_r, e_i;
      e_r = diff_t'(b.re) - diff_t'(rii) * diff_t'(lvl_of(k));
      e_i = diff_t'(b.im) - diff_t'(rii) * diff_t'(lvl_of(k));
      dre[k]  = met_t'(e_r * e_r);
      dim_[k] = met_t'(e_i * e_i);
    end
  end

  // ---- metric enumeration: smallest unvisited candidate ------------------
  always_comb begin
    met_t d;
    sym_t c;
    dmin = '1;
    cmin = '0;
    any  = 1'b0;
    for (int kr = 0; kr < 8; kr++)
      for (int ki = 0; ki < 8; ki++) begin
        c.re = lvl_of(kr);
        c.im = lvl_of(ki);
        d    = dre[kr] + dim_[ki];
        if (sym_ok(lmod_q[level], c) && !visited[level][kr*8+ki] && (!any || d < dmin)) begin
          any  = 1'b1;
          dmin = d;
          cmin = 6'(kr * 8 + ki);
        end
      end
    cbest.re = lvl_of(int'(cmin[5:3]));
    cbest.im = lvl_of(int'(cmin[2:0]));
    t_new    = t_lvl[level] + dmin;
  end

  // ---- b of the next level down, with the new symbol on the path ----------
  svec_t  path_new;
  bcplx_t b_down;
  logic [LW-1:0] lvl_dn;
  always_comb begin
    path_new        = path;
    path_new[level] = cbest;
    lvl_dn          = (level == '0) ? '0 : level - 1'b1;
    b_down          = calc_b(y_q[lvl_dn], r_q[lvl_dn], path_new, int'(lvl_dn));
  end

  // ---- control ----------------------------------------------------------------
  logic in_sph, finish;
  assign in_sph   = any && (t_new < r2);
  assign in_ready = !busy;
  assign finish   = busy && (abort_req || (!in_sph && level == LW'(NT - 1)) ||
                             (in_sph && level == '0 && NT == 1));

  svec_t best_ord;
  symbol_reorder u_reorder (
    .s_in  (best),
    .perm  (perm_q),
    .s_out (best_ord)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy && in_valid) begin
        busy <= 1'b1;
      end else if (finish) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy && in_valid) begin
      sc_q            <= in_sc;
      y_q             <= in_y;
      r_q             <= in_r;
      perm_q          <= in_perm;
      for (int k = 0; k < NT; k++) lmod_q[k] <= mods[in_perm[k]];
      level           <= LW'(NT - 1);
      b_lvl[NT-1].re  <= bcomp_t'(in_y[NT-1].re);
      b_lvl[NT-1].im  <= bcomp_t'(in_y[NT-1].im);
      t_lvl[NT-1]     <= '0;
      visited[NT-1]   <= '0;
      r2              <= '1;
      found           <= 1'b0;
      nodes           <= '0;
      path            <= '0;
      best            <= '0;
    end else if (busy && !finish) begin
      nodes <= nodes + 1'b1;
      if (!in_sph) begin
        level <= level + 1'b1;                     // ascend
      end else begin
        visited[level][cmin] <= 1'b1;
        path[level]          <= cbest;
        if (level == '0) begin                     // leaf inside the sphere
          r2    <= t_new;
          best  <= path_new;
          found <= 1'b1;
          level <= level + 1'b1;
        end else begin                             // descend
          level            <= lvl_dn;
          b_lvl[lvl_dn]    <= b_down;
          t_lvl[lvl_dn]    <= t_new;
          visited[lvl_dn]  <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (finish) begin
      out_sc      <= sc_q;
      out_sym     <= best_ord;
      out_metric  <= r2;
      out_nodes   <= nodes + 1'b1;
      out_found   <= found;
      out_aborted <= abort_req;
    end
  end

endmodule
