// Constellation-point normalization of the QR decomposition results.
//
// So that one detector can handle a different modulation on every stream,
// all constellations are mapped onto the odd-integer grid of 64-QAM:
// s~ = C B s, with B a real diagonal matrix of scale factors and C a diagonal
// of rotations (45 degrees for BPSK, 1 otherwise). The detector then works on
//   Q~^H_ij = C_ii Q^H_ij                  and
//   R~_ij   = C_ii / (C_jj B_jj) R_ij,
// which keeps the diagonal of R~ real and non-negative. Both formulas, and the
// latency of 6 clock cycles, follow the document. The choice of the subsets
// (QPSK on +-1, 16-QAM on +-1/+-3, BPSK rotated onto the QPSK points) and the
// fixed-point constants 1/B are this design's.
//
// Layer k of the sorted QR decomposition carries stream perm[k], so the
// modulation used for row/column k is mods[perm[k]].
//
// Interface: one whole subcarrier (Q^H, R, perm, subcarrier index) is accepted
// per cycle when in_valid is high; the normalized result appears with
// out_valid exactly LAT = 6 cycles later. Fully pipelined, no back-pressure.
// Pipeline: 1 input register, 2 rotation (add/sub), 3 multiply by 1/sqrt(2)
// after a rotation, 4 multiply by 1/B_jj (R only), 5 round and saturate,
// 6 output register.
module const_norm
  import mimo_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [SCW-1:0]       in_sc,
  input  cmat_t                in_qh,     // Q^H, [row][col]
  input  cmat_t                in_r,      // R, upper triangle used
  input  pvec_t                in_perm,
  input  modv_t                mods,      // modulation of each stream
  output logic                 out_valid,
  output logic [SCW-1:0]       out_sc,
  output cmat_t                out_qh,
  output cmat_t                out_r,     // lower triangle forced to zero
  output pvec_t                out_perm
);

  localparam int unsigned LAT = 6;
  localparam int unsigned XW  = DW + 2;    // width after a rotation
  localparam int unsigned PW  = XW + 17;   // width of a product

  typedef logic signed [XW-1:0] wide_t;
  typedef struct packed { wide_t re; wide_t im; } wcplx_t;
  typedef wcplx_t [NT-1:0][NT-1:0] wmat_t;

  // 1/sqrt(2) in 0.16 unsigned fixed point
  localparam logic [16:0] INV_SQRT2 = 17'd46341;

  // 1/B for each modulation, 0.16 unsigned fixed point:
  // BPSK and QPSK 1/sqrt(2), 16-QAM 1/sqrt(10), 64-QAM 1/sqrt(42).
  function automatic logic [16:0] inv_b(mod_e m);
    case (m)
      MOD_QAM16: return 17'd20724;
      MOD_QAM64: return 17'd10112;
      default:   return 17'd46341;
    endcase
  endfunction

  // rotation codes: 0 none, 1 multiply by (1+j), 2 multiply by (1-j)
  function automatic wcplx_t rotate(cplx_t c, logic [1:0] code);
    wcplx_t o;
    wide_t a, b;
    a = wide_t'(c.re);
    b = wide_t'(c.im);
    case (code)
      2'd1:    begin o.re = a - b; o.im = a + b; end
      2'd2:    begin o.re = a + b; o.im = b - a; end
      default: begin o.re = a;     o.im = b;     end
    endcase
    return o;
  endfunction

  // x * k / 2^16 with rounding
  function automatic wide_t mulk(wide_t x, logic [16:0] k);
    logic signed [PW-1:0] p;
    p = PW'(x) * $signed({1'b0, k});
    p = p + (PW'(1) <<< 15);
    return wide_t'(p >>> 16);
  endfunction

  function automatic comp_t sat(wide_t x);
    localparam wide_t MAXV = wide_t'((1 <<< (DW-1)) - 1);
    localparam wide_t MINV = -wide_t'(1 <<< (DW-1));
    if (x > MAXV) return comp_t'(MAXV);
    if (x < MINV) return comp_t'(MINV);
    return comp_t'(x);
  endfunction

  // ---- stage 1: input register, layer modulations -------------------------
  logic  [LAT-1:0]        v;
  logic  [SCW-1:0]        sc   [LAT];
  pvec_t                  perm [LAT];
  mod_e  [NT-1:0]         lmod [LAT];
  cmat_t                  qh1, r1;
  wmat_t                  q2, r2, q3, r3, r4;
  logic [NT-1:0]          qrot2;                    // row was rotated
  logic [NT-1:0][NT-1:0]  rrot2;                    // element was rotated
  cmat_t                  q5, r5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    sc[0]   <= in_sc;
    perm[0] <= in_perm;
    for (int k = 0; k < NT; k++) lmod[0][k] <= mods[in_perm[k]];
    qh1 <= in_qh;
    r1  <= in_r;
    for (int s = 1; s < LAT; s++) begin
      sc[s]   <= sc[s-1];
      perm[s] <= perm[s-1];
      lmod[s] <= lmod[s-1];
    end
  end

  // ---- stage 2: rotations by C_ii and 1/C_jj ------------------------------
  always_ff @(posedge clk) begin
    for (int i = 0; i < NT; i++) begin
      qrot2[i] <= (lmod[0][i] == MOD_BPSK);
      for (int j = 0; j < NT; j++) begin
        logic bi, bj;
        bi = (lmod[0][i] == MOD_BPSK);
        bj = (lmod[0][j] == MOD_BPSK);
        q2[i][j]    <= rotate(qh1[i][j], bi ? 2'd1 : 2'd0);
        rrot2[i][j] <= bi ^ bj;
        r2[i][j]    <= rotate(r1[i][j], (bi && !bj) ? 2'd1 : (!bi && bj) ? 2'd2 : 2'd0);
      end
    end
  end

  // ---- stage 3: restore unit magnitude of a rotation ----------------------
  always_ff @(posedge clk) begin
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++) begin
        q3[i][j].re <= qrot2[i] ? mulk(q2[i][j].re, INV_SQRT2) : q2[i][j].re;
        q3[i][j].im <= qrot2[i] ? mulk(q2[i][j].im, INV_SQRT2) : q2[i][j].im;
        r3[i][j].re <= rrot2[i][j] ? mulk(r2[i][j].re, INV_SQRT2) : r2[i][j].re;
        r3[i][j].im <= rrot2[i][j] ? mulk(r2[i][j].im, INV_SQRT2) : r2[i][j].im;
      end
  end

  // ---- stage 4: divide column j of R by B_jj ------------------------------
  wmat_t q4;
  always_ff @(posedge clk) begin
    q4 <= q3;
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++) begin
        r4[i][j].re <= mulk(r3[i][j].re, inv_b(lmod[2][j]));
        r4[i][j].im <= mulk(r3[i][j].im, inv_b(lmod[2][j]));
      end
  end

  // ---- stage 5: saturate, clear the lower triangle of R -------------------
  always_ff @(posedge clk) begin
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++) begin
        q5[i][j].re <= sat(q4[i][j].re);
        q5[i][j].im <= sat(q4[i][j].im);
        r5[i][j].re <= (j >= i) ? sat(r4[i][j].re) : '0;
        r5[i][j].im <= (j > i)  ? sat(r4[i][j].im) : '0;
      end
  end

  // ---- stage 6: output register --------------------------------------------
  always_ff @(posedge clk) begin
    out_qh <= q5;
    out_r  <= r5;
  end

  assign out_valid = v[LAT-1];
  assign out_sc    = sc[LAT-1];
  assign out_perm  = perm[LAT-1];

endmodule
