// Partial distance unit of the SIC detector (combinational).
//
// For layer i it forms b_i = y_i - sum_{j>i} R_ij s_j from the decisions of the
// layers above and then picks the constellation point closest to b_i / R_ii.
// The division by R_ii is avoided: the decision boundaries are the multiples
// 2 R_ii, 4 R_ii and 6 R_ii of the real diagonal entry, compared with |Re b_i|
// and |Im b_i| (six comparators in all), and the sign of each part gives the
// sign of the point. This follows the document. The result is clipped to the
// largest level of the stream's modulation; for BPSK, whose points were rotated
// onto +-(1+j), the decision is the sign of Re b_i + Im b_i.
//
// Interface: purely combinational. y is the entry y~_i of the normalized
// vector, rrow row i of the normalized R, s the decisions so far (entries j > i
// are used), layer the index i, lmod the modulation of layer i.
module sic_pdu
  import mimo_pkg::*;
(
  input  cplx_t              y,
  input  cvec_t              rrow,
  input  svec_t              s,
  input  logic [$clog2(NT)-1:0] layer,
  input  mod_e               lmod,
  output bcplx_t             b,
  output sym_t               s_hat
);

  // one real dimension: odd level from |x| against 2R, 4R, 6R
  function automatic lvl_t slice_dim(bcomp_t x, bcomp_t r, mod_e m);
    bcomp_t a;
    int     k;
    int     lv;
    a  = (x < 0) ? -x : x;
    k  = int'(a >= 2 * r) + int'(a >= 4 * r) + int'(a >= 6 * r);
    lv = 2 * k + 1;
    if (lv > int'(max_level(m))) lv = int'(max_level(m));
    return (x < 0) ? lvl_t'(-lv) : lvl_t'(lv);
  endfunction

  bcomp_t rii;

  always_comb begin
    b   = calc_b(y, rrow, s, int'(layer));
    rii = bcomp_t'(rrow[layer].re);
    if (lmod == MOD_BPSK) begin
      s_hat.re = (b.re + b.im < 0) ? -4'sd1 : 4'sd1;
      s_hat.im = s_hat.re;
    end else begin
      s_hat.re = slice_dim(b.re, rii, lmod);
      s_hat.im = slice_dim(b.im, rii, lmod);
    end
  end

endmodule
