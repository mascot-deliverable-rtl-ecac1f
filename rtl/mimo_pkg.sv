// Shared types and constants of the QR-based MIMO receiver.
//
// Complex samples are pairs of signed fixed-point numbers with FRAC fraction
// bits. Detected symbols live on the Gaussian-integer grid of 64-QAM, i.e.
// each real dimension is one of the odd integers -7..7, and every lower-order
// modulation is a subset of that grid (BPSK is rotated by 45 degrees onto the
// QPSK points). The 4x4 configuration with 48 data subcarriers per OFDM symbol
// follows the document; word widths and the fixed-point format are this
// design's choice.
package mimo_pkg;

  localparam int unsigned NT   = 4;    // transmit streams (4x4 system)
  localparam int unsigned NSC  = 48;   // data subcarriers per OFDM symbol
  localparam int unsigned DW   = 16;   // width of one real component
  localparam int unsigned FRAC = 12;   // fraction bits of Q, R and y
  localparam int unsigned MW   = 56;   // width of squared-distance metrics
  localparam int unsigned SCW  = $clog2(NSC);
  localparam int unsigned NR   = NT * (NT + 1) / 2; // entries of upper-triangular R

  typedef logic signed [DW-1:0] comp_t;

  typedef struct packed {
    comp_t re;
    comp_t im;
  } cplx_t;

  // One real dimension of a grid symbol: odd integer in -7..7.
  typedef logic signed [3:0] lvl_t;

  typedef struct packed {
    lvl_t re;
    lvl_t im;
  } sym_t;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_e;

  typedef cplx_t [NT-1:0]        cvec_t;   // vector of NT complex values
  typedef cplx_t [NT-1:0][NT-1:0] cmat_t;  // [row][col]
  typedef sym_t  [NT-1:0]        svec_t;
  typedef mod_e  [NT-1:0]        modv_t;   // modulation of each stream

  // Permutation: entry k holds the original stream index of sorted layer k.
  typedef logic [NT-1:0][$clog2(NT)-1:0] pvec_t;

  // Bits of one stream (up to 6 for 64-QAM) and of one vector.
  typedef logic [5:0]          sbits_t;
  typedef sbits_t [NT-1:0]     vbits_t;

  // Interference-cancelled value b_i = y_i - sum_{j>i} R_ij s_j.
  localparam int unsigned BW = DW + 8;
  typedef logic signed [BW-1:0] bcomp_t;
  typedef struct packed {
    bcomp_t re;
    bcomp_t im;
  } bcplx_t;

  // Complex product R_ij * s_j, where s_j is a small grid integer.
  function automatic bcplx_t mul_rs(cplx_t r, sym_t s);
    bcplx_t o;
    o.re = bcomp_t'(r.re) * bcomp_t'(s.re) - bcomp_t'(r.im) * bcomp_t'(s.im);
    o.im = bcomp_t'(r.re) * bcomp_t'(s.im) + bcomp_t'(r.im) * bcomp_t'(s.re);
    return o;
  endfunction

  // b_i for layer i, given row i of R and the decisions of layers above i.
  function automatic bcplx_t calc_b(cplx_t y, cvec_t rrow, svec_t s, int i);
    bcplx_t acc, p;
    acc.re = bcomp_t'(y.re);
    acc.im = bcomp_t'(y.im);
    for (int j = 0; j < NT; j++)
      if (j > i) begin
        p = mul_rs(rrow[j], s[j]);
        acc.re = acc.re - p.re;
        acc.im = acc.im - p.im;
      end
    return acc;
  endfunction

  // Largest grid magnitude allowed for a modulation.
  function automatic int unsigned max_level(mod_e m);
    case (m)
      MOD_QAM64: return 7;
      MOD_QAM16: return 3;
      default:   return 1;
    endcase
  endfunction

  // Number of bits carried by one symbol of the modulation.
  function automatic int unsigned bits_per_sym(mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 6;
    endcase
  endfunction

  // True when lvl is a grid point of modulation m in one dimension.
  function automatic logic level_ok(mod_e m, lvl_t l);
    int a;
    a = (l < 0) ? -int'(l) : int'(l);
    return (a % 2 == 1) && (a <= int'(max_level(m)));
  endfunction

  // True when s is a constellation point of modulation m on the scaled grid.
  function automatic logic sym_ok(mod_e m, sym_t s);
    if (m == MOD_BPSK) return (s.re == s.im) && level_ok(MOD_QPSK, s.re);
    return level_ok(m, s.re) && level_ok(m, s.im);
  endfunction

endpackage
