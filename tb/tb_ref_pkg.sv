// Reference models for the detector testbenches, written independently of the
// RTL: random channels and symbols, Euclidean metrics, SIC by exhaustive
// nearest-point search per layer, maximum-likelihood detection by exhaustive
// search, and the Gray bit labels as lookup tables.
package tb_ref_pkg;
  import mimo_pkg::*;

  function automatic int rand_range(int lo, int hi);
    return lo + int'($urandom_range(hi - lo, 0));
  endfunction

  function automatic int npoints(mod_e m);
    case (m)
      MOD_BPSK:  return 2;
      MOD_QPSK:  return 4;
      MOD_QAM16: return 16;
      default:   return 64;
    endcase
  endfunction

  // k-th point (0..npoints-1) of modulation m on the odd-integer grid
  function automatic sym_t point(mod_e m, int k);
    sym_t s;
    int n;
    if (m == MOD_BPSK) begin
      s.re = (k == 0) ? -4'sd1 : 4'sd1;
      s.im = s.re;
      return s;
    end
    n = (m == MOD_QPSK) ? 2 : (m == MOD_QAM16) ? 4 : 8;
    s.re = lvl_t'(2 * (k / n) - (n - 1));
    s.im = lvl_t'(2 * (k % n) - (n - 1));
    return s;
  endfunction

  function automatic sym_t rand_sym(mod_e m);
    return point(m, int'($urandom_range(npoints(m) - 1, 0)));
  endfunction

  function automatic mod_e rand_mod();
    return mod_e'($urandom_range(3, 0));
  endfunction

  // random normalized R~: real positive diagonal, small off-diagonal entries
  function automatic cmat_t rand_r(int dlo, int dhi, int off);
    cmat_t r;
    r = '0;
    for (int i = 0; i < NT; i++)
      for (int j = i; j < NT; j++)
        if (i == j) r[i][j].re = comp_t'(rand_range(dlo, dhi));
        else begin
          r[i][j].re = comp_t'(rand_range(-off, off));
          r[i][j].im = comp_t'(rand_range(-off, off));
        end
    return r;
  endfunction

  // y = R s + noise, layer order
  function automatic cvec_t make_y(cmat_t r, svec_t s, int noise);
    cvec_t y;
    for (int i = 0; i < NT; i++) begin
      longint ar, ai;
      ar = rand_range(-noise, noise);
      ai = rand_range(-noise, noise);
      for (int j = i; j < NT; j++) begin
        ar += longint'(r[i][j].re) * s[j].re - longint'(r[i][j].im) * s[j].im;
        ai += longint'(r[i][j].re) * s[j].im + longint'(r[i][j].im) * s[j].re;
      end
      y[i].re = comp_t'(ar);
      y[i].im = comp_t'(ai);
    end
    return y;
  endfunction

  // squared distance of layer i given decisions for layers >= i
  function automatic longint layer_dist(cvec_t y, cmat_t r, svec_t s, int i);
    longint ar, ai;
    ar = y[i].re;
    ai = y[i].im;
    for (int j = i; j < NT; j++) begin
      ar -= longint'(r[i][j].re) * s[j].re - longint'(r[i][j].im) * s[j].im;
      ai -= longint'(r[i][j].re) * s[j].im + longint'(r[i][j].im) * s[j].re;
    end
    return ar * ar + ai * ai;
  endfunction

  function automatic longint full_metric(cvec_t y, cmat_t r, svec_t s);
    longint m;
    m = 0;
    for (int i = 0; i < NT; i++) m += layer_dist(y, r, s, i);
    return m;
  endfunction

  // SIC: for each layer from the top, the point with the smallest distance
  function automatic svec_t sic_ref(cvec_t y, cmat_t r, mod_e lm[NT]);
    svec_t s;
    s = '0;
    for (int i = NT - 1; i >= 0; i--) begin
      longint best;
      best = -1;
      for (int k = 0; k < npoints(lm[i]); k++) begin
        longint d;
        s[i] = point(lm[i], k);
        d = layer_dist(y, r, s, i);
        if (best < 0 || d < best) best = d;
      end
      for (int k = 0; k < npoints(lm[i]); k++) begin
        s[i] = point(lm[i], k);
        if (layer_dist(y, r, s, i) == best) break;
      end
    end
    return s;
  endfunction

  // ML metric by exhaustive search over all vectors
  function automatic longint ml_metric(cvec_t y, cmat_t r, mod_e lm[NT]);
    longint best;
    int idx[NT];
    int total;
    svec_t s;
    best = -1;
    total = 1;
    for (int i = 0; i < NT; i++) total *= npoints(lm[i]);
    for (int n = 0; n < total; n++) begin
      int q;
      longint m;
      q = n;
      for (int i = 0; i < NT; i++) begin
        idx[i] = q % npoints(lm[i]);
        q = q / npoints(lm[i]);
        s[i] = point(lm[i], idx[i]);
      end
      m = full_metric(y, r, s);
      if (best < 0 || m < best) best = m;
    end
    return best;
  endfunction

  // Gray labels per real dimension (802.11a), LSB = sign bit
  function automatic logic [2:0] gray64(int x);
    case (x)
      -7: return 3'b000; -5: return 3'b100; -3: return 3'b110; -1: return 3'b010;
       1: return 3'b011;  3: return 3'b111;  5: return 3'b101;  7: return 3'b001;
      default: return 3'bxxx;
    endcase
  endfunction
  function automatic logic [1:0] gray16(int x);
    case (x)
      -3: return 2'b00; -1: return 2'b10; 1: return 2'b11; 3: return 2'b01;
      default: return 2'bxx;
    endcase
  endfunction

  function automatic sbits_t bits_ref(sym_t s, mod_e m);
    case (m)
      MOD_BPSK:  return sbits_t'(s.re > 0);
      MOD_QPSK:  return sbits_t'({s.im > 0, s.re > 0});
      MOD_QAM16: return sbits_t'({gray16(s.im), gray16(s.re)});
      default:   return sbits_t'({gray64(s.im), gray64(s.re)});
    endcase
  endfunction

endpackage
