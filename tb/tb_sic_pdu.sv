// Testbench of the SIC partial distance unit: random layers, modulations and
// decisions; the decision must equal the nearest constellation point found by
// exhaustive search, and b must equal y minus the cancelled layers.
module tb_sic_pdu;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  cplx_t y;
  cvec_t rrow;
  svec_t s;
  logic [$clog2(NT)-1:0] layer;
  mod_e lmod;
  bcplx_t b;
  sym_t s_hat;

  sic_pdu dut (.y(y), .rrow(rrow), .s(s), .layer(layer), .lmod(lmod), .b(b), .s_hat(s_hat));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      cmat_t r;
      cvec_t yv;
      svec_t sv;
      mod_e lm[NT];
      svec_t ref_s;
      int i;
      for (int k = 0; k < NT; k++) begin lm[k] = rand_mod(); sv[k] = rand_sym(lm[k]); end
      r  = rand_r(200, 1500, 600);
      yv = make_y(r, sv, 900);
      i  = int'($urandom_range(NT - 1, 0));
      // decisions above layer i are the true symbols
      ref_s = sv;
      y = yv[i]; rrow = r[i]; s = sv; layer = 2'(i); lmod = lm[i];
      #1;
      // the decision must be a point of the modulation at the smallest
      // distance (exhaustive search; either point of a tie is accepted)
      begin
        longint best, dd;
        best = -1;
        for (int k = 0; k < npoints(lm[i]); k++) begin
          ref_s[i] = point(lm[i], k);
          dd = layer_dist(yv, r, ref_s, i);
          if (best < 0 || dd < best) best = dd;
        end
        ref_s[i] = s_hat;
        checks++;
        if (!sym_ok(lm[i], s_hat) || layer_dist(yv, r, ref_s, i) != best) begin
          failures++;
          if (failures < 10) $display("layer %0d mod %0d: decision %0d,%0d not nearest",
                                      i, lm[i], s_hat.re, s_hat.im);
        end
      end
      begin
        longint br, bi;
        br = yv[i].re; bi = yv[i].im;
        for (int j = i + 1; j < NT; j++) begin
          br -= longint'(r[i][j].re) * sv[j].re - longint'(r[i][j].im) * sv[j].im;
          bi -= longint'(r[i][j].re) * sv[j].im + longint'(r[i][j].im) * sv[j].re;
        end
        checks++;
        if (longint'(b.re) != br || longint'(b.im) != bi) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
