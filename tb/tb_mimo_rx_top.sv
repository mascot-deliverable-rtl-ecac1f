// Self-checking testbench of mimo_rx_top (normalization, preprocessing
// memories, Q^H y rotation and both detectors).
//
// QR results are written directly on the two result channels: Q^H is a random
// unitary matrix made of a permutation with phases from {1, j, -1, -j}, R is a
// random upper-triangular matrix with a real positive diagonal, and perm is a
// random layer order. The received vector of each subcarrier is
// y = Q R P^T s for the streams' symbols s on their normalized constellations
// (BPSK real, others scaled by 1/sqrt(2), 1/sqrt(10), 1/sqrt(42)). Each of
// three frames, with random modulations per stream, is detected with the SIC
// detector and with the sphere decoder, switching det_sel between passes;
// without noise every decision must equal the transmitted symbol and the bits
// its Gray label. The detection rate of both modes must stay within one OFDM
// symbol (320 cycles for 48 subcarriers).
module tb_mimo_rx_top;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic pclk = 0, clk = 0, rst_n = 1;
  // reset falls at 1 ns so that the asynchronous resets act before the first clock edge
  initial #1 rst_n = 0;
  always #5 pclk = ~pclk;
  always #6 clk = ~clk;

  modv_t mods;
  logic det_sel = 0;
  logic [1:0] sq_valid = '0, sq_written;
  logic [1:0][SCW-1:0] sq_sc;
  cmat_t [1:0] sq_qh, sq_r;
  pvec_t [1:0] sq_perm;
  logic y_valid = 0, y_ready;
  logic [SCW-1:0] y_sc = '0;
  cvec_t y_vec = '0;
  logic det_valid, det_aborted;
  logic [SCW-1:0] det_sc;
  svec_t det_sym;
  vbits_t det_bits;
  logic [NT-1:0][2:0] det_nbits;
  logic [15:0] sd_n_aborted, sd_n_core0, sd_n_core1;

  mimo_rx_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(negedge clk) cyc++;
  int n_written = 0;
  always @(posedge pclk) if (rst_n) n_written += int'(sq_written[0]) + int'(sq_written[1]);

  svec_t s_tx [NSC];
  cvec_t y_clean [NSC];
  cmat_t qh_m [NSC], r_m [NSC];
  pvec_t perm_m [NSC];
  int n_det = 0, n_bad = 0;

  always @(posedge clk) if (rst_n && det_valid) begin
    n_det++;
    for (int k = 0; k < NT; k++) begin
      checks++;
      if (det_bits[k] !== bits_ref(det_sym[k], mods[k]) || int'(det_nbits[k]) != bits_per_sym(mods[k]))
        failures++;
    end
    checks++;
    if (det_sym !== s_tx[det_sc]) begin
      failures++;
      if (n_bad++ < 5) $display("sc %0d detected wrongly (mode %0d)", det_sc, det_sel);
    end
  end

  function automatic real bsc(mod_e m);
    case (m)
      MOD_QAM16: return $sqrt(10.0);
      MOD_QAM64: return $sqrt(42.0);
      default:   return $sqrt(2.0);
    endcase
  endfunction

  task automatic make_frame();
    for (int n = 0; n < NSC; n++) begin
      real sr [NT], si [NT], zr [NT], zi [NT];
      int  pm [NT];
      // symbols
      for (int j = 0; j < NT; j++) begin
        s_tx[n][j] = rand_sym(mods[j]);
        if (mods[j] == MOD_BPSK) begin sr[j] = real'(s_tx[n][j].re); si[j] = 0.0; end
        else begin
          sr[j] = real'(s_tx[n][j].re) / bsc(mods[j]);
          si[j] = real'(s_tx[n][j].im) / bsc(mods[j]);
        end
      end
      // layer order: random permutation
      for (int k = 0; k < NT; k++) pm[k] = k;
      for (int k = NT - 1; k > 0; k--) begin
        int a, t;
        a = $urandom_range(0, k);
        t = pm[k]; pm[k] = pm[a]; pm[a] = t;
      end
      for (int k = 0; k < NT; k++) perm_m[n][k] = 2'(pm[k]);
      // R: upper triangular, real positive diagonal
      r_m[n] = '0;
      for (int i = 0; i < NT; i++)
        for (int j = i; j < NT; j++)
          if (i == j) r_m[n][i][j].re = comp_t'(rand_range(3000, 4500));
          else begin
            r_m[n][i][j].re = comp_t'(rand_range(-600, 600));
            r_m[n][i][j].im = comp_t'(rand_range(-600, 600));
          end
      // z = R s_layer
      for (int i = 0; i < NT; i++) begin
        zr[i] = 0.0; zi[i] = 0.0;
        for (int j = i; j < NT; j++) begin
          zr[i] += real'(r_m[n][i][j].re) * sr[pm[j]] - real'(r_m[n][i][j].im) * si[pm[j]];
          zi[i] += real'(r_m[n][i][j].re) * si[pm[j]] + real'(r_m[n][i][j].im) * sr[pm[j]];
        end
      end
      // Q^H: row i has a single unit entry e^{j ph_i pi/2} in column c_i
      qh_m[n] = '0;
      for (int i = 0; i < NT; i++) y_clean[n][i] = '0;
      begin
        int c [NT];
        for (int k = 0; k < NT; k++) c[k] = k;
        for (int k = NT - 1; k > 0; k--) begin
          int a, t;
          a = $urandom_range(0, k);
          t = c[k]; c[k] = c[a]; c[a] = t;
        end
        for (int i = 0; i < NT; i++) begin
          int ph;
          real yr, yi;
          ph = $urandom_range(0, 3);
          case (ph)
            0: qh_m[n][i][c[i]].re = comp_t'(4096);
            1: qh_m[n][i][c[i]].im = comp_t'(4096);
            2: qh_m[n][i][c[i]].re = comp_t'(-4096);
            default: qh_m[n][i][c[i]].im = comp_t'(-4096);
          endcase
          // y = Q z: y[c_i] = conj(q) z_i, where q = QH[i][c_i]
          case (ph)
            0: begin yr = zr[i];  yi = zi[i];  end
            1: begin yr = zi[i];  yi = -zr[i]; end
            2: begin yr = -zr[i]; yi = -zi[i]; end
            default: begin yr = -zi[i]; yi = zr[i]; end
          endcase
          y_clean[n][c[i]].re = comp_t'(int'(yr));
          y_clean[n][c[i]].im = comp_t'(int'(yi));
        end
      end
    end
  endtask

  task automatic write_qr();
    int n0;
    n0 = n_written;
    for (int n = 0; n < NSC; n += 2) begin
      @(negedge pclk);
      for (int k = 0; k < 2; k++) begin
        sq_valid[k] = 1'b1;
        sq_sc[k]    = SCW'(n + k);
        sq_qh[k]    = qh_m[n + k];
        sq_r[k]     = r_m[n + k];
        sq_perm[k]  = perm_m[n + k];
      end
    end
    @(negedge pclk);
    sq_valid = '0;
    while (n_written - n0 < NSC) @(negedge pclk);
    repeat (3) @(negedge pclk);
  endtask

  task automatic push_vectors(output int span);
    int t0, d0;
    d0 = n_det;
    @(negedge clk);
    t0 = cyc;
    for (int n = 0; n < NSC; n++) begin
      y_sc = SCW'(n);
      y_vec = y_clean[n];
      y_valid = 1;
      while (!y_ready) @(negedge clk);
      @(negedge clk);
      y_valid = 0;
    end
    while (n_det - d0 < NSC) @(negedge clk);
    span = cyc - t0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int span;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < NT; k++) mods[k] = (f == 0) ? mod_e'(k) : rand_mod();
      make_frame();
      write_qr();
      for (int m = 0; m < 2; m++) begin
        det_sel = 1'(m);
        push_vectors(span);
        $display("frame %0d, %s: 48 subcarriers in %0d cycles", f, (m != 0) ? "sphere decoder" : "SIC", span);
        checks++;
        if (span > 320) failures++;
      end
    end
    checks++;
    if (n_det != 6 * NSC) begin failures++; $display("%0d detections", n_det); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
