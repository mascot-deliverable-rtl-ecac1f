// Behavioural model of one MMSE-SQRD ASIC for the testbenches (not
// synthesizable, not part of the design). It receives a channel matrix as
// NT*NT complex words plus one {cfg, sigma} word over a four-phase handshake
// (acknowledging combinationally), computes a sorted QR decomposition
// H P = Q R in floating point (column with the smallest remaining norm first,
// no regularization), waits LAT cycles and returns Q^H, the upper triangle of
// R and the permutation word over a second four-phase link, in the word
// format of sqrd_retrieve. Values use FRAC fraction bits.
module sqrd_asic_model
  import mimo_pkg::*;
#(
  parameter int LAT = 20
) (
  input  logic        clk,
  input  logic        ld_req,
  output logic        ld_ack,
  input  logic [31:0] ld_data,
  output logic        rt_req,
  input  logic        rt_ack,
  output logic [31:0] rt_data
);

  localparam int NW_IN = NT * NT + 1;
  real hr [NT][NT], hi [NT][NT];
  logic [31:0] out_words [$];
  int nin = 0;
  logic req_q = 0;
  int n_done = 0;

  assign ld_ack = ld_req;
  initial begin rt_req = 0; rt_data = '0; end

  function automatic logic [15:0] fx(real v);
    int x;
    x = int'($floor(v * real'(1 << FRAC) + 0.5));
    if (x > 32767) x = 32767;
    if (x < -32768) x = -32768;
    return 16'(x);
  endfunction

  task automatic decompose();
    real qr [NT][NT], qi [NT][NT];       // [row][col]
    real rr [NT][NT], ri [NT][NT];
    int  p [NT];
    for (int i = 0; i < NT; i++) begin
      p[i] = i;
      for (int j = 0; j < NT; j++) begin
        qr[i][j] = hr[i][j]; qi[i][j] = hi[i][j]; rr[i][j] = 0.0; ri[i][j] = 0.0;
      end
    end
    for (int i = 0; i < NT; i++) begin
      int kmin;
      real nmin, nrm;
      kmin = i; nmin = 1.0e30;
      for (int l = i; l < NT; l++) begin
        real n;
        n = 0.0;
        for (int a = 0; a < NT; a++) n += qr[a][l] * qr[a][l] + qi[a][l] * qi[a][l];
        if (n < nmin) begin nmin = n; kmin = l; end
      end
      if (kmin != i) begin
        int t;
        t = p[i]; p[i] = p[kmin]; p[kmin] = t;
        for (int a = 0; a < NT; a++) begin
          real x;
          x = qr[a][i]; qr[a][i] = qr[a][kmin]; qr[a][kmin] = x;
          x = qi[a][i]; qi[a][i] = qi[a][kmin]; qi[a][kmin] = x;
          x = rr[a][i]; rr[a][i] = rr[a][kmin]; rr[a][kmin] = x;
          x = ri[a][i]; ri[a][i] = ri[a][kmin]; ri[a][kmin] = x;
        end
      end
      nrm = $sqrt(nmin);
      rr[i][i] = nrm; ri[i][i] = 0.0;
      for (int a = 0; a < NT; a++) begin qr[a][i] /= nrm; qi[a][i] /= nrm; end
      for (int l = i + 1; l < NT; l++) begin
        real cr, ci;
        cr = 0.0; ci = 0.0;
        for (int a = 0; a < NT; a++) begin   // q_i^H q_l
          cr += qr[a][i] * qr[a][l] + qi[a][i] * qi[a][l];
          ci += qr[a][i] * qi[a][l] - qi[a][i] * qr[a][l];
        end
        rr[i][l] = cr; ri[i][l] = ci;
        for (int a = 0; a < NT; a++) begin
          qr[a][l] -= cr * qr[a][i] - ci * qi[a][i];
          qi[a][l] -= cr * qi[a][i] + ci * qr[a][i];
        end
      end
    end
    // Q^H [i][j] = conj(Q[j][i])
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++) out_words.push_back({fx(qr[j][i]), fx(-qi[j][i])});
    for (int i = 0; i < NT; i++)
      for (int j = i; j < NT; j++) out_words.push_back({fx(rr[i][j]), fx(ri[i][j])});
    begin
      logic [31:0] pw;
      pw = '0;
      for (int k = 0; k < NT; k++) pw[2*k +: 2] = 2'(p[k]);
      out_words.push_back(pw);
    end
  endtask

  // input link: capture each word on the first cycle of its request
  always @(posedge clk) begin
    if (ld_req && !req_q) begin
      if (nin < NT * NT) begin
        hr[nin / NT][nin % NT] = real'($signed(ld_data[31:16])) / real'(1 << FRAC);
        hi[nin / NT][nin % NT] = real'($signed(ld_data[15:0])) / real'(1 << FRAC);
      end
      nin++;
      if (nin == NW_IN) begin
        nin = 0;
        decompose();
      end
    end
    req_q <= ld_req;
  end

  // output link: four-phase handshake per word
  initial begin
    forever begin
      @(posedge clk);
      if (out_words.size() >= NT * NT + NR + 1) begin
        repeat (LAT) @(posedge clk);
        for (int w = 0; w < NT * NT + NR + 1; w++) begin
          rt_data <= out_words.pop_front();
          rt_req  <= 1'b1;
          @(posedge clk);
          while (!rt_ack) @(posedge clk);
          rt_req <= 1'b0;
          @(posedge clk);
          while (rt_ack) @(posedge clk);
        end
        n_done++;
      end
    end
  end

endmodule
