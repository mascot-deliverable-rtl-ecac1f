// SQRD Retrieve unit: collects QR decomposition results from an ASIC.
//
// The ASIC returns, per matrix, the NT x NT entries of Q^H in row order, the
// NT(NT+1)/2 entries of the upper triangle of R in row order (one complex
// entry per 32-bit word, real part in the upper half) and one word holding
// the column permutation of the sorted decomposition (2 bits per layer, layer
// 0 in the lowest bits). Each word arrives with a four-phase handshake in
// which this unit answers combinationally, ack = req while it has room, which
// is the direct input-to-output path the document describes on the receiving
// side. A word is captured in the first cycle its req is seen. Completed
// results leave on res_valid/res_ready, labelled with the subcarrier index
// taken from a small tag FIFO filled by the matching load unit. The word
// format and the tag FIFO are this design's choices.
module sqrd_retrieve
  import mimo_pkg::*;
#(
  parameter int unsigned TAGS = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tag_valid,
  input  logic [SCW-1:0] tag_sc,
  output logic           tag_full,
  // ASIC output link
  input  logic           asic_req,
  output logic           asic_ack,
  input  logic [31:0]    asic_data,
  // results
  output logic           res_valid,
  input  logic           res_ready,
  output logic [SCW-1:0] res_sc,
  output cmat_t          res_qh,
  output cmat_t          res_r,
  output pvec_t          res_perm
);

  localparam int unsigned NQ = NT * NT;
  localparam int unsigned NW = NQ + NR + 1;
  localparam int unsigned CW = $clog2(NW + 1);
  localparam int unsigned TW = $clog2(TAGS);

  logic [CW-1:0]  widx;
  logic           req_q, full;
  logic           take;

  // tag FIFO
  logic [SCW-1:0] tags [TAGS];
  logic [TW-1:0]  twp, trp;
  logic [TW:0]    tcnt;

  assign asic_ack = asic_req && !full;
  assign tag_full = (tcnt == (TW+1)'(TAGS));
  assign take     = asic_req && !req_q && !full;
  assign res_valid = full && (tcnt != '0);
  assign res_sc    = tags[trp];

  // position of word w of the R part in the upper triangle
  function automatic void r_pos(int w, output int i, output int j);
    int k;
    k = 0;
    i = 0;
    j = 0;
    for (int a = 0; a < NT; a++)
      for (int b = a; b < NT; b++) begin
        if (k == w) begin i = a; j = b; end
        k++;
      end
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx  <= '0;
      req_q <= 1'b0;
      full  <= 1'b0;
      twp   <= '0;
      trp   <= '0;
      tcnt  <= '0;
    end else begin
      req_q <= asic_req && !full;
      if (take) begin
        if (widx == CW'(NW - 1)) begin
          widx <= '0;
          full <= 1'b1;
        end else widx <= widx + 1'b1;
      end
      if (res_valid && res_ready) full <= 1'b0;
      if (tag_valid) twp <= twp + 1'b1;
      if (res_valid && res_ready) trp <= trp + 1'b1;
      tcnt <= tcnt + (TW+1)'(tag_valid) - (TW+1)'(res_valid && res_ready);
    end
  end

  always_ff @(posedge clk) begin
    if (tag_valid) tags[twp] <= tag_sc;
    if (take) begin
      int w, i, j;
      w = int'(widx);
      if (w < NQ) begin
        res_qh[w / NT][w % NT].re <= asic_data[31:16];
        res_qh[w / NT][w % NT].im <= asic_data[15:0];
      end else if (w < NQ + NR) begin
        r_pos(w - NQ, i, j);
        res_r[i][j].re <= asic_data[31:16];
        res_r[i][j].im <= asic_data[15:0];
      end else begin
        for (int k = 0; k < NT; k++) res_perm[k] <= asic_data[2*k +: 2];
      end
    end
    if (take && widx == '0) begin
      for (int a = 0; a < NT; a++)
        for (int b = 0; b < a; b++) res_r[a][b] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (tag_valid) assert (tcnt != (TW+1)'(TAGS)) else $error("tag FIFO overflow");
  end

endmodule
