// Successive interference cancellation (SIC) detector.
//
// Detects one normalized received vector y~ = Q~^H y against the normalized
// upper-triangular R~, layer by layer from the last layer (NT-1) to the first.
// A single partial distance unit (sic_pdu) is reused NT times: in every cycle
// it cancels the layers already decided and slices the current one, and its
// decision is fed back for the next layer. The decided vector is then put
// back into stream order with the permutation of the sorted QR decomposition
// and Gray-demapped. The structure (one PDU used NT times, then reordering and
// demapping) follows the document; the one-layer-per-cycle schedule is this
// design's choice.
//
// Interface: a vector is accepted when in_valid && in_ready. Timing: one layer
// per cycle, so a new vector is accepted every NT cycles; the result appears
// with out_valid for one cycle NT + 1 clock edges after the accepting edge
// (5 for NT = 4), and the next vector can be accepted NT cycles after the
// previous one. There is no output back-pressure.
module sic_detector
  import mimo_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  modv_t          mods,       // modulation of each stream
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [SCW-1:0] in_sc,
  input  cvec_t          in_y,       // normalized y~ for this subcarrier
  input  cmat_t          in_r,       // normalized R~
  input  pvec_t          in_perm,
  output logic           out_valid,
  output logic [SCW-1:0] out_sc,
  output svec_t          out_sym,    // decisions in stream order
  output vbits_t         out_bits,
  output logic [NT-1:0][2:0] out_nbits
);

  localparam int unsigned LW = $clog2(NT);

  logic             busy;
  logic [LW-1:0]    layer;
  logic [SCW-1:0]   sc_q;
  cvec_t            y_q;
  cmat_t            r_q;
  pvec_t            perm_q;
  svec_t            s_q;
  mod_e             lmod;
  bcplx_t           b_unused;
  sym_t             s_new;
  svec_t            s_done, s_ord;

  // reorder stage
  logic             v_ord;
  logic [SCW-1:0]   sc_ord;
  svec_t            sym_ord;

  vbits_t           bits_c;
  logic [NT-1:0][2:0] nbits_c;

  assign lmod     = mods[perm_q[layer]];
  assign in_ready = !busy || (layer == '0);

  sic_pdu u_pdu (
    .y     (y_q[layer]),
    .rrow  (r_q[layer]),
    .s     (s_q),
    .layer (layer),
    .lmod  (lmod),
    .b     (b_unused),
    .s_hat (s_new)
  );

  always_comb begin
    s_done        = s_q;
    s_done[layer] = s_new;
  end

  symbol_reorder u_reorder (
    .s_in  (s_done),
    .perm  (perm_q),
    .s_out (s_ord)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      layer <= '0;
      v_ord <= 1'b0;
    end else begin
      v_ord <= busy && (layer == '0);
      if (in_valid && in_ready) begin
        busy  <= 1'b1;
        layer <= LW'(NT - 1);
      end else if (busy) begin
        if (layer == '0) busy <= 1'b0;
        else             layer <= layer - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      sc_q   <= in_sc;
      y_q    <= in_y;
      r_q    <= in_r;
      perm_q <= in_perm;
      s_q    <= '0;
    end else if (busy) begin
      s_q <= s_done;
    end
    if (busy && layer == '0) begin
      sc_ord  <= sc_q;
      sym_ord <= s_ord;
    end
  end

  symbol_demap u_demap (
    .s     (sym_ord),
    .mods  (mods),
    .bits  (bits_c),
    .nbits (nbits_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_ord;
  end

  always_ff @(posedge clk) begin
    out_sc    <= sc_ord;
    out_sym   <= sym_ord;
    out_bits  <= bits_c;
    out_nbits <= nbits_c;
  end

endmodule
