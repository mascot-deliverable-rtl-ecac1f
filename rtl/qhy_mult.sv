// Rotation of the received vector: y^ = Q~^H y.
//
// For every data subcarrier the buffered received vector y is multiplied by
// the normalized Q~^H of the same subcarrier, giving the vector the detectors
// work on. The operation is the document's; the fully parallel datapath (NT x
// NT complex multipliers, one vector per cycle) and the rounding are this
// design's choice. Q~^H and y use FRAC fraction bits; products are rounded
// back to FRAC bits and saturated to DW bits.
//
// Timing: in_valid with (sc, y, Q~^H) gives out_valid with (sc, y^) one cycle
// later. Fully pipelined.
module qhy_mult
  import mimo_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [SCW-1:0] in_sc,
  input  cvec_t          in_y,
  input  cmat_t          in_qh,
  output logic           out_valid,
  output logic [SCW-1:0] out_sc,
  output cvec_t          out_y
);

  localparam int unsigned AW = 2 * DW + 4;
  typedef logic signed [AW-1:0] acc_t;

  function automatic comp_t rnd_sat(acc_t x);
    acc_t r;
    r = (x + (acc_t'(1) <<< (FRAC - 1))) >>> FRAC;
    if (r >  acc_t'((1 <<< (DW-1)) - 1)) return comp_t'((1 <<< (DW-1)) - 1);
    if (r < -acc_t'(1 <<< (DW-1)))       return comp_t'(-(1 <<< (DW-1)));
    return comp_t'(r);
  endfunction

  cvec_t y_c;
  always_comb begin
    for (int i = 0; i < NT; i++) begin
      acc_t ar, ai;
      ar = '0;
      ai = '0;
      for (int j = 0; j < NT; j++) begin
        ar = ar + acc_t'(in_qh[i][j].re) * acc_t'(in_y[j].re)
                - acc_t'(in_qh[i][j].im) * acc_t'(in_y[j].im);
        ai = ai + acc_t'(in_qh[i][j].re) * acc_t'(in_y[j].im)
                + acc_t'(in_qh[i][j].im) * acc_t'(in_y[j].re);
      end
      y_c[i].re = rnd_sat(ar);
      y_c[i].im = rnd_sat(ai);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_sc <= in_sc;
    out_y  <= y_c;
  end

endmodule
