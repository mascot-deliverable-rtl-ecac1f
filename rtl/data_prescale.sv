// Prescaling of channel estimates before the QR decomposition.
//
// The fixed-point channel matrix coming from the channel estimation is scaled
// by a power of two so that it uses the input range of the QR decomposition
// ASIC well: shift > 0 multiplies by 2^shift with saturation, shift < 0
// divides by 2^-shift with rounding. The document only says that the data is
// "properly pre-scaled"; the power-of-two scaling and its run-time setting are
// this design's choice. Combinational.
module data_prescale
  import mimo_pkg::*;
(
  input  cmat_t             h_in,
  input  logic signed [3:0] shift,
  output cmat_t             h_out
);

  localparam int unsigned XW = DW + 8;
  typedef logic signed [XW-1:0] x_t;

  function automatic comp_t scale(comp_t v, logic signed [3:0] sh);
    x_t x;
    x = x_t'(v);
    if (sh >= 0) x = x <<< sh;
    else         x = (x + (x_t'(1) <<< (-sh - 1))) >>> (-sh);
    if (x >  x_t'((1 <<< (DW-1)) - 1)) return comp_t'((1 <<< (DW-1)) - 1);
    if (x < -x_t'(1 <<< (DW-1)))       return comp_t'(-(1 <<< (DW-1)));
    return comp_t'(x);
  endfunction

  always_comb
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++) begin
        h_out[i][j].re = scale(h_in[i][j].re, shift);
        h_out[i][j].im = scale(h_in[i][j].im, shift);
      end

endmodule
