// Symbol reordering after detection (combinational).
//
// The sorted QR decomposition detects the streams in a changed order; entry k
// of perm names the stream that was detected as layer k. This block puts each
// decision back at its stream position: s_out[perm[k]] = s_in[k]. The document
// names the block and the permutation matrix P; encoding P as a list of stream
// indices is this design's choice.
module symbol_reorder
  import mimo_pkg::*;
(
  input  svec_t s_in,
  input  pvec_t perm,
  output svec_t s_out
);

  always_comb begin
    s_out = '0;
    for (int k = 0; k < NT; k++) s_out[perm[k]] = s_in[k];
  end

endmodule
