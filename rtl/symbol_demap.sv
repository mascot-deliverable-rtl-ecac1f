// Gray demapping of detected symbols to bits (combinational).
//
// Each stream is demapped according to its own modulation. Symbols are on the
// odd-integer grid (QPSK +-1, 16-QAM +-1/+-3, 64-QAM +-1..+-7, BPSK +-(1+j)).
// The document asks for Gray mapping; the bit labelling below (that of IEEE
// 802.11a, per real dimension) is this design's choice:
//   bit0 = x > 0,  bit1 = |x| < 4 (64-QAM) or |x| == 1 (16-QAM),
//   bit2 = |x| in {3,5} (64-QAM only).
// The in-phase bits occupy the low half of a stream's bit field and the
// quadrature bits the next positions; nbits gives the count per stream.
module symbol_demap
  import mimo_pkg::*;
(
  input  svec_t  s,
  input  modv_t  mods,
  output vbits_t bits,
  output logic [NT-1:0][2:0] nbits
);

  function automatic logic [2:0] dim_bits(lvl_t x, mod_e m);
    int a;
    a = (x < 0) ? -int'(x) : int'(x);
    case (m)
      MOD_QAM64: return {1'(a == 3 || a == 5), 1'(a < 4), 1'(x > 0)};
      MOD_QAM16: return {1'b0, 1'(a == 1), 1'(x > 0)};
      default:   return {2'b00, 1'(x > 0)};
    endcase
  endfunction

  always_comb begin
    for (int k = 0; k < NT; k++) begin
      logic [2:0] bi, bq;
      bi = dim_bits(s[k].re, mods[k]);
      bq = dim_bits(s[k].im, mods[k]);
      nbits[k] = 3'(bits_per_sym(mods[k]));
      case (mods[k])
        MOD_BPSK:  bits[k] = {5'b0, bi[0]};
        MOD_QPSK:  bits[k] = {4'b0, bq[0], bi[0]};
        MOD_QAM16: bits[k] = {2'b0, bq[1:0], bi[1:0]};
        default:   bits[k] = {bq, bi};
      endcase
    end
  end

endmodule
