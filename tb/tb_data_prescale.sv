// Self-checking testbench of data_prescale.
//
// Applies random channel matrices and random shifts in -8..7 and compares
// every output entry with an integer model: multiplication by 2^shift with
// saturation, or division by 2^-shift with round-half-up, then saturation to
// the 16-bit component range. Purely combinational, so every check is made
// one time step after the inputs change; a watchdog ends a hung run.
module tb_data_prescale;
  import mimo_pkg::*;

  cmat_t             h_in, h_out;
  logic signed [3:0] shift;
  int checks = 0, failures = 0;

  data_prescale dut (.h_in(h_in), .shift(shift), .h_out(h_out));

  function automatic int ref_scale(int v, int sh);
    longint x;
    x = v;
    if (sh >= 0) x = x * (longint'(1) << sh);
    else         x = (x + (longint'(1) << (-sh - 1))) >>> (-sh);
    if (x > 32767)  x = 32767;
    if (x < -32768) x = -32768;
    return int'(x);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      shift = 4'($urandom_range(0, 15));
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          // mix of small and full-range values so both saturation and rounding occur
          if (t % 2 == 0) begin
            h_in[i][j].re = comp_t'($urandom);
            h_in[i][j].im = comp_t'($urandom);
          end else begin
            h_in[i][j].re = comp_t'(int'($urandom_range(0, 600)) - 300);
            h_in[i][j].im = comp_t'(int'($urandom_range(0, 600)) - 300);
          end
        end
      #1;
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          int er, ei;
          er = ref_scale(int'(h_in[i][j].re), int'(shift));
          ei = ref_scale(int'(h_in[i][j].im), int'(shift));
          checks++;
          if (int'(h_out[i][j].re) != er || int'(h_out[i][j].im) != ei) begin
            failures++;
            if (failures < 10)
              $display("mismatch shift=%0d in=%0d,%0d out=%0d,%0d exp=%0d,%0d", shift,
                       h_in[i][j].re, h_in[i][j].im, h_out[i][j].re, h_out[i][j].im, er, ei);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
