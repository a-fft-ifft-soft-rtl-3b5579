// coef_const_mult: multiplier-free unit for the four constant twiddle
// factors of a radix-2/4/8 group: 1, -j, W^(N/8) and W^(3N/8).
//
//   sel 0 (1)        : re' = re,               im' = im
//   sel 1 (W^(N/8))  : re' = c*(re + im),      im' = c*(im - re)
//   sel 2 (-j)       : re' = im,               im' = -re
//   sel 3 (W^(3N/8)) : re' = c*(im - re),      im' = -c*(re + im)
// with c = sqrt(2)/2 and W = exp(-j*2*pi/N). The sel encoding equals the
// exponent of W_8, so the unit multiplies by W_8^sel.
//
// The product by c is built from shifts and adds: c is replaced by the
// first CL terms of a signed-power-of-two expansion (fft_pkg), summed with
// fft_pkg::SP2_FRAC extra fraction bits and rounded once at the end.
// A result outside the WL-bit range saturates. Purely combinational.
//
// Origin: the four constant factors and the shift-and-add product by
// sqrt(2)/2 follow the original; the particular signed-power-of-two
// expansion, reading CL as its number of terms, and the rounding are this
// design's choices.
module coef_const_mult
  import fft_pkg::*;
#(
  parameter int WL = 16,
  parameter int CL = 8
) (
  input  logic [1:0]           sel,
  input  logic signed [WL-1:0] in_re,
  input  logic signed [WL-1:0] in_im,
  output logic signed [WL-1:0] out_re,
  output logic signed [WL-1:0] out_im
);
  localparam int XW = WL + 2 + SP2_FRAC;   // width of the shift-add sums

  function automatic logic signed [WL-1:0] sat(logic signed [XW-1:0] v);
    logic signed [XW-1:0] hi, lo;
    hi = XW'({1'b0, {(WL - 1){1'b1}}});   // largest WL-bit value
    lo = ~hi;                             // smallest WL-bit value
    if (v > hi) return hi[WL-1:0];
    if (v < lo) return lo[WL-1:0];
    return v[WL-1:0];
  endfunction

  // round(c * v), v a (WL+1)-bit sum or difference
  function automatic logic signed [XW-1:0] times_c(logic signed [WL:0] v);
    logic signed [XW-1:0] acc, x;
    acc = '0;
    x   = XW'(v) <<< SP2_FRAC;
    for (int i = 0; i < CL; i++) begin
      if (SQRT2_2_TERMS[i].neg) acc -= x >>> SQRT2_2_TERMS[i].shift;
      else                      acc += x >>> SQRT2_2_TERMS[i].shift;
    end
    return (acc + XW'(longint'(1) <<< (SP2_FRAC - 1))) >>> SP2_FRAC;
  endfunction

  logic signed [WL:0] s, d;   // re + im, im - re
  assign s = (WL+1)'(in_re) + (WL+1)'(in_im);
  assign d = (WL+1)'(in_im) - (WL+1)'(in_re);

  always_comb begin
    unique case (sel)
      2'd0: begin out_re = in_re;               out_im = in_im; end
      2'd1: begin out_re = sat(times_c(s));     out_im = sat(times_c(d)); end
      2'd2: begin out_re = in_im;               out_im = sat(-XW'(in_re)); end
      default: begin out_re = sat(times_c(d));  out_im = sat(-times_c(s)); end
    endcase
  end
endmodule
