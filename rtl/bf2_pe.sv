// bf2_pe: the radix-2 butterfly PE of the memory-based FFT.
//
// Decimation-in-frequency butterfly with the twiddle on the difference:
//   x0 = (a + b) / 2,   x1 = ((a - b) / 2) * w
// Both halvings round, the complex product (four multipliers) is rounded to
// the data format with the coefficient's CW fraction bits removed, and any
// result outside WL bits saturates. Purely combinational.
//
// Origin: the original asks for one butterfly PE doing complex add, subtract,
// multiply and divide; the radix-2 form, the halving as the divide, and the
// rounding and saturation are this design's choices.
module bf2_pe #(
  parameter int WL = 16,
  parameter int CW = 14
) (
  input  logic signed [WL-1:0] a_re,
  input  logic signed [WL-1:0] a_im,
  input  logic signed [WL-1:0] b_re,
  input  logic signed [WL-1:0] b_im,
  input  logic signed [CW+1:0] w_re,
  input  logic signed [CW+1:0] w_im,
  output logic signed [WL-1:0] x0_re,
  output logic signed [WL-1:0] x0_im,
  output logic signed [WL-1:0] x1_re,
  output logic signed [WL-1:0] x1_im
);
  localparam int PW = WL + CW + 3;

  function automatic logic signed [WL-1:0] half(logic signed [WL:0] v);
    logic signed [WL:0] r;
    r = (v + 1'b1) >>> 1;
    return r[WL-1:0];
  endfunction

  function automatic logic signed [WL-1:0] rnd_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r, hi, lo;
    r  = (v + PW'(longint'(1) <<< (CW - 1))) >>> CW;
    hi = PW'({1'b0, {(WL - 1){1'b1}}});   // largest WL-bit value
    lo = ~hi;                             // smallest WL-bit value
    if (r > hi) return hi[WL-1:0];
    if (r < lo) return lo[WL-1:0];
    return r[WL-1:0];
  endfunction

  logic signed [WL-1:0] d_re, d_im;

  assign x0_re = half((WL+1)'(a_re) + (WL+1)'(b_re));
  assign x0_im = half((WL+1)'(a_im) + (WL+1)'(b_im));
  assign d_re  = half((WL+1)'(a_re) - (WL+1)'(b_re));
  assign d_im  = half((WL+1)'(a_im) - (WL+1)'(b_im));

  assign x1_re = rnd_sat(PW'(d_re) * PW'(w_re) - PW'(d_im) * PW'(w_im));
  assign x1_im = rnd_sat(PW'(d_re) * PW'(w_im) + PW'(d_im) * PW'(w_re));
endmodule
