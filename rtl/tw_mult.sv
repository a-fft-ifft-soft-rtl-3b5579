// tw_mult: general twiddle multiplier between two groups of the SDF
// pipeline (the "ROM" and "X" pair of the pipeline diagram).
//
// It follows a group that handled frames of L samples with S radix-2 stages
// (S = 1 for the Radix-2 PE, 2 for a radix-2/4 group, 3 for a radix-2/4/8
// group). At its input the position p in the frame has the group's outputs
// k1..kS in its top S bits (k1 on top) and the remaining index m in the low
// bits. The sample is multiplied by W_L^(m*k), k = k1 + 2*k2 + 4*k3, read from
// a twiddle_rom of L entries (m*k < L always holds).
//
// Product: (a+jb)(c+jd) with four multipliers, rounded to the data format
// and saturated. The output is registered one clock after an accepted input;
// the input may pause (in_valid low) at any time.
//
// Origin: general twiddle factors from a coefficient table between groups
// follow the original; the exponent formula, the rounding and the output
// register are this design's choices.
module tw_mult #(
  parameter int WL = 16,
  parameter int CW = 14,
  parameter int L  = 128,
  parameter int S  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WL-1:0] in_re,
  input  logic signed [WL-1:0] in_im,
  output logic                 out_valid,
  output logic signed [WL-1:0] out_re,
  output logic signed [WL-1:0] out_im
);
  localparam int LB = $clog2(L);
  localparam int PW = WL + CW + 3;          // product and sum width

  logic [LB-1:0]        pos, m, e;
  logic [2:0]           k;
  logic signed [CW+1:0] w_re, w_im;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    k = '0;
    for (int i = 0; i < S; i++) k[i] = pos[LB-1-i];
    m = pos & LB'((1 << (LB - S)) - 1);
  end
  assign e = LB'(m * k);

  twiddle_rom #(.L(L), .CW(CW)) u_rom (.addr(e), .w_re, .w_im);

  function automatic logic signed [WL-1:0] rnd_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r, hi, lo;
    r  = (v + PW'(longint'(1) <<< (CW - 1))) >>> CW;
    hi = PW'({1'b0, {(WL - 1){1'b1}}});   // largest WL-bit value
    lo = ~hi;                             // smallest WL-bit value
    if (r > hi) return hi[WL-1:0];
    if (r < lo) return lo[WL-1:0];
    return r[WL-1:0];
  endfunction

  assign p_re = PW'(in_re) * PW'(w_re) - PW'(in_im) * PW'(w_im);
  assign p_im = PW'(in_re) * PW'(w_im) + PW'(in_im) * PW'(w_re);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pos    <= pos + 1'b1;
        out_re <= rnd_sat(p_re);
        out_im <= rnd_sat(p_im);
      end
    end
  end
endmodule
