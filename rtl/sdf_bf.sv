// sdf_bf: radix-2 single-path delay-feedback (SDF) butterfly stage.
//
// This is the common core of every processing element of the pipeline: the
// Radix-2 PE of the pipeline head and PE3 of a radix-2/4/8 group are exactly
// this stage, and PE1/PE2 add a trivial-twiddle multiplier behind it.
//
// Operation, per frame of 2*DELAY valid input samples:
//   * first DELAY samples: the input is written into the DELAY-word feedback
//     memory, and the word leaving the memory (a difference left over from
//     the previous frame) is sent on;
//   * last DELAY samples: the word leaving the memory, a = x[n], meets the
//     input b = x[n+DELAY]; (a+b)/2 is sent on and (a-b)/2 is written back,
//     to leave during the first half of the next frame.
// Both results are halved with rounding (the per-butterfly divide by two
// that keeps the wordlength fixed); a result outside the WL-bit range
// saturates.
//
// Interface: samples move only on in_valid, so the input may pause at any
// time. The output is registered: out_valid follows an accepted input by one
// clock, except during the very first DELAY inputs after reset, while the
// memory is filled. Because the stage is continuous-flow, the differences of
// a frame leave only when the next frame (or flush samples) is supplied.
// out_pos counts output samples modulo 2^POS_W; it starts at 0 with the first
// output, so it gives the sample's place in the output frame, which the
// following twiddle multiplier needs.
//
// Origin: the store / add-and-subtract cycle of an SDF stage follows the
// original; halving with rounding, the registered output and the position
// counter are this design's choices.
module sdf_bf #(
  parameter int WL    = 16,
  parameter int DELAY = 64,
  parameter int POS_W = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WL-1:0] in_re,
  input  logic signed [WL-1:0] in_im,
  output logic                 out_valid,
  output logic signed [WL-1:0] out_re,
  output logic signed [WL-1:0] out_im,
  output logic [POS_W-1:0]     out_pos
);
  localparam int CW = (DELAY > 1) ? $clog2(DELAY) + 1 : 1;  // frame counter width

  logic [CW-1:0]   cnt;       // position of the input sample in its frame
  logic            second;    // input belongs to the second half of the frame
  logic            primed;    // the feedback memory has been filled once
  logic [2*WL-1:0] fb_in, fb_out;
  logic signed [WL-1:0] a_re, a_im, y_re, y_im, d_re, d_im;

  function automatic logic signed [WL-1:0] half(logic signed [WL:0] v);
    logic signed [WL:0] r;
    r = (v + 1) >>> 1;
    return r[WL-1:0];
  endfunction

  function automatic logic signed [WL-1:0] half_sum(logic signed [WL-1:0] a,
                                                    logic signed [WL-1:0] b);
    return half((WL+1)'(a) + (WL+1)'(b));
  endfunction

  function automatic logic signed [WL-1:0] half_diff(logic signed [WL-1:0] a,
                                                     logic signed [WL-1:0] b);
    return half((WL+1)'(a) - (WL+1)'(b));
  endfunction

  assign second = cnt[CW-1];
  assign {a_re, a_im} = fb_out;

  always_comb begin
    if (second) begin
      y_re = half_sum(a_re, in_re);
      y_im = half_sum(a_im, in_im);
      d_re = half_diff(a_re, in_re);
      d_im = half_diff(a_im, in_im);
    end else begin
      y_re = a_re;
      y_im = a_im;
      d_re = in_re;
      d_im = in_im;
    end
  end
  assign fb_in = {d_re, d_im};

  delay_line #(.DEPTH(DELAY), .W(2*WL)) u_fb (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  (fb_in),
    .dout (fb_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_pos   <= '0;
    end else begin
      out_valid <= in_valid && (primed || second);
      if (out_valid) out_pos <= out_pos + 1'b1;
      if (in_valid) begin
        cnt    <= (int'(cnt) == 2 * DELAY - 1) ? '0 : cnt + 1'b1;
        if (second) primed <= 1'b1;
        out_re <= y_re;
        out_im <= y_im;
      end
    end
  end
endmodule
