// r248_group: one radix-2/4/8 butterfly processor of the SDF pipeline, or
// the shorter radix-2/4 and radix-2 heads that complete sizes that are not a
// power of 8.
//
//   S = 3 (radix-2/4/8): PE1 (delay L/2, -j) -> PE2 (delay L/4, 1/-j/W^(N/8)/
//                        W^(3N/8)) -> PE3 (delay L/8, butterfly only)
//   S = 2 (radix-2/4)  : PE1 (delay L/2, -j) -> butterfly with delay L/4
//   S = 1 (radix-2)    : one butterfly with delay L/2 (the Radix-2 PE)
//
// L is the frame length the group works on. The group computes S radix-2
// decimation-in-frequency stages with all trivial twiddle factors inside;
// the general factor W_L^(m*k) that remains is applied by the tw_mult after
// the group (none after the last group). Each PE adds one clock of register
// latency on top of its delay.
//
// Origin: the PE1/PE2/PE3 group and the reduced radix-2/4 and radix-2 forms
// follow the original; the single parameterised wrapper is this design's
// choice.
module r248_group #(
  parameter int WL = 16,
  parameter int L  = 64,
  parameter int S  = 3,
  parameter int CL = 8
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

  if (S == 1) begin : g_r2
    sdf_bf #(.WL(WL), .DELAY(L / 2), .POS_W(LB)) u_pe (
      .clk, .rst_n, .in_valid, .in_re, .in_im,
      .out_valid, .out_re, .out_im, .out_pos()
    );
  end else begin : g_r4
    logic                 v1, v2;
    logic signed [WL-1:0] re1, im1, re2, im2;

    pe1 #(.WL(WL), .L(L)) u_pe1 (
      .clk, .rst_n, .in_valid, .in_re, .in_im,
      .out_valid(v1), .out_re(re1), .out_im(im1)
    );

    if (S == 3) begin : g_pe2
      pe2 #(.WL(WL), .L(L), .CL(CL)) u_pe2 (
        .clk, .rst_n, .in_valid(v1), .in_re(re1), .in_im(im1),
        .out_valid(v2), .out_re(re2), .out_im(im2)
      );
    end else begin : g_no_pe2
      assign v2  = v1;
      assign re2 = re1;
      assign im2 = im1;
    end

    // PE3 (S = 3) or the second butterfly of a radix-2/4 group (S = 2)
    sdf_bf #(.WL(WL), .DELAY(L / (1 << S)), .POS_W(LB)) u_pe3 (
      .clk, .rst_n, .in_valid(v2), .in_re(re2), .in_im(im2),
      .out_valid, .out_re, .out_im, .out_pos()
    );
  end
endmodule
