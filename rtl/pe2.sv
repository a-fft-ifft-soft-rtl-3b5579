// pe2: second processing element of a radix-2/4/8 group.
//
// An SDF butterfly with a DELAY of L/4 (L = group frame
// length), followed by the constant-coefficient unit that multiplies by
// 1, W^(N/8), -j or W^(3N/8) without a general multiplier.
//
// With the group frame index n = (L/2)n1 + (L/4)n2 + (L/8)n3 + m and the
// outputs k1 (PE1) and k2 (this butterfly), the factor applied here is
// W_8^(n3*(k1 + 2*k2)). At the output of this stage the position bits are,
// from the top, k1, k2, n3, m, so the selection is read straight from the
// stage's output position. Output timing is that of sdf_bf; the constant
// multiplier is combinational behind its register.
//
// Origin: a butterfly followed by the constant-factor unit (1, -j, W^(N/8),
// W^(3N/8)) follows the original; the selection from the position counter is
// this design's choice.
module pe2 #(
  parameter int WL = 16,
  parameter int L  = 128,
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

  logic signed [WL-1:0] b_re, b_im;
  logic [LB-1:0]        pos;
  logic [1:0]           sel;

  sdf_bf #(.WL(WL), .DELAY(L / 4), .POS_W(LB)) u_bf (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid, .out_re(b_re), .out_im(b_im), .out_pos(pos)
  );

  // W_8 exponent n3*(k1 + 2*k2)
  assign sel = pos[LB-3] ? {pos[LB-2], pos[LB-1]} : 2'd0;

  coef_const_mult #(.WL(WL), .CL(CL)) u_coef (
    .sel, .in_re(b_re), .in_im(b_im), .out_re, .out_im
  );
endmodule
