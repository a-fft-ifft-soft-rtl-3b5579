// pe1: first processing element of a radix-2/4 or radix-2/4/8 group.
//
// An SDF butterfly with a DELAY of L/2 (L = frame length handled by the
// group), followed by a multiplexer that either passes the butterfly output
// or multiplies it by -j. Multiplying by -j needs no multiplier: real and
// imaginary parts are exchanged and the new imaginary part is negated.
//
// With the group frame index written n = (L/2)n1 + (L/4)n2 + rest, the
// butterfly produces output k1; the factor (-j)^(n2*k1) is applied, i.e.
// -j is selected for the second quarter of the difference half
// (k1 = 1, n2 = 1). Both bits are the top two bits of the stage's output
// position. Output timing is that of sdf_bf (registered butterfly; the -j
// selection is combinational behind the register).
//
// Origin: the -j by exchanging real and imaginary parts in the second quarter
// of each block follows the original; the position counter that finds that
// quarter is this design's choice.
module pe1 #(
  parameter int WL = 16,
  parameter int L  = 128
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
  logic                 mj;

  sdf_bf #(.WL(WL), .DELAY(L / 2), .POS_W(LB)) u_bf (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid, .out_re(b_re), .out_im(b_im), .out_pos(pos)
  );

  assign mj = pos[LB-1] & pos[LB-2];

  function automatic logic signed [WL-1:0] neg_sat(logic signed [WL-1:0] v);
    return (v == {1'b1, {(WL-1){1'b0}}}) ? {1'b0, {(WL-1){1'b1}}} : -v;
  endfunction

  always_comb begin
    if (mj) begin
      out_re = b_im;
      out_im = neg_sat(b_re);
    end else begin
      out_re = b_re;
      out_im = b_im;
    end
  end
endmodule
