// ps_conv: parallel-to-serial converter behind the FFT RAM.
//
// Takes a pair of results read from the FFT RAM in one access and sends
// them out one per clock: d0 in the clock after pair_valid, d1 in the clock
// after that. The controller presents a pair at most every other clock.
// Output is registered; out_valid marks each sample.
//
// Origin: the original names the P/S converter without its width; two samples
// per read is this design's choice.
module ps_conv #(
  parameter int WL = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pair_valid,
  input  logic [2*WL-1:0]      d0,
  input  logic [2*WL-1:0]      d1,
  output logic                 out_valid,
  output logic signed [WL-1:0] out_re,
  output logic signed [WL-1:0] out_im
);
  logic            pend;
  logic [2*WL-1:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      held      <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (pair_valid) begin
      {out_re, out_im} <= d0;
      held             <= d1;
      pend             <= 1'b1;
      out_valid        <= 1'b1;
    end else if (pend) begin
      {out_re, out_im} <= held;
      pend             <= 1'b0;
      out_valid        <= 1'b1;
    end else begin
      out_valid <= 1'b0;
    end
  end

  a_pair_spacing: assert property (@(posedge clk) disable iff (!rst_n) !(pair_valid && pend))
    else $error("ps_conv: pair presented while the previous one is still leaving");
endmodule
