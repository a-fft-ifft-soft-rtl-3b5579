// sp_conv: serial-to-parallel converter in front of the FFT RAM.
//
// Collects two consecutive input samples and presents them together, so that
// a frame of N samples is written into the two-write-port FFT RAM in N/2
// accesses. The first sample of a pair is held in a register; the pair is
// valid (combinationally) in the clock in which the second sample arrives,
// and is written at that clock edge. A sample is accepted when
// in_valid && in_ready; in_ready is the controller's "loading" flag.
// Only the first sample needs storage: d1 is the current input itself, so
// its bits are plain wires from in_re/in_im and carry no logic of their own.
// The pairing (two samples per RAM write) is this design's choice; the
// original names the S/P block without giving its width.
module sp_conv #(
  parameter int WL = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_ready,
  input  logic signed [WL-1:0] in_re,
  input  logic signed [WL-1:0] in_im,
  output logic                 pair_valid,
  output logic [2*WL-1:0]      d0,          // {re, im} of the even sample
  output logic [2*WL-1:0]      d1           // {re, im} of the odd sample
);
  logic            have;
  logic [2*WL-1:0] held;

  assign pair_valid = in_valid && in_ready && have;
  assign d0         = held;
  assign d1         = {in_re, in_im};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0;
      held <= '0;
    end else if (in_valid && in_ready) begin
      have <= ~have;
      if (!have) held <= {in_re, in_im};
    end
  end
endmodule
