// fft_ram: working memory of the memory-based FFT, N complex words.
//
// Two read ports and two write ports, so that one radix-2 butterfly can
// fetch both operands and store both results in one clock, and so that the
// S/P and P/S converters move two samples per access. Reads are
// combinational; writes happen at the rising edge. The controller never
// issues two writes to the same address in one clock. Contents are not reset.
//
// Origin: the original names an FFT RAM (its memory unit) without giving its
// ports; two read and two write ports and the register-array form are this
// design's choices.
module fft_ram #(
  parameter int N = 128,
  parameter int W = 32
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] ra0,
  input  logic [$clog2(N)-1:0] ra1,
  output logic [W-1:0]         rd0,
  output logic [W-1:0]         rd1,
  input  logic                 we0,
  input  logic [$clog2(N)-1:0] wa0,
  input  logic [W-1:0]         wd0,
  input  logic                 we1,
  input  logic [$clog2(N)-1:0] wa1,
  input  logic [W-1:0]         wd1
);
  logic [W-1:0] mem [N];

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];

  always_ff @(posedge clk) begin
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
  end

  a_one_write_per_word: assert property (@(posedge clk) !(we0 && we1 && wa0 == wa1))
    else $error("fft_ram: two writes to address %0d", wa0);
endmodule
