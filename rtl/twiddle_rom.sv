// twiddle_rom: coefficient table holding W_L^e = exp(-j*2*pi*e/L) for
// e = 0 .. L-1.
//
// Each entry is quantised as round(value * 2^CW), so CW (the coefficient
// weight) is the number of fraction bits; an entry is CW+2 bits wide so that
// +1.0 is representable. The table is computed while the design is
// elaborated, one entry per generate iteration, and maps to a ROM (or to
// constant logic) in synthesis. Read is combinational.
//
// Origin: the coefficient table follows the original; computing it at
// elaboration and reading CW as its fraction bits are this design's choices.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int L  = 128,
  parameter int CW = 14
) (
  input  logic [$clog2(L)-1:0] addr,
  output logic signed [CW+1:0] w_re,
  output logic signed [CW+1:0] w_im
);
  logic signed [CW+1:0] rom_re [L];
  logic signed [CW+1:0] rom_im [L];

  for (genvar e = 0; e < L; e++) begin : g_entry
    assign rom_re[e] = (CW+2)'(tw_cos(e, L, CW));
    assign rom_im[e] = (CW+2)'(tw_sin(e, L, CW));
  end

  assign w_re = rom_re[addr];
  assign w_im = rom_im[addr];
endmodule
