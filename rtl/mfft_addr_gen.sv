// mfft_addr_gen: address generator of the memory-based FFT.
//
// Combinational. From the controller's phase and counters it forms the two
// FFT RAM addresses of the current access and the coefficient ROM address:
//   LOAD    pair i           : a0 = 2i,          a1 = 2i + 1
//   COMPUTE stage s, bfly b  : h = N/2^(s+1), m = b mod h,
//                              a0 = (b div h)*2h + m, a1 = a0 + h,
//                              twiddle W_N^(m*2^s)   (in-place radix-2 DIF)
//   UNLOAD  pair i           : a0 = bitrev(2i),  a1 = a0 + N/2
// After the in-place DIF stages, X[k] sits at address bitrev(k), so the
// UNLOAD pair holds X[2i] and X[2i+1] and the output leaves in natural order.
//
// Origin: the original shows an address generator feeding the RAM and the
// coefficient ROM but not its scheme; the in-place radix-2 addressing with a
// bit-reversed unload is this design's choice.
module mfft_addr_gen
  import fft_pkg::*;
#(
  parameter int N = 128
) (
  input  logic [1:0]                   phase,   // 0 load, 1 compute, 2 unload
  input  logic [$clog2($clog2(N))-1:0] stage,
  input  logic [$clog2(N)-2:0]         cnt,     // pair or butterfly index
  output logic [$clog2(N)-1:0]         a0,
  output logic [$clog2(N)-1:0]         a1,
  output logic [$clog2(N)-1:0]         tw_addr
);
  localparam int NB = $clog2(N);

  logic [NB-1:0] h, m, grp;

  always_comb begin
    h       = NB'(N >> (int'(stage) + 1));
    m       = NB'(cnt) & (h - 1'b1);
    grp     = NB'(cnt) >> (NB - 1 - int'(stage));
    tw_addr = '0;
    unique case (phase)
      2'd0: begin
        a0 = {cnt, 1'b0};
        a1 = {cnt, 1'b1};
      end
      2'd1: begin
        a0      = (grp << (NB - int'(stage))) | m;
        a1      = a0 + h;
        tw_addr = m << stage;
      end
      default: begin
        a0 = NB'(bitrev({cnt, 1'b0}, NB));
        a1 = a0 + NB'(N / 2);
      end
    endcase
  end
endmodule
