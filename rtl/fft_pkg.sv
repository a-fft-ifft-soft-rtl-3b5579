// fft_pkg: types, constants and helper functions shared by both FFT/IFFT
// architectures (the single-path delay-feedback pipeline and the
// memory-based core).
//
// * fft_func_e selects the transform. An IFFT is computed on the same
//   datapath by swapping real and imaginary parts at the core's input and
//   output, which turns the forward kernel W^(nk) into W^(-nk).
// * SQRT2_2_TERMS is the signed-power-of-two expansion of sqrt(2)/2 used by
//   the multiplier-free W^(N/8) and W^(3N/8) units: sqrt(2)/2 is approximated
//   by the first CL terms, sum(sign_i * 2^-shift_i). The coefficient
//   effective length CL (1..8) picks how many terms are used.
// * sat(), half_sum() etc. implement the fixed-point rules common to every
//   butterfly: each butterfly divides by 2 (rounded), so an N-point
//   transform is scaled by 1/N and never grows beyond the I/O wordlength.
//
// Origin: FFT/IFFT selection and the shift-add constant multiplier follow the
// original; the encodings, the expansion of sqrt(2)/2 and the fixed-point
// rules are this design's choices.
package fft_pkg;

  typedef enum logic {FUNC_FFT = 1'b0, FUNC_IFFT = 1'b1} fft_func_e;

  // one term of a shift-add constant: value = sign * 2^-shift
  typedef struct packed {
    logic       neg;
    logic [4:0] shift;
  } sp2_term_t;

  localparam int SQRT2_2_MAX_TERMS = 8;
  // 1 - 2^-2 - 2^-5 - 2^-6 + 2^-8 + 2^-14 + 2^-16 - 2^-20 ~= 0.70710659
  localparam sp2_term_t SQRT2_2_TERMS [SQRT2_2_MAX_TERMS] = '{
    '{neg: 1'b0, shift: 5'd0},  '{neg: 1'b1, shift: 5'd2},
    '{neg: 1'b1, shift: 5'd5},  '{neg: 1'b1, shift: 5'd6},
    '{neg: 1'b0, shift: 5'd8},  '{neg: 1'b0, shift: 5'd14},
    '{neg: 1'b0, shift: 5'd16}, '{neg: 1'b1, shift: 5'd20}
  };
  // fraction bits kept while summing the shifted terms
  localparam int SP2_FRAC = 20;

  // reverse the low `bits` bits of v
  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // twiddle factor W_L^e = exp(-j*2*pi*e/L) quantised with cw fraction bits
  function automatic longint tw_cos(longint e, longint l, int cw);
    return longint'($floor($cos(2.0 * 3.14159265358979323846 * real'(e) / real'(l))
                           * (2.0 ** cw) + 0.5));
  endfunction
  function automatic longint tw_sin(longint e, longint l, int cw);
    return longint'($floor(-$sin(2.0 * 3.14159265358979323846 * real'(e) / real'(l))
                           * (2.0 ** cw) + 0.5));
  endfunction

endpackage
