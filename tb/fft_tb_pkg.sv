// fft_tb_pkg: reference model and stimulus helpers shared by the FFT
// testbenches. The reference is a direct O(N^2) DFT in double precision,
// independent of the butterfly structure under test.
//
// Origin: these reference models are the testbenches' own; they compute the
// plain textbook DFT, independent of the hardware's algorithm.
package fft_tb_pkg;

  // X[k] = scale * sum_n x[n] * exp(sgn*j*2*pi*n*k/N); sgn = -1 forward
  function automatic void dft(input real xr[], input real xi[], input int n,
                              input real sgn, input real scale,
                              output real yr[], output real yi[]);
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      real ar = 0.0, ai = 0.0;
      for (int t = 0; t < n; t++) begin
        real ph = sgn * 2.0 * 3.14159265358979323846 * real'((longint'(t) * k) % longint'(n)) / real'(n);
        ar += xr[t] * $cos(ph) - xi[t] * $sin(ph);
        ai += xr[t] * $sin(ph) + xi[t] * $cos(ph);
      end
      yr[k] = ar * scale;
      yi[k] = ai * scale;
    end
  endfunction

  // random sample inside the disc of radius amp (no saturation possible)
  function automatic void rand_disc(input int amp, output int re, output int im);
    do begin
      re = int'($urandom_range(2 * amp)) - amp;
      im = int'($urandom_range(2 * amp)) - amp;
    end while (longint'(re) * re + longint'(im) * im > longint'(amp) * amp);
  endfunction

  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
