// tb_fft_sdf_pipeline: self-checking test of the SDF FFT/IFFT pipeline.
//
// Two instances (forward and inverse) receive FRAMES random frames back to
// back, then a pause, then N flush samples; the input is also stalled at
// random for a few cycles to exercise in_valid gaps. Every output sample is
// compared, at its reported frequency index, with a double-precision DFT/N
// (forward) or inverse DFT (inverse) of the same frame, within TOL LSB.
// Also checked: bit-reversed out_idx sequence, latency of the first output
// in an unstalled run, and one output per input once the pipeline is full.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_fft_sdf_pipeline;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  parameter int N      = 64;
  parameter int WL     = 16;   // 8..16 (the test amplitude scales with it)
  localparam int NB     = $clog2(N);
  localparam int FRAMES = 3;
  localparam int AMP    = 20000 >> (16 - WL);
  localparam real TOL   = 2.0 + NB;
  // N-1 words of delay, one register per PE and per twiddle multiplier
  localparam int NG      = NB / 3 + ((NB % 3) != 0 ? 1 : 0);
  localparam int LATENCY = N - 1 + NB + NG - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid;
  logic signed [WL-1:0] in_re, in_im;
  logic                 ov [2];
  logic signed [WL-1:0] ore [2], oim [2];
  logic [NB-1:0]        oidx [2];

  fft_sdf_pipeline #(.N(N), .WL(WL), .FUNC(FUNC_FFT)) dut_f (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[0]), .out_re(ore[0]), .out_im(oim[0]), .out_idx(oidx[0]));
  fft_sdf_pipeline #(.N(N), .WL(WL), .FUNC(FUNC_IFFT)) dut_i (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[1]), .out_re(ore[1]), .out_im(oim[1]), .out_idx(oidx[1]));

  int  checks = 0, failures = 0;
  real xr [FRAMES][], xi [FRAMES][];
  real ref_r [2][FRAMES][], ref_i [2][FRAMES][];
  int  out_cnt [2];
  int  cycle = 0, first_out = -1, first_in = -1;
  bit  stall_run;
  real max_err = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // compare outputs as they appear
  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && ov[d]) begin
        automatic int f = out_cnt[d] / N;
        automatic int p = out_cnt[d] % N;
        if (d == 0 && first_out < 0) first_out = cycle;
        if (f < FRAMES) begin
          automatic real er = absr(real'(ore[d]) - ref_r[d][f][oidx[d]]);
          automatic real ei = absr(real'(oim[d]) - ref_i[d][f][oidx[d]]);
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          check(int'(oidx[d]) == int'(bitrev(p, NB)), $sformatf("out_idx %0d at pos %0d", oidx[d], p));
          check(er <= TOL && ei <= TOL,
                $sformatf("dir %0d frame %0d bin %0d: got (%0d,%0d) want (%.1f,%.1f)",
                          d, f, oidx[d], ore[d], oim[d], ref_r[d][f][oidx[d]], ref_i[d][f][oidx[d]]));
        end
        out_cnt[d]++;
      end
    end
  end

  initial begin
    int r, i;
    for (int f = 0; f < FRAMES; f++) begin
      xr[f] = new[N];
      xi[f] = new[N];
      for (int t = 0; t < N; t++) begin
        rand_disc(AMP, r, i);
        xr[f][t] = r;
        xi[f][t] = i;
      end
      dft(xr[f], xi[f], N, -1.0, 1.0 / N, ref_r[0][f], ref_i[0][f]);
      dft(xr[f], xi[f], N, 1.0, 1.0 / N, ref_r[1][f], ref_i[1][f]);
    end
    out_cnt = '{0, 0};
    in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // frames back to back; the last frame is fed with random stalls
    for (int f = 0; f < FRAMES; f++) begin
      for (int t = 0; t < N; t++) begin
        if (f == FRAMES - 1) begin
          while ($urandom_range(3) == 0) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
        end
        if (first_in < 0) first_in = cycle;
        in_valid <= 1'b1;
        in_re <= WL'(int'(xr[f][t]));
        in_im <= WL'(int'(xi[f][t]));
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (17) @(posedge clk);
    for (int t = 0; t < N; t++) begin   // flush
      in_valid <= 1'b1; in_re <= '0; in_im <= '0;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (4 * N) @(posedge clk);
    check(out_cnt[0] == FRAMES * N + 1 && out_cnt[1] == FRAMES * N + 1,
          $sformatf("output count %0d/%0d, want %0d", out_cnt[0], out_cnt[1], FRAMES * N + 1));
    check(first_out - first_in == LATENCY + 1,
          $sformatf("latency %0d, want %0d", first_out - first_in, LATENCY + 1));
    $display("max error %.2f LSB, latency %0d cycles", max_err, first_out - first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20 * N + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
