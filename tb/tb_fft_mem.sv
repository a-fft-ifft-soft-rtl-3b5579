// tb_fft_mem: self-checking test of the memory-based FFT/IFFT core.
//
// A forward and an inverse instance receive FRAMES random frames through the
// valid/ready input, with random gaps in in_valid. Each output frame must be
// the DFT/N (forward) or inverse DFT (inverse) of the matching input frame,
// in natural order, within TOL LSB. The cycle counts are checked too:
// frame 0 is sent alone, and its first result must leave N*log2(N)/2 + 2
// clocks after its last sample was taken; the remaining frames are offered
// back to back (the source only waits for in_ready), and from the third
// frame on the results must follow each other every N*log2(N)/2 clocks, the
// butterfly PE's own work (N >= 16): the PE never waits for loading or
// unloading.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_fft_mem;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  parameter int N = 64;
  parameter int WL     = 16;   // 8..16 (the test amplitude scales with it)
  localparam int NB     = $clog2(N);
  localparam int FRAMES = 5;
  localparam int AMP    = 20000 >> (16 - WL);
  localparam real TOL   = 2.0 + NB;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid;
  logic signed [WL-1:0] in_re, in_im;
  logic                 ird [2], ov [2], bsy [2];
  logic signed [WL-1:0] ore [2], oim [2];
  logic [NB-1:0]        oidx [2];

  fft_mem #(.N(N), .WL(WL), .FUNC(FUNC_FFT)) dut_f (
    .clk, .rst_n, .in_valid, .in_ready(ird[0]), .in_re, .in_im,
    .out_valid(ov[0]), .out_re(ore[0]), .out_im(oim[0]), .out_idx(oidx[0]), .busy(bsy[0]));
  fft_mem #(.N(N), .WL(WL), .FUNC(FUNC_IFFT)) dut_i (
    .clk, .rst_n, .in_valid, .in_ready(ird[1]), .in_re, .in_im,
    .out_valid(ov[1]), .out_re(ore[1]), .out_im(oim[1]), .out_idx(oidx[1]), .busy(bsy[1]));

  int  checks = 0, failures = 0;
  real xr [FRAMES][], xi [FRAMES][];
  real ref_r [2][FRAMES][], ref_i [2][FRAMES][];
  int  out_cnt [2];
  int  cycle = 0, last_in = 0;
  int  first_out [FRAMES];
  real max_err = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // clock edge at which the last sample of a frame is accepted
  int acc_cnt = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid && ird[0]) begin
      if (acc_cnt % N == N - 1) last_in = cycle;
      acc_cnt++;
    end
  end


  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && ov[d]) begin
        automatic int f = out_cnt[d] / N;
        automatic int p = out_cnt[d] % N;
        if (f < FRAMES) begin
          automatic real er = absr(real'(ore[d]) - ref_r[d][f][p]);
          automatic real ei = absr(real'(oim[d]) - ref_i[d][f][p]);
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          if (d == 0 && p == 0) first_out[f] = cycle;
          check(int'(oidx[d]) == p, $sformatf("out_idx %0d, want %0d", oidx[d], p));
          check(er <= TOL && ei <= TOL,
                $sformatf("dir %0d frame %0d bin %0d: got (%0d,%0d) want (%.1f,%.1f)",
                          d, f, p, ore[d], oim[d], ref_r[d][f][p], ref_i[d][f][p]));
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
    // drive at the falling edge; a sample is held until the acceptance
    // monitor has counted it
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      for (int t = 0; t < N; t++) begin
        automatic int n_acc;
        while (f == 2 && $urandom_range(3) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_re = WL'(int'(xr[f][t]));
        in_im = WL'(int'(xi[f][t]));
        n_acc = acc_cnt;
        do @(negedge clk); while (acc_cnt == n_acc);
      end
      if (f == 0) begin
        in_valid = 1'b0;
        wait (out_cnt[0] == N);
        @(posedge clk);
        check(first_out[0] - last_in == N * NB / 2 + 2,
              $sformatf("frame 0: first output %0d clocks after last input, want %0d",
                        first_out[0] - last_in, N * NB / 2 + 2));
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    wait (out_cnt[0] == FRAMES * N);
    repeat (4) @(posedge clk);
    // with N = 8 a buffer's load + compute + unload round trip (about 30
    // clocks) is longer than two compute times, so only larger sizes run
    // at the butterfly rate
    for (int f = 3; f < FRAMES; f++)
      if (NB >= 4) check(first_out[f] - first_out[f - 1] == N * NB / 2,
            $sformatf("frames %0d-%0d: results %0d clocks apart, want %0d",
                      f - 1, f, first_out[f] - first_out[f - 1], N * NB / 2));
    check(out_cnt[0] == FRAMES * N && out_cnt[1] == FRAMES * N,
          $sformatf("output count %0d/%0d, want %0d", out_cnt[0], out_cnt[1], FRAMES * N));
    $display("max error %.2f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (FRAMES * (N * NB + 4 * N) + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
