// tb_fft_ip_top: end-to-end test of the FFT/IFFT core, both architectures,
// both transform directions, at the default size (N = 128).
//
// Two tops are built: the default one (FFT) and one generated for IFFT.
// Each gets FRAMES random frames on its pipeline input (back to back, with
// random input stalls in one frame, then N flush samples) and the same
// frames on its memory-based input (valid/ready, so the core's refusals
// back-pressure the source). Every output sample is compared with a
// double-precision DFT/N or inverse DFT of its frame.
//
// The mechanisms of the design are counted and each must occur: pipeline
// input stalls, back-to-back frames, PE1's -j selection, each of PE2's
// W^(N/8), -j and W^(3N/8) selections, non-trivial ROM twiddles, and
// back-pressure from the memory-based core.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_fft_ip_top;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int N      = 128;
  localparam int WL     = 16;
  localparam int NB     = $clog2(N);
  localparam int FRAMES = 3;
  localparam int AMP    = 20000;
  localparam real TOL   = 2.0 + NB;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // index 0: FFT top, 1: IFFT top
  logic                 p_iv, m_iv;
  logic signed [WL-1:0] p_ire, p_iim, m_ire, m_iim;
  logic                 p_ov [2], m_ov [2], m_ird [2], m_bsy [2];
  logic signed [WL-1:0] p_ore [2], p_oim [2], m_ore [2], m_oim [2];
  logic [NB-1:0]        p_oidx [2], m_oidx [2];

  fft_ip_top dut_f (
    .clk, .rst_n,
    .p_in_valid(p_iv), .p_in_re(p_ire), .p_in_im(p_iim),
    .p_out_valid(p_ov[0]), .p_out_re(p_ore[0]), .p_out_im(p_oim[0]), .p_out_idx(p_oidx[0]),
    .m_in_valid(m_iv), .m_in_ready(m_ird[0]), .m_in_re(m_ire), .m_in_im(m_iim),
    .m_out_valid(m_ov[0]), .m_out_re(m_ore[0]), .m_out_im(m_oim[0]), .m_out_idx(m_oidx[0]),
    .m_busy(m_bsy[0])
  );
  fft_ip_top #(.FUNC(FUNC_IFFT)) dut_i (
    .clk, .rst_n,
    .p_in_valid(p_iv), .p_in_re(p_ire), .p_in_im(p_iim),
    .p_out_valid(p_ov[1]), .p_out_re(p_ore[1]), .p_out_im(p_oim[1]), .p_out_idx(p_oidx[1]),
    .m_in_valid(m_iv), .m_in_ready(m_ird[1]), .m_in_re(m_ire), .m_in_im(m_iim),
    .m_out_valid(m_ov[1]), .m_out_re(m_ore[1]), .m_out_im(m_oim[1]), .m_out_idx(m_oidx[1]),
    .m_busy(m_bsy[1])
  );

  int  checks = 0, failures = 0;
  real xr [FRAMES][], xi [FRAMES][];
  real ref_r [2][FRAMES][], ref_i [2][FRAMES][];
  int  p_cnt [2], m_cnt [2];
  real max_err = 0.0;
  // mechanism counters
  int  n_stall = 0, n_b2b = 0, n_mj = 0, n_w1 = 0, n_w2 = 0, n_w3 = 0, n_rom = 0, n_bp = 0;
  bit  p_done = 0, m_done = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic cmp(int d, int f, int k, int got_r, int got_i, string tag);
    automatic real er = absr(real'(got_r) - ref_r[d][f][k]);
    automatic real ei = absr(real'(got_i) - ref_i[d][f][k]);
    if (er > max_err) max_err = er;
    if (ei > max_err) max_err = ei;
    check(er <= TOL && ei <= TOL,
          $sformatf("%s dir %0d frame %0d bin %0d: got (%0d,%0d) want (%.1f,%.1f)",
                    tag, d, f, k, got_r, got_i, ref_r[d][f][k], ref_i[d][f][k]));
  endtask

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && p_ov[d]) begin
        automatic int f = p_cnt[d] / N;
        if (f < FRAMES) begin
          check(int'(p_oidx[d]) == int'(bitrev(p_cnt[d] % N, NB)), "pipeline out_idx");
          cmp(d, f, p_oidx[d], p_ore[d], p_oim[d], "pipeline");
        end
        p_cnt[d]++;
      end
      if (rst_n && m_ov[d]) begin
        automatic int f = m_cnt[d] / N;
        if (f < FRAMES) begin
          check(int'(m_oidx[d]) == m_cnt[d] % N, "memory out_idx");
          cmp(d, f, m_oidx[d], m_ore[d], m_oim[d], "memory");
        end
        m_cnt[d]++;
      end
    end
  end

  // mechanism monitors (N = 128: group 0 is the Radix-2 PE, groups 1 and 2
  // are radix-2/4/8 groups)
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut_f.u_pipe.g_grp[1].u_grp.g_r4.u_pe1.out_valid &&
          dut_f.u_pipe.g_grp[1].u_grp.g_r4.u_pe1.mj) n_mj++;
      if (dut_f.u_pipe.g_grp[1].u_grp.g_r4.g_pe2.u_pe2.out_valid) begin
        case (dut_f.u_pipe.g_grp[1].u_grp.g_r4.g_pe2.u_pe2.sel)
          2'd1: n_w1++;
          2'd2: n_w2++;
          2'd3: n_w3++;
          default: ;
        endcase
      end
      if (dut_f.u_pipe.g_grp[0].g_tw.u_tw.in_valid && dut_f.u_pipe.g_grp[0].g_tw.u_tw.e != 0)
        n_rom++;
      if (m_iv && !m_ird[0]) n_bp++;
    end
  end

  // pipeline source: frames back to back, stalls inside frame 1, flush
  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      if (f > 0) n_b2b++;
      for (int t = 0; t < N; t++) begin
        while (f == 1 && $urandom_range(4) == 0) begin
          p_iv = 1'b0;
          n_stall++;
          @(negedge clk);
        end
        p_iv  = 1'b1;
        p_ire = WL'(int'(xr[f][t]));
        p_iim = WL'(int'(xi[f][t]));
        @(negedge clk);
      end
    end
    for (int t = 0; t < N; t++) begin
      p_iv = 1'b1; p_ire = '0; p_iim = '0;
      @(negedge clk);
    end
    p_iv = 1'b0;
    wait (p_cnt[0] >= FRAMES * N && p_cnt[1] >= FRAMES * N);
    p_done = 1;
  end

  // memory-based source: keeps in_valid high, waits on in_ready
  initial begin
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      for (int t = 0; t < N; t++) begin
        m_iv  = 1'b1;
        m_ire = WL'(int'(xr[f][t]));
        m_iim = WL'(int'(xi[f][t]));
        while (!m_ird[0]) @(negedge clk);
        @(negedge clk);
      end
    end
    m_iv = 1'b0;
    wait (m_cnt[0] == FRAMES * N && m_cnt[1] == FRAMES * N);
    m_done = 1;
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
    p_cnt = '{0, 0};
    m_cnt = '{0, 0};
    p_iv = 1'b0; p_ire = '0; p_iim = '0;
    m_iv = 1'b0; m_ire = '0; m_iim = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (p_done && m_done);
    repeat (10) @(posedge clk);
    check(m_cnt[0] == FRAMES * N, "memory-based output count");
    $display("mechanisms: stalls %0d, back-to-back frames %0d, PE1 -j %0d, PE2 W^(N/8) %0d -j %0d W^(3N/8) %0d, ROM twiddles %0d, back-pressure %0d",
             n_stall, n_b2b, n_mj, n_w1, n_w2, n_w3, n_rom, n_bp);
    check(n_stall > 0, "no pipeline input stall happened");
    check(n_b2b > 0, "no back-to-back frames");
    check(n_mj > 0, "PE1 never selected -j");
    check(n_w1 > 0 && n_w2 > 0 && n_w3 > 0, "PE2 did not use all constant twiddles");
    check(n_rom > 0, "no non-trivial ROM twiddle");
    check(n_bp > 0, "memory-based core never back-pressured");
    $display("max error %.2f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (FRAMES * (N * NB + 4 * N) + 20 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
