// tb_fft_workloads: every transform size of the OFDM standards the core is
// meant for: 64 (IEEE 802.11a, HiperLAN/2), 256 and 1024 (DAB, VDSL), 512
// (ADSL, DAB, VDSL), 2048 (DAB, DVB-T 2k, VDSL), 4096 (VDSL) and 8192
// (DVB-T 8k, VDSL), plus the smallest size, 8 points; each is a core
// generated at that size (16-bit data, FFT). Both architectures get one random frame; the
// pipeline is then flushed with a second frame. Every bin is compared with a
// double-precision DFT/N within log2(N)+2 LSB. The pipeline must deliver one
// output per clock for the whole frame once output starts (the real-time
// rate), and the memory-based core must deliver the last bin of a frame
// 2N + N*log2(N)/2 clocks after its first sample was presented.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_fft_workloads;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int WL  = 16;
  localparam int NW  = 8;
  localparam int SZ [NW] = '{8, 64, 256, 512, 1024, 2048, 4096, 8192};
  localparam int AMP = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int N  = SZ[w];
    localparam int NB = $clog2(N);

    logic                 p_iv = 1'b0, m_iv = 1'b0, p_ov, m_ov, m_ird, m_bsy;
    logic signed [WL-1:0] p_ire = '0, p_iim = '0, m_ire = '0, m_iim = '0;
    logic signed [WL-1:0] p_ore, p_oim, m_ore, m_oim;
    logic [NB-1:0]        p_oidx, m_oidx;

    fft_ip_top #(.N(N)) dut (
      .clk, .rst_n,
      .p_in_valid(p_iv), .p_in_re(p_ire), .p_in_im(p_iim),
      .p_out_valid(p_ov), .p_out_re(p_ore), .p_out_im(p_oim), .p_out_idx(p_oidx),
      .m_in_valid(m_iv), .m_in_ready(m_ird), .m_in_re(m_ire), .m_in_im(m_iim),
      .m_out_valid(m_ov), .m_out_re(m_ore), .m_out_im(m_oim), .m_out_idx(m_oidx),
      .m_busy(m_bsy)
    );

    real xr [], xi [], rr [], ri [];
    int  p_cnt = 0, m_cnt = 0, p_gaps = 0, m_start = 0, m_end = 0, cyc = 0;
    real max_err = 0.0;

    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (rst_n && p_ov && p_cnt < N) begin
        automatic real er = absr(real'(p_ore) - rr[p_oidx]);
        automatic real ei = absr(real'(p_oim) - ri[p_oidx]);
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= NB + 2.0 && ei <= NB + 2.0,
              $sformatf("N=%0d pipeline bin %0d: got (%0d,%0d) want (%.1f,%.1f)", N, p_oidx, p_ore, p_oim, rr[p_oidx], ri[p_oidx]));
        p_cnt++;
      end else if (rst_n && p_cnt > 0 && p_cnt < N) begin
        p_gaps++;
      end
      if (rst_n && m_ov && m_cnt < N) begin
        automatic real er = absr(real'(m_ore) - rr[m_oidx]);
        automatic real ei = absr(real'(m_oim) - ri[m_oidx]);
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= NB + 2.0 && ei <= NB + 2.0,
              $sformatf("N=%0d memory bin %0d: got (%0d,%0d) want (%.1f,%.1f)", N, m_oidx, m_ore, m_oim, rr[m_oidx], ri[m_oidx]));
        m_cnt++;
        if (m_cnt == N) m_end = cyc;
      end
    end

    initial begin
      int r, i;
      xr = new[N];
      xi = new[N];
      for (int t = 0; t < N; t++) begin
        rand_disc(AMP, r, i);
        xr[t] = r;
        xi[t] = i;
      end
      dft(xr, xi, N, -1.0, 1.0 / N, rr, ri);
      wait (rst_n);
      @(negedge clk);
      // both cores take the frame at full rate; the pipeline is then flushed
      for (int t = 0; t < 2 * N; t++) begin
        p_iv  = 1'b1;
        p_ire = (t < N) ? WL'(int'(xr[t])) : '0;
        p_iim = (t < N) ? WL'(int'(xi[t])) : '0;
        m_iv  = (t < N);
        m_ire = (t < N) ? WL'(int'(xr[t])) : '0;
        m_iim = (t < N) ? WL'(int'(xi[t])) : '0;
        if (t == 0) m_start = cyc;
        @(negedge clk);
      end
      p_iv = 1'b0;
      m_iv = 1'b0;
      wait (m_cnt == N && p_cnt == N);
      check(p_gaps == 0, $sformatf("N=%0d: pipeline output paused %0d clocks", N, p_gaps));
      check(m_end - m_start == 2 * N + N * NB / 2,
            $sformatf("N=%0d: memory-based frame took %0d clocks, want %0d", N, m_end - m_start, 2 * N + N * NB / 2));
      $display("N=%0d: max error %.2f LSB, memory-based frame %0d clocks", N, max_err, m_end - m_start);
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (8192 * 10 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
