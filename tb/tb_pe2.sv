// tb_pe2: checks the second PE of a radix-2/4/8 group (L = 32, delay 8).
// Per half-frame of L/2 inputs the butterfly gives rounded half-sums and
// half-differences (delay L/4). The output at position p of the L-sample
// group frame is then multiplied by W_8^(n3*(k1 + 2*k2)), with k1, k2, n3
// the top three bits of p. The reference uses exact complex arithmetic
// (tolerance 1 LSB for the sqrt(2)/2 factors, exact for 1 and -j).
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_pe2;
  import fft_tb_pkg::*;
  localparam int WL = 16, L = 32, FR = 6;
  localparam int H = L / 2, D = L / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0, out_valid;
  logic signed [WL-1:0] in_re = '0, in_im = '0, out_re, out_im;

  pe2 #(.WL(WL), .L(L)) dut (.*);

  int  checks = 0, failures = 0, n_out = 0;
  real exp_re [$], exp_im [$];
  int  xr [FR * H], xi [FR * H];
  int  n_sel [4];

  function automatic int half(int v);
    return (v + 1) >>> 1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      check(absr(real'(out_re) - exp_re[0]) <= 1.0 && absr(real'(out_im) - exp_im[0]) <= 1.0,
            $sformatf("output %0d: got (%0d,%0d) want (%.1f,%.1f)", n_out, out_re, out_im, exp_re[0], exp_im[0]));
      void'(exp_re.pop_front());
      void'(exp_im.pop_front());
      n_out++;
    end
  end

  initial begin
    int p = 0;
    for (int i = 0; i < FR * H; i++) begin
      xr[i] = int'($urandom_range(40000)) - 20000;
      xi[i] = int'($urandom_range(40000)) - 20000;
    end
    n_sel = '{0, 0, 0, 0};
    for (int f = 0; f < FR; f++) begin
      automatic int b = f * H;
      for (int i = 0; i < H; i++) begin
        automatic int j = i % D;
        automatic int br = (i < D) ? half(xr[b + j] + xr[b + j + D]) : half(xr[b + j] - xr[b + j + D]);
        automatic int bi = (i < D) ? half(xi[b + j] + xi[b + j + D]) : half(xi[b + j] - xi[b + j + D]);
        automatic int pp = p % L;
        automatic int k1 = (pp >> 4) & 1, k2 = (pp >> 3) & 1, n3 = (pp >> 2) & 1;
        automatic int e = n3 * (k1 + 2 * k2);
        automatic real ang = -2.0 * 3.14159265358979 * e / 8.0;
        exp_re.push_back(br * $cos(ang) - bi * $sin(ang));
        exp_im.push_back(br * $sin(ang) + bi * $cos(ang));
        n_sel[e]++;
        p++;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < FR * H; i++) begin
      @(negedge clk);
      while ($urandom_range(4) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_re = WL'(xr[i]);
      in_im = WL'(xi[i]);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(n_out == FR * H - D, $sformatf("output count %0d", n_out));
    check(n_sel[1] > 0 && n_sel[2] > 0 && n_sel[3] > 0, "not every constant exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
