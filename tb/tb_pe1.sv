// tb_pe1: checks the first PE of a radix-2/4/8 group (L = 16, delay 8).
// Per frame of L inputs the expected output is the rounded half-sums
// (x[i] + x[i+L/2])/2, i < L/2, then the half-differences, where the
// differences of the second quarter (i >= L/4) are multiplied by -j, i.e.
// (re, im) -> (im, -re). Inputs stall at random.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_pe1;
  localparam int WL = 16, L = 16, FR = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0, out_valid;
  logic signed [WL-1:0] in_re = '0, in_im = '0, out_re, out_im;

  pe1 #(.WL(WL), .L(L)) dut (.*);

  int checks = 0, failures = 0, n_out = 0;
  int exp_re [$], exp_im [$];
  int xr [FR * L], xi [FR * L];

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
      check(out_re == exp_re[0] && out_im == exp_im[0],
            $sformatf("output %0d: got (%0d,%0d) want (%0d,%0d)", n_out, out_re, out_im, exp_re[0], exp_im[0]));
      void'(exp_re.pop_front());
      void'(exp_im.pop_front());
      n_out++;
    end
  end

  initial begin
    for (int i = 0; i < FR * L; i++) begin
      xr[i] = int'($urandom_range(60000)) - 30000;
      xi[i] = int'($urandom_range(60000)) - 30000;
    end
    for (int f = 0; f < FR; f++) begin
      automatic int b = f * L;
      for (int i = 0; i < L / 2; i++) begin
        exp_re.push_back(half(xr[b + i] + xr[b + i + L / 2]));
        exp_im.push_back(half(xi[b + i] + xi[b + i + L / 2]));
      end
      for (int i = 0; i < L / 2; i++) begin
        automatic int dr = half(xr[b + i] - xr[b + i + L / 2]);
        automatic int di = half(xi[b + i] - xi[b + i + L / 2]);
        exp_re.push_back(i >= L / 4 ? di : dr);
        exp_im.push_back(i >= L / 4 ? -dr : di);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < FR * L; i++) begin
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
    check(n_out == FR * L - L / 2, $sformatf("output count %0d", n_out));
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
