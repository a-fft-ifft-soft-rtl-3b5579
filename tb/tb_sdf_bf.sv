// tb_sdf_bf: checks the radix-2 SDF butterfly stage against a frame-level
// model. For each frame of 2*DELAY inputs the expected outputs are the
// rounded half-sums (x[i] + x[i+DELAY])/2 followed, one half-frame later, by
// the half-differences (x[i] - x[i+DELAY])/2. Also checked: no output during
// the first DELAY inputs, one output per input afterwards (including across
// random input stalls), one clock of latency, and out_pos counting from 0.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_sdf_bf;
  localparam int WL = 16, DELAY = 4, POS_W = 5, FR = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0, out_valid;
  logic signed [WL-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic [POS_W-1:0]     out_pos;

  sdf_bf #(.WL(WL), .DELAY(DELAY), .POS_W(POS_W)) dut (.*);

  int checks = 0, failures = 0;
  int exp_re [$], exp_im [$];
  int xr [FR * 2 * DELAY], xi [FR * 2 * DELAY];
  int n_out = 0, n_in = 0;
  logic prev_in_valid = 1'b0;
  int   prev_idx = 0;

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
    if (rst_n) begin
      check(out_valid == (prev_in_valid && prev_idx >= DELAY), $sformatf("out_valid after input %0d", prev_idx));
      if (out_valid) begin
        check(out_re == exp_re[0] && out_im == exp_im[0],
              $sformatf("output %0d: got (%0d,%0d) want (%0d,%0d)", n_out, out_re, out_im, exp_re[0], exp_im[0]));
        check(int'(out_pos) == n_out % (1 << POS_W), "out_pos");
        void'(exp_re.pop_front());
        void'(exp_im.pop_front());
        n_out++;
      end
      prev_in_valid <= in_valid;
      prev_idx      <= n_in;
      if (in_valid) n_in++;
    end
  end

  initial begin
    for (int i = 0; i < FR * 2 * DELAY; i++) begin
      xr[i] = int'($urandom_range(60000)) - 30000;
      xi[i] = int'($urandom_range(60000)) - 30000;
    end
    // expected output stream: sums of frame f, then differences of frame f
    for (int f = 0; f < FR; f++) begin
      automatic int b = f * 2 * DELAY;
      for (int i = 0; i < DELAY; i++) begin
        exp_re.push_back(half(xr[b + i] + xr[b + i + DELAY]));
        exp_im.push_back(half(xi[b + i] + xi[b + i + DELAY]));
      end
      for (int i = 0; i < DELAY; i++) begin
        exp_re.push_back(half(xr[b + i] - xr[b + i + DELAY]));
        exp_im.push_back(half(xi[b + i] - xi[b + i + DELAY]));
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < FR * 2 * DELAY; i++) begin
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_re = WL'(xr[i]);
      in_im = WL'(xi[i]);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    // the last DELAY differences wait for a next frame
    check(n_out == FR * 2 * DELAY - DELAY, $sformatf("output count %0d", n_out));
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
