// tb_ps_conv: random pairs presented at most every other clock (with random
// gaps); the output must be d0 in the next clock and d1 in the clock after,
// each flagged by out_valid, and nothing else.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_ps_conv;
  localparam int WL = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 pair_valid = 0, out_valid;
  logic [2*WL-1:0]      d0 = '0, d1 = '0;
  logic signed [WL-1:0] out_re, out_im;

  ps_conv #(.WL(WL)) dut (.*);

  int checks = 0, failures = 0, n_out = 0, n_exp = 0;
  logic [2*WL-1:0] exp_q [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        check(exp_q.size() > 0 && {out_re, out_im} == exp_q[0], $sformatf("sample %0d", n_out));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_out++;
      end
      if (pair_valid) begin
        exp_q.push_back(d0);
        exp_q.push_back(d1);
        n_exp += 2;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (150) begin
      @(negedge clk);
      pair_valid = ($urandom_range(2) != 0);
      d0 = 16'($urandom);
      d1 = 16'($urandom);
      if (pair_valid) begin
        @(negedge clk);
        pair_valid = 0;
      end
    end
    @(negedge clk) pair_valid = 0;
    repeat (3) @(posedge clk);
    check(n_out == n_exp && n_out > 50, $sformatf("sample count %0d, want %0d", n_out, n_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
