// tb_sp_conv: a random sample stream with random in_valid and in_ready gaps;
// every pair_valid must present the last two accepted samples, the even one
// on d0, and pairs must be formed from samples 0-1, 2-3, ... of the stream.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_sp_conv;
  localparam int WL = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 0, in_ready = 0, pair_valid;
  logic signed [WL-1:0] in_re = '0, in_im = '0;
  logic [2*WL-1:0]      d0, d1;

  sp_conv #(.WL(WL)) dut (.*);

  int checks = 0, failures = 0, n_acc = 0, n_pairs = 0;
  logic [2*WL-1:0] acc [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check(pair_valid == (in_valid && in_ready && n_acc % 2 == 1), "pair_valid timing");
      if (pair_valid) begin
        check(d0 == acc[n_acc - 1] && d1 == {in_re, in_im}, $sformatf("pair %0d contents", n_pairs));
        n_pairs++;
      end
      if (in_valid && in_ready) begin
        acc.push_back({in_re, in_im});
        n_acc++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_ready = ($urandom_range(4) != 0);
      in_re    = WL'($urandom);
      in_im    = WL'($urandom);
    end
    @(negedge clk) in_valid = 0;
    check(n_pairs == n_acc / 2 && n_pairs > 50, "pair count");
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
