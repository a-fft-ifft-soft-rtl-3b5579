// tb_delay_line: writes random words with a random enable into delay lines
// of depth 5 and 1 and checks, on every enabled clock, that dout is the word
// written DEPTH enabled clocks earlier (the first DEPTH outputs are skipped,
// as the SDF stage never uses them).
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_delay_line;
  localparam int W = 12;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, d5, d1;
  always #5 clk = ~clk;

  delay_line #(.DEPTH(5), .W(W)) dut5 (.clk, .rst_n, .en, .din, .dout(d5));
  delay_line #(.DEPTH(1), .W(W)) dut1 (.clk, .rst_n, .en, .din, .dout(d1));

  int checks = 0, failures = 0, n = 0;
  logic [W-1:0] hist [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && en) begin
      if (n >= 5) check(d5 == hist[n - 5], $sformatf("depth 5 at %0d: got %h want %h", n, d5, hist[n - 5]));
      if (n >= 1) check(d1 == hist[n - 1], $sformatf("depth 1 at %0d: got %h want %h", n, d1, hist[n - 1]));
      hist.push_back(din);
      n++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = W'($urandom);
    end
    @(negedge clk) en = 1'b0;
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
