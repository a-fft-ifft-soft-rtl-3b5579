// tb_fft_ram: random traffic on both write ports (never the same address
// twice in one clock) and both read ports of a 32-word RAM, checked against
// an array model: reads are combinational and see writes from earlier clocks.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_fft_ram;
  localparam int N = 32, W = 20;

  logic         clk = 1'b0;
  logic [4:0]   ra0, ra1, wa0, wa1;
  logic [W-1:0] rd0, rd1, wd0, wd1;
  logic         we0, we1;
  always #5 clk = ~clk;

  fft_ram #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [N];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // fill every word first
    for (int a = 0; a < N; a += 2) begin
      @(negedge clk);
      we0 = 1; wa0 = 5'(a);     wd0 = W'($urandom); model[a] = wd0;
      we1 = 1; wa1 = 5'(a + 1); wd1 = W'($urandom); model[a + 1] = wd1;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // the writes of the previous clock are in the model now
      ra0 = 5'($urandom); ra1 = 5'($urandom);
      we0 = 1'($urandom); we1 = 1'($urandom);
      wa0 = 5'($urandom); wa1 = 5'($urandom);
      if (wa1 == wa0) wa1 = wa0 + 1'b1;
      wd0 = W'($urandom); wd1 = W'($urandom);
      #1;
      check(rd0 == model[ra0] && rd1 == model[ra1], $sformatf("read %0d/%0d", ra0, ra1));
      if (we0) model[wa0] = wd0;
      if (we1) model[wa1] = wd1;
    end
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
