// tb_mfft_addr_gen: for N = 32, checks the three address modes.
//   LOAD: pair i -> 2i, 2i+1.
//   COMPUTE: in each stage s the N/2 butterflies touch every address exactly
//     once, a1 = a0 + N/2^(s+1), bit (log2N-1-s) of a0 is 0, and the twiddle
//     address is (a0 mod N/2^(s+1)) * 2^s.
//   UNLOAD: pair i -> bitrev(2i), bitrev(2i+1).
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_mfft_addr_gen;
  import fft_tb_pkg::*;
  localparam int N = 32, NB = 5;

  logic [1:0]    phase;
  logic [2:0]    stage;
  logic [NB-2:0] cnt;
  logic [NB-1:0] a0, a1, tw_addr;

  mfft_addr_gen #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    phase = 0; stage = 0;
    for (int i = 0; i < N / 2; i++) begin
      cnt = (NB-1)'(i);
      #1 check(a0 == NB'(2 * i) && a1 == NB'(2 * i + 1), $sformatf("load %0d", i));
    end
    phase = 1;
    for (int s = 0; s < NB; s++) begin
      automatic bit seen [N];
      automatic int h = N >> (s + 1);
      stage = 3'(s);
      for (int b = 0; b < N / 2; b++) begin
        cnt = (NB-1)'(b);
        #1;
        check(int'(a1) == int'(a0) + h && a0[NB-1-s] == 1'b0, $sformatf("stage %0d bfly %0d pair", s, b));
        check(int'(tw_addr) == (int'(a0) % h) << s, $sformatf("stage %0d bfly %0d twiddle", s, b));
        check(!seen[a0] && !seen[a1], $sformatf("stage %0d address reused", s));
        seen[a0] = 1;
        seen[a1] = 1;
      end
    end
    phase = 2; stage = 0;
    for (int i = 0; i < N / 2; i++) begin
      cnt = (NB-1)'(i);
      #1 check(int'(a0) == int'(bitrev(2 * i, NB)) && int'(a1) == int'(bitrev(2 * i + 1, NB)),
               $sformatf("unload %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
