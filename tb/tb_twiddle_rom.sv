// tb_twiddle_rom: reads every entry of a 64-entry table (CW = 14) and of an
// 8-entry table (CW = 6) and compares it with cos/-sin of 2*pi*e/L scaled by
// 2^CW; a correctly rounded entry is within 0.5 LSB.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_twiddle_rom;
  import fft_tb_pkg::*;

  logic [5:0]         a64;
  logic [2:0]         a8;
  logic signed [15:0] r64, i64;
  logic signed [7:0]  r8, i8;

  twiddle_rom #(.L(64), .CW(14)) dut64 (.addr(a64), .w_re(r64), .w_im(i64));
  twiddle_rom #(.L(8), .CW(6)) dut8 (.addr(a8), .w_re(r8), .w_im(i8));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int e = 0; e < 64; e++) begin
      automatic real ang = 2.0 * 3.14159265358979 * e / 64.0;
      a64 = 6'(e);
      a8  = 3'(e % 8);
      #1;
      check(absr(real'(r64) - $cos(ang) * 16384.0) <= 0.5001 &&
            absr(real'(i64) + $sin(ang) * 16384.0) <= 0.5001,
            $sformatf("L=64 e=%0d: got (%0d,%0d)", e, r64, i64));
      if (e < 8) begin
        automatic real a2 = 2.0 * 3.14159265358979 * e / 8.0;
        check(absr(real'(r8) - $cos(a2) * 64.0) <= 0.5001 &&
              absr(real'(i8) + $sin(a2) * 64.0) <= 0.5001,
              $sformatf("L=8 e=%0d: got (%0d,%0d)", e, r8, i8));
      end
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
