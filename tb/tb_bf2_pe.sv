// tb_bf2_pe: random operands and twiddles (taken from a 32-entry table
// computed here); x0 must equal the rounded (a+b)/2 exactly and x1 must be
// within 1.5 LSB of ((a-b)/2) * w computed in double precision.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_bf2_pe;
  import fft_tb_pkg::*;
  localparam int WL = 16, CW = 14;

  logic signed [WL-1:0] a_re, a_im, b_re, b_im, x0_re, x0_im, x1_re, x1_im;
  logic signed [CW+1:0] w_re, w_im;

  bf2_pe #(.WL(WL), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ar, ai, br, bi;
    for (int n = 0; n < 500; n++) begin
      automatic int  e   = int'($urandom_range(31));
      automatic real ang = -2.0 * 3.14159265358979 * e / 32.0;
      automatic real wr  = $floor($cos(ang) * 16384.0 + 0.5), wi = $floor($sin(ang) * 16384.0 + 0.5);
      automatic real dr, di, er, ei;
      rand_disc(16000, ar, ai);
      rand_disc(16000, br, bi);
      a_re = WL'(ar); a_im = WL'(ai); b_re = WL'(br); b_im = WL'(bi);
      w_re = (CW+2)'(int'(wr)); w_im = (CW+2)'(int'(wi));
      #1;
      check(x0_re == WL'((ar + br + 1) >>> 1) && x0_im == WL'((ai + bi + 1) >>> 1),
            $sformatf("x0: got (%0d,%0d)", x0_re, x0_im));
      dr = real'((ar - br + 1) >>> 1);
      di = real'((ai - bi + 1) >>> 1);
      er = dr * $cos(ang) - di * $sin(ang);
      ei = dr * $sin(ang) + di * $cos(ang);
      check(absr(real'(x1_re) - er) <= 1.5 && absr(real'(x1_im) - ei) <= 1.5,
            $sformatf("x1 e=%0d: got (%0d,%0d) want (%.2f,%.2f)", e, x1_re, x1_im, er, ei));
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
