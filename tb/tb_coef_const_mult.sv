// tb_coef_const_mult: random inputs with every selection. sel 0 and 2 (1 and
// -j) must be exact; sel 1 and 3 (W^(N/8), W^(3N/8)) must be within 1 LSB of
// the exact product with (1-j)/sqrt(2) and (-1-j)/sqrt(2). With CL = 2
// terms (sqrt(2)/2 ~ 0.75) the error bound is |x|*0.043 + 1 instead.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_coef_const_mult;
  import fft_tb_pkg::*;
  localparam int WL = 16;

  logic [1:0]           sel;
  logic signed [WL-1:0] in_re, in_im, o_re, o_im, c_re, c_im;

  coef_const_mult #(.WL(WL)) dut (.sel, .in_re, .in_im, .out_re(o_re), .out_im(o_im));
  coef_const_mult #(.WL(WL), .CL(2)) dut_c (.sel, .in_re, .in_im, .out_re(c_re), .out_im(c_im));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int r, i;
    for (int n = 0; n < 400; n++) begin
      automatic real ang, er, ei, tol;
      rand_disc(32000, r, i);
      sel = 2'(n % 4);
      in_re = WL'(r);
      in_im = WL'(i);
      #1;
      ang = -2.0 * 3.14159265358979 * real'(sel) / 8.0;
      er  = r * $cos(ang) - i * $sin(ang);
      ei  = r * $sin(ang) + i * $cos(ang);
      tol = sel[0] ? 1.0 : 0.0;
      check(absr(real'(o_re) - er) <= tol + 1e-9 && absr(real'(o_im) - ei) <= tol + 1e-9,
            $sformatf("sel %0d x=(%0d,%0d): got (%0d,%0d) want (%.2f,%.2f)", sel, r, i, o_re, o_im, er, ei));
      tol = sel[0] ? 0.043 * (absr(r) + absr(i)) + 1.0 : 0.0;
      check(absr(real'(c_re) - er) <= tol + 1e-9 && absr(real'(c_im) - ei) <= tol + 1e-9,
            $sformatf("CL=2 sel %0d: got (%0d,%0d) want (%.2f,%.2f)", sel, c_re, c_im, er, ei));
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
