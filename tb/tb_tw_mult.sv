// tb_tw_mult: checks the ROM twiddle multiplier for a radix-2 head (L = 16,
// S = 1) and a radix-2/4/8 group (L = 64, S = 3). Random samples stream in
// with stalls; the sample at frame position p must come out one clock later
// multiplied by exp(-j*2*pi*m*k/L), k = bit-reversed top S bits of p and m
// the remaining low bits, within 1.5 LSB of the exact product.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_tw_mult;
  import fft_tb_pkg::*;
  localparam int WL = 16, NS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0;
  logic signed [WL-1:0] in_re = '0, in_im = '0;
  logic                 ov [2];
  logic signed [WL-1:0] ore [2], oim [2];

  tw_mult #(.WL(WL), .L(16), .S(1)) dut_a (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[0]), .out_re(ore[0]), .out_im(oim[0]));
  tw_mult #(.WL(WL), .L(64), .S(3)) dut_b (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[1]), .out_re(ore[1]), .out_im(oim[1]));

  localparam int LL [2] = '{16, 64};
  localparam int SS [2] = '{1, 3};

  int  checks = 0, failures = 0, n_in = 0;
  int  cnt [2];
  int  xr [NS], xi [NS];
  bit  in_v_d = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int expo(int p, int l, int s);
    int lb = $clog2(l);
    int k = 0;
    for (int i = 0; i < s; i++) k |= ((p >> (lb - 1 - i)) & 1) << i;
    return (p % (l >> s)) * k;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < 2; d++) begin
        check(ov[d] == in_v_d, "out_valid is in_valid delayed by one clock");
        if (ov[d]) begin
          automatic int  s   = cnt[d];
          automatic real ang = -2.0 * 3.14159265358979 * expo(s % LL[d], LL[d], SS[d]) / LL[d];
          automatic real er  = xr[s] * $cos(ang) - xi[s] * $sin(ang);
          automatic real ei  = xr[s] * $sin(ang) + xi[s] * $cos(ang);
          check(absr(real'(ore[d]) - er) <= 1.5 && absr(real'(oim[d]) - ei) <= 1.5,
                $sformatf("L=%0d sample %0d: got (%0d,%0d) want (%.1f,%.1f)", LL[d], s, ore[d], oim[d], er, ei));
          cnt[d]++;
        end
      end
      in_v_d <= in_valid;
    end
  end

  initial begin
    int r, i;
    for (int t = 0; t < NS; t++) begin
      rand_disc(30000, r, i);
      xr[t] = r;
      xi[t] = i;
    end
    cnt = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NS; t++) begin
      @(negedge clk);
      while ($urandom_range(4) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_re = WL'(xr[t]);
      in_im = WL'(xi[t]);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    check(cnt[0] == NS && cnt[1] == NS, "output count");
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
