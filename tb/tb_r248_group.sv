// tb_r248_group: a radix-2/4/8 group of frame length 8 is a complete 8-point
// FFT, a radix-2/4 group of length 4 a 4-point FFT and a radix-2 group of
// length 2 a 2-point FFT. Each is fed random frames back to back (plus one
// flush frame) and every output is compared, at bin bitrev(position), with
// a double-precision DFT/L of its frame, within 2 LSB.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_r248_group;
  import fft_tb_pkg::*;
  localparam int WL = 16, FR = 6, AMP = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0;
  logic signed [WL-1:0] in_re = '0, in_im = '0;
  logic                 ov [3];
  logic signed [WL-1:0] ore [3], oim [3];

  r248_group #(.WL(WL), .L(8), .S(3)) dut8 (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[0]), .out_re(ore[0]), .out_im(oim[0]));
  r248_group #(.WL(WL), .L(4), .S(2)) dut4 (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[1]), .out_re(ore[1]), .out_im(oim[1]));
  r248_group #(.WL(WL), .L(2), .S(1)) dut2 (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov[2]), .out_re(ore[2]), .out_im(oim[2]));

  localparam int LEN [3] = '{8, 4, 2};
  localparam int LB  [3] = '{3, 2, 1};

  int  checks = 0, failures = 0;
  int  cnt [3];
  int  xr [FR * 8], xi [FR * 8];
  real ref_r [3][FR * 4][], ref_i [3][FR * 4][];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  for (genvar d = 0; d < 3; d++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && ov[d]) begin
        automatic int f = cnt[d] / LEN[d];
        automatic int k = int'(bitrev(cnt[d] % LEN[d], LB[d]));
        if (f < FR * 8 / LEN[d])
          check(absr(real'(ore[d]) - ref_r[d][f][k]) <= 2.0 && absr(real'(oim[d]) - ref_i[d][f][k]) <= 2.0,
                $sformatf("L=%0d frame %0d bin %0d: got (%0d,%0d) want (%.1f,%.1f)", LEN[d], f, k,
                          ore[d], oim[d], ref_r[d][f][k], ref_i[d][f][k]));
        cnt[d]++;
      end
    end
  end

  initial begin
    int r, i;
    for (int t = 0; t < FR * 8; t++) begin
      rand_disc(AMP, r, i);
      xr[t] = r;
      xi[t] = i;
    end
    for (int d = 0; d < 3; d++) begin
      for (int f = 0; f < FR * 8 / LEN[d]; f++) begin
        automatic real fr[] = new[LEN[d]];
        automatic real fi[] = new[LEN[d]];
        for (int t = 0; t < LEN[d]; t++) begin
          fr[t] = xr[f * LEN[d] + t];
          fi[t] = xi[f * LEN[d] + t];
        end
        dft(fr, fi, LEN[d], -1.0, 1.0 / LEN[d], ref_r[d][f], ref_i[d][f]);
      end
    end
    cnt = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < FR * 8 + 8; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_re = (t < FR * 8) ? WL'(xr[t]) : '0;
      in_im = (t < FR * 8) ? WL'(xi[t]) : '0;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    for (int d = 0; d < 3; d++)
      check(cnt[d] >= FR * 8, $sformatf("L=%0d: only %0d outputs", LEN[d], cnt[d]));
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
