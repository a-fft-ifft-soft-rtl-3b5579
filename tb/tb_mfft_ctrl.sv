// tb_mfft_ctrl: drives the two-bank controller (N = 16) with input pairs
// and checks the schedule it produces.
//
// Phase 1 offers pairs at random, phase 2 offers one on every clock that
// in_ready allows. A small model follows each frame's bank: the bank a
// frame is loaded into must be the next one computed and then the next one
// unloaded. Checks on every clock:
//   - ld_we = in_ready && pair_in, and ld_cnt counts the pairs of a frame;
//   - the PE runs N*log2(N)/2 clocks per frame, with stage/cnt stepping
//     through every butterfly in order;
//   - pair reads come on every other clock with ucnt 0..N/2-1, and
//     frame_done comes with the last one, once per frame;
//   - no bank is loaded, computed or unloaded by two roles at once;
//   - with pairs always offered, the PE never idles between frames.
//
// Origin: the test data, reference models and tolerances are this testbench's
// own; the behaviour checked is the one described above.
module tb_mfft_ctrl;
  localparam int N = 16, NB = 4, FRAMES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          pair_in = 1'b0;
  logic          in_ready, ld_bank, ld_we, pe_active, pe_bank, out_bank, pair_rd, frame_done;
  logic [NB-2:0] ld_cnt, cnt, ucnt;
  logic [1:0]    stage;

  mfft_ctrl #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_load = 0, n_comp = 0, n_rd = 0, n_done = 0, gap = 0;
  int loaded = 0, computed = 0, unloaded = 0, pe_idle = 0;
  bit full_rate = 1'b0;
  bit ld_q[$], pe_q[$];   // banks of frames waiting for the PE / the unloader

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check(ld_we == (in_ready && pair_in), "ld_we");
      // exclusive roles
      if (pe_active && in_ready) check(pe_bank != ld_bank, "bank loaded and computed at once");
      if (pe_active && pair_rd) check(pe_bank != out_bank, "bank computed and unloaded at once");
      if (in_ready && pair_rd) check(ld_bank != out_bank, "bank loaded and unloaded at once");
      // loader
      if (ld_we) begin
        check(int'(ld_cnt) == n_load, $sformatf("load count %0d, want %0d", ld_cnt, n_load));
        n_load++;
        if (n_load == N / 2) begin
          ld_q.push_back(ld_bank);
          loaded++;
          n_load = 0;
        end
      end
      // butterfly PE
      if (pe_active) begin
        if (n_comp == 0) begin
          check(ld_q.size() > 0 && ld_q[0] == pe_bank, "PE works on the oldest loaded frame");
          if (ld_q.size() > 0) void'(ld_q.pop_front());
        end
        check(int'(stage) == n_comp / (N / 2) && int'(cnt) == n_comp % (N / 2),
              $sformatf("butterfly order: stage %0d cnt %0d at step %0d", stage, cnt, n_comp));
        n_comp++;
        if (n_comp == N * NB / 2) begin
          pe_q.push_back(pe_bank);
          computed++;
          n_comp = 0;
        end
      end else if (full_rate && computed >= 4 && computed < FRAMES) pe_idle++;
      // unloader
      if (pair_rd) begin
        if (n_rd == 0) begin
          check(pe_q.size() > 0 && pe_q[0] == out_bank, "unloader takes the oldest result");
          if (pe_q.size() > 0) void'(pe_q.pop_front());
        end
        check(int'(ucnt) == n_rd && (n_rd == 0 || gap == 1),
              $sformatf("unload order and spacing: ucnt %0d gap %0d", ucnt, gap));
        check(frame_done == (n_rd == N / 2 - 1), "frame_done with the last read");
        n_rd++;
        if (n_rd == N / 2) begin
          unloaded++;
          n_rd = 0;
        end
        gap = 0;
      end else begin
        gap++;
        check(!frame_done, "frame_done without a read");
      end
      if (frame_done) n_done++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: random pair arrivals
    while (loaded < 3) begin
      @(negedge clk);
      pair_in = in_ready && ($urandom_range(2) != 0);
    end
    // wait until the core is empty, then offer pairs at full rate
    @(negedge clk);
    pair_in = 1'b0;
    wait (unloaded == 3);
    full_rate = 1'b1;
    while (loaded < FRAMES) begin
      @(negedge clk);
      pair_in = in_ready;
    end
    @(negedge clk);
    pair_in = 1'b0;
    wait (unloaded == FRAMES);
    repeat (4) @(posedge clk);
    check(n_done == FRAMES, $sformatf("frame_done pulsed %0d times, want %0d", n_done, FRAMES));
    check(loaded == FRAMES && computed == FRAMES, "frame counts");
    check(pe_idle == 0, $sformatf("PE idle for %0d clocks between full-rate frames", pe_idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
