// mfft_ctrl: controller of the continuous-flow memory-based FFT.
//
// The core has two frame buffers (banks). Each bank cycles through
//   LOAD  -> the bank is free; it is filled from the S/P converter when it
//            holds the load turn (N/2 pair writes)
//   READY -> holds a full input frame; it is transformed in place when it
//            holds the PE turn: one radix-2 butterfly per clock, N/2
//            butterflies per pass, log2(N) passes
//   DONE  -> holds a result frame; it is unloaded through the P/S converter
//            when it holds the output turn (N/2 pair reads, one every other
//            clock), then returns to LOAD.
// The three turns pass from bank to bank after each use, so frames keep
// their order while one bank is loaded or unloaded and the other is
// computed: the single butterfly PE can work without pause
// (continuous flow). A bank is only ever in one role, so the two banks never
// compete for a RAM port.
//
// Outputs: in_ready (the load-turn bank is free), ld_* for the loader,
// pe_* with stage/cnt for the address generator, out_bank/ucnt/pair_rd for
// the unloader, and frame_done with the last pair read of a frame.
// Timing of one frame in an idle core: N clocks of loading (at full input
// rate), N*log2(N)/2 clocks of computing, N-1 clocks of unloading.
//
// Origin: the original names a controller with input, queue-write and
// queue-read control; the bank states, the three turns and the counters are
// this design's choices.
module mfft_ctrl #(
  parameter int N = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pair_in,     // S/P pair arriving now
  output logic                         in_ready,
  // loader
  output logic                         ld_bank,
  output logic                         ld_we,
  output logic [$clog2(N)-2:0]         ld_cnt,
  // butterfly PE
  output logic                         pe_active,
  output logic                         pe_bank,
  output logic [$clog2($clog2(N))-1:0] stage,
  output logic [$clog2(N)-2:0]         cnt,
  // unloader
  output logic                         out_bank,
  output logic                         pair_rd,
  output logic [$clog2(N)-2:0]         ucnt,
  output logic                         frame_done
);
  localparam int NB = $clog2(N);

  typedef enum logic [1:0] {LOAD = 2'd0, READY = 2'd1, DONE = 2'd2} bank_e;

  bank_e bstate [2];
  logic  ld_tok, pe_tok, out_tok;   // bank holding each turn
  logic  odd;           // a pair was read in the previous clock
  logic  unloading;

  assign ld_bank    = ld_tok;
  assign pe_bank    = pe_tok;
  assign out_bank   = out_tok;
  assign in_ready   = (bstate[ld_tok] == LOAD);
  assign ld_we      = in_ready && pair_in;
  assign pe_active  = (bstate[pe_tok] == READY);
  assign unloading  = (bstate[out_tok] == DONE);
  assign pair_rd    = unloading && !odd;
  assign frame_done = pair_rd && (&ucnt);


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate  <= '{LOAD, LOAD};
      ld_tok  <= 1'b0;
      pe_tok  <= 1'b0;
      out_tok <= 1'b0;
      ld_cnt  <= '0;
      stage   <= '0;
      cnt     <= '0;
      ucnt    <= '0;
      odd     <= 1'b0;
    end else begin
      odd <= pair_rd;
      // loader
      if (ld_we) begin
        ld_cnt <= ld_cnt + 1'b1;
        if (&ld_cnt) begin
          bstate[ld_tok] <= READY;
          ld_tok         <= ~ld_tok;
        end
      end
      // butterfly PE
      if (pe_active) begin
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          if (int'(stage) == NB - 1) begin
            stage          <= '0;
            bstate[pe_tok] <= DONE;
            pe_tok         <= ~pe_tok;
          end else begin
            stage <= stage + 1'b1;
          end
        end
      end
      // unloader
      if (pair_rd) begin
        ucnt <= ucnt + 1'b1;
        if (&ucnt) begin
          bstate[out_tok] <= LOAD;
          out_tok         <= ~out_tok;
        end
      end
    end
  end
endmodule
