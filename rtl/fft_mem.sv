// fft_mem: continuous-flow memory-based N-point FFT/IFFT with a single
// radix-2 butterfly PE.
//
// Blocks: S/P converter -> two FFT RAM banks <-> butterfly PE (fed by the
// coefficient ROM) -> P/S converter, sequenced by the controller and the
// address generators. A frame is loaded into a free bank in natural order,
// transformed in place by log2(N) radix-2 decimation-in-frequency passes of
// N/2 butterflies each (one butterfly per clock), and unloaded in natural
// order (the unload addresses are bit-reversed). With two banks, one frame
// is computed while the other bank delivers the previous result and takes
// the next input, so the PE never waits for I/O.
//
// Interface: valid/ready input, one sample per clock while in_ready is high;
// in_ready drops while both banks are occupied. The output has no
// back-pressure: out_valid marks N consecutive samples X[0..N-1], out_idx
// gives the frequency index.
// Timing: the first result of a frame leaves N*log2(N)/2 + 2 clocks after
// its last sample is taken when the PE is free; in steady state a frame is
// accepted every N*log2(N)/2 clocks (the PE's work), so the sustained input
// rate is 2/log2(N) samples per clock.
// Scaling and IFFT handling are those of the pipeline core: every butterfly
// halves, the result is DFT/N or the inverse DFT, and the IFFT swaps real and
// imaginary parts at input and output.
//
// Origin: the block set (S/P, FFT RAM, butterfly PE, coefficient ROM, address
// generator, controller, P/S), one butterfly PE for all butterflies, and
// continuous flow follow the original; the radix-2 PE, the two ping-pong
// banks, the addressing and the handshake are this design's choices.
module fft_mem
  import fft_pkg::*;
#(
  parameter int        N    = 128,
  parameter int        WL   = 16,
  parameter int        CW   = 14,
  parameter fft_func_e FUNC = FUNC_FFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [WL-1:0] in_re,
  input  logic signed [WL-1:0] in_im,
  output logic                 out_valid,
  output logic signed [WL-1:0] out_re,
  output logic signed [WL-1:0] out_im,
  output logic [$clog2(N)-1:0] out_idx,
  output logic                 busy
);
  localparam int NB = $clog2(N);
  localparam int SW = $clog2(NB);

  logic                 pair_in, frame_done;
  logic                 ld_bank, ld_we, pe_active, pe_bank, out_bank, pair_rd;
  logic [NB-2:0]        ld_cnt, cnt, ucnt;
  logic [SW-1:0]        stage;
  logic [NB-1:0]        la0, la1, pa0, pa1, ua0, ua1, tw_addr, unused_tw0, unused_tw1;
  logic [2*WL-1:0]      sp0, sp1, x0, x1, pe_rd0, pe_rd1, u_rd0, u_rd1;
  logic [2*WL-1:0]      rd0 [2], rd1 [2];
  logic signed [WL-1:0] x_re, x_im, y_re, y_im;
  logic signed [WL-1:0] x0_re, x0_im, x1_re, x1_im;
  logic signed [CW+1:0] w_re, w_im;

  // IFFT: swap real and imaginary parts on the way in and out
  assign x_re = (FUNC == FUNC_IFFT) ? in_im : in_re;
  assign x_im = (FUNC == FUNC_IFFT) ? in_re : in_im;

  sp_conv #(.WL(WL)) u_sp (
    .clk, .rst_n, .in_valid, .in_ready, .in_re(x_re), .in_im(x_im),
    .pair_valid(pair_in), .d0(sp0), .d1(sp1)
  );

  mfft_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .pair_in, .in_ready,
    .ld_bank, .ld_we, .ld_cnt,
    .pe_active, .pe_bank, .stage, .cnt,
    .out_bank, .pair_rd, .ucnt, .frame_done
  );

  // one address generator per access stream: load, butterflies, unload
  mfft_addr_gen #(.N(N)) u_agen_ld (.phase(2'd0), .stage(SW'(0)), .cnt(ld_cnt),
                                    .a0(la0), .a1(la1), .tw_addr(unused_tw0));
  mfft_addr_gen #(.N(N)) u_agen_pe (.phase(2'd1), .stage, .cnt,
                                    .a0(pa0), .a1(pa1), .tw_addr);
  mfft_addr_gen #(.N(N)) u_agen_un (.phase(2'd2), .stage(SW'(0)), .cnt(ucnt),
                                    .a0(ua0), .a1(ua1), .tw_addr(unused_tw1));

  twiddle_rom #(.L(N), .CW(CW)) u_rom (.addr(tw_addr), .w_re, .w_im);

  assign pe_rd0 = rd0[pe_bank];
  assign pe_rd1 = rd1[pe_bank];

  bf2_pe #(.WL(WL), .CW(CW)) u_pe (
    .a_re(pe_rd0[2*WL-1:WL]), .a_im(pe_rd0[WL-1:0]),
    .b_re(pe_rd1[2*WL-1:WL]), .b_im(pe_rd1[WL-1:0]),
    .w_re, .w_im, .x0_re, .x0_im, .x1_re, .x1_im
  );
  assign x0 = {x0_re, x0_im};
  assign x1 = {x1_re, x1_im};

  // the two frame buffers; the controller gives each at most one role
  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic          is_ld, is_pe, we;
    logic [NB-1:0] ra0, ra1, wa0, wa1;
    logic [2*WL-1:0] wd0, wd1;

    assign is_ld = ld_we && (ld_bank == 1'(b));
    assign is_pe = pe_active && (pe_bank == 1'(b));
    assign we    = (is_ld || is_pe) && rst_n;   // no writes while in reset
    assign ra0   = is_pe ? pa0 : ua0;
    assign ra1   = is_pe ? pa1 : ua1;
    assign wa0   = is_ld ? la0 : pa0;
    assign wa1   = is_ld ? la1 : pa1;
    assign wd0   = is_ld ? sp0 : x0;
    assign wd1   = is_ld ? sp1 : x1;

    fft_ram #(.N(N), .W(2 * WL)) u_ram (
      .clk, .ra0, .ra1, .rd0(rd0[b]), .rd1(rd1[b]),
      .we0(we), .wa0, .wd0,
      .we1(we), .wa1, .wd1
    );
  end

  assign u_rd0 = rd0[out_bank];
  assign u_rd1 = rd1[out_bank];

  ps_conv #(.WL(WL)) u_ps (
    .clk, .rst_n, .pair_valid(pair_rd), .d0(u_rd0), .d1(u_rd1),
    .out_valid, .out_re(y_re), .out_im(y_im)
  );

  assign out_re = (FUNC == FUNC_IFFT) ? y_im : y_re;
  assign out_im = (FUNC == FUNC_IFFT) ? y_re : y_im;
  assign busy   = pe_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_idx <= '0;
    else if (out_valid) out_idx <= out_idx + 1'b1;
  end

  // the last pair of a frame is read while sample N-3 is leaving
  a_unload_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                     frame_done |-> (int'(out_idx) == N - 3 && out_valid))
    else $error("fft_mem: output counter out of step");
endmodule
