// fft_sdf_pipeline: N-point FFT/IFFT as a single-path delay-feedback (SDF)
// pipeline built from radix-2/4/8 butterfly processors.
//
// Structure (N = 2^n, n = 3q + r): when r = 1 a Radix-2 PE comes first, when
// r = 2 a radix-2/4 group comes first, and q radix-2/4/8 groups follow. A
// ROM-fed twiddle multiplier (tw_mult) sits between consecutive groups. For
// N = 128: Radix-2 PE (delay 64) -> ROM x -> PE1/PE2/PE3 (32/16/8) -> ROM x
// -> PE1/PE2/PE3 (4/2/1). The delays add up to N-1 words of feedback memory.
//
// Data: one complex sample per clock when in_valid is high, natural order,
// WL-bit two's complement real and imaginary parts. Every butterfly halves
// its results, so the output is DFT/N (FFT) or the exact inverse DFT (IFFT).
// Keep |x| below 2^(WL-1) (a disc, not a square) to rule out saturation.
// The IFFT reuses the forward datapath by swapping real and imaginary parts
// at input and output.
//
// Output: the spectrum leaves in bit-reversed order, one sample per accepted
// input once the pipeline is full; out_idx gives the frequency index of the
// current sample. The pipeline is continuous-flow: frame f+1 may follow frame
// f without a gap, and the end of frame f leaves while frame f+1 (or N flush
// samples) is entering. The first output appears after N-1 accepted inputs
// plus one clock per PE and per twiddle multiplier.
//
// Origin: the SDF pipeline, the radix-2/4/8 groups with a radix-2 or
// radix-2/4 head chosen by the size, and the 128-point layout follow the
// original; the ROM multiplier placement, the index output, scaling, and the
// IFFT by swapping are this design's choices.
module fft_sdf_pipeline
  import fft_pkg::*;
#(
  parameter int        N    = 128,
  parameter int        WL   = 16,
  parameter int        CW   = 14,
  parameter int        CL   = 8,
  parameter fft_func_e FUNC = FUNC_FFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WL-1:0] in_re,
  input  logic signed [WL-1:0] in_im,
  output logic                 out_valid,
  output logic signed [WL-1:0] out_re,
  output logic signed [WL-1:0] out_im,
  output logic [$clog2(N)-1:0] out_idx
);
  localparam int NB = $clog2(N);
  localparam int R  = NB % 3;
  localparam int NG = NB / 3 + ((R != 0) ? 1 : 0);

  // number of radix-2 stages in group g
  function automatic int g_stages(int g);
    return (g == 0 && R != 0) ? R : 3;
  endfunction
  // frame length handled by group g
  function automatic int g_len(int g);
    int b = NB;
    for (int i = 0; i < g; i++) b -= g_stages(i);
    return 1 << b;
  endfunction

  initial begin
    assert (N >= 8 && N <= 8192 && (1 << NB) == N)
      else $error("N must be a power of two from 8 to 8192");
  end

  // chain[g]: input of group g; chain[NG]: pipeline result
  logic                 c_v  [NG+1];
  logic signed [WL-1:0] c_re [NG+1];
  logic signed [WL-1:0] c_im [NG+1];

  assign c_v[0]  = in_valid;
  assign c_re[0] = (FUNC == FUNC_IFFT) ? in_im : in_re;
  assign c_im[0] = (FUNC == FUNC_IFFT) ? in_re : in_im;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic                 gv;
    logic signed [WL-1:0] gre, gim;

    r248_group #(.WL(WL), .L(g_len(g)), .S(g_stages(g)), .CL(CL)) u_grp (
      .clk, .rst_n, .in_valid(c_v[g]), .in_re(c_re[g]), .in_im(c_im[g]),
      .out_valid(gv), .out_re(gre), .out_im(gim)
    );

    if (g < NG - 1) begin : g_tw
      tw_mult #(.WL(WL), .CW(CW), .L(g_len(g)), .S(g_stages(g))) u_tw (
        .clk, .rst_n, .in_valid(gv), .in_re(gre), .in_im(gim),
        .out_valid(c_v[g+1]), .out_re(c_re[g+1]), .out_im(c_im[g+1])
      );
    end else begin : g_last
      assign c_v[g+1]  = gv;
      assign c_re[g+1] = gre;
      assign c_im[g+1] = gim;
    end
  end

  logic [NB-1:0] pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos <= '0;
    else if (c_v[NG]) pos <= pos + 1'b1;
  end

  assign out_valid = c_v[NG];
  assign out_re    = (FUNC == FUNC_IFFT) ? c_im[NG] : c_re[NG];
  assign out_im    = (FUNC == FUNC_IFFT) ? c_re[NG] : c_im[NG];
  always_comb out_idx = NB'(bitrev(pos, NB));
endmodule
