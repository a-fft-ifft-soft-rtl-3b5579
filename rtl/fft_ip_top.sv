// fft_ip_top: the FFT/IFFT soft core in both of its architectures, side by
// side, sharing one clock, one reset and one set of generator parameters.
//
//   p_* : SDF pipeline (fft_sdf_pipeline). One sample per clock in and out,
//         continuous-flow, output in bit-reversed order with its index.
//   m_* : memory-based core (fft_mem). One radix-2 butterfly PE working in
//         place on two N-word RAM banks in turn (one is computed while the
//         other is unloaded and reloaded); valid/ready input, natural-order
//         output.
//
// A generated core normally holds one of the two (the generator's
// "Architecture" choice); both are brought out here so either can be used
// and the two can be compared on the same data. Parameters are the
// generator's: N points (8..8192), WL-bit I/O wordlength, CW coefficient
// fraction bits, CL shift-add terms for sqrt(2)/2, and FFT or IFFT.
// Both cores scale by 1/N (FFT) and produce the exact inverse DFT (IFFT).
// Reset is asynchronous, active low.
//
// Origin: the two architectures, the parameter set (point count, wordlength,
// FFT/IFFT, CL, CW) and the 8..8192 range follow the original; putting both
// cores side by side in one top, and the port names, are this design's
// choices.
module fft_ip_top
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
  // pipeline core
  input  logic                 p_in_valid,
  input  logic signed [WL-1:0] p_in_re,
  input  logic signed [WL-1:0] p_in_im,
  output logic                 p_out_valid,
  output logic signed [WL-1:0] p_out_re,
  output logic signed [WL-1:0] p_out_im,
  output logic [$clog2(N)-1:0] p_out_idx,
  // memory-based core
  input  logic                 m_in_valid,
  output logic                 m_in_ready,
  input  logic signed [WL-1:0] m_in_re,
  input  logic signed [WL-1:0] m_in_im,
  output logic                 m_out_valid,
  output logic signed [WL-1:0] m_out_re,
  output logic signed [WL-1:0] m_out_im,
  output logic [$clog2(N)-1:0] m_out_idx,
  output logic                 m_busy
);
  fft_sdf_pipeline #(.N(N), .WL(WL), .CW(CW), .CL(CL), .FUNC(FUNC)) u_pipe (
    .clk, .rst_n,
    .in_valid (p_in_valid),  .in_re (p_in_re),  .in_im (p_in_im),
    .out_valid(p_out_valid), .out_re(p_out_re), .out_im(p_out_im),
    .out_idx  (p_out_idx)
  );

  fft_mem #(.N(N), .WL(WL), .CW(CW), .FUNC(FUNC)) u_mem (
    .clk, .rst_n,
    .in_valid (m_in_valid),  .in_ready(m_in_ready),
    .in_re    (m_in_re),     .in_im   (m_in_im),
    .out_valid(m_out_valid), .out_re  (m_out_re), .out_im(m_out_im),
    .out_idx  (m_out_idx),   .busy    (m_busy)
  );
endmodule
