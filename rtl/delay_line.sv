// delay_line: the feedback memory of one single-path delay-feedback (SDF)
// stage, drawn as the shift register above every PE of the pipeline.
//
// It behaves as a DEPTH-word shift register that moves only when `en` is
// high: dout is the word that was written DEPTH enabled cycles earlier.
// Instead of moving every word, it is built as a circular buffer (one RAM
// array with a single pointer that is read and then overwritten), which is
// how a long SDF delay is normally mapped onto memory.
//
// Interface: din is written and the pointer advances at the rising clock
// edge when en = 1; dout is combinational from the current pointer.
// Reset clears only the pointer: a word is never read before it has been
// written, because the SDF stage marks its output invalid until it has
// filled the delay once.
//
// Origin: the feedback shift register of each SDF stage is the original's;
// building it as a circular buffer with one pointer (instead of a chain of
// registers) is this design's choice, and it behaves the same.
module delay_line #(
  parameter int DEPTH = 64,
  parameter int W     = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (int'(ptr) == DEPTH - 1) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end
endmodule
