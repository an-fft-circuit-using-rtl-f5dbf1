// swap_memory: the reordering memory of one pipelined FFT stage.
//
// A circular buffer of DEPTH words of WIDTH bits. Each enabled cycle it
// returns the word written DEPTH enabled cycles earlier (dout, read
// combinationally at the pointer) and stores din in its place, so it delays the
// stream by exactly DEPTH samples. The stage uses it to hold the first half of
// each butterfly's inputs until their partners arrive and to hold the second
// outputs until the first ones have left, which is the index swap between
// stages. One memory serves all moduli of the stage, each word holding the
// residues of every active modulus side by side, as in the document. Its depth
// here is N/2^(s+1) words for stage s (a single-path delay-feedback pipeline),
// which is this design's choice. The pointer resets to 0; the contents are not
// reset and are only read after they have been written.
module swap_memory #(
  parameter int DEPTH = 4,
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ptr <= '0;
    else if (en && ptr == AW'(DEPTH - 1)) ptr <= '0;
    else if (en)                     ptr <= ptr + 1'b1;
  end
endmodule
