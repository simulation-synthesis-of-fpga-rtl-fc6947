// processing_element: one multiply-accumulate cell of the slave processor.
//
// Each processing element owns one element of the C block under
// computation.  When `en` is high it adds the product of its A operand and
// its B operand to the accumulator; `clr` empties the accumulator (the
// slave controller raises it in its last unload state so the next block
// starts from zero).  Operands are signed two's complement integers of
// DATA_W bits (the 8-bit fixed-point numbers of the design; the binary
// point is the user's) and the accumulator keeps full precision in ACC_W
// bits, 36 by default to match the 36-bit result bus.
//
// Timing: one product per clock, registered result `acc` one cycle after
// `en`.  `rst` is synchronous and active high; `clr` has the same effect
// and `rst`/`clr` win over `en`.
//
// The multiply-and-accumulate function is the original design's; signed
// operands, the 36-bit full-precision register and the clear input are
// this design's choices for what the description leaves open.
module processing_element #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 36
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clr,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [2*DATA_W-1:0] prod;

  always_comb prod = a * b;

  always_ff @(posedge clk) begin
    if (rst || clr)
      acc <= '0;
    else if (en)
      acc <= acc + ACC_W'(prod);
  end

endmodule
