// operand_mem: storage for an operand matrix (Matrix A or Matrix B).
//
// A single-clock memory of DEPTH words of WORD_W bits.  A word holds the
// two elements one processing-element row (or column) needs at one step of
// the inner dimension, so the controller fetches one word per step.  The
// main controller keeps an element address that advances by two per step;
// the word index it presents here is that address divided by two.
//
// Layout (chosen by the loading host, see the top level):
//   Matrix A (I x K):  word rb*K + k = { A[2rb+1][k], A[2rb][k] }
//   Matrix B (K x J):  word cb*K + k = { B[k][2cb+1], B[k][2cb] }
// so the words of one block row of A (one block column of B) are
// contiguous in k.
//
// Read port: synchronous; `rd_data` is updated the clock after `rd_en`
// (the read A / read B signal) and holds otherwise.  Write port: a host
// loads the matrix through `we`/`wr_addr`/`wr_data` before the start of a
// multiplication.  No reset: contents are whatever was written.
//
// Read enable, clocked reads and the address stepping by two elements follow
// the original description; the word layout and the host write port are
// this design's choices.
module operand_mem #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned DEPTH  = 32,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [WORD_W-1:0] rd_data,
  input  logic              we,
  input  logic [AW-1:0]     wr_addr,
  input  logic [WORD_W-1:0] wr_data
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
