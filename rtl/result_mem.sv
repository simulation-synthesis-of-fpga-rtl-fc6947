// result_mem: storage for the result matrix (Matrix C).
//
// DEPTH words of ACC_W bits, one element of C per word.  The main
// controller writes one element per clock while it unloads a block
// (Main5..Main8), at consecutive addresses: block n of the schedule
// occupies words 4n .. 4n+3 in the order C(2rb,2cb), C(2rb,2cb+1),
// C(2rb+1,2cb), C(2rb+1,2cb+1), where (rb, cb) is the block's position.
//
// Ports: write port `we`/`wr_addr`/`wr_data`; a synchronous read port for
// the host (`rd_data` valid the clock after `rd_addr`); `mat_c`, a register
// that shows the element most recently written (the Mat C output).  Only
// `mat_c` is reset (synchronous, active high).
//
// The write side and the Mat C output follow the original block diagram;
// the host read port and the storage order are this design's choices.
module result_mem #(
  parameter int unsigned ACC_W = 36,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [ACC_W-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [ACC_W-1:0] rd_data,
  output logic [ACC_W-1:0] mat_c
);

  logic [ACC_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst)     mat_c <= '0;
    else if (we) mat_c <= wr_data;
  end

endmodule
