// slave_processor: the MAC unit of the coprocessor.
//
// Holds FIFO A and FIFO B (one WORD_W-bit word each: SI = 2 elements of a
// column of A, SJ = 2 elements of a row of B), the operand registers, the
// four processing elements of a 2 x 2 block of C and the result
// multiplexer.  The slave controller sequences it.
//
// Data flow for one step k of the inner dimension:
//   cycle 0  data_ack high: FIFO A <= fifo_a_in, FIFO B <= fifo_b_in
//   cycle 1  Slave1: operand registers <= FIFO A / FIFO B
//   cycle 2  Slave2: PE(r,c) accumulates a[r] * b[c]
// Processing element p = r*SJ + c holds C(row r, column c) of the block;
// element r of a word sits in bits [r*DATA_W +: DATA_W].
//
// Unloading: the select `sel` (S1,S2, driven by the main controller) picks
// which processing element drives the ACC_W-bit `data` bus; set I..IV are
// PE0..PE3, i.e. the block in row-major order.  `data` is combinational
// from the accumulators.  `set_valid` is high while the slave controller
// is in Slave3..Slave6 and `set_idx` names the set it is sending, which the
// top level uses to check that both controllers agree.
// `rst` is synchronous and active high; it clears FIFOs, operands,
// accumulators and the controller.
//
// Follows the original description in its parts and order of operations.
// Own choices: the result multiplexer is 4-to-1 on the two selects (the
// description calls it 2:1 but feeds it four outputs and two selects), the
// FIFOs are one word deep, and the set order is row-major.
module slave_processor
  import matmul_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 36,
  localparam int unsigned WORD_W = SI * DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] fifo_a_in,
  input  logic [WORD_W-1:0] fifo_b_in,
  input  logic              data_ack,
  input  logic              done_from_main,
  input  logic [1:0]        sel,
  output logic              data_req,
  output logic [ACC_W-1:0]  data,
  output logic              set_valid,
  output logic [1:0]        set_idx
);

  logic [WORD_W-1:0] fifo_a, fifo_b;
  logic [WORD_W-1:0] op_a, op_b;
  logic              load_ops, en_mac, clr_pe;
  logic signed [ACC_W-1:0] acc [NUM_PE];

  slave_controller u_ctrl (
    .clk           (clk),
    .rst           (rst),
    .data_ack      (data_ack),
    .done_from_main(done_from_main),
    .data_req      (data_req),
    .load_ops      (load_ops),
    .en_mac        (en_mac),
    .clr_pe        (clr_pe),
    .set_idx       (set_idx),
    .set_valid     (set_valid),
    .state         ()
  );

  // FIFO A / FIFO B, loaded by the data acknowledgement of the main side.
  always_ff @(posedge clk) begin
    if (rst) begin
      fifo_a <= '0;
      fifo_b <= '0;
    end else if (data_ack) begin
      fifo_a <= fifo_a_in;
      fifo_b <= fifo_b_in;
    end
  end

  // Operand registers ("register 1 .. register N"), loaded in Slave1.
  always_ff @(posedge clk) begin
    if (rst) begin
      op_a <= '0;
      op_b <= '0;
    end else if (load_ops) begin
      op_a <= fifo_a;
      op_b <= fifo_b;
    end
  end

  for (genvar r = 0; r < SI; r++) begin : g_row
    for (genvar c = 0; c < SJ; c++) begin : g_col
      processing_element #(
        .DATA_W(DATA_W),
        .ACC_W (ACC_W)
      ) u_pe (
        .clk(clk),
        .rst(rst),
        .clr(clr_pe),
        .en (en_mac),
        .a  (op_a[r*DATA_W +: DATA_W]),
        .b  (op_b[c*DATA_W +: DATA_W]),
        .acc(acc[r*SJ + c])
      );
    end
  end

  // Result multiplexer selected by S1,S2.
  always_comb data = acc[sel];

endmodule
