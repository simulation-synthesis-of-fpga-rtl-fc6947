// matmul_pkg: constants and state types shared by the matrix coprocessor.
//
// The coprocessor computes C = A x B with the Parallel Block schedule: C is
// cut into SI x SJ blocks; for each block the main controller streams, for
// every k of the inner dimension, SI elements of column k of A and SJ
// elements of row k of B to a slave processor whose SI*SJ processing
// elements each accumulate one element of the block.  The block shape
// 2 x 2 (four processing elements, four result sets per block) is fixed by
// the two controller state machines; the matrix sizes and widths are module
// parameters.
package matmul_pkg;

  // Block shape: rows of A (SI) and columns of B (SJ) handled per block.
  localparam int unsigned SI     = 2;
  localparam int unsigned SJ     = 2;
  localparam int unsigned NUM_PE = SI * SJ;   // four processing elements

  // Main controller states (Reset main, Main1..Main12, Check for data request).
  typedef enum logic [3:0] {
    M_RESET     = 4'd0,
    M_MAIN1     = 4'd1,   // read one word of A and one of B, addresses += 2
    M_MAIN2     = 4'd2,   // load FIFO A / FIFO B, data ack, N count += 1
    M_MAIN3     = 4'd3,   // test N count
    M_CHECK_REQ = 4'd4,   // wait for data request from the slave
    M_MAIN4     = 4'd5,   // done from main, clear N count, final count += 1
    M_MAIN5     = 4'd6,   // store result set I in Matrix C
    M_MAIN6     = 4'd7,   // store result set II
    M_MAIN7     = 4'd8,   // store result set III
    M_MAIN8     = 4'd9,   // store result set IV
    M_MAIN9     = 4'd10,  // choose the next block or finish
    M_MAIN10    = 4'd11,  // same block row (first): reset A, preset B
    M_MAIN11    = 4'd12,  // next block row: preset A, back to first B block
    M_MAIN12    = 4'd13   // same block row (later): preset A, preset B
  } main_state_e;

  // Slave controller states (Check the data ack, Slave1..Slave6).
  typedef enum logic [2:0] {
    S_CHECK_ACK = 3'd0,
    S_SLAVE1    = 3'd1,   // FIFO registers -> operand registers
    S_SLAVE2    = 3'd2,   // multiply-accumulate in all processing elements
    S_SLAVE3    = 3'd3,   // result set I on DATA
    S_SLAVE4    = 3'd4,   // result set II
    S_SLAVE5    = 3'd5,   // result set III
    S_SLAVE6    = 3'd6    // result set IV, processing elements cleared
  } slave_state_e;

endpackage
