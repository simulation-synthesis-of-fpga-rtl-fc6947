// main_controller: state machine and counters of the main processor.
//
// It runs the Parallel Block schedule over an I x K matrix A and a K x J
// matrix B.  C is computed in 2 x 2 blocks, row-major over the block grid
// (block row rb, block column cb).  For each block:
//   Main1      read one word of A and one of B (read A / read B), both
//              element addresses advance by 2 (one word = 2 elements)
//   Main2      the words enter FIFO A / FIFO B; data ack to the slave;
//              N count += 1
//   Main3      if N count has reached K (all K steps of the inner
//              dimension sent) go to Main4, else to Check-for-data-request
//   Check      wait for data request from the slave, then Main1 again
//   Main4      done from main goes high (and stays high to Main8);
//              N count cleared, final count += 1
//   Main5..8   store result sets I..IV from the slave into Matrix C, one
//              per clock, at consecutive C addresses; S1,S2 (`sel`) pick
//              the set
//   Main9      last block: back to Reset main and pulse `done`; otherwise
//   Main10     next block in block row 0: A address reset to 0, B address
//              preset to the next block column
//   Main11     first block of the next block row: A address preset to the
//              next block row, B address preset to block column 0
//   Main12     next block in a later block row: A address preset to the
//              start of the current block row, B preset to the next column
// With a 4 x 4 result (four blocks) this is final count 1 -> Main10,
// 2 -> Main11, 3 -> Main12, 4 -> Reset main.  Reset main holds every
// counter and the slave processor in reset until `start` is seen high.
//
// Timing: every step except the last of a block takes 5 clocks (Main1,
// Main2, Main3 and two in Check, while the slave does Slave1 and Slave2);
// the last step plus unloading takes 10, so a block takes 5*K + 5 clocks
// and the last block ends in Reset main instead of Main1.  Main4 falls in
// the same clock as the slave's Slave2, so the slave sees done from main
// there, and Main5..Main8 line up with Slave3..Slave6.
// The five counters (address A, B, C, N count, final count) are
// ctrl_counter instances with the reset / enable / preset strobes decoded
// below; the preset values are the start addresses of block rows and
// columns in the operand layout, this design's choice.
// All outputs are decoded from the state and the counters; `rst` is
// synchronous, active high.
//
// States, their order and their actions follow the original main state
// machine.  Own choices: N count is compared with K after its increment
// (the description's "N count = 7" read as "step 7 was the last"), the
// branch out of Main9 follows the textual state list where the drawing
// disagrees, and Main9 chooses by block position so that sizes beyond four
// blocks work.
module main_controller
  import matmul_pkg::*;
#(
  parameter int unsigned DIM_I = 8,
  parameter int unsigned DIM_K = 8,
  parameter int unsigned DIM_J = 8,
  localparam int unsigned ROW_BLKS   = DIM_I / SI,
  localparam int unsigned COL_BLKS   = DIM_J / SJ,
  localparam int unsigned NUM_BLOCKS = ROW_BLKS * COL_BLKS,
  localparam int unsigned A_WORDS    = DIM_I * DIM_K / SI,
  localparam int unsigned B_WORDS    = DIM_K * DIM_J / SJ,
  localparam int unsigned C_WORDS    = DIM_I * DIM_J,
  localparam int unsigned A_AW = (A_WORDS > 1) ? $clog2(A_WORDS) : 1,
  localparam int unsigned B_AW = (B_WORDS > 1) ? $clog2(B_WORDS) : 1,
  localparam int unsigned C_AW = (C_WORDS > 1) ? $clog2(C_WORDS) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            data_req,
  output logic            read_a,
  output logic            read_b,
  output logic [A_AW-1:0] addr_a_word,
  output logic [B_AW-1:0] addr_b_word,
  output logic            data_ack,
  output logic            done_from_main,
  output logic [1:0]      sel,
  output logic            write_c,
  output logic [C_AW-1:0] addr_c,
  output logic            reset_slave,
  output logic            busy,
  output logic            done,
  output main_state_e     state
);

  // Element addresses are one bit wider than the word addresses.
  localparam int unsigned A_EW = A_AW + 1;
  localparam int unsigned B_EW = B_AW + 1;
  localparam int unsigned NW   = $clog2(DIM_K + 1);
  localparam int unsigned FW   = $clog2(NUM_BLOCKS + 1);
  localparam int unsigned RW   = (ROW_BLKS > 1) ? $clog2(ROW_BLKS) : 1;
  localparam int unsigned CW   = (COL_BLKS > 1) ? $clog2(COL_BLKS) : 1;
  // Distance in elements between consecutive block rows / columns.
  localparam int unsigned A_STRIDE = SI * DIM_K;
  localparam int unsigned B_STRIDE = SJ * DIM_K;

  main_state_e     state_nxt;
  logic [A_EW-1:0] addr_a;
  logic [B_EW-1:0] addr_b;
  logic [NW-1:0]   n_count;
  logic [FW-1:0]   final_count;
  logic [RW-1:0]   blk_row;
  logic [CW-1:0]   blk_col;
  logic            last_block, more_cols;

  always_comb begin
    last_block = (final_count == FW'(NUM_BLOCKS));
    more_cols  = (32'(blk_col) + 1 < COL_BLKS);
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    if (rst) state <= M_RESET;
    else     state <= state_nxt;
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      M_RESET:     if (start) state_nxt = M_MAIN1;
      M_MAIN1:     state_nxt = M_MAIN2;
      M_MAIN2:     state_nxt = M_MAIN3;
      M_MAIN3:     state_nxt = (n_count == NW'(DIM_K)) ? M_MAIN4 : M_CHECK_REQ;
      M_CHECK_REQ: if (data_req) state_nxt = M_MAIN1;
      M_MAIN4:     state_nxt = M_MAIN5;
      M_MAIN5:     state_nxt = M_MAIN6;
      M_MAIN6:     state_nxt = M_MAIN7;
      M_MAIN7:     state_nxt = M_MAIN8;
      M_MAIN8:     state_nxt = M_MAIN9;
      M_MAIN9: begin
        if (last_block)        state_nxt = M_RESET;
        else if (!more_cols)   state_nxt = M_MAIN11;
        else if (blk_row == 0) state_nxt = M_MAIN10;
        else                   state_nxt = M_MAIN12;
      end
      M_MAIN10, M_MAIN11, M_MAIN12: state_nxt = M_MAIN1;
      default:     state_nxt = M_RESET;
    endcase
  end

  // ----------------------------------------------------------- counters
  // Control strobes of the counters, decoded from the state.
  logic reset_all;
  logic reset_address_A_count, en_address_A_count, preset_address_A_count;
  logic reset_address_B_count, en_address_B_count, preset_address_B_count;
  logic reset_address_C_count, en_address_C_count;
  logic reset_N_count, en_N_count, reset_final_count, en_final_count;
  logic [A_EW-1:0] preset_address_A;
  logic [B_EW-1:0] preset_address_B;

  always_comb begin
    reset_all              = rst || (state == M_RESET);
    en_address_A_count     = (state == M_MAIN1);
    en_address_B_count     = (state == M_MAIN1);
    reset_address_A_count  = reset_all || (state == M_MAIN10);
    preset_address_A_count = (state inside {M_MAIN11, M_MAIN12});
    reset_address_B_count  = reset_all;
    preset_address_B_count = (state inside {M_MAIN10, M_MAIN11, M_MAIN12});
    reset_address_C_count  = reset_all;
    en_address_C_count     = write_c;
    en_N_count             = (state == M_MAIN2);
    reset_N_count          = reset_all || (state == M_MAIN4);
    en_final_count         = (state == M_MAIN4);
    reset_final_count      = reset_all;
    // Main11 starts the next block row; Main12 returns to the current one.
    preset_address_A = (state == M_MAIN11) ? A_EW'((32'(blk_row) + 1) * A_STRIDE)
                                           : A_EW'(32'(blk_row) * A_STRIDE);
    // Main11 goes back to block column 0; Main10/Main12 to the next one.
    preset_address_B = (state == M_MAIN11) ? '0
                                           : B_EW'((32'(blk_col) + 1) * B_STRIDE);
  end

  ctrl_counter #(.WIDTH(A_EW), .STEP(SI)) u_address_A_count (
    .clk(clk), .reset(reset_address_A_count), .en(en_address_A_count),
    .preset(preset_address_A_count), .preset_val(preset_address_A), .count(addr_a));

  ctrl_counter #(.WIDTH(B_EW), .STEP(SJ)) u_address_B_count (
    .clk(clk), .reset(reset_address_B_count), .en(en_address_B_count),
    .preset(preset_address_B_count), .preset_val(preset_address_B), .count(addr_b));

  ctrl_counter #(.WIDTH(C_AW), .STEP(1)) u_address_C_count (
    .clk(clk), .reset(reset_address_C_count), .en(en_address_C_count),
    .preset(1'b0), .preset_val('0), .count(addr_c));

  ctrl_counter #(.WIDTH(NW), .STEP(1)) u_N_count (
    .clk(clk), .reset(reset_N_count), .en(en_N_count),
    .preset(1'b0), .preset_val('0), .count(n_count));

  ctrl_counter #(.WIDTH(FW), .STEP(1)) u_final_count (
    .clk(clk), .reset(reset_final_count), .en(en_final_count),
    .preset(1'b0), .preset_val('0), .count(final_count));

  // Position of the current block in the block grid.
  always_ff @(posedge clk) begin
    if (reset_all) begin
      blk_row <= '0;
      blk_col <= '0;
    end else if (state == M_MAIN11) begin
      blk_row <= blk_row + 1'b1;
      blk_col <= '0;
    end else if (state inside {M_MAIN10, M_MAIN12}) begin
      blk_col <= blk_col + 1'b1;
    end
  end

  // ------------------------------------------------------------ outputs
  always_comb begin
    read_a         = (state == M_MAIN1);
    read_b         = (state == M_MAIN1);
    addr_a_word    = A_AW'(addr_a >> 1);
    addr_b_word    = B_AW'(addr_b >> 1);
    data_ack       = (state == M_MAIN2);
    done_from_main = (state inside {M_MAIN4, M_MAIN5, M_MAIN6, M_MAIN7, M_MAIN8});
    write_c        = (state inside {M_MAIN5, M_MAIN6, M_MAIN7, M_MAIN8});
    unique case (state)
      M_MAIN6: sel = 2'd1;
      M_MAIN7: sel = 2'd2;
      M_MAIN8: sel = 2'd3;
      default: sel = 2'd0;
    endcase
    reset_slave    = (state == M_RESET);
    busy           = (state != M_RESET);
    done           = (state == M_MAIN9) && last_block;
  end

endmodule
