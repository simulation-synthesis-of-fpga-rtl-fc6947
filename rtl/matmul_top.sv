// matmul_top: matrix multiplication coprocessor, C = A x B.
//
// The main processor (Matrix A, Matrix B, Matrix C and the main
// controller) streams operands to the slave processor (the MAC unit with
// four processing elements) following the Parallel Block schedule: C is
// produced 2 x 2 elements at a time; for each block, K pairs of words (two
// elements of a column of A, two of a row of B) are sent, each followed by
// one multiply-accumulate in all four processing elements, and the four
// finished elements are then written to Matrix C one per clock.
//
// Defaults follow the design's main configuration: 8 x 8 matrices of 8-bit
// signed fixed-point elements, four processing elements, a 36-bit result
// path.  Set DIM_I = DIM_J = 4 to get the four-block run of the
// controller's state diagram.
//
// Interface:
//   clk, rst         clock; synchronous active-high reset, held at least
//                    one clock before the first start
//   start            level; sampled in Reset main, starts a multiplication
//   busy, done       busy is high from start to the end; done pulses for one
//                    clock when the last block has been stored
//   c_out            the element of C most recently written (Mat C)
//   host_*           loading port of the host: word writes into Matrix A
//                    and Matrix B (layout in operand_mem) and a synchronous
//                    read port of Matrix C (one clock latency; element of
//                    block n, set s at word 4n+s, see result_mem)
// The host ports are this design's own addition: the controller design only
// says the matrices live in the main processor.
// A multiplication takes (DIM_I/2)*(DIM_J/2)*(5*DIM_K + 5) clocks from the
// first clock in Main1: 720 clocks at the defaults (see main_controller).
module matmul_top
  import matmul_pkg::*;
#(
  parameter int unsigned DIM_I  = 8,
  parameter int unsigned DIM_K  = 8,
  parameter int unsigned DIM_J  = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 36,
  localparam int unsigned WORD_W  = SI * DATA_W,
  localparam int unsigned A_WORDS = DIM_I * DIM_K / SI,
  localparam int unsigned B_WORDS = DIM_K * DIM_J / SJ,
  localparam int unsigned C_WORDS = DIM_I * DIM_J,
  localparam int unsigned A_AW = (A_WORDS > 1) ? $clog2(A_WORDS) : 1,
  localparam int unsigned B_AW = (B_WORDS > 1) ? $clog2(B_WORDS) : 1,
  localparam int unsigned C_AW = (C_WORDS > 1) ? $clog2(C_WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic [ACC_W-1:0]  c_out,
  output logic              busy,
  output logic              done,
  input  logic              host_a_we,
  input  logic [A_AW-1:0]   host_a_addr,
  input  logic              host_b_we,
  input  logic [B_AW-1:0]   host_b_addr,
  input  logic [WORD_W-1:0] host_wdata,
  input  logic [C_AW-1:0]   host_c_addr,
  output logic [ACC_W-1:0]  host_c_data
);

  logic              read_a, read_b, data_ack, done_from_main, write_c;
  logic              reset_slave, data_req, set_valid;
  logic [1:0]        sel, set_idx;
  logic [A_AW-1:0]   addr_a;
  logic [B_AW-1:0]   addr_b;
  logic [C_AW-1:0]   addr_c;
  logic [WORD_W-1:0] mat_a_out, mat_b_out;
  logic [ACC_W-1:0]  data;

  main_controller #(
    .DIM_I(DIM_I),
    .DIM_K(DIM_K),
    .DIM_J(DIM_J)
  ) u_main (
    .clk           (clk),
    .rst           (rst),
    .start         (start),
    .data_req      (data_req),
    .read_a        (read_a),
    .read_b        (read_b),
    .addr_a_word   (addr_a),
    .addr_b_word   (addr_b),
    .data_ack      (data_ack),
    .done_from_main(done_from_main),
    .sel           (sel),
    .write_c       (write_c),
    .addr_c        (addr_c),
    .reset_slave   (reset_slave),
    .busy          (busy),
    .done          (done),
    .state         ()
  );

  operand_mem #(
    .WORD_W(WORD_W),
    .DEPTH (A_WORDS)
  ) u_matrix_a (
    .clk    (clk),
    .rd_en  (read_a),
    .rd_addr(addr_a),
    .rd_data(mat_a_out),
    .we     (host_a_we),
    .wr_addr(host_a_addr),
    .wr_data(host_wdata)
  );

  operand_mem #(
    .WORD_W(WORD_W),
    .DEPTH (B_WORDS)
  ) u_matrix_b (
    .clk    (clk),
    .rd_en  (read_b),
    .rd_addr(addr_b),
    .rd_data(mat_b_out),
    .we     (host_b_we),
    .wr_addr(host_b_addr),
    .wr_data(host_wdata)
  );

  slave_processor #(
    .DATA_W(DATA_W),
    .ACC_W (ACC_W)
  ) u_slave (
    .clk           (clk),
    .rst           (rst || reset_slave),
    .fifo_a_in     (mat_a_out),
    .fifo_b_in     (mat_b_out),
    .data_ack      (data_ack),
    .done_from_main(done_from_main),
    .sel           (sel),
    .data_req      (data_req),
    .data          (data),
    .set_valid     (set_valid),
    .set_idx       (set_idx)
  );

  result_mem #(
    .ACC_W(ACC_W),
    .DEPTH(C_WORDS)
  ) u_matrix_c (
    .clk    (clk),
    .rst    (rst),
    .we     (write_c),
    .wr_addr(addr_c),
    .wr_data(data),
    .rd_addr(host_c_addr),
    .rd_data(host_c_data),
    .mat_c  (c_out)
  );

  // Handshake rules between the two controllers.
  // Operands are only acknowledged to a slave that is waiting for them.
  a_ack_when_waiting: assert property (@(posedge clk) disable iff (rst)
    data_ack |-> data_req);
  // Each result set is stored while the slave is sending that same set.
  a_set_aligned: assert property (@(posedge clk) disable iff (rst)
    write_c |-> (set_valid && set_idx == sel));

endmodule
