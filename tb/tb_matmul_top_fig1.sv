// tb_matmul_top_fig1: end-to-end test of the small example of the Parallel
// Block scheme: 4 x 4 matrices (N = 4) in 2 x 2 blocks (Si = Sj = 2).
// Derived from the four-block test: a 4 x 4 A and a 4 x 4 B give
// four 2 x 2 blocks of C, the block count drawn in the
// main controller's state diagram.  Besides the checks of the full-size
// test it checks the branch taken after each block: Main10 after the
// first, Main11 after the second, Main12 after the third and Reset main
// after the fourth.
//
// Same procedure as the full-size test:
//
// For each of several matrix pairs (random, all -128, all 127 x -128,
// identity x random) the host port loads A and B in the block layout,
// `start` is pulsed, and after `done` Matrix C is read back through the
// host port and compared with a product computed here.  Also checked:
//   - `c_out` shows each element one clock after it is written;
//   - the run takes (I/2)(J/2)(5K+5) - 2 clocks from the first Main1 to
//     `done`, and `start` is taken the clock after it is seen;
//   - a second start after a finished run works (back through Reset main).
// Each mechanism of the design is counted and must occur at least once:
// waits in Check-for-data-request, Main10/Main11/Main12 block changes,
// done-from-main unloads, processing-element clears, return to Reset main,
// negative results and results beyond 16 bits.
module tb_matmul_top_fig1;
  import matmul_pkg::*;
  localparam int DIM_I = 4, DIM_K = 4, DIM_J = 4;
  localparam int DATA_W = 8, ACC_W = 36, WORD_W = 16;
  localparam int NB = (DIM_I / 2) * (DIM_J / 2);
  localparam int A_AW = $clog2(DIM_I * DIM_K / 2);
  localparam int B_AW = $clog2(DIM_K * DIM_J / 2);
  localparam int C_AW = $clog2(DIM_I * DIM_J);

  logic clk = 1'b0;
  logic rst, start, busy, done;
  logic [ACC_W-1:0] c_out, host_c_data;
  logic host_a_we, host_b_we;
  logic [A_AW-1:0] host_a_addr;
  logic [B_AW-1:0] host_b_addr;
  logic [WORD_W-1:0] host_wdata;
  logic [C_AW-1:0] host_c_addr;

  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] A [DIM_I][DIM_K];
  logic signed [DATA_W-1:0] B [DIM_K][DIM_J];
  longint C [DIM_I][DIM_J];
  int n_wait = 0, n_main10 = 0, n_main11 = 0, n_main12 = 0, n_unload = 0;
  int n_clear = 0, n_reset_return = 0, n_negative = 0, n_wide = 0;

  matmul_top #(.DIM_I(DIM_I), .DIM_K(DIM_K), .DIM_J(DIM_J)) dut (.*);

  // branch taken after each block of a run
  main_state_e branch [$];
  logic        in_main9;
  always @(negedge clk) begin
    if (in_main9) branch.push_back(dut.u_main.state);
    in_main9 = !rst && dut.u_main.state == M_MAIN9;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled inside the design
  always @(posedge clk) if (!rst) begin
    if (dut.u_main.state == M_CHECK_REQ && !dut.data_req) n_wait++;
    if (dut.u_main.state == M_MAIN10) n_main10++;
    if (dut.u_main.state == M_MAIN11) n_main11++;
    if (dut.u_main.state == M_MAIN12) n_main12++;
    if (dut.u_main.state == M_MAIN4 && dut.done_from_main) n_unload++;
    if (dut.u_slave.clr_pe) n_clear++;
    if (dut.u_main.state == M_MAIN9 && done) n_reset_return++;
  end

  // c_out follows every write to Matrix C one clock later
  logic [ACC_W-1:0] last_written;
  logic             wrote;
  always @(posedge clk) begin
    if (wrote) begin
      checks++;
      if (c_out !== last_written) begin
        failures++;
        $display("FAIL c_out %h, expected %h", c_out, last_written);
      end
    end
    wrote        <= dut.write_c;
    last_written <= dut.data;
  end

  task automatic load_and_run(int run_id);
    int cyc = 0, t_main1 = -1;
    // reference product
    for (int i = 0; i < DIM_I; i++)
      for (int j = 0; j < DIM_J; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < DIM_K; k++) C[i][j] += longint'(A[i][k]) * longint'(B[k][j]);
      end
    // load in the block layout
    for (int rb = 0; rb < DIM_I / 2; rb++)
      for (int k = 0; k < DIM_K; k++) begin
        @(negedge clk);
        host_a_we = 1'b1; host_a_addr = A_AW'(rb * DIM_K + k);
        host_wdata = {A[2*rb+1][k], A[2*rb][k]};
      end
    @(negedge clk); host_a_we = 1'b0;
    for (int cb = 0; cb < DIM_J / 2; cb++)
      for (int k = 0; k < DIM_K; k++) begin
        @(negedge clk);
        host_b_we = 1'b1; host_b_addr = B_AW'(cb * DIM_K + k);
        host_wdata = {B[k][2*cb+1], B[k][2*cb]};
      end
    @(negedge clk); host_b_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (dut.u_main.state != M_MAIN1 || !busy) begin
      failures++;
      $display("FAIL run %0d: start not taken", run_id);
    end
    t_main1 = 0;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NB * (5 * DIM_K + 5) - 2) begin
      failures++;
      $display("FAIL run %0d: done after %0d clocks, expected %0d", run_id, cyc,
               NB * (5 * DIM_K + 5) - 2);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL run %0d: still busy", run_id); end
    #1;
    checks++;
    if (branch.size() != 4 || branch[0] != M_MAIN10 || branch[1] != M_MAIN11 ||
        branch[2] != M_MAIN12 || branch[3] != M_RESET) begin
      failures++;
      $display("FAIL run %0d: branches after the blocks were %p", run_id, branch);
    end
    branch.delete();
    // read back Matrix C: block n = rb*(J/2)+cb, set s = 2r+c, word 4n+s
    for (int rb = 0; rb < DIM_I / 2; rb++)
      for (int cb = 0; cb < DIM_J / 2; cb++)
        for (int s = 0; s < 4; s++) begin
          int i = 2 * rb + s / 2, j = 2 * cb + s % 2;
          host_c_addr = C_AW'(4 * (rb * (DIM_J / 2) + cb) + s);
          @(negedge clk);
          checks++;
          if ($signed(host_c_data) !== ACC_W'(C[i][j])) begin
            failures++;
            $display("FAIL run %0d: C[%0d][%0d] = %0d, expected %0d", run_id, i, j,
                     $signed(host_c_data), C[i][j]);
          end
          if (C[i][j] < 0) n_negative++;
          if (C[i][j] > 32767 || C[i][j] < -32768) n_wide++;
        end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; host_a_we = 1'b0; host_b_we = 1'b0;
    host_a_addr = '0; host_b_addr = '0; host_wdata = '0; host_c_addr = '0;
    wrote = 1'b0; in_main9 = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 5; run++) begin
      for (int i = 0; i < DIM_I; i++)
        for (int k = 0; k < DIM_K; k++)
          case (run)
            1:       A[i][k] = -128;
            2:       A[i][k] = 127;
            3:       A[i][k] = (i == k) ? 8'sd1 : 8'sd0;
            default: A[i][k] = DATA_W'($urandom);
          endcase
      for (int k = 0; k < DIM_K; k++)
        for (int j = 0; j < DIM_J; j++)
          B[k][j] = (run == 1 || run == 2) ? -8'sd128 : DATA_W'($urandom);
      load_and_run(run);
    end
    // every mechanism must have happened
    begin
      int counts [9];
      string names [9];
      counts = '{n_wait, n_main10, n_main11, n_main12, n_unload, n_clear,
                 n_reset_return, n_negative, n_wide};
      names = '{"data-request wait", "Main10", "Main11", "Main12",
                           "done-from-main unload", "PE clear", "return to Reset main",
                           "negative result", "result beyond 16 bits"};
      for (int m = 0; m < 9; m++) begin
        checks++;
        $display("mechanism %-24s occurred %0d times", names[m], counts[m]);
        if (counts[m] == 0) begin
          failures++;
          $display("FAIL mechanism %s never occurred", names[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
