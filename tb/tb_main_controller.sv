// tb_main_controller: self-checking test of the main state machine.
// Runs the controller with a 4 x 8 A and an 8 x 4 B (four 2 x 2 blocks of
// C, the block count of the state diagram) against a stand-in for the
// slave that drops data request for 2 clocks (plus a random extra delay
// in the second run) after each data ack.  Checked against a schedule
// worked out here:
//   - the word addresses of every read of A and B (block row rb, block
//     column cb, step k: A word rb*K + k, B word cb*K + k);
//   - every write to C: consecutive addresses, S1,S2 select 0..3, done
//     from main high;
//   - the branch taken after each block: Main10, Main11, Main12, Reset main;
//   - with no extra delay, `done` 4*(5K+5) - 2 clocks after the first
//     Main1 (5K+5 clocks per block).
module tb_main_controller;
  import matmul_pkg::*;
  localparam int DIM_I = 4, DIM_K = 8, DIM_J = 4;
  localparam int NB = (DIM_I / 2) * (DIM_J / 2);

  logic clk = 1'b0;
  logic rst, start, data_req;
  logic read_a, read_b, data_ack, done_from_main, write_c, reset_slave, busy, done;
  logic [3:0] addr_a_word, addr_b_word;
  logic [1:0] sel;
  logic [3:0] addr_c;
  main_state_e state;
  int checks = 0, failures = 0;
  int extra_max;
  int cnt;

  main_controller #(.DIM_I(DIM_I), .DIM_K(DIM_K), .DIM_J(DIM_J)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in for the slave's data request
  always_ff @(posedge clk) begin
    if (rst || reset_slave) cnt <= 0;
    else if (data_ack)      cnt <= 2 + ((extra_max > 0) ? $urandom_range(0, extra_max) : 0);
    else if (cnt > 0)       cnt <= cnt - 1;
  end
  assign data_req = (cnt == 0);

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run(int xmax);
    int reads = 0, writes = 0, blocks_seen = 0, cyc = 0, t_main1 = -1;
    bit finished = 0, saw_done = 0;
    main_state_e expect_branch [NB];
    expect_branch = '{M_MAIN10, M_MAIN11, M_MAIN12, M_RESET};
    extra_max = xmax;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!finished) begin
      int b = reads / DIM_K;          // block being read
      int k = reads % DIM_K;
      int rb = b / (DIM_J / 2), cb = b % (DIM_J / 2);
      if (state == M_MAIN1 && t_main1 < 0) t_main1 = cyc;
      if (read_a) begin
        checks++;
        if (!read_b || addr_a_word != 4'(rb * DIM_K + k) || addr_b_word != 4'(cb * DIM_K + k))
          fail($sformatf("read %0d: A word %0d B word %0d, expected %0d %0d",
                         reads, addr_a_word, addr_b_word, rb * DIM_K + k, cb * DIM_K + k));
        reads++;
      end
      if (write_c) begin
        checks++;
        if (addr_c != 4'(writes) || sel != 2'(writes % 4) || !done_from_main)
          fail($sformatf("write %0d: addr %0d sel %0d done_from_main %b",
                         writes, addr_c, sel, done_from_main));
        writes++;
      end
      if (done) begin
        saw_done = 1;
        checks++;
        if (xmax == 0 && cyc - t_main1 != NB * (5 * DIM_K + 5) - 2)
          fail($sformatf("done %0d clocks after first Main1, expected %0d",
                         cyc - t_main1, NB * (5 * DIM_K + 5) - 2));
        if (reads != NB * DIM_K || writes != NB * 4)
          fail($sformatf("%0d reads %0d writes at done", reads, writes));
      end
      if (state == M_MAIN9) begin
        checks++;
        if (blocks_seen >= NB) fail("too many blocks");
        else begin
          // the branch is the state after Main9
          @(negedge clk); cyc++;
          if (state != expect_branch[blocks_seen])
            fail($sformatf("after block %0d went to %s, expected %s", blocks_seen + 1,
                           state.name(), expect_branch[blocks_seen].name()));
          blocks_seen++;
          if (state == M_RESET) finished = 1;
          continue;
        end
      end
      @(negedge clk); cyc++;
    end
    checks++;
    if (!saw_done) fail("done never pulsed");
    checks++;
    if (blocks_seen != NB || busy) fail("run did not end in Reset main");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; extra_max = 0;
    @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (state != M_RESET || !reset_slave || busy) fail("does not wait in Reset main");
    run(0);
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
