// tb_slave_controller: self-checking test of the slave state machine.
// Plays the main side: acknowledges operands after random waits, and on
// the last step of a block raises done-from-main in the clock where the
// slave computes (Slave2).  Each clock the outputs are compared with the
// sequence the state diagram prescribes: wait (data_req high), Slave1
// (load_ops), Slave2 (en_mac), then back to wait, or Slave3..Slave6 with
// set_valid and set_idx 0..3 and clr_pe in Slave6.
module tb_slave_controller;
  import matmul_pkg::*;

  logic clk = 1'b0;
  logic rst, data_ack, done_from_main;
  logic data_req, load_ops, en_mac, clr_pe, set_valid;
  logic [1:0] set_idx;
  slave_state_e state;
  int checks = 0, failures = 0;

  slave_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs: {data_req, load_ops, en_mac, clr_pe, set_valid, set_idx}
  task automatic expect_out(logic [6:0] exp, string what);
    logic [6:0] got;
    got = {data_req, load_ops, en_mac, clr_pe, set_valid, set_idx};
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (state %s)", what, got, exp, state.name());
    end
  endtask

  localparam logic [6:0] O_WAIT = 7'b1000000;
  localparam logic [6:0] O_S1   = 7'b0100000;
  localparam logic [6:0] O_S2   = 7'b0010000;

  initial begin
    rst = 1'b1; data_ack = 1'b0; done_from_main = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    expect_out(O_WAIT, "after reset");
    for (int blk = 0; blk < 6; blk++) begin
      int steps = $urandom_range(1, 9);
      for (int k = 0; k < steps; k++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          expect_out(O_WAIT, "idle wait");
        end
        data_ack = 1'b1;                 // Main2
        @(negedge clk);
        data_ack = 1'b0;
        expect_out(O_S1, "slave1");
        @(negedge clk);
        expect_out(O_S2, "slave2");
        done_from_main = (k == steps - 1);
        @(negedge clk);
        if (k != steps - 1) expect_out(O_WAIT, "back to wait");
      end
      for (int s = 0; s < 4; s++) begin
        expect_out({1'b0, 1'b0, 1'b0, (s == 3), 1'b1, 2'(s)}, "unload set");
        @(negedge clk);
      end
      done_from_main = 1'b0;
      expect_out(O_WAIT, "after unload");
    end
    // reset in the middle of an unload
    data_ack = 1'b1; @(negedge clk); data_ack = 1'b0;
    @(negedge clk); done_from_main = 1'b1; @(negedge clk);
    rst = 1'b1; @(negedge clk); rst = 1'b0; done_from_main = 1'b0;
    expect_out(O_WAIT, "reset mid-unload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
