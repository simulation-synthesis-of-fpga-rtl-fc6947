// tb_slave_processor: self-checking test of the MAC unit.
// Plays the main controller with the same timing: for each of K steps it
// presents a word of two A elements and a word of two B elements, pulses
// data ack when data_req is high, and after the last step raises
// done-from-main two clocks after the ack and steps the select S1,S2
// through sets I..IV, one per clock.  Each set on `data` is compared with
// the 2 x 2 block product computed here from the same operands.  Several
// blocks in a row check that the accumulators are cleared after Slave6;
// the number of clocks per step is checked too (data request returns 3 clocks after data ack).
module tb_slave_processor;
  localparam int DATA_W = 8;
  localparam int ACC_W  = 36;
  localparam int WORD_W = 2 * DATA_W;

  logic clk = 1'b0;
  logic rst, data_ack, done_from_main, data_req, set_valid;
  logic [WORD_W-1:0] fifo_a_in, fifo_b_in;
  logic [1:0] sel, set_idx;
  logic [ACC_W-1:0] data;
  longint exp_c [4];
  int checks = 0, failures = 0;

  slave_processor #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] el(logic [WORD_W-1:0] w, int i);
    return w[i*DATA_W +: DATA_W];
  endfunction

  initial begin
    rst = 1'b1; data_ack = 1'b0; done_from_main = 1'b0; sel = '0;
    fifo_a_in = '0; fifo_b_in = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int blk = 0; blk < 5; blk++) begin
      int steps = (blk == 0) ? 8 : $urandom_range(1, 12);
      for (int p = 0; p < 4; p++) exp_c[p] = 0;
      for (int k = 0; k < steps; k++) begin
        int waited = 0;
        while (!data_req) @(negedge clk);
        // Main1 stand-in: new operands on the memory outputs
        if (blk == 1 && k == 0) begin
          fifo_a_in = {8'h80, 8'h80}; fifo_b_in = {8'h80, 8'h7f};
        end else begin
          fifo_a_in = WORD_W'($urandom); fifo_b_in = WORD_W'($urandom);
        end
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++)
            exp_c[r*2 + c] += longint'(el(fifo_a_in, r)) * longint'(el(fifo_b_in, c));
        data_ack = 1'b1;                               // Main2
        @(negedge clk);
        data_ack = 1'b0;
        fifo_a_in = WORD_W'($urandom); fifo_b_in = WORD_W'($urandom); // must be ignored
        @(negedge clk);                                // Main3
        if (k == steps - 1) begin
          done_from_main = 1'b1;                       // Main4
          @(negedge clk);
          for (int s = 0; s < 4; s++) begin            // Main5..Main8
            sel = 2'(s);
            #1;
            checks++;
            if (data !== ACC_W'(exp_c[s]) || !set_valid || set_idx != 2'(s)) begin
              failures++;
              $display("FAIL block %0d set %0d: data=%0d expected %0d valid=%b idx=%0d",
                       blk, s, $signed(data), exp_c[s], set_valid, set_idx);
            end
            @(negedge clk);
          end
          done_from_main = 1'b0;
          sel = '0;
        end else begin
          @(negedge clk);                              // Check for data request
          waited = 3;
          while (!data_req && waited < 10) begin @(negedge clk); waited++; end
          checks++;
          if (waited != 3) begin
            failures++;
            $display("FAIL data request %0d clocks after data ack, expected 3", waited);
          end
        end
      end
      // after the unload every accumulator is cleared
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s); #1;
        checks++;
        if (data !== '0) begin
          failures++;
          $display("FAIL block %0d: PE%0d not cleared (%0d)", blk, s, data);
        end
      end
      sel = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
