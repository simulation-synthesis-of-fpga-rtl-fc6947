// tb_operand_mem: self-checking test of the operand memory (Matrix A / B).
// Fills every word with a random pattern through the write port, then
// reads all words back in random order with `rd_en` and checks the data one
// clock after the request.  With `rd_en` low the output must hold its last
// value.  A simultaneous write and read of the same word returns the old
// word (read-before-write).
module tb_operand_mem;
  localparam int WORD_W = 16;
  localparam int DEPTH  = 32;
  localparam int AW     = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rd_en, we;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [WORD_W-1:0] rd_data, wr_data;
  logic [WORD_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  operand_mem #(.WORD_W(WORD_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_data(logic [WORD_W-1:0] exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    rd_en = 1'b0; we = 1'b0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = WORD_W'($urandom);
      @(negedge clk);
      we = 1'b1; wr_addr = AW'(i); wr_data = model[i];
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      int unsigned ad = $urandom_range(0, DEPTH - 1);
      logic [WORD_W-1:0] last;
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(ad);
      @(negedge clk);
      expect_data(model[ad], "read");
      last = model[ad];
      rd_en = 1'b0; rd_addr = AW'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      expect_data(last, "hold with read low");
    end
    // read and write the same word in one clock
    @(negedge clk);
    rd_en = 1'b1; rd_addr = 5; we = 1'b1; wr_addr = 5; wr_data = ~model[5];
    @(negedge clk);
    expect_data(model[5], "read before write");
    model[5] = ~model[5];
    we = 1'b0;
    @(negedge clk);
    expect_data(model[5], "new word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
