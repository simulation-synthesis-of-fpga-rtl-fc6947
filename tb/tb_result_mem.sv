// tb_result_mem: self-checking test of the result memory (Matrix C).
// Writes random 36-bit words at random addresses, checks `mat_c` shows the
// word written last (one clock after the write, holding otherwise), then
// reads the whole memory back through the synchronous host port (one clock
// latency) against a model.  Reset clears `mat_c` only.
module tb_result_mem;
  localparam int ACC_W = 36;
  localparam int DEPTH = 64;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst, we;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [ACC_W-1:0] wr_data, rd_data, mat_c;
  logic [ACC_W-1:0] model [DEPTH];
  logic [ACC_W-1:0] last;
  int checks = 0, failures = 0;

  result_mem #(.ACC_W(ACC_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [ACC_W-1:0] got, logic [ACC_W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(negedge clk);
    rst = 1'b0;
    expect_eq(mat_c, '0, "mat_c after reset");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      model[i] = {$urandom, $urandom} & {ACC_W{1'b1}};
      we = 1'b1; wr_addr = AW'(i); wr_data = model[i];
    end
    for (int n = 0; n < 100; n++) begin
      int unsigned ad = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      we = 1'b1; wr_addr = AW'(ad); wr_data = {$urandom, $urandom} & {ACC_W{1'b1}};
      model[ad] = wr_data; last = wr_data;
      @(negedge clk);
      expect_eq(mat_c, last, "mat_c after write");
      we = 1'b0; wr_data = ~wr_data;
      @(negedge clk);
      expect_eq(mat_c, last, "mat_c holds");
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      rd_addr = AW'(i);
      @(negedge clk);
      expect_eq(rd_data, model[i], "read port");
    end
    rst = 1'b1;
    @(negedge clk);
    expect_eq(mat_c, '0, "mat_c reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
