// tb_processing_element: self-checking test of one multiply-accumulate cell.
// Random signed operands (including the extremes -128 and 127) are
// accumulated over several runs; a software model of the accumulator is
// compared with `acc` after every clock.  Also checked: `en` low holds the
// value, `clr` and `rst` empty it, and the result appears one clock after
// `en` (single-cycle latency).
module tb_processing_element;
  localparam int DATA_W = 8;
  localparam int ACC_W  = 36;

  logic clk = 1'b0;
  logic rst, clr, en;
  logic signed [DATA_W-1:0] a, b;
  logic signed [ACC_W-1:0]  acc;
  longint model;
  int checks = 0, failures = 0;

  processing_element #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (acc !== ACC_W'(model)) begin
      failures++;
      $display("FAIL %s: acc=%0d expected %0d", what, acc, model);
    end
  endtask

  task automatic step(logic e, logic c, logic signed [DATA_W-1:0] va,
                      logic signed [DATA_W-1:0] vb);
    en = e; clr = c; a = va; b = vb;
    @(posedge clk);
    #1;
    if (c) model = 0;
    else if (e) model += longint'(va) * longint'(vb);
    check("step");
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; en = 1'b0; a = '0; b = '0; model = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    check("after reset");
    for (int run = 0; run < 20; run++) begin
      for (int k = 0; k < 8; k++) begin
        logic signed [DATA_W-1:0] va, vb;
        if (run == 0)      begin va = -128; vb = -128; end
        else if (run == 1) begin va = 127;  vb = -128; end
        else begin va = DATA_W'($urandom); vb = DATA_W'($urandom); end
        step(1'b1, 1'b0, va, vb);
        // enable low in between: value must hold
        if ($urandom_range(0, 3) == 0) step(1'b0, 1'b0, DATA_W'($urandom), DATA_W'($urandom));
      end
      step(1'b0, 1'b1, DATA_W'($urandom), DATA_W'($urandom));   // clear
    end
    // a long accumulation, far beyond one block, then synchronous reset
    for (int k = 0; k < 300; k++) step(1'b1, 1'b0, -128, -128);
    rst = 1'b1; en = 1'b1; a = 5; b = 5;
    @(posedge clk); #1;
    model = 0; rst = 1'b0;
    check("after rst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
