// ctrl_counter: counter of the main controller's datapath.
//
// The main controller's address A, address B, address C, N and final
// counters all share this form: a synchronous reset to zero, an enable
// that adds STEP, and a preset that loads `preset_val` (used to jump the
// operand addresses to the start of a block row or column).  Priority:
// reset, then preset, then enable.  `count` is the register itself; the
// effect of a control is visible the clock after it.
//
// The reset / enable / preset controls are those the original counters
// are driven with; the shared module is this design's structure.
module ctrl_counter #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned STEP  = 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             en,
  input  logic             preset,
  input  logic [WIDTH-1:0] preset_val,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset)       count <= '0;
    else if (preset) count <= preset_val;
    else if (en)     count <= count + WIDTH'(STEP);
  end

endmodule
