// slave_controller: state machine of the slave processor.
//
// It waits in Check-the-data-ack until the main controller pulses
// `data_ack`, which means FIFO A and FIFO B have just been loaded.  Slave1
// copies the FIFO registers into the operand registers (`load_ops`), Slave2
// lets every processing element multiply and accumulate (`en_mac`, the
// En_cii_reg enable).  If `done_from_main` is low in Slave2 the slave goes
// back to wait for the next operands; if it is high the block is complete
// and Slave3..Slave6 spend one cycle each on result sets I..IV, the main
// controller storing one set per cycle.  Slave6 clears the processing
// elements (`clr_pe`, Reset_PE) and returns to the wait state.
//
// `data_req` tells the main controller that the slave can take new
// operands; it is high exactly while the slave waits in Check-the-data-ack,
// so it is low in Slave6 as the state list requires.  All outputs are
// decoded from the state register (Moore).  `rst` is synchronous, active
// high.
//
// States and transitions are those of the original slave state machine;
// decoding data_req from the wait state is this design's choice.
module slave_controller
  import matmul_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         data_ack,
  input  logic         done_from_main,
  output logic         data_req,
  output logic         load_ops,
  output logic         en_mac,
  output logic         clr_pe,
  output logic [1:0]   set_idx,
  output logic         set_valid,
  output slave_state_e state
);

  slave_state_e state_nxt;

  always_ff @(posedge clk) begin
    if (rst) state <= S_CHECK_ACK;
    else     state <= state_nxt;
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      S_CHECK_ACK: if (data_ack) state_nxt = S_SLAVE1;
      S_SLAVE1:    state_nxt = S_SLAVE2;
      S_SLAVE2:    state_nxt = done_from_main ? S_SLAVE3 : S_CHECK_ACK;
      S_SLAVE3:    state_nxt = S_SLAVE4;
      S_SLAVE4:    state_nxt = S_SLAVE5;
      S_SLAVE5:    state_nxt = S_SLAVE6;
      S_SLAVE6:    state_nxt = S_CHECK_ACK;
      default:     state_nxt = S_CHECK_ACK;
    endcase
  end

  always_comb begin
    data_req  = (state == S_CHECK_ACK);
    load_ops  = (state == S_SLAVE1);
    en_mac    = (state == S_SLAVE2);
    clr_pe    = (state == S_SLAVE6);
    set_valid = (state inside {S_SLAVE3, S_SLAVE4, S_SLAVE5, S_SLAVE6});
    unique case (state)
      S_SLAVE4: set_idx = 2'd1;
      S_SLAVE5: set_idx = 2'd2;
      S_SLAVE6: set_idx = 2'd3;
      default:  set_idx = 2'd0;
    endcase
  end

endmodule
