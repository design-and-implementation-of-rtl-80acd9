// miller_fsm: the four-state Miller state machine, transcribed from its state
// table. The state (00, 01, 10, 11) advances once per rising clock edge on the
// input bit; a synchronous active-high reset forces the next state to 00.
//
// Next-state table (current state, input -> next state):
//   00,0 -> 10   00,1 -> 01
//   01,0 -> 10   01,1 -> 01
//   10,0 -> 11   10,1 -> 00
//   11,0 -> 01   11,1 -> 10
// The table follows the source state table row by row. The source gives no
// output function for the machine, so the state itself is the output. Reset
// being synchronous ("reset is 1, then the next state will be 00") follows
// the source; the port names are this design's.
//
// Timing: state is registered; it changes one cycle after din is sampled.
module miller_fsm
  import sols_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          din,
  output miller_state_e state
);

  miller_state_e state_d;

  always_comb begin
    unique case (state)
      MS_00:   state_d = din ? MS_01 : MS_10;
      MS_01:   state_d = din ? MS_01 : MS_10;
      MS_10:   state_d = din ? MS_00 : MS_11;
      default: state_d = din ? MS_10 : MS_01;  // MS_11
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= MS_00;
    else     state <= state_d;
  end

endmodule
