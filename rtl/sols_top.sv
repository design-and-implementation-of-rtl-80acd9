// sols_top: top level of the DSRC line encoder. It holds the shared SOLS
// encoder, which turns the data bit X into FM0, Manchester or Miller code as
// selected by mode, and, beside it, the four-state Miller state machine,
// which steps on the same data bit and brings its state out.
//
// Interface: clk is the bit clock (former half of a bit while high), rst_n an
// active-low reset, x the data bit held for one cycle, mode the code select
// (sols_pkg::code_mode_e). code is the line signal; code_a / code_b are the
// two half-bit values of the current code word for synchronous consumers;
// miller_state is the state machine's state.
//
// Timing: code, code_a and code_b follow x within the same cycle; miller_state
// is registered and reflects x one cycle later. Both parts reset
// synchronously: the encoder on rst_n low, the state machine on its
// active-high reset driven from the inverted rst_n. Putting both under one
// reset pin is this design's choice.
module sols_top
  import sols_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x,
  input  code_mode_e    mode,
  output logic          code,
  output logic          code_a,
  output logic          code_b,
  output miller_state_e miller_state
);

  sols_encoder u_encoder (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (x),
    .mode   (mode),
    .code   (code),
    .code_a (code_a),
    .code_b (code_b)
  );

  miller_fsm u_miller_fsm (
    .clk   (clk),
    .rst   (~rst_n),
    .din   (x),
    .state (miller_state)
  );

endmodule
