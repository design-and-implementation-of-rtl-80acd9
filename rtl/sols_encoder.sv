// sols_encoder: one shared datapath that produces FM0, Manchester or Miller
// line code, in the spirit of similarity-oriented logic simplification (SOLS):
// the three codes share one pair of state flip-flops, one code-word datapath
// and one half-bit output multiplexer instead of having an encoder each.
//
// Code word. Each data bit X occupies one cycle of the bit clock CLK. Its code
// word is two half-bit values: A, sent while CLK is high (former half), and
// B, sent while CLK is low (later half). The line output is therefore
//   code = CLK ? A : B
// so CLK is used as data here, as in the reference architecture.
//
// Rules per mode (level_q is the value sent in the later half of the previous
// bit, prev_x_q is the previous data bit):
//   FM0        A = ~level_q            (a transition at every bit boundary)
//              B = A ^ ~X              (transition inside the bit iff X = 0)
//   Manchester A = ~X,  B = X          (equal to X xor CLK)
//   Miller     A = level_q ^ (~X & ~prev_x_q)
//                                      (boundary transition only between
//                                       two consecutive 0 bits)
//              B = A ^ X               (transition inside the bit iff X = 1)
// The later half is always "A xor m", with m = ~X, 1 or X: this one XOR is
// shared by all three codes. The FM0 rules and the Miller definition follow
// the source description; the Manchester polarity is taken from the
// "A_in xor CLK" term of its Miller block diagram. The FM0 state is held in
// a single flip-flop (B of the previous bit), as area-compact retiming
// suggests; Miller adds the previous-bit flip-flop, giving two flip-flops in
// total, as in the shared FM0/Miller schematic.
//
// Interface and timing: x and mode must be stable for a whole clock cycle,
// changing just after the rising edge. code_a, code_b and code follow them
// combinationally within the cycle (no latency); the state flip-flops take
// the bit's values at the rising edge that ends the bit. rst_n is active low
// (the reference schematics pass the reset through an inverter) and
// synchronous, like the state machine's; reset sets level_q = 0 and
// prev_x_q = 1, so the first
// Miller 0 after reset has no boundary transition. Reset values and the mode
// encoding are this design's choices.
module sols_encoder
  import sols_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,     // synchronous, active low
  input  logic       x,
  input  code_mode_e mode,
  output logic       code,
  output logic       code_a,
  output logic       code_b
);

  logic level_q;   // later-half value of the previous bit
  logic prev_x_q;  // previous data bit (used by Miller only)
  logic m;         // shared later-half XOR operand

  always_comb begin
    unique case (mode)
      MODE_MANCHESTER: begin
        code_a = ~x;
        m      = 1'b1;
      end
      MODE_MILLER: begin
        code_a = level_q ^ (~x & ~prev_x_q);
        m      = x;
      end
      default: begin  // MODE_FM0 and the reserved value
        code_a = ~level_q;
        m      = ~x;
      end
    endcase
    code_b = code_a ^ m;
  end

  // Half-bit selector: former half while CLK is high, later half while low.
  assign code = clk ? code_a : code_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level_q  <= 1'b0;
      prev_x_q <= 1'b1;
    end else begin
      level_q  <= code_b;
      prev_x_q <= x;
    end
  end

endmodule
