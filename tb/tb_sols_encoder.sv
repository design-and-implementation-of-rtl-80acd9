// tb_sols_encoder: self-checking testbench of the shared line encoder.
//
// A random bit stream is sent in random runs of FM0, Manchester and Miller
// mode. For every bit the expected former-half and later-half line values are
// worked out from the coding rules themselves, kept as a line-level history
// (not from the encoder's equations):
//   FM0:        the level always changes at the bit boundary; it changes again
//               in mid-bit for a 0 and stays for a 1.
//   Manchester: the line is X xor CLK (former half ~X, later half X).
//   Miller:     mid-bit change for a 1; a boundary change only between two 0s.
// The line output is sampled in each half of the clock cycle, and code_a /
// code_b are checked too. The code word must appear in the same cycle as the
// bit (zero latency). Before the random run, the bits 0 1 1 0 1 are sent from
// reset in each mode and compared with code words worked out by hand. A
// watchdog ends the run if it hangs.
module tb_sols_encoder;
  import sols_pkg::*;

  localparam int NBITS = 4000;

  logic       clk;
  logic       rst_n = 1'b0;
  logic       x = 1'b0;
  code_mode_e mode = MODE_FM0;
  logic       code, code_a, code_b;

  int checks = 0;
  int failures = 0;

  sols_encoder dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #(10 * (NBITS + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL bit %0d mode %s %s: got %0b expected %0b", n, mode.name(), what, got, exp);
    end
  endtask

  logic last_level;  // line level in the later half of the previous bit
  logic last_x;      // previous data bit
  logic ea, eb;
  int   run_left;
  int   n_fm0 = 0, n_man = 0, n_mil = 0, n_switch = 0;

  // hand-worked code words {A,B} for X = 0 1 1 0 1 straight after reset
  localparam logic       FIG_X   [5] = '{1'b0, 1'b1, 1'b1, 1'b0, 1'b1};
  localparam logic [1:0] FIG_FM0 [5] = '{2'b10, 2'b11, 2'b00, 2'b10, 2'b11};
  localparam logic [1:0] FIG_MAN [5] = '{2'b10, 2'b01, 2'b01, 2'b10, 2'b01};
  localparam logic [1:0] FIG_MIL [5] = '{2'b00, 2'b01, 2'b10, 2'b00, 2'b01};

  task automatic directed(input code_mode_e md, input logic [1:0] exp [5]);
    mode  = md;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      #1;
      rst_n = 1'b1;
      x     = FIG_X[i];
      #2;
      check(code_a, exp[i][1], "directed A", i);
      check(code_b, exp[i][0], "directed B", i);
      @(posedge clk);
    end
  endtask

  initial begin
    directed(MODE_FM0, FIG_FM0);
    directed(MODE_MANCHESTER, FIG_MAN);
    directed(MODE_MILLER, FIG_MIL);
    mode  = MODE_FM0;
    rst_n = 1'b0;
    // reset; expected history starts from the encoder's documented reset
    last_level = 1'b0;
    last_x     = 1'b1;
    repeat (3) @(posedge clk);
    run_left = 0;
    for (int n = 0; n < NBITS; n++) begin
      @(posedge clk);
      #1;
      // reset is released just after the edge that starts the first bit
      rst_n = 1'b1;
      if (run_left == 0) begin
        code_mode_e nm;
        nm = code_mode_e'($urandom_range(2, 0));
        if (nm != mode) n_switch++;
        mode     = nm;
        run_left = $urandom_range(40, 1);
      end
      run_left--;
      x = 1'($urandom);
      case (mode)
        MODE_FM0: begin
          ea = ~last_level;
          eb = x ? ea : ~ea;
          n_fm0++;
        end
        MODE_MANCHESTER: begin
          ea = ~x;
          eb = x;
          n_man++;
        end
        default: begin
          ea = (!x && !last_x) ? ~last_level : last_level;
          eb = x ? ~ea : ea;
          n_mil++;
        end
      endcase
      #2;  // still in the former half (clk high)
      check(code, ea, "former half", n);
      check(code_a, ea, "code_a", n);
      check(code_b, eb, "code_b", n);
      @(negedge clk);
      #2;  // later half (clk low)
      check(code, eb, "later half", n);
      last_level = eb;
      last_x     = x;
    end
    // every mode and mode switches must have occurred
    checks++; if (n_fm0 == 0 || n_man == 0 || n_mil == 0 || n_switch == 0) failures++;
    $display("bits: fm0=%0d manchester=%0d miller=%0d, mode switches=%0d", n_fm0, n_man, n_mil, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
