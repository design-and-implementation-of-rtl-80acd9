// tb_miller_fsm: self-checking testbench of the four-state Miller state
// machine. A reference copy of the state table, written as a list of rows
// (state, input, next state), predicts each next state; the run applies
// random input bits with occasional resets and checks the state after every
// clock edge, and requires that each of the eight table rows and the reset
// row was exercised. A watchdog ends the run if it hangs.
module tb_miller_fsm;
  import sols_pkg::*;

  localparam int NSTEPS = 2000;

  logic          clk;
  logic          rst = 1'b1;
  logic          din = 1'b0;
  miller_state_e state;

  int checks = 0;
  int failures = 0;
  int row_hits[8];
  int reset_hits = 0;

  miller_fsm dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #(10 * (NSTEPS + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows of the state table: {current state, input} -> next state
  function automatic logic [1:0] table_next(input logic [1:0] cs, input logic in);
    logic [1:0] nxt [8] = '{2'b10, 2'b01,   // 00,0  00,1
                            2'b10, 2'b01,   // 01,0  01,1
                            2'b11, 2'b00,   // 10,0  10,1
                            2'b01, 2'b10};  // 11,0  11,1
    return nxt[{cs, in}];
  endfunction

  logic [1:0] expected;
  logic       do_reset;

  initial begin
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++; if (state !== MS_00) failures++;
    rst = 1'b0;
    expected = 2'b00;
    for (int n = 0; n < NSTEPS; n++) begin
      do_reset = ($urandom_range(49, 0) == 0);
      rst = do_reset;
      din = 1'($urandom);
      if (do_reset) begin
        expected = 2'b00;
        reset_hits++;
      end else begin
        row_hits[{expected, din}]++;
        expected = table_next(expected, din);
      end
      @(posedge clk); #1;
      checks++;
      if (state !== miller_state_e'(expected)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: state %b expected %b", n, state, expected);
      end
    end
    foreach (row_hits[i]) begin
      checks++;
      if (row_hits[i] == 0) begin
        failures++;
        $display("table row %0d never exercised", i);
      end
    end
    checks++; if (reset_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
