// tb_sols_top: end-to-end testbench of the line encoder top level, at its
// default (and only) configuration.
//
// One long random stream is sent while the code select changes between FM0,
// Manchester and Miller at random, and the reset is pulsed now and then for
// one clock edge. Expected line values are worked out from the coding
// rules kept as a line-level history, and the Miller state machine is checked
// against a reference copy of its state table. The run counts how often each
// mechanism happened and fails if any never did:
//   FM0 rule 1 (mid-bit transition for 0), rule 2 (none for 1), rule 3
//   (boundary transition), Manchester bits, Miller mid-bit transition for 1,
//   Miller boundary transition between two 0s, Miller 1->0 boundary without a
//   transition, mode switches, resets, and every row of the state table.
module tb_sols_top;
  import sols_pkg::*;

  localparam int NBITS = 20000;

  logic          clk;
  logic          rst_n = 1'b0;
  logic          x = 1'b0;
  code_mode_e    mode = MODE_FM0;
  logic          code, code_a, code_b;
  miller_state_e miller_state;

  int checks = 0;
  int failures = 0;

  sols_top dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #(10 * (NBITS + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] got, input logic [1:0] exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL bit %0d mode %s %s: got %b expected %b", n, mode.name(), what, got, exp);
    end
  endtask

  function automatic logic [1:0] table_next(input logic [1:0] cs, input logic in);
    logic [1:0] nxt [8] = '{2'b10, 2'b01, 2'b10, 2'b01, 2'b11, 2'b00, 2'b01, 2'b10};
    return nxt[{cs, in}];
  endfunction

  // mechanism counters
  int fm0_rule1 = 0, fm0_rule2 = 0, fm0_rule3 = 0, man_bits = 0;
  int mil_mid = 0, mil_boundary = 0, mil_flat = 0, switches = 0, resets = 0;
  int row_hits[8];

  logic       last_level, last_x, ea, eb;
  logic [1:0] fsm_exp;
  logic       in_reset;
  int         run_left;

  task automatic reset_history();
    last_level = 1'b0;
    last_x     = 1'b1;
    fsm_exp    = 2'b00;
  endtask

  initial begin
    reset_history();
    repeat (2) @(posedge clk);
    run_left = 0;
    in_reset = 1'b1;  // released just after the edge that starts bit 0
    for (int n = 0; n < NBITS; n++) begin
      @(posedge clk);
      #1;
      if (in_reset) begin
        // the previous bit was cut by a reset pulse; release it now
        rst_n    = 1'b1;
        in_reset = 1'b0;
        checks++;
        if (dut.u_encoder.level_q !== 1'b0 || dut.u_encoder.prev_x_q !== 1'b1) failures++;
      end
      if (run_left == 0) begin
        code_mode_e nm;
        nm = code_mode_e'($urandom_range(2, 0));
        if (nm != mode) switches++;
        mode     = nm;
        run_left = $urandom_range(30, 1);
      end
      run_left--;
      x = 1'($urandom);
      case (mode)
        MODE_FM0: begin
          ea = ~last_level;
          eb = x ? ea : ~ea;
          fm0_rule3++;
          if (x) fm0_rule2++; else fm0_rule1++;
        end
        MODE_MANCHESTER: begin
          ea = ~x;
          eb = x;
          man_bits++;
        end
        default: begin
          ea = (!x && !last_x) ? ~last_level : last_level;
          eb = x ? ~ea : ea;
          if (x) mil_mid++;
          else if (!last_x) mil_boundary++;
          else mil_flat++;
        end
      endcase
      #2;
      check({1'b0, code}, {1'b0, ea}, "former half", n);
      check({code_a, code_b}, {ea, eb}, "code word", n);
      // state machine: state shown now is the result of the previous bits
      check(miller_state, fsm_exp, "miller_state", n);
      @(negedge clk);
      #2;
      check({1'b0, code}, {1'b0, eb}, "later half", n);
      if (n > 100 && $urandom_range(199, 0) == 0) begin
        // reset pulse in the later half of this bit, taken at the next edge
        rst_n    = 1'b0;
        in_reset = 1'b1;
        resets++;
        reset_history();
      end else begin
        row_hits[{fsm_exp, x}]++;
        fsm_exp    = table_next(fsm_exp, x);
        last_level = eb;
        last_x     = x;
      end
    end
    checks++; if (fm0_rule1 == 0) failures++;
    checks++; if (fm0_rule2 == 0) failures++;
    checks++; if (fm0_rule3 == 0) failures++;
    checks++; if (man_bits == 0) failures++;
    checks++; if (mil_mid == 0) failures++;
    checks++; if (mil_boundary == 0) failures++;
    checks++; if (mil_flat == 0) failures++;
    checks++; if (switches == 0) failures++;
    checks++; if (resets == 0) failures++;
    foreach (row_hits[i]) begin
      checks++;
      if (row_hits[i] == 0) failures++;
    end
    $display("FM0 rule1=%0d rule2=%0d rule3=%0d  Manchester bits=%0d", fm0_rule1, fm0_rule2, fm0_rule3, man_bits);
    $display("Miller mid-bit=%0d boundary=%0d no-transition=%0d  mode switches=%0d resets=%0d",
             mil_mid, mil_boundary, mil_flat, switches, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
