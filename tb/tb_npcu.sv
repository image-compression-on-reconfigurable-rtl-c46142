// Testbench of npcu: checks that the program is broadcast slot by slot,
// that a step lasts exactly STEP_CYCLES clocks, that step_start and
// step_end mark its first and last slot, and that clearing run stops the
// unit only at the end of a step.
module tb_npcu;
  import idc_pkg::*;
  localparam int STEP = 40;

  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;
  instr_t instr;
  logic step_start, step_end;

  npcu #(.STEP_CYCLES(STEP)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    chk(!step_start, "idle unit starts a step");
    run = 1;
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < STEP; k++) begin
        #1;
        chk(step_start == (k == 0), $sformatf("step_start slot %0d", k));
        chk(step_end == (k == STEP - 1), $sformatf("step_end slot %0d", k));
        chk(instr == dwt_program(k), $sformatf("instruction slot %0d", k));
        if (s == 3 && k == 5) run = 0;
        @(negedge clk);
      end
    end
    // run was dropped in the middle of the last step: the unit parks in slot 0
    repeat (10) begin
      #1 chk(!step_start && instr.op == OP_NOP, "unit halted");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
