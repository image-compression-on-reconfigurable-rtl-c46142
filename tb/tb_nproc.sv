// Testbench of nproc, driven by an npcu: random 9-sample windows are
// issued step after step (some steps left idle) and the low-pass and
// high-pass results are compared with the 9/7 lifting equations computed
// here. The result must appear exactly one step after the window.
module tb_nproc;
  import idc_pkg::*;

  localparam int STEP = 32;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  instr_t instr;
  logic step_start, step_end, issue, res_valid, run;
  coef_t win [9];
  coef_t lo, hi;

  npcu #(.STEP_CYCLES(STEP)) u_npcu (.clk, .rst_n, .run, .instr, .step_start, .step_end);
  nproc dut (.clk, .rst_n, .instr, .step_start, .step_end, .issue, .win, .lo, .hi, .res_valid);

  int checks = 0, failures = 0;

  function automatic int fdiv(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  int w [9];
  int exp_lo, exp_hi, nres, nexp;
  longint t_issue;
  bit pending;

  initial begin
    run = 0; issue = 0;
    for (int k = 0; k < 9; k++) win[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    for (int n = 0; n < 200; n++) begin
      // wait for slot 0 of a step
      @(negedge clk);
      while (!step_start) @(negedge clk);
      for (int k = 0; k < 9; k++) begin
        w[k] = (n < 4) ? ((n == 0) ? 0 : ((n == 1) ? 2000000 : -2000000)) : int'(signed'(18'($urandom)));
        win[k] = coef_t'(w[k]);
      end
      issue = (n % 5 != 3);
      if (issue) begin
        int dm1, dj;
        dm1 = w[3] - fdiv(9 * (w[2] + w[4]) - (w[0] + w[6]) + 8, 16);
        dj  = w[5] - fdiv(9 * (w[4] + w[6]) - (w[2] + w[8]) + 8, 16);
        exp_hi = dj;
        exp_lo = w[4] - fdiv(-(dm1 + dj) + 2, 4);
        nexp++;
      end
      @(posedge clk);
      #1 issue = 0;
      // hold the window for the step, check the result at its end
      t_issue = $time;
      repeat (STEP - 1) @(posedge clk);
      #1;
      checks++;
      if (res_valid !== (n % 5 != 3)) begin
        failures++;
        $display("FAIL step %0d res_valid=%0b", n, res_valid);
      end
      if (res_valid) begin
        nres++;
        checks++;
        if (lo !== coef_t'(exp_lo) || hi !== coef_t'(exp_hi)) begin
          failures++;
          $display("FAIL step %0d lo=%0d (%0d) hi=%0d (%0d)", n, lo, exp_lo, hi, exp_hi);
        end
      end
    end
    checks++;
    if (nres != nexp) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250 * STEP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
