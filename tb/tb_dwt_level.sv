// Testbench of dwt_level: one 2D-DWT level on a random 32x16 image. The
// LL, LH, HL and HH outputs are compared with the reference model, the
// LL consumer withdraws room at random to exercise the stall path, and
// the image must be taken in at the pace of W/2+2 steps per row when the
// consumer never stalls.
module tb_dwt_level;
  import idc_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 32, H = 16, STEP = 30;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  instr_t instr;
  logic step_start, step_end, run;
  logic start, in_valid, in_ready, room, ll_room, p_valid, q_valid, done;
  coef_t in_data, ll, lh, hl, hh;
  logic [$clog2(64+1)-1:0] width;
  logic [$clog2(64+1)-1:0] height;
  logic [$clog2(64+1)-1:0] p_row, q_row;
  logic [$clog2(32+1)-1:0] p_col, q_col;

  npcu #(.STEP_CYCLES(STEP)) u_npcu (.clk, .rst_n, .run, .instr, .step_start, .step_end);
  dwt_level #(.MAX_W(64), .MAX_H(64)) dut (.*);

  int checks = 0, failures = 0;
  int img[];
  img_t ref_sb[3][4];
  int got[4][int];
  int idx, nstall;
  bit stall_mode;
  longint t0, t_last;

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      idx <= idx + 1;
      t_last <= $time / 10;
    end
    if (p_valid) begin
      got[0][int'(p_row) * (W / 2) + int'(p_col)] = ll;
      got[1][int'(p_row) * (W / 2) + int'(p_col)] = lh;
    end
    if (q_valid) begin
      got[2][int'(q_row) * (W / 2) + int'(q_col)] = hl;
      got[3][int'(q_row) * (W / 2) + int'(q_col)] = hh;
    end
    if (stall_mode && step_start && !ll_room) nstall++;
  end

  always @(negedge clk) ll_room <= stall_mode ? ($urandom % 3 != 0) : 1'b1;

  assign in_valid = run && (idx < W * H);
  assign in_data  = (idx < W * H) ? coef_t'(img[idx]) : '0;

  task automatic run_image(bit stall);
    img = new[W * H];
    for (int i = 0; i < W * H; i++) img[i] = int'(unsigned'(16'($urandom)));
    dwt2d_3lvl(img, W, H, ref_sb);
    for (int b = 0; b < 4; b++) got[b].delete();
    idx = 0;
    stall_mode = stall;
    @(negedge clk) start = 1;
    @(negedge clk) begin start = 0; run = 1; end
    t0 = $time / 10;
    wait (done);
    repeat (STEP + 2) @(posedge clk);
    run = 0;
    if (!stall) begin
      checks++;
      if (t_last - t0 > longint'(H * (W / 2 + 2) + 2) * STEP) begin
        failures++;
        $display("FAIL input took %0d cycles", t_last - t0);
      end
    end
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < (W / 2) * (H / 2); i++) begin
        checks++;
        if (!got[b].exists(i) || got[b][i] != ref_sb[0][b][i]) begin
          failures++;
          if (failures < 8) $display("FAIL band %0d idx %0d", b, i);
        end
      end
  endtask

  initial begin
    start = 0; run = 0; idx = 0; nstall = 0; stall_mode = 0;
    width = W; height = H;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(1'b0);
    repeat (2 * STEP) @(negedge clk);
    run_image(1'b1);
    checks++;
    if (nstall == 0) begin
      failures++;
      $display("FAIL no stall exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (H * (W / 2 + 2) + 100) * STEP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
