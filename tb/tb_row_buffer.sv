// Testbench of row_buffer: random rows of a 16x6 image are streamed in
// with random gaps, steps are paced by the testbench and the consumer
// room is withdrawn at random. Every issued window must equal the
// symmetrically extended neighbourhood x[2j-4 .. 2j+4] of the next output
// pair, in order, and no window may be issued without room.
module tb_row_buffer;
  import idc_pkg::*;
  localparam int W = 16, H = 6, STEP = 6;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, room, step_start, dest_room, issue, done;
  coef_t in_data;
  coef_t win [9];
  logic [$clog2(64+1)-1:0] width;
  logic [$clog2(64+1)-1:0] height;

  row_buffer #(.MAX_W(64), .MAX_H(64)) dut (.*);

  int checks = 0, failures = 0;
  int img [H][W];
  int nwin, sent;
  int cyc;
  bit issued_d;

  function automatic int mir(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * n - 2 - i;
    return i;
  endfunction

  always @(negedge clk) begin
    cyc <= cyc + 1;
    step_start <= (cyc % STEP == 0);
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) sent <= sent + 1;
    issued_d <= issue;
    if (issue && !dest_room) begin
      failures++;
      $display("FAIL issue without room");
    end
    if (issued_d) begin
      int r, j;
      r = nwin / (W / 2);
      j = nwin % (W / 2);
      checks++;
      for (int t = 0; t < 9; t++)
        if (win[t] != coef_t'(img[r][mir(2 * j - 4 + t, W)])) begin
          failures++;
          $display("FAIL row %0d pair %0d tap %0d: %p vs %p", r, j, t, win, img[r]);
          break;
        end
      nwin <= nwin + 1;
    end
  end

  always @(negedge clk) begin
    in_valid  <= (sent < W * H) && ($urandom % 3 != 0);
    dest_room <= ($urandom % 4 != 0);
  end
  assign in_data = (sent < W * H) ? coef_t'(img[sent / W][sent % W]) : '0;

  initial begin
    cyc = 0; step_start = 0; nwin = 0; sent = 0; start = 0; in_valid = 0; dest_room = 1;
    width = W; height = H;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = int'($urandom % 200000) - 100000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (3) @(posedge clk);
    checks++;
    if (nwin != H * W / 2) begin
      failures++;
      $display("FAIL %0d windows, expected %0d", nwin, H * W / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
