// Testbench of col_buffer: a 6-column, 12-row half image is pushed in
// raster order whenever the buffer reports room; steps are paced by the
// testbench and the consumer room is withdrawn at random. Every issued
// window must be the symmetrically extended column neighbourhood
// rows 2j-4 .. 2j+4 of output row j, labelled with (j, column), in order.
module tb_col_buffer;
  import idc_pkg::*;
  localparam int N = 6, H = 12, STEP = 5;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic start, in_valid, room, step_start, dest_room, issue, done;
  coef_t in_data;
  coef_t win [9];
  logic [$clog2(32+1)-1:0] width;
  logic [$clog2(64+1)-1:0] height;
  logic [$clog2(64+1)-1:0] out_row;
  logic [$clog2(32+1)-1:0] out_col;

  col_buffer #(.MAX_N(32), .MAX_H(64)) dut (.*);

  int checks = 0, failures = 0;
  int img [H][N];
  int nwin, sent, cyc;
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
    issued_d <= issue;
    if (issue && !dest_room) begin
      failures++;
      $display("FAIL issue without room");
    end
    if (issued_d) begin
      int j, c;
      j = nwin / N;
      c = nwin % N;
      checks++;
      if (out_row != j || out_col != c) begin
        failures++;
        $display("FAIL label %0d,%0d expected %0d,%0d", out_row, out_col, j, c);
      end
      checks++;
      for (int t = 0; t < 9; t++)
        if (win[t] != coef_t'(img[mir(2 * j - 4 + t, H)][c])) begin
          failures++;
          $display("FAIL row %0d col %0d tap %0d", j, c, t);
          break;
        end
      nwin <= nwin + 1;
    end
  end

  // push one word at a time, only into a buffer with room, spaced by a step
  initial begin
    cyc = 0; step_start = 0; nwin = 0; sent = 0; start = 0; in_valid = 0; in_data = '0; dest_room = 1;
    width = N; height = H;
    for (int r = 0; r < H; r++) for (int c = 0; c < N; c++) img[r][c] = int'($urandom % 2000000) - 1000000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      while (sent < N * H) begin
        @(negedge clk);
        if (room && step_start && ($urandom % 2 == 0)) begin
          in_valid = 1;
          in_data  = coef_t'(img[sent / N][sent % N]);
          sent++;
          @(negedge clk);
          in_valid = 0;
        end
      end
      forever begin
        @(negedge clk);
        dest_room = ($urandom % 4 != 0);
      end
    join_any
    wait (done);
    repeat (3) @(posedge clk);
    checks++;
    if (nwin != N * H / 2) begin
      failures++;
      $display("FAIL %0d windows, expected %0d", nwin, N * H / 2);
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
