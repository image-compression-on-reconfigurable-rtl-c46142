// Testbench of coef_buffer: a dwt_core (reduced sizes, 30-clock step)
// writes the subbands of a random 64x64 image into the buffer. Each time
// level 3 completes a block row (a strip segment), the testbench reads
// back all 64 coefficients of every block of that segment, in all ten
// subbands, while the DWT keeps writing the following rows, and compares
// them with the reference model. A second image with extreme pixel values
// checks the stored word widths.
module tb_coef_buffer;
  import idc_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 64, H = 64, S = W / 8, STEP = 30;
  localparam int MAXW = 64, MAXH = 64;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic start, px_signed, px_valid, px_ready, busy, done;
  logic [15:0] px_data;
  logic  sb_valid [3][4];
  coef_t sb_data  [3][4];
  logic [$clog2(MAXH+1)-1:0]   sb_row [3][2];
  logic [$clog2(MAXW/2+1)-1:0] sb_col [3][2];
  logic [$clog2(MAXW+1)-1:0] width;
  logic [$clog2(MAXH+1)-1:0] height;
  logic rd_en;
  logic [1:0] rd_level, rd_band;
  logic [$clog2(MAXH+1)-1:0]   rd_row;
  logic [$clog2(MAXW/2+1)-1:0] rd_col;
  coef_t rd_data;

  dwt_core #(.MAX_W(MAXW), .MAX_H(MAXH), .STEP_CYCLES(STEP)) u_dwt (.*);
  coef_buffer #(.MAX_W(MAXW), .MAX_H(MAXH)) dut (.*);

  int checks = 0, failures = 0;
  int img[];
  img_t ref_sb[3][4];
  int idx, n3, segs_ready, segs_read;

  always @(posedge clk) begin
    if (px_valid && px_ready) idx <= idx + 1;
    if (sb_valid[2][1]) n3 = n3 + 1;
    if (sb_valid[2][2]) n3 = n3 + 1;
    if (n3 == 2 * S) begin
      n3 = 0;
      segs_ready++;
    end
  end

  assign px_valid = busy && (idx < W * H);
  assign px_data  = (idx < W * H) ? 16'(img[idx]) : '0;

  task automatic read_segment(int g);
    for (int m = 0; m < S; m++)
      for (int l = 0; l < 3; l++) begin
        int n, w;
        n = 4 >> l;
        w = (W >> l) / 2;
        for (int b = (l == 2 ? 0 : 1); b < 4; b++)
          for (int i = 0; i < n; i++)
            for (int j = 0; j < n; j++) begin
              int exp;
              @(negedge clk);
              rd_en = 1; rd_level = 2'(l); rd_band = 2'(b);
              rd_row = g * n + i; rd_col = m * n + j;
              exp = ref_sb[l][b][(g * n + i) * w + m * n + j];
              @(negedge clk);
              rd_en = 0;
              checks++;
              if (rd_data != coef_t'(exp)) begin
                failures++;
                if (failures < 10) $display("FAIL seg %0d block %0d level %0d band %0d (%0d,%0d): %0d vs %0d",
                                            g, m, l + 1, b, i, j, rd_data, exp);
              end
            end
      end
  endtask

  task automatic run_image(bit extreme);
    img = new[W * H];
    for (int i = 0; i < W * H; i++)
      img[i] = extreme ? (((i / W + i % W) % 2 == 0) ? 65535 : 0) : int'(unsigned'(16'($urandom)));
    dwt2d_3lvl(img, W, H, ref_sb);
    idx = 0; n3 = 0; segs_ready = 0; segs_read = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (segs_read < H / 8) begin
      wait (segs_ready > segs_read);
      read_segment(segs_read);
      segs_read++;
    end
    wait (done);
  endtask

  initial begin
    start = 0; px_signed = 0; rd_en = 0; rd_level = 0; rd_band = 0; rd_row = 0; rd_col = 0;
    width = W; height = H;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(1'b0);
    run_image(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (H * (W / 2 + 2) + 400) * STEP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
