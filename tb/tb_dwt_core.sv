// Testbench of dwt_core: a random 32x32 image (signed and unsigned runs)
// goes through the three-level DWT; every coefficient of the ten subbands
// is compared with the reference model, and the time to take in the image
// is checked against the pace of W/2+2 steps per row.
module tb_dwt_core;
  import idc_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 32, H = 32, STEP = 30;
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

  dwt_core #(.MAX_W(MAXW), .MAX_H(MAXH), .STEP_CYCLES(STEP)) dut (.*);

  int checks = 0, failures = 0;
  int img[];
  img_t ref_sb[3][4];
  int got[3][4][int];
  int ngot[3][4];
  int idx;
  longint t0, t_last_px;

  always @(posedge clk) begin
    if (px_valid && px_ready) begin
      idx <= idx + 1;
      t_last_px <= $time / 10;
    end
    for (int l = 0; l < 3; l++)
      for (int b = 0; b < 4; b++)
        if (sb_valid[l][b]) begin
          got[l][b][int'(sb_row[l][b/2]) * ((W >> l) / 2) + int'(sb_col[l][b/2])] = sb_data[l][b];
          ngot[l][b]++;
        end
  end

  assign px_valid = busy && (idx < W * H);
  assign px_data  = (idx < W * H) ? 16'(img[idx]) : '0;

  int nbad;
  task automatic run_image(bit sgn);
    img = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      int v;
      v = $urandom;
      if (sgn) img[i] = int'(signed'(16'(v)));
      else     img[i] = int'(unsigned'(16'(v)));
    end
    if (sgn) begin img[0] = -32768; img[1] = 32767; end
    dwt2d_3lvl(img, W, H, ref_sb);
    for (int l = 0; l < 3; l++) for (int b = 0; b < 4; b++) begin got[l][b].delete(); ngot[l][b] = 0; end
    idx = 0;
    px_signed = sgn;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = $time / 10;
    wait (done);
    // input pace: one step per pixel pair, plus 2 flush steps per row
    checks++;
    if (t_last_px - t0 > longint'(H * (W / 2 + 2) + 4) * STEP) begin
      failures++;
      $display("FAIL input took %0d cycles", t_last_px - t0);
    end
    for (int l = 0; l < 3; l++)
      for (int b = (l == 2 ? 0 : 1); b < 4; b++) begin
        int n;
        n = ((W >> l) / 2) * ((H >> l) / 2);
        checks++;
        if (ngot[l][b] != n) begin
          failures++;
          $display("FAIL level %0d band %0d: %0d of %0d coefficients", l + 1, b, ngot[l][b], n);
        end
        nbad = 0;
        for (int i = 0; i < n; i++) begin
          checks++;
          if (!got[l][b].exists(i) || got[l][b][i] != ref_sb[l][b][i]) nbad++;
          if (!got[l][b].exists(i) || got[l][b][i] != ref_sb[l][b][i]) begin
            failures++;
            if (nbad < 3)
              $display("FAIL level %0d band %0d idx %0d got %0d exp %0d", l + 1, b, i,
                       got[l][b].exists(i) ? got[l][b][i] : 32'hdead, ref_sb[l][b][i]);
          end
        end
      end
  endtask

  initial begin
    start = 0; px_signed = 0; idx = 0;
    width = W; height = H;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(1'b0);
    run_image(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (H * (W / 2 + 2) + 400) * STEP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
