// Testbench of dyn_range: the subbands of a random 64x32 image are
// computed by the reference model and fed to the unit in batches, as the
// DWT core would deliver them (each block row's level-1 and level-2
// coefficients before its level-3 ones, one batch of processor results at
// a time). The per-block BitDepthAC_block and DC, and the per-segment
// BitDepthDC and BitDepthAC, are compared with values computed here. One
// block gets a large negative DC and one a large AC to exercise the ends
// of the bit-depth range.
module tb_dyn_range;
  import idc_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 64, H = 32, S = W / 8, NSEG = H / 8;
  localparam int MAXW = 64, MAXH = 64;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic  start;
  logic [$clog2(MAXW+1)-1:0] width;
  logic  sb_valid [3][4];
  coef_t sb_data  [3][4];
  logic [$clog2(MAXH+1)-1:0]   sb_row [3][2];
  logic [$clog2(MAXW/2+1)-1:0] sb_col [3][2];
  logic  blk_valid, seg_valid;
  logic [$clog2(MAXW/8)-1:0] blk_idx;
  logic [5:0] blk_bitdepth_ac, bitdepth_dc, bitdepth_ac;
  coef_t blk_dc;
  logic [$clog2(MAXH/8)-1:0] seg_idx;

  dyn_range #(.MAX_W(MAXW), .MAX_H(MAXH)) dut (.*);

  int checks = 0, failures = 0;
  int img[];
  img_t sb[3][4];
  int exp_bd[NSEG][S];
  int exp_dc_bits[NSEG], exp_ac[NSEG];
  int nblk, nseg, cur_seg;

  function automatic int bitlen(int v);
    int a, n;
    a = (v < 0) ? -v : v;
    n = 0;
    while (a > 0) begin n++; a = a >> 1; end
    return n;
  endfunction

  function automatic int tcbits(int v);
    int n;
    n = 1;
    while (!((v >= -(1 << (n - 1))) && (v <= (1 << (n - 1)) - 1))) n++;
    return n;
  endfunction

  task automatic clear_inputs();
    for (int l = 0; l < 3; l++) begin
      for (int b = 0; b < 4; b++) begin sb_valid[l][b] = 0; sb_data[l][b] = '0; end
      for (int p = 0; p < 2; p++) begin sb_row[l][p] = '0; sb_col[l][p] = '0; end
    end
  endtask

  // deliver coefficient (row, col) of level l: P (LH, + LL at level 3) and Q (HL, HH)
  task automatic deliver(int l, int r, int c);
    int w;
    w = (W >> l) / 2;
    @(negedge clk);
    sb_row[l][0] = r; sb_col[l][0] = c;
    sb_row[l][1] = r; sb_col[l][1] = c;
    sb_data[l][0] = sb[l][0][r*w + c];
    sb_data[l][1] = sb[l][1][r*w + c];
    sb_data[l][2] = sb[l][2][r*w + c];
    sb_data[l][3] = sb[l][3][r*w + c];
    sb_valid[l][0] = (l == 2);
    sb_valid[l][1] = 1; sb_valid[l][2] = 1; sb_valid[l][3] = 1;
    @(negedge clk);
    clear_inputs();
    repeat (8) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (blk_valid) begin
      checks++;
      if (blk_bitdepth_ac != exp_bd[cur_seg][blk_idx] || blk_dc != coef_t'(sb[2][0][cur_seg*S + blk_idx])
          || blk_idx != nblk % S) begin
        failures++;
        $display("FAIL seg %0d block %0d: bd %0d exp %0d dc %0d", cur_seg, blk_idx, blk_bitdepth_ac,
                 exp_bd[cur_seg][blk_idx], blk_dc);
      end
      nblk++;
    end
    if (seg_valid) begin
      checks++;
      if (seg_idx != cur_seg || bitdepth_dc != exp_dc_bits[cur_seg] || bitdepth_ac != exp_ac[cur_seg]) begin
        failures++;
        $display("FAIL segment %0d: dc bits %0d exp %0d, ac %0d exp %0d", seg_idx, bitdepth_dc,
                 exp_dc_bits[cur_seg], bitdepth_ac, exp_ac[cur_seg]);
      end
      nseg++;
      cur_seg++;
    end
  end

  initial begin
    clear_inputs();
    start = 0; nblk = 0; nseg = 0; cur_seg = 0;
    width = W;
    img = new[W * H];
    for (int i = 0; i < W * H; i++) img[i] = int'(signed'(16'($urandom % 4096)));
    dwt2d_3lvl(img, W, H, sb);
    sb[2][0][1] = -1048576;           // needs 21 two's-complement bits
    sb[0][3][0] = 4194303;            // needs 22 magnitude bits
    for (int g = 0; g < NSEG; g++) begin
      exp_dc_bits[g] = 1;
      exp_ac[g] = 0;
      for (int m = 0; m < S; m++) begin
        int bd;
        bd = 0;
        for (int l = 0; l < 3; l++) begin
          int n, w;
          n = 4 >> l;
          w = (W >> l) / 2;
          for (int b = 1; b < 4; b++)
            for (int r = g * n; r < (g + 1) * n; r++)
              for (int c = m * n; c < (m + 1) * n; c++)
                if (bitlen(sb[l][b][r*w + c]) > bd) bd = bitlen(sb[l][b][r*w + c]);
        end
        exp_bd[g][m] = bd;
        if (bd > exp_ac[g]) exp_ac[g] = bd;
        if (tcbits(sb[2][0][g*S + m]) > exp_dc_bits[g]) exp_dc_bits[g] = tcbits(sb[2][0][g*S + m]);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // level 1 runs up to three block rows ahead of level 3
    for (int g = 0; g < NSEG + 3; g++) begin
      if (g < NSEG)
        for (int r = 4 * g; r < 4 * g + 4; r++) for (int c = 0; c < W / 2; c++) deliver(0, r, c);
      if (g >= 1 && g - 1 < NSEG)
        for (int r = 2 * (g - 1); r < 2 * (g - 1) + 2; r++) for (int c = 0; c < W / 4; c++) deliver(1, r, c);
      if (g >= 3)
        for (int c = 0; c < W / 8; c++) deliver(2, g - 3, c);
    end
    repeat (3 * S) @(negedge clk);
    checks++;
    if (nblk != S * NSEG || nseg != NSEG) begin
      failures++;
      $display("FAIL %0d blocks and %0d segments", nblk, nseg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
