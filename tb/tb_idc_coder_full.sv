// Full-size testbench of the coder: idc_coder with all its default
// parameters (2048x2048 maximum image, 117-clock nPCU step) processes one
// IMG_W x IMG_H image of random 16-bit unsigned pixels end to end. Every
// subband coefficient, every block's BitDepthAC_block and DC and every
// segment's bit depths are compared with the reference model, every
// coefficient is read back from the coefficient buffer once its segment is
// announced, each segment header's length and Part 1A are checked, and
// the input pace is checked against W/2+2 steps per row.
module tb_idc_coder_full;
  import idc_pkg::*;
  import dwt_ref_pkg::*;

  localparam int MAXW = 2048, MAXH = 2048, STEP = 117;
  localparam int IMG_W = 2048, IMG_H = 2048;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic reg_we, reg_re;
  logic [2:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic px_valid, px_ready;
  logic [15:0] px_data;
  logic  sb_valid [3][4];
  coef_t sb_data  [3][4];
  logic [$clog2(MAXH+1)-1:0]   sb_row [3][2];
  logic [$clog2(MAXW/2+1)-1:0] sb_col [3][2];
  logic blk_valid, seg_valid, dc_stop, busy, done;
  logic [$clog2(MAXW/8)-1:0] blk_idx;
  logic [5:0] blk_bitdepth_ac, bitdepth_dc, bitdepth_ac;
  coef_t blk_dc;
  logic [$clog2(MAXH/8)-1:0] seg_idx;
  logic [26:0] seg_byte_limit;
  logic [4:0] bitplane_stop;
  logic [1:0] stage_stop;
  logic cb_rd_en;
  logic [1:0] cb_rd_level, cb_rd_band;
  logic [$clog2(MAXH+1)-1:0]   cb_rd_row;
  logic [$clog2(MAXW/2+1)-1:0] cb_rd_col;
  coef_t cb_rd_data;
  logic hdr_valid, hdr_ready, hdr_last;
  logic [7:0] hdr_data;
  logic [23:0] hdr_exp[$];       // expected Part 1A of each announced segment
  bit [7:0] hdr_bytes[$];
  int n_hdr, n_hdr_wait;
  logic org_valid, org_ready, org_last, out_valid, out_ready, out_last, out_half, seg_truncated;
  logic [15:0] org_data, out_data;
  logic [17:0] org_q[$];         // words still to offer {last, x, data}
  logic [17:0] out_exp[$];       // expected output {last, half, data}
  int lim_cfg, n_trunc, n_trunc_exp, n_org_seg, org_cap = 0;
  logic org_ready_q = 0;
  int segs_to_read[$];
  int n_cb_reads;
  bit rd_busy = 0;

  idc_coder dut (.*);

  int checks = 0, failures = 0;
  int W, H;
  int img[];
  img_t ref_sb[3][4];
  int got[];     // subband (l, b) at offset (4*l+b)*N0
  bit seen[];
  int N0;
  int ngot[3][4];
  int idx;
  longint t0, t_last_px;
  int n_stall, n_seg, n_signed, n_unsigned, n_refused, nblk;
  bit feeding;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  function automatic int blk_bd(int g, int m);
    int bd;
    bd = 0;
    for (int l = 0; l < 3; l++) begin
      int n, w;
      n = 4 >> l;
      w = (W >> l) / 2;
      for (int b = 1; b < 4; b++)
        for (int r = g * n; r < (g + 1) * n; r++)
          for (int c = m * n; c < (m + 1) * n; c++)
            if (bitlen(ref_sb[l][b][r*w + c]) > bd) bd = bitlen(ref_sb[l][b][r*w + c]);
    end
    return bd;
  endfunction

  int seg_max_ac, seg_max_dc;
  always @(posedge clk) begin
    if (px_valid && px_ready) begin
      idx <= idx + 1;
      t_last_px <= $time / 10;
    end
    if (feeding && px_valid && !px_ready) n_stall++;
    for (int l = 0; l < 3; l++)
      for (int b = 0; b < 4; b++)
        if (sb_valid[l][b]) begin
          int k;
          k = (4 * l + b) * N0 + int'(sb_row[l][b/2]) * ((W >> l) / 2) + int'(sb_col[l][b/2]);
          got[k]  = sb_data[l][b];
          seen[k] = 1'b1;
          ngot[l][b]++;
        end
    if (blk_valid) begin
      int g, m, e;
      g = n_seg;
      m = int'(blk_idx);
      e = blk_bd(g, m);
      chk(blk_idx == nblk % (W / 8), "block order");
      chk(blk_bitdepth_ac == e, $sformatf("BitDepthAC_block seg %0d block %0d: %0d vs %0d", g, m, blk_bitdepth_ac, e));
      chk(blk_dc == coef_t'(ref_sb[2][0][g * (W / 8) + m]), $sformatf("DC seg %0d block %0d", g, m));
      if (m == 0) begin seg_max_ac = 0; seg_max_dc = 1; end
      if (e > seg_max_ac) seg_max_ac = e;
      if (tcbits(ref_sb[2][0][g * (W / 8) + m]) > seg_max_dc) seg_max_dc = tcbits(ref_sb[2][0][g * (W / 8) + m]);
      nblk++;
    end
    if (seg_valid) begin
      chk(seg_idx == n_seg, "segment index");
      chk(bitdepth_ac == seg_max_ac && bitdepth_dc == seg_max_dc,
          $sformatf("segment %0d bit depths %0d/%0d vs %0d/%0d", n_seg, bitdepth_dc, bitdepth_ac, seg_max_dc, seg_max_ac));
      segs_to_read.push_back(n_seg);
      begin
        bit fst, lst;
        fst = (n_seg == 0);
        lst = (n_seg == H / 8 - 1);
        hdr_exp.push_back({fst, lst, 8'(n_seg), bitdepth_dc[4:0], bitdepth_ac[4:0], 1'b0, fst, fst, fst});
      end
      n_seg++;
    end
  end

  // header consumer: random ready; each header's Part 1A and length are
  // checked against the segment announcement
  always @(negedge clk) hdr_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (hdr_valid && !hdr_ready) n_hdr_wait++;
    if (hdr_valid && hdr_ready) begin
      hdr_bytes.push_back(hdr_data);
      if (hdr_last) begin
        logic [23:0] e;
        int len;
        e = (hdr_exp.size() > 0) ? hdr_exp.pop_front() : 24'hx;
        len = (e[23] ? 19 : 3) + (e[22] ? 1 : 0);
        chk(hdr_bytes.size() == len && {hdr_bytes[0], hdr_bytes[1], hdr_bytes[2]} == e,
            $sformatf("header %0d: %0d bytes, part 1A %02h%02h%02h vs %06h", n_hdr,
                      hdr_bytes.size(), hdr_bytes[0], hdr_bytes[1], hdr_bytes[2], e));
        hdr_bytes.delete();
        n_hdr++;
      end
    end
  end

  // stand-in for the bitstream organiser: random segments of 1 to 24
  // words while an image runs (at most 1000 per run); the output of the bit-rate control is
  // compared with the segment cut at SegByteLimit (lim_cfg) bytes
  task automatic new_org_segment();
    int n, k;
    n = $urandom_range(1, 24);
    k = (lim_cfg == 0 || 2 * n <= lim_cfg) ? n : (lim_cfg + 1) / 2;
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      org_q.push_back({i == n - 1, 1'b0, w});
      if (i < k)
        out_exp.push_back({i == k - 1, (i == k - 1) && lim_cfg != 0 && 2 * n > lim_cfg && lim_cfg % 2 == 1, w});
    end
    if (k < n) n_trunc_exp++;
    n_org_seg++;
  endtask

  always @(negedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (org_valid && org_ready_q) void'(org_q.pop_front());
    if (org_q.size() == 0 && feeding && n_org_seg < org_cap) new_org_segment();
    org_valid <= (org_q.size() > 0) && ($urandom_range(0, 3) != 0);
    if (org_q.size() > 0) {org_last, org_data} <= {org_q[0][17], org_q[0][15:0]};
  end
  always @(posedge clk) begin
    org_ready_q <= org_ready;
    if (seg_truncated) n_trunc++;
    if (out_valid && out_ready) begin
      logic [17:0] e;
      e = (out_exp.size() > 0) ? out_exp.pop_front() : 18'h3ffff;
      if ({out_last, out_half, out_data} == e) chk(1'b1, "");
      else chk(1'b0, $sformatf("bit-rate control output %0b %0b %04h vs %05h", out_last, out_half, out_data, e));
    end
  end

  // BPE-side reader: reads every coefficient of each announced segment
  // from the coefficient buffer (one block of one subband level at a time)
  initial begin
    cb_rd_en = 0; cb_rd_level = 0; cb_rd_band = 0; cb_rd_row = 0; cb_rd_col = 0; n_cb_reads = 0;
    forever begin
      int g;
      wait (segs_to_read.size() > 0);
      g = segs_to_read.pop_front();
      rd_busy = 1;
      for (int m = 0; m < W / 8; m++)
        for (int l = 0; l < 3; l++) begin
          int n, w;
          n = 4 >> l;
          w = (W >> l) / 2;
          for (int b = (l == 2 ? 0 : 1); b < 4; b++)
            for (int i = 0; i < n; i++)
              for (int j = 0; j < n; j++) begin
                int e;
                @(negedge clk);
                cb_rd_en = 1; cb_rd_level = 2'(l); cb_rd_band = 2'(b);
                cb_rd_row = g * n + i; cb_rd_col = m * n + j;
                e = ref_sb[l][b][(g * n + i) * w + m * n + j];
                @(negedge clk);
                cb_rd_en = 0;
                chk(cb_rd_data == coef_t'(e), $sformatf("coefficient buffer seg %0d block %0d level %0d band %0d", g, m, l + 1, b));
                n_cb_reads++;
              end
        end
      rd_busy = 0;
    end
  end

  assign px_valid = feeding && (idx < W * H);
  assign px_data  = (idx < W * H) ? 16'(img[idx]) : '0;

  task automatic wr(int a, int d);
    @(negedge clk);
    reg_we = 1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd(int a, output int d);
    @(negedge clk);
    reg_re = 1; reg_addr = 3'(a);
    @(negedge clk);
    reg_re = 0;
    d = reg_rdata;
  endtask

  task automatic run_image(int w, int h, bit sgn);
    int st, nseg0;
    W = w; H = h;
    img = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      int v;
      v = $urandom;
      img[i] = sgn ? int'(signed'(16'(v))) : int'(unsigned'(16'(v)));
    end
    if (sgn) begin img[0] = -32768; img[W+1] = 32767; end
    else     begin img[0] = 65535; img[1] = 0; end
    dwt2d_3lvl(img, W, H, ref_sb);
    N0 = (W / 2) * (H / 2);
    got  = new[12 * N0];
    seen = new[12 * N0];
    for (int l = 0; l < 3; l++) for (int b = 0; b < 4; b++) ngot[l][b] = 0;
    idx = 0; nblk = 0; n_seg = 0;
    lim_cfg = sgn ? 20 : 13;
    org_cap = n_org_seg + 1000;
    wr(1, W); wr(2, H); wr(3, sgn); wr(4, lim_cfg); wr(5, 8'hC0);
    wr(0, 1);
    feeding = 1;
    t0 = $time / 10;
    wait (busy);
    wait (done);
    feeding = 0;
    wait (n_seg == H / 8 && segs_to_read.size() == 0 && !rd_busy);
    wait (org_q.size() == 0);
    repeat (4 * (W / 8)) @(negedge clk);
    chk(out_exp.size() == 0, $sformatf("%0d bit-rate control words missing", out_exp.size()));
    rd(6, st);
    chk(st == 2, $sformatf("status after run %0h", st));
    rd(7, st);
    chk(st == H / 8, $sformatf("segment count register %0d", st));
    chk(t_last_px - t0 <= longint'(H * (W / 2 + 2) + 8) * STEP,
        $sformatf("input pace: %0d clocks for %0dx%0d", t_last_px - t0, W, H));
    chk(n_seg == H / 8, $sformatf("segments %0d", n_seg));
    chk(n_hdr == H / 8 && hdr_exp.size() == 0, $sformatf("headers %0d", n_hdr));
    n_hdr = 0;
    chk(nblk == (H / 8) * (W / 8), "blocks");
    chk(n_cb_reads == 64 * nblk, $sformatf("coefficient buffer reads %0d", n_cb_reads));
    n_cb_reads = 0;
    for (int l = 0; l < 3; l++)
      for (int b = (l == 2 ? 0 : 1); b < 4; b++) begin
        int n;
        n = ((W >> l) / 2) * ((H >> l) / 2);
        chk(ngot[l][b] == n, $sformatf("level %0d band %0d count %0d", l + 1, b, ngot[l][b]));
        for (int i = 0; i < n; i++)
          chk(seen[(4*l+b)*N0 + i] && got[(4*l+b)*N0 + i] == ref_sb[l][b][i],
              $sformatf("level %0d band %0d coefficient %0d", l + 1, b, i));
      end
    if (sgn) n_signed++; else n_unsigned++;
  endtask

  initial begin
    int st;
    reg_we = 0; reg_re = 0; reg_addr = 0; reg_wdata = 0;
    feeding = 0; idx = 0; W = 32; H = 32;
    n_stall = 0; n_seg = 0; n_signed = 0; n_unsigned = 0; n_refused = 0;
    n_hdr = 0; n_hdr_wait = 0; n_trunc = 0; n_trunc_exp = 0; n_org_seg = 0; lim_cfg = 0;
    org_valid = 0; org_last = 0; org_data = 0; out_ready = 0;
    img = new[W * H];
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(IMG_W, IMG_H, 1'b0);
    chk(n_stall > 0, "input stall never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (IMG_H * (IMG_W / 2 + 2) + 400) * STEP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
