// Testbench of header_gen: random image configurations and segment
// announcements; each header is rebuilt here field by field into a bit
// queue (MSB first) and compared byte by byte with the unit's stream, and
// the hdr_last position is checked. The consumer withdraws hdr_ready at
// random to exercise the handshake. The cases cover a first segment, a
// middle one, a last one and an image of a single segment.
module tb_header_gen;
  localparam int MAXW = 2048, MAXH = 2048;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic [$clog2(MAXW+1)-1:0] width;
  logic [$clog2(MAXH+1)-1:0] height;
  logic        px_signed, dc_stop;
  logic [26:0] seg_byte_limit;
  logic [4:0]  bitplane_stop;
  logic [1:0]  stage_stop;
  logic        seg_valid;
  logic [7:0]  seg_idx;
  logic [5:0]  bitdepth_dc, bitdepth_ac;
  logic        hdr_valid, hdr_ready, hdr_last;
  logic [7:0]  hdr_data;

  header_gen #(.MAX_W(MAXW), .MAX_H(MAXH)) dut (.*);

  int checks = 0, failures = 0;
  bit q[$];

  task automatic push(longint unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endtask

  task automatic expect_header();
    bit fst, lst;
    fst = (seg_idx == 0);
    lst = (int'(seg_idx) == int'(height) / 8 - 1);
    q.delete();
    push(fst, 1); push(lst, 1); push(seg_idx, 8);
    push(bitdepth_dc, 5); push(bitdepth_ac, 5); push(0, 1);
    push(fst, 1); push(fst, 1); push(fst, 1);
    if (lst) begin push(0, 3); push(0, 5); end
    if (fst) begin
      push(seg_byte_limit, 27); push(dc_stop, 1); push(bitplane_stop, 5);
      push(stage_stop, 2); push(0, 1); push(0, 4);
      push(width / 8, 20); push(1, 1); push(1, 1); push(0, 2);
      push(1, 1); push(0, 2); push(px_signed, 1); push(16 % 16, 4);
      push(width, 20); push(0, 1); push(1, 3); push(0, 1); push(0, 20); push(0, 11);
    end
  endtask

  task automatic run_case(int w, int h, int idx);
    int nb, got;
    logic [7:0] exp_b;
    @(negedge clk);
    width = w; height = h; seg_idx = idx;
    px_signed = $urandom_range(0, 1); dc_stop = $urandom_range(0, 1);
    seg_byte_limit = $urandom; bitplane_stop = $urandom; stage_stop = $urandom;
    bitdepth_dc = $urandom_range(1, 31); bitdepth_ac = $urandom_range(0, 31);
    expect_header();
    nb = q.size() / 8;
    seg_valid = 1;
    @(negedge clk);
    seg_valid = 0;
    got = 0;
    while (got < nb) begin
      hdr_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (hdr_valid && hdr_ready) begin
        for (int i = 0; i < 8; i++) exp_b[7-i] = q[got*8 + i];
        checks++;
        if (hdr_data !== exp_b || hdr_last !== (got == nb - 1)) begin
          failures++;
          $display("FAIL %0dx%0d seg %0d byte %0d: %02h last %0b, expected %02h",
                   w, h, idx, got, hdr_data, hdr_last, exp_b);
        end
        got++;
      end
      @(negedge clk);
    end
    hdr_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (hdr_valid) begin
      failures++;
      $display("FAIL %0dx%0d seg %0d: more than %0d bytes", w, h, idx, nb);
    end
  endtask

  initial begin
    seg_valid = 0; hdr_ready = 1; seg_idx = 0; width = 64; height = 64;
    px_signed = 0; dc_stop = 0; seg_byte_limit = 0; bitplane_stop = 0;
    stage_stop = 0; bitdepth_dc = 0; bitdepth_ac = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(2048, 2048, 0);     // first segment
    run_case(2048, 2048, 100);   // middle
    run_case(2048, 2048, 255);   // last
    run_case(128, 8, 0);         // single segment: first and last
    for (int k = 0; k < 20; k++) begin
      int w, h;
      w = 8 * $urandom_range(4, 256);
      h = 8 * $urandom_range(4, 256);
      run_case(w, h, $urandom_range(0, h / 8 - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
