// Testbench of ctrl_regs: writes and reads back every configuration
// register, checks that a start with a bad image shape is refused and
// flagged, that a good one gives a single start pulse, that the
// configuration is frozen while the core is busy, and that finished
// segments are counted.
module tb_ctrl_regs;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic reg_we, reg_re;
  logic [2:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic start, px_signed, dc_stop;
  logic [11:0] width, height;
  logic [26:0] seg_byte_limit;
  logic [4:0] bitplane_stop;
  logic [1:0] stage_stop;
  logic core_busy, core_done, seg_done;

  ctrl_regs #(.MAX_W(2048), .MAX_H(2048)) dut (.*);

  int checks = 0, failures = 0, nstart = 0;
  always @(posedge clk) if (start) nstart++;

  task automatic wr(int a, int d);
    @(negedge clk);
    reg_we = 1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd_chk(int a, int exp, string what);
    @(negedge clk);
    reg_re = 1; reg_addr = 3'(a);
    @(negedge clk);
    reg_re = 0;
    checks++;
    if (reg_rdata !== exp) begin
      failures++;
      $display("FAIL %s: read %0h expected %0h", what, reg_rdata, exp);
    end
  endtask

  initial begin
    reg_we = 0; reg_re = 0; reg_addr = 0; reg_wdata = 0;
    core_busy = 0; core_done = 0; seg_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(1, 100); wr(2, 64); wr(3, 1); wr(4, 12345); wr(5, 8'b10_01011_1);
    rd_chk(1, 100, "width");
    rd_chk(2, 64, "height");
    rd_chk(3, 1, "format");
    rd_chk(4, 12345, "SegByteLimit");
    rd_chk(5, 8'b10_01011_1, "stop");
    checks++;
    if (!(dc_stop && bitplane_stop == 5'b01011 && stage_stop == 2'b10 && px_signed && seg_byte_limit == 12345)) begin
      failures++;
      $display("FAIL decoded configuration outputs");
    end
    // width 100 is not a multiple of 8: refused
    wr(0, 1);
    rd_chk(6, 32'b100, "error flag on bad shape");
    checks++;
    if (nstart != 0) begin failures++; $display("FAIL started with bad shape"); end
    wr(1, 24);
    wr(0, 1);
    rd_chk(6, 32'b100, "error flag on too small width");
    wr(1, 2048); wr(2, 2048);
    wr(0, 1);
    repeat (2) @(negedge clk);
    checks++;
    if (nstart != 1 || width != 2048 || height != 2048) begin failures++; $display("FAIL start pulse"); end
    core_busy = 1;
    rd_chk(6, 32'b001, "busy");
    wr(1, 64);
    rd_chk(1, 2048, "width frozen while busy");
    wr(0, 1);
    checks++;
    if (nstart != 1) begin failures++; $display("FAIL restarted while busy"); end
    repeat (3) begin
      @(negedge clk) seg_done = 1;
      @(negedge clk) seg_done = 0;
    end
    rd_chk(7, 3, "segment count");
    core_busy = 0; core_done = 1;
    rd_chk(6, 32'b010, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
