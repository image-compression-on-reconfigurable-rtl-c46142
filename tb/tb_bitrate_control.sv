// Testbench of bitrate_control: random segments of 1 to 40 words are sent
// with random SegByteLimit values (0 = no limit, small odd and even
// limits, limits just above and below the segment length), with random
// gaps on the input and random back-pressure on the output. The expected
// output is worked out per segment: all n words if the limit is 0 or at
// least 2n bytes, else the first ceil(limit/2) words with the last one
// marked and, for an odd limit, half. The number of truncation pulses is
// checked too.
module tb_bitrate_control;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous reset acts
  always #5 clk = ~clk;

  logic [26:0] seg_byte_limit;
  logic        in_valid, in_ready, in_last;
  logic [15:0] in_data;
  logic        out_valid, out_ready, out_last, out_half, truncated;
  logic [15:0] out_data;

  bitrate_control dut (.*);

  int checks = 0, failures = 0;
  logic [17:0] exp_q[$];     // {last, half, data}
  int n_trunc_exp = 0, n_trunc = 0, n_out = 0;

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (truncated) n_trunc++;
    if (out_valid && out_ready) begin
      logic [17:0] e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %04h", out_data);
      end else begin
        e = exp_q.pop_front();
        if ({out_last, out_half, out_data} !== e) begin
          failures++;
          if (failures < 20)
            $display("FAIL word %0d: %0b %0b %04h expected %0b %0b %04h", n_out,
                     out_last, out_half, out_data, e[17], e[16], e[15:0]);
        end
      end
      n_out++;
    end
  end

  task automatic send_segment(int n, int lim);
    int k;
    logic [15:0] w [];
    w = new[n];
    for (int i = 0; i < n; i++) w[i] = 16'($urandom);
    k = (lim == 0 || 2 * n <= lim) ? n : (lim + 1) / 2;
    for (int i = 0; i < k; i++)
      exp_q.push_back({i == k - 1, (i == k - 1) && (k < n || 2 * n > lim) && lim != 0 && (lim % 2 == 1), w[i]});
    if (k < n) n_trunc_exp++;
    @(negedge clk);
    seg_byte_limit = lim;
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1; in_data = w[i]; in_last = (i == n - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_data = 0; seg_byte_limit = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_segment(10, 0);       // no limit
    send_segment(10, 20);      // exactly fits
    send_segment(10, 19);      // last word half
    send_segment(10, 7);       // odd cut
    send_segment(10, 8);       // even cut
    send_segment(1, 1);        // one byte of one word
    send_segment(5, 1000);     // far below the limit
    for (int s = 0; s < 200; s++) begin
      int n;
      n = $urandom_range(1, 40);
      send_segment(n, ($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, 90));
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d expected words never came out", exp_q.size());
    end
    checks++;
    if (n_trunc != n_trunc_exp) begin
      failures++;
      $display("FAIL truncations %0d, expected %0d", n_trunc, n_trunc_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
