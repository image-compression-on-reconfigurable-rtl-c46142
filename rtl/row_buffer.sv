// Row buffer of one DWT level: feeds the row (horizontal) nProcessor.
//
// Pixels of one level image arrive in raster order through a 4-word FIFO.
// The buffer keeps only the pixels of the horizontal filter mask: a shift
// register of ten 32-bit words, advanced by two pixels (one pair) per step.
// After pair m (pixels 2m, 2m+1) has entered, the window for output pair
// j = m-2, x[2j-4 .. 2j+4], is in the register; an output multiplexer
// applies the symmetric extension of CCSDS 122.0 at both row ends
// (x[-i] = x[i], x[N-1+i] = x[N-1-i]). Two extra "virtual" pairs are stepped
// at the end of each row so that the last two output pairs can be formed;
// a row of N pixels thus takes N/2+2 steps. The ten-register structure
// follows the document; the FIFO, the pair handling and the flushing are
// this design's choices.
//
// Interface: in_valid/in_ready/in_data (pixel stream), width (N, even,
// >= 8) and height of this level's input, start (clears the counters for
// a new image), step_start from the nPCU, dest_room (both row-to-column
// buffers can take a result). room tells a producer without handshake
// that a word pushed in the next two steps fits. Outputs: issue (high in slot 0 when a window
// is handed to the processor), win (the mirrored window, held for the
// step), done (all rows processed).
module row_buffer
  import idc_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned MAX_H = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic [$clog2(MAX_W+1)-1:0] width,
  input  logic [$clog2(MAX_H+1)-1:0] height,
  input  logic  in_valid,
  output logic  in_ready,
  output logic  room,
  input  coef_t in_data,
  input  logic  step_start,
  input  logic  dest_room,
  output logic  issue,
  output coef_t win [9],
  output logic  done
);
  localparam int unsigned WW = $clog2(MAX_W+1);
  localparam int unsigned HW = $clog2(MAX_H+1);

  logic  running;
  logic  f_pop, f_empty, f_full;
  coef_t f_dout;
  logic [2:0] f_count;

  sync_fifo #(.DEPTH(4)) u_fifo (
    .clk, .rst_n, .push(in_valid && in_ready), .din(in_data), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count)
  );

  assign in_ready = running && !f_full;
  assign room     = (f_count < 3'd3);

  coef_t       pair [2];
  logic [1:0]  pair_cnt;
  coef_t       sh [10];       // sh[k] = x[2m-8+k] after pair m entered
  logic [WW-1:0] m;           // next pair index to enter
  logic [HW-1:0] row;

  logic virt, step_ok, compute;
  assign virt    = (m >= WW'(width >> 1));
  assign compute = (m >= WW'(2));
  assign step_ok = running && (virt || pair_cnt == 2'd2) && (!compute || dest_room);
  assign issue   = step_start && step_ok && compute;

  // fill the pair register between steps
  assign f_pop = running && !virt && !f_empty && pair_cnt != 2'd2 && !step_start;

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * n - 2 - i;
    return i;
  endfunction

  // window of output pair j = m-2, taken from the shift register after the
  // pair m is shifted in
  coef_t nsh [10];
  always_comb begin
    for (int k = 0; k < 8; k++) nsh[k] = sh[k+2];
    nsh[8] = virt ? '0 : pair[0];
    nsh[9] = virt ? '0 : pair[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_cnt <= '0;
      m        <= '0;
      row      <= '0;
      running  <= 1'b0;
      done     <= 1'b0;
      pair[0]  <= '0;
      pair[1]  <= '0;
      for (int k = 0; k < 10; k++) sh[k] <= '0;
      for (int k = 0; k < 9; k++) win[k] <= '0;
    end else if (start) begin
      pair_cnt <= '0;
      m        <= '0;
      row      <= '0;
      running  <= (height != '0);
      done     <= (height == '0);
    end else begin
      if (f_pop) begin
        pair[pair_cnt[0]] <= f_dout;
        pair_cnt <= pair_cnt + 1'b1;
      end
      if (step_start && step_ok) begin
        sh <= nsh;
        if (!virt) pair_cnt <= '0;
        if (compute) begin
          for (int t = 0; t < 9; t++)
            win[t] <= nsh[mirror(2 * int'(m) - 8 + t, int'(width)) - (2 * int'(m) - 8)];
        end
        if (m == WW'(width >> 1) + 1'b1) begin
          m <= '0;
          if (row == HW'(height - 1'b1)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          row <= row + 1'b1;
        end else begin
          m <= m + 1'b1;
        end
      end
    end
  end

  a_pair_only_two: assert property (@(posedge clk) disable iff (!rst_n) pair_cnt <= 2'd2);
endmodule
