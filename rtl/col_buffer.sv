// Row-to-column buffer of one DWT level: feeds a column (vertical)
// nProcessor.
//
// Row-transformed coefficients (one half of a row: the low-pass or the
// high-pass outputs of the row processor) arrive in raster order through a
// 4-word FIFO. Eight line buffers of N words (N = width of this half-row)
// plus the incoming register form a delay line of 8*N+1 words: at column c
// the line buffers hold rows r-1 .. r-8 of that column and the register
// holds row r, i.e. nine vertically aligned samples. Each step one sample
// is taken; when the newest row r is even and r >= 4, the output
// multiplexer builds the window of output row j = (r-4)/2 with the CCSDS
// 122.0 symmetric extension at the top and bottom, and the window is
// issued to the column processor. After the last real row, three virtual
// rows are stepped so that the last two output rows can be formed. The
// line-buffer structure follows the document (8*N+1 words, double-port
// memories); FIFO, flushing and labelling are this design's choices. The
// line buffers are read asynchronously in this model.
//
// Interface: in_valid/in_data (no back-pressure: the producer checks
// room), room (FIFO can take a word in the next two steps), width (N) and
// height (rows of the half image), start, step_start, dest_room (the
// consumer of this buffer's results can take one). Outputs: issue, win,
// out_row/out_col (coordinates of the pair being computed), done.
module col_buffer
  import idc_pkg::*;
#(
  parameter int unsigned MAX_N = 1024,
  parameter int unsigned MAX_H = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic [$clog2(MAX_N+1)-1:0] width,
  input  logic [$clog2(MAX_H+1)-1:0] height,
  input  logic  in_valid,
  input  coef_t in_data,
  output logic  room,
  input  logic  step_start,
  input  logic  dest_room,
  output logic  issue,
  output coef_t win [9],
  output logic [$clog2(MAX_H+1)-1:0] out_row,
  output logic [$clog2(MAX_N+1)-1:0] out_col,
  output logic  done
);
  localparam int unsigned NW = $clog2(MAX_N+1);
  localparam int unsigned HW = $clog2(MAX_H+1);

  logic  f_pop, f_empty, f_full;
  coef_t f_dout;
  logic [2:0] f_count;

  sync_fifo #(.DEPTH(4)) u_fifo (
    .clk, .rst_n, .push(in_valid), .din(in_data), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count)
  );

  assign room = (f_count < 3'd3);

  coef_t lb_q [8];            // line buffer outputs at column c: row r-1-k
  logic [HW+1:0] r;           // newest row index (may exceed height-1)
  logic [NW-1:0] c;
  logic running;

  logic virt, compute, step_ok;
  coef_t v;
  assign virt    = (r >= (HW+2)'(height));
  assign compute = !r[0] && (r >= (HW+2)'(4));
  assign step_ok = running && (virt || !f_empty) && (!compute || dest_room);
  assign issue   = step_start && step_ok && compute;
  assign f_pop   = step_start && step_ok && !virt;
  assign v       = virt ? '0 : f_dout;

  function automatic int mirror(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * n - 2 - i;
    return i;
  endfunction

  coef_t taps [9];            // taps[s] = row r-8+s at column c
  always_comb begin
    for (int s = 0; s < 8; s++) taps[s] = lb_q[7-s];
    taps[8] = v;
  end

  // eight line buffers, each a memory of N words with one write and one
  // read port; line k takes the word line k-1 held at the same column
  logic lb_we;
  assign lb_we = running && step_start && step_ok;
  for (genvar k = 0; k < 8; k++) begin : g_line
    coef_t mem [MAX_N];
    assign lb_q[k] = mem[c[$clog2(MAX_N)-1:0]];
    always_ff @(posedge clk)
      if (lb_we) mem[c[$clog2(MAX_N)-1:0]] <= (k == 0) ? v : lb_q[(k == 0) ? 0 : k - 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r       <= '0;
      c       <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      out_row <= '0;
      out_col <= '0;
      for (int k = 0; k < 9; k++) win[k] <= '0;
    end else if (start) begin
      r       <= '0;
      c       <= '0;
      running <= (height != '0);
      done    <= (height == '0);
    end else if (step_start && step_ok) begin
      if (compute) begin
        for (int t = 0; t < 9; t++)
          win[t] <= taps[mirror(int'(r) - 8 + t, int'(height)) - (int'(r) - 8)];
        out_row <= HW'((r - (HW+2)'(4)) >> 1);
        out_col <= c;
      end
      if (c == NW'(width - 1'b1)) begin
        c <= '0;
        if (r == (HW+2)'(height) + 2) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
        r <= r + 1'b1;
      end else begin
        c <= c + 1'b1;
      end
    end
  end

  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && f_full));
endmodule
