// One level of the 2D DWT: three nProcessors and their buffers.
//
// The row processor transforms each row of the level image with the help
// of the row buffer; its low-pass outputs go to row-to-column buffer P and
// its high-pass outputs to row-to-column buffer Q. The column processor on
// P produces the LL (low/low) and LH (low horizontally, high vertically)
// subbands, the one on Q produces HL and HH. LL is passed on to the next
// level (or is LL3 at the last level). All three processors execute the
// instruction broadcast by the shared nPCU. This arrangement is the one
// the document describes; the subband naming (first letter: horizontal
// filter) is this design's convention.
//
// Interface: pixel stream in_valid/in_ready/in_data, width/height of this
// level's input image (even, >= 8 and >= 8 rows), start, the nPCU bus
// (instr, step_start, step_end), ll_room (the LL consumer can take a word;
// tie high for a sink that never stalls). Outputs: p_valid with ll/lh at
// (p_row, p_col) and q_valid with hl/hh at (q_row, q_col), each a one-clock
// pulse; done when the whole image has gone through the level.
module dwt_level
  import idc_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned MAX_H = 2048
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic [$clog2(MAX_W+1)-1:0] width,
  input  logic [$clog2(MAX_H+1)-1:0] height,
  input  logic   in_valid,
  output logic   in_ready,
  output logic   room,
  input  coef_t  in_data,
  input  instr_t instr,
  input  logic   step_start,
  input  logic   step_end,
  input  logic   ll_room,
  output logic   p_valid,
  output coef_t  ll,
  output coef_t  lh,
  output logic [$clog2(MAX_H+1)-1:0]   p_row,
  output logic [$clog2(MAX_W/2+1)-1:0] p_col,
  output logic   q_valid,
  output coef_t  hl,
  output coef_t  hh,
  output logic [$clog2(MAX_H+1)-1:0]   q_row,
  output logic [$clog2(MAX_W/2+1)-1:0] q_col,
  output logic   done
);
  localparam int unsigned MAX_N = MAX_W / 2;
  localparam int unsigned NW = $clog2(MAX_N+1);

  logic  rb_issue, rb_done, p_room, q_room, r_valid;
  coef_t rb_win [9];
  coef_t r_lo, r_hi;

  row_buffer #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_row_buf (
    .clk, .rst_n, .start, .width, .height,
    .in_valid, .in_ready, .room, .in_data,
    .step_start, .dest_room(p_room && q_room),
    .issue(rb_issue), .win(rb_win), .done(rb_done)
  );

  nproc u_row_proc (
    .clk, .rst_n, .instr, .step_start, .step_end, .issue(rb_issue),
    .win(rb_win), .lo(r_lo), .hi(r_hi), .res_valid(r_valid)
  );

  logic  p_issue, q_issue, p_done, q_done;
  coef_t p_win [9];
  coef_t q_win [9];
  logic [$clog2(MAX_H+1)-1:0] p_r, q_r;
  logic [NW-1:0] p_c, q_c;
  logic [NW-1:0] half_w;
  assign half_w = NW'(width >> 1);

  col_buffer #(.MAX_N(MAX_N), .MAX_H(MAX_H)) u_buf_p (
    .clk, .rst_n, .start, .width(half_w), .height,
    .in_valid(r_valid), .in_data(r_lo), .room(p_room),
    .step_start, .dest_room(ll_room),
    .issue(p_issue), .win(p_win), .out_row(p_r), .out_col(p_c), .done(p_done)
  );

  col_buffer #(.MAX_N(MAX_N), .MAX_H(MAX_H)) u_buf_q (
    .clk, .rst_n, .start, .width(half_w), .height,
    .in_valid(r_valid), .in_data(r_hi), .room(q_room),
    .step_start, .dest_room(1'b1),
    .issue(q_issue), .win(q_win), .out_row(q_r), .out_col(q_c), .done(q_done)
  );

  nproc u_col_proc_p (
    .clk, .rst_n, .instr, .step_start, .step_end, .issue(p_issue),
    .win(p_win), .lo(ll), .hi(lh), .res_valid(p_valid)
  );

  nproc u_col_proc_q (
    .clk, .rst_n, .instr, .step_start, .step_end, .issue(q_issue),
    .win(q_win), .lo(hl), .hi(hh), .res_valid(q_valid)
  );

  assign p_row = p_r;
  assign p_col = p_c;
  assign q_row = q_r;
  assign q_col = q_c;
  assign done  = rb_done && p_done && q_done;
endmodule
