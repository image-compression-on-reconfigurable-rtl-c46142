// 3-level 2D DWT core: a SIMD machine of nine nProcessors.
//
// Three dwt_level instances are chained: the LL output of level 1 is the
// input image of level 2, and that of level 2 feeds level 3. One nPCU
// broadcasts the 1D-DWT program to all nine processors, so every level
// works in parallel on its own data and the ten subbands are produced
// concurrently, without storing the image: only the row buffers and the
// row-to-column line buffers (8 lines of W/2, W/4, W/8 words for levels
// 1, 2, 3, as in the document) hold data. The transform is the CCSDS
// 122.0 integer 9/7 DWT with symmetric extension.
//
// Interface: start (one clock, with width/height stable until done),
// pixel stream px_valid/px_ready/px_data (16-bit, px_signed selects two's
// complement or unsigned input), raster order. Outputs: per level l
// (index l-1) a coefficient pulse sb_valid[l][band] with sb_data, and the
// subband coordinates sb_row/sb_col; band 0..3 = LL, LH, HL, HH (LL only
// at level 3). done goes high when the last coefficient has left.
// Timing: one nPCU step (STEP_CYCLES clocks) consumes up to two pixels at
// level 1; a row of W pixels takes W/2+2 steps.
// Requirements: width and height multiples of 8 and >= 32, so that each
// level image is at least 8x8.
module dwt_core
  import idc_pkg::*;
#(
  parameter int unsigned MAX_W       = 2048,
  parameter int unsigned MAX_H       = 2048,
  parameter int unsigned STEP_CYCLES = 117
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic [$clog2(MAX_W+1)-1:0] width,
  input  logic [$clog2(MAX_H+1)-1:0] height,
  input  logic  px_signed,
  input  logic  px_valid,
  output logic  px_ready,
  input  logic [15:0] px_data,
  output logic  sb_valid [3][4],
  output coef_t sb_data  [3][4],
  output logic [$clog2(MAX_H+1)-1:0]   sb_row [3][2],
  output logic [$clog2(MAX_W/2+1)-1:0] sb_col [3][2],
  output logic  busy,
  output logic  done
);
  localparam int unsigned WW = $clog2(MAX_W+1);
  localparam int unsigned HW = $clog2(MAX_H+1);

  instr_t instr;
  logic   step_start, step_end;

  npcu #(.STEP_CYCLES(STEP_CYCLES)) u_npcu (
    .clk, .rst_n, .run(busy), .instr, .step_start, .step_end
  );

  logic  lv_in_valid [3];
  logic  lv_in_ready [3];
  logic  lv_room     [3];
  coef_t lv_in_data  [3];
  logic  lv_ll_room  [3];
  logic  lv_done     [3];
  logic  p_valid [3];
  logic  q_valid [3];
  coef_t ll [3];
  coef_t lh [3];
  coef_t hl [3];
  coef_t hh [3];

  assign lv_in_valid[0] = px_valid;
  assign lv_in_data[0]  = px_signed ? coef_t'(signed'(px_data)) : coef_t'(px_data);
  assign px_ready       = lv_in_ready[0] && busy;

  for (genvar l = 0; l < 3; l++) begin : g_level
    logic [WW-1:0] w_l;
    logic [HW-1:0] h_l;
    assign w_l = width  >> l;
    assign h_l = height >> l;

    dwt_level #(.MAX_W(MAX_W >> l), .MAX_H(MAX_H >> l)) u_level (
      .clk, .rst_n, .start,
      .width($clog2((MAX_W >> l)+1)'(w_l)), .height($clog2((MAX_H >> l)+1)'(h_l)),
      .in_valid(lv_in_valid[l]), .in_ready(lv_in_ready[l]), .room(lv_room[l]),
      .in_data(lv_in_data[l]),
      .instr, .step_start, .step_end, .ll_room(lv_ll_room[l]),
      .p_valid(p_valid[l]), .ll(ll[l]), .lh(lh[l]),
      .p_row(sb_row[l][0]), .p_col(sb_col[l][0]),
      .q_valid(q_valid[l]), .hl(hl[l]), .hh(hh[l]),
      .q_row(sb_row[l][1]), .q_col(sb_col[l][1]),
      .done(lv_done[l])
    );

    if (l < 2) begin : g_chain
      assign lv_in_valid[l+1] = p_valid[l];
      assign lv_in_data[l+1]  = ll[l];
      assign lv_ll_room[l]    = lv_room[l+1];
    end else begin : g_last
      assign lv_ll_room[l] = 1'b1;
    end

    assign sb_valid[l][0] = (l == 2) ? p_valid[l] : 1'b0;
    assign sb_valid[l][1] = p_valid[l];
    assign sb_valid[l][2] = q_valid[l];
    assign sb_valid[l][3] = q_valid[l];
    assign sb_data[l][0]  = ll[l];
    assign sb_data[l][1]  = lh[l];
    assign sb_data[l][2]  = hl[l];
    assign sb_data[l][3]  = hh[l];
  end

  // done is raised one clock after the step that computed the last
  // coefficients, i.e. together with their valid pulses
  logic finishing;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      finishing <= 1'b0;
    end else if (start) begin
      busy      <= 1'b1;
      done      <= 1'b0;
      finishing <= 1'b0;
    end else begin
      finishing <= busy && step_end && lv_done[0] && lv_done[1] && lv_done[2];
      if (finishing) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // level 1 and 2 never hand a full FIFO their LL output
  a_lv_in_ready: assert property (@(posedge clk) disable iff (!rst_n)
    !(p_valid[0] && !lv_in_ready[1]) && !(p_valid[1] && !lv_in_ready[2]));
endmodule
