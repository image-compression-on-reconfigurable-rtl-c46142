// Dynamic Range unit of the Bit Plane Encoder front end.
//
// It watches the coefficients leaving the DWT core and, without stalling
// it, groups them into 8x8-pixel blocks and strip segments (one segment =
// one row of S = width/8 blocks, the "strip compression" the document
// recommends), and computes per block BitDepthAC_block (bits of the
// largest AC magnitude) and per segment BitDepthDC (two's-complement bits
// of the DC coefficients) and BitDepthAC (largest BitDepthAC_block). Block
// membership: a level-l subband coefficient at (row, col) belongs to block
// (row >> (3-l), col >> (3-l)); LL3 is the block's DC coefficient.
//
// How it works: all nProcessors deliver their results in the same clock
// (end of an nPCU step). The unit latches the six results in that clock,
// reduces each to the bit depth of its larger AC magnitude, and applies
// them to a per-block accumulator memory one per clock over the next six
// clocks (a step is far longer). The memory has four banks, indexed by
// block row mod 4, because level-1 coefficients of the next block rows
// arrive before level 3 finishes the current one. When all 2*S level-3
// results of a block row have been applied, the row's segment is complete
// and a readout engine streams its S blocks out (one per clock) and clears
// the bank (a per-entry flag marks the entries written since, so the
// memory itself needs no clearing). Using the strip segment size and computing the bit depths with
// the formulas above are this design's choices.
//
// Interface: start (with width/height), sb_* from dwt_core. Outputs per
// block: blk_valid, blk_idx (m), blk_bitdepth_ac, blk_dc; per segment, in
// the clock of its last block: seg_valid, seg_idx, bitdepth_dc, bitdepth_ac.
module dyn_range
  import idc_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned MAX_H = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic [$clog2(MAX_W+1)-1:0] width,
  input  logic  sb_valid [3][4],
  input  coef_t sb_data  [3][4],
  input  logic [$clog2(MAX_H+1)-1:0]   sb_row [3][2],
  input  logic [$clog2(MAX_W/2+1)-1:0] sb_col [3][2],
  output logic  blk_valid,
  output logic [$clog2(MAX_W/8)-1:0] blk_idx,
  output logic [5:0] blk_bitdepth_ac,
  output coef_t blk_dc,
  output logic  seg_valid,
  output logic [$clog2(MAX_H/8)-1:0] seg_idx,
  output logic [5:0] bitdepth_dc,
  output logic [5:0] bitdepth_ac
);
  localparam int unsigned MAX_S = MAX_W / 8;
  localparam int unsigned SW = $clog2(MAX_S);
  localparam int unsigned BRW = $clog2(MAX_H / 8);

  typedef struct packed {
    logic            valid;
    logic            lvl3;
    logic [BRW-1:0]  brow;
    logic [SW-1:0]   bcol;
    logic [5:0]      bits;
    coef_t           dc;
  } upd_t;

  upd_t pend [6];
  logic [2:0] sel;
  logic busy_apply;
  logic [SW:0] s_blocks;
  assign s_blocks = (SW+1)'(width >> 3);

  logic [5:0] acc [4][MAX_S];
  logic [MAX_S-1:0] touched [4];   // entry holds data of the current block row
  coef_t      dcv [4][MAX_S];
  logic [SW+1:0] cnt3 [4];

  function automatic logic [5:0] max6(logic [5:0] a, logic [5:0] b);
    return (a > b) ? a : b;
  endfunction

  // readout engine
  logic          ro_active;
  logic [1:0]    ro_bank;
  logic [BRW-1:0] ro_brow;
  logic [SW:0]   ro_m;
  logic [5:0]    ro_max_ac, ro_max_dc;

  logic any_valid;
  always_comb begin
    any_valid = 1'b0;
    for (int l = 0; l < 3; l++)
      for (int b = 0; b < 4; b++)
        any_valid |= sb_valid[l][b];
  end

  upd_t cur;
  assign cur = pend[sel];
  logic [1:0] cur_bank;
  assign cur_bank = cur.brow[1:0];

  logic finish_row;
  assign finish_row = busy_apply && cur.valid && cur.lvl3 &&
                      (cnt3[cur_bank] + 1'b1 == (SW+2)'(2 * s_blocks));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel        <= '0;
      busy_apply <= 1'b0;
      ro_active  <= 1'b0;
      ro_bank    <= '0;
      ro_brow    <= '0;
      ro_m       <= '0;
      ro_max_ac  <= '0;
      ro_max_dc  <= '0;
      blk_valid  <= 1'b0;
      seg_valid  <= 1'b0;
      blk_idx    <= '0;
      blk_bitdepth_ac <= '0;
      blk_dc     <= '0;
      seg_idx    <= '0;
      bitdepth_dc <= '0;
      bitdepth_ac <= '0;
      for (int k = 0; k < 6; k++) pend[k] <= '0;
      for (int k = 0; k < 4; k++) begin
        cnt3[k]    <= '0;
        touched[k] <= '0;
      end
    end else if (start) begin
      busy_apply <= 1'b0;
      ro_active  <= 1'b0;
      for (int k = 0; k < 4; k++) begin
        cnt3[k]    <= '0;
        touched[k] <= '0;
      end
    end else begin
      blk_valid <= 1'b0;
      seg_valid <= 1'b0;
      // capture one batch of processor results
      if (any_valid) begin
        for (int l = 0; l < 3; l++) begin
          int sh;
          sh = 2 - l;
          // P processor: LH (and LL at level 3), Q processor: HL and HH
          pend[2*l].valid   <= sb_valid[l][1];
          pend[2*l].lvl3    <= (l == 2);
          pend[2*l].brow    <= BRW'(sb_row[l][0] >> sh);
          pend[2*l].bcol    <= SW'(sb_col[l][0] >> sh);
          pend[2*l].bits    <= mag_bits(sb_data[l][1]);
          pend[2*l].dc      <= sb_data[l][0];
          pend[2*l+1].valid <= sb_valid[l][2];
          pend[2*l+1].lvl3  <= (l == 2);
          pend[2*l+1].brow  <= BRW'(sb_row[l][1] >> sh);
          pend[2*l+1].bcol  <= SW'(sb_col[l][1] >> sh);
          pend[2*l+1].bits  <= max6(mag_bits(sb_data[l][2]), mag_bits(sb_data[l][3]));
          pend[2*l+1].dc    <= '0;
        end
        sel        <= '0;
        busy_apply <= 1'b1;
      end else if (busy_apply) begin
        if (cur.valid) begin
          acc[cur_bank][cur.bcol] <= touched[cur_bank][cur.bcol] ?
                                     max6(acc[cur_bank][cur.bcol], cur.bits) : cur.bits;
          touched[cur_bank][cur.bcol] <= 1'b1;
          if (sel == 3'd4) dcv[cur_bank][cur.bcol] <= cur.dc;
          if (cur.lvl3) cnt3[cur_bank] <= finish_row ? '0 : cnt3[cur_bank] + 1'b1;
        end
        if (finish_row) begin
          ro_active <= 1'b1;
          ro_bank   <= cur_bank;
          ro_brow   <= cur.brow;
          ro_m      <= '0;
          ro_max_ac <= '0;
          ro_max_dc <= 6'd1;
        end
        if (sel == 3'd5) busy_apply <= 1'b0;
        sel <= sel + 1'b1;
      end
      // stream a finished segment out and clear its bank
      if (ro_active) begin
        logic [5:0] nac, ndc;
        logic [5:0] bd;
        bd  = touched[ro_bank][SW'(ro_m)] ? acc[ro_bank][SW'(ro_m)] : '0;
        nac = max6(ro_max_ac, bd);
        ndc = max6(ro_max_dc, tc_bits(dcv[ro_bank][SW'(ro_m)]));
        blk_valid       <= 1'b1;
        blk_idx         <= SW'(ro_m);
        blk_bitdepth_ac <= bd;
        blk_dc          <= dcv[ro_bank][SW'(ro_m)];
        touched[ro_bank][SW'(ro_m)] <= 1'b0;
        ro_max_ac <= nac;
        ro_max_dc <= ndc;
        ro_m      <= ro_m + 1'b1;
        if (ro_m == s_blocks - 1'b1) begin
          ro_active   <= 1'b0;
          seg_valid   <= 1'b1;
          seg_idx     <= ro_brow;
          bitdepth_ac <= nac;
          bitdepth_dc <= ndc;
        end
      end
    end
  end

  // a new batch must not arrive while the previous one is still applied
  a_batch_spacing: assert property (@(posedge clk) disable iff (!rst_n) !(any_valid && busy_apply));
endmodule
