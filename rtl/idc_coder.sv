// CCSDS 122.0 image coder, top level.
//
// The coder takes an image of 16-bit pixels (32x32 up to 2048x2048,
// multiples of 8) as a raster stream and applies the three-level integer
// 2D DWT on the fly in a SIMD core of nine nProcessors, so the image is
// never stored: only line buffers of a few rows are kept. The ten subband
// coefficient streams are kept in the DWT Coefficient Buffer for the Bit
// Plane Encoder coders (read through the cb_rd_* port, and also brought out
// as streams), and the Dynamic Range unit of the Bit Plane Encoder characterises each strip
// segment (one row of width/8 blocks): it delivers per block
// BitDepthAC_block and the DC coefficient, and per segment BitDepthDC and
// BitDepthAC. From these and the configuration, the header generator
// sends each segment's header as a byte stream. A register bank (ctrl_regs) configures and starts the coder
// and reports its status; in the instrument it is reached through a
// network interface that is not part of this RTL, so the register bus is a
// port of the top.
//
// The coders of the Bit Plane Encoder that turn these streams into the
// rest of the coded segment (DC coder, AC coder, bitstream
// organiser) are not part of this top: the coefficient buffer read port,
// the coefficient streams, the segment parameters and the header stream
// are where they connect. The organiser's 16-bit word stream (org_*)
// enters the bit-rate control, which cuts each segment at SegByteLimit
// bytes (out_*). A segment may be read from the coefficient
// buffer once seg_valid has announced it, and must be read before the DWT
// has finished the next segment.
//
// Timing: one nPCU step of STEP_CYCLES clocks (117 by default) takes two
// pixels; a row of W pixels takes W/2+2 steps, so the pixel rate is close
// to 2 pixels per 117 clocks.
module idc_coder
  import idc_pkg::*;
#(
  parameter int unsigned MAX_W       = 2048,
  parameter int unsigned MAX_H       = 2048,
  parameter int unsigned STEP_CYCLES = 117
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration / status register bus
  input  logic        reg_we,
  input  logic        reg_re,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // image input
  input  logic        px_valid,
  output logic        px_ready,
  input  logic [15:0] px_data,
  // subband coefficients (level, band LL/LH/HL/HH) with coordinates
  output logic        sb_valid [3][4],
  output coef_t       sb_data  [3][4],
  output logic [$clog2(MAX_H+1)-1:0]   sb_row [3][2],
  output logic [$clog2(MAX_W/2+1)-1:0] sb_col [3][2],
  // DWT coefficient buffer read port (for the BPE coders)
  input  logic        cb_rd_en,
  input  logic [1:0]  cb_rd_level,
  input  logic [1:0]  cb_rd_band,
  input  logic [$clog2(MAX_H+1)-1:0]   cb_rd_row,
  input  logic [$clog2(MAX_W/2+1)-1:0] cb_rd_col,
  output coef_t       cb_rd_data,
  // segment dynamic range
  output logic        blk_valid,
  output logic [$clog2(MAX_W/8)-1:0] blk_idx,
  output logic [5:0]  blk_bitdepth_ac,
  output coef_t       blk_dc,
  output logic        seg_valid,
  output logic [$clog2(MAX_H/8)-1:0] seg_idx,
  output logic [5:0]  bitdepth_dc,
  output logic [5:0]  bitdepth_ac,
  // segment header byte stream
  output logic        hdr_valid,
  input  logic        hdr_ready,
  output logic [7:0]  hdr_data,
  output logic        hdr_last,
  // coded segment words from the bitstream organiser, and the segment
  // after bit-rate control (truncated at SegByteLimit)
  input  logic        org_valid,
  output logic        org_ready,
  input  logic [15:0] org_data,
  input  logic        org_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  output logic        out_last,
  output logic        out_half,
  output logic        seg_truncated,
  // compression parameters for the Bit Plane Encoder coders
  output logic [26:0] seg_byte_limit,
  output logic        dc_stop,
  output logic [4:0]  bitplane_stop,
  output logic [1:0]  stage_stop,
  output logic        busy,
  output logic        done
);
  logic start, px_signed;
  logic [$clog2(MAX_W+1)-1:0] width;
  logic [$clog2(MAX_H+1)-1:0] height;

  ctrl_regs #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_ctrl (
    .clk, .rst_n, .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .start, .width, .height, .px_signed, .seg_byte_limit, .dc_stop,
    .bitplane_stop, .stage_stop,
    .core_busy(busy), .core_done(done), .seg_done(seg_valid)
  );

  dwt_core #(.MAX_W(MAX_W), .MAX_H(MAX_H), .STEP_CYCLES(STEP_CYCLES)) u_dwt (
    .clk, .rst_n, .start, .width, .height, .px_signed,
    .px_valid, .px_ready, .px_data,
    .sb_valid, .sb_data, .sb_row, .sb_col, .busy, .done
  );

  coef_buffer #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_coef_buf (
    .clk, .rst_n, .sb_valid, .sb_data, .sb_row, .sb_col,
    .rd_en(cb_rd_en), .rd_level(cb_rd_level), .rd_band(cb_rd_band),
    .rd_row(cb_rd_row), .rd_col(cb_rd_col), .rd_data(cb_rd_data)
  );

  dyn_range #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_dyn (
    .clk, .rst_n, .start, .width,
    .sb_valid, .sb_data, .sb_row, .sb_col,
    .blk_valid, .blk_idx, .blk_bitdepth_ac, .blk_dc,
    .seg_valid, .seg_idx, .bitdepth_dc, .bitdepth_ac
  );

  header_gen #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_hdr (
    .clk, .rst_n, .width, .height, .px_signed, .seg_byte_limit, .dc_stop,
    .bitplane_stop, .stage_stop,
    .seg_valid, .seg_idx(8'(seg_idx)), .bitdepth_dc, .bitdepth_ac,
    .hdr_valid, .hdr_ready, .hdr_data, .hdr_last
  );

  bitrate_control u_rate (
    .clk, .rst_n, .seg_byte_limit,
    .in_valid(org_valid), .in_ready(org_ready), .in_data(org_data), .in_last(org_last),
    .out_valid, .out_ready, .out_data, .out_last, .out_half,
    .truncated(seg_truncated)
  );
endmodule
