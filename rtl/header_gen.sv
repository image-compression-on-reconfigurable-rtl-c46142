// Segment header generator of the Bit Plane Encoder.
//
// For every segment the dynamic-range unit announces (seg_valid), this
// unit emits the CCSDS 122.0 segment header as a byte stream, most
// significant bit first. The header carries the segment number, the
// segment's BitDepthDC and BitDepthAC, the compression parameters and the
// image description. Its layout:
//   Part 1A (3 bytes, every segment): StartImgFlag, EndImgFlag,
//     SegmentCount[7:0], BitDepthDC[4:0], BitDepthAC[4:0], reserved 0,
//     Part2Flag, Part3Flag, Part4Flag
//   Part 1B (1 byte, last segment only): PadRows[2:0] (0: heights are
//     multiples of 8), reserved 00000
//   Part 2 (5 bytes): SegByteLimit[26:0], DCStop, BitPlaneStop[4:0],
//     StageStop[1:0], UseFill 0, reserved 0000
//   Part 3 (3 bytes): S[19:0] (= width/8), OptDCSelect 1, OptACSelect 1,
//     reserved 00
//   Part 4 (8 bytes): DWTtype 1 (integer), reserved 00, SignedPixels,
//     PixelBitDepth[3:0] (16 coded as 0), ImageWidth[19:0], TransposeImg 0,
//     CodeWordLength[2:0] = 001 (16-bit words), CustomWtFlag 0, ten 2-bit
//     custom weights 0, reserved 11 zero bits
// Parts 2 to 4 go into the first segment of an image only, so the first
// header is 19 bytes (20 if it is also the last), the others 3 (4 for the
// last). That a header carries the dimensions, the dynamic range and the
// compression parameters follows the document; the field layout is the
// CCSDS 122.0 one; which parts are sent, the fixed field values above and
// the byte interface are this design's choices.
//
// How it works: seg_valid loads the whole header into a 160-bit shift
// register, left-aligned, with a byte count; each accepted byte shifts it
// by eight. The configuration inputs must be stable while an image is
// coded (ctrl_regs freezes them while busy).
//
// Interface: hdr_valid/hdr_ready handshake with hdr_data and hdr_last (last
// byte of a header). A new seg_valid must not arrive while a header is
// still being sent (segments are thousands of clocks apart; an assertion
// checks it).
module header_gen #(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned MAX_H = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  // image configuration
  input  logic [$clog2(MAX_W+1)-1:0] width,
  input  logic [$clog2(MAX_H+1)-1:0] height,
  input  logic        px_signed,
  input  logic [26:0] seg_byte_limit,
  input  logic        dc_stop,
  input  logic [4:0]  bitplane_stop,
  input  logic [1:0]  stage_stop,
  // segment announcement from the dynamic-range unit
  input  logic        seg_valid,
  input  logic [7:0]  seg_idx,
  input  logic [5:0]  bitdepth_dc,
  input  logic [5:0]  bitdepth_ac,
  // header byte stream
  output logic        hdr_valid,
  input  logic        hdr_ready,
  output logic [7:0]  hdr_data,
  output logic        hdr_last
);
  localparam int unsigned HB = 20 * 8;   // longest header in bits

  logic [HB-1:0] sr;
  logic [4:0]    left;                   // bytes still to send

  logic first, last;
  logic [7:0] nseg;                      // segments in the image - 1
  assign nseg  = 8'(((height >> 3) - 1'b1));
  assign first = (seg_idx == 8'd0);
  assign last  = (seg_idx == nseg);

  logic [23:0] p1a;
  logic [7:0]  p1b;
  logic [39:0] p2;
  logic [23:0] p3;
  logic [63:0] p4;
  assign p1a = {first, last, seg_idx, bitdepth_dc[4:0], bitdepth_ac[4:0],
                1'b0, first, first, first};
  assign p1b = {3'd0, 5'd0};
  assign p2  = {seg_byte_limit, dc_stop, bitplane_stop, stage_stop, 1'b0, 4'd0};
  assign p3  = {20'(width >> 3), 1'b1, 1'b1, 2'd0};
  assign p4  = {1'b1, 2'd0, px_signed, 4'd0, 20'(width), 1'b0, 3'b001,
                1'b0, 20'd0, 11'd0};

  // header image and length, left-aligned in HB bits
  logic [HB-1:0] img;
  logic [4:0]    nbytes;
  always_comb begin
    case ({first, last})
      2'b10: begin img = {p1a, p2, p3, p4, 8'd0};  nbytes = 5'd19; end
      2'b11: begin img = {p1a, p1b, p2, p3, p4};   nbytes = 5'd20; end
      2'b01: begin img = {p1a, p1b, 128'd0};       nbytes = 5'd4;  end
      default: begin img = {p1a, 136'd0};          nbytes = 5'd3;  end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (seg_valid) begin
      sr   <= img;
      left <= nbytes;
    end else if (hdr_valid && hdr_ready) begin
      sr   <= sr << 8;
      left <= left - 1'b1;
    end
  end

  assign hdr_valid = (left != '0);
  assign hdr_data  = sr[HB-1 -: 8];
  assign hdr_last  = (left == 5'd1);

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    seg_valid |-> left == '0);
  a_bitdepth_fits: assert property (@(posedge clk) disable iff (!rst_n)
    seg_valid |-> bitdepth_dc < 6'd32 && bitdepth_ac < 6'd32);
endmodule
