// Configuration and Control module of the coder.
//
// A bank of read/write registers through which the host configures the
// image shape, the input format and the compression parameters, starts a
// compression and reads the status. It checks the image shape before it
// starts the DWT and the dynamic-range unit, counts the finished segments,
// and reports busy / done / error. The register set (image width and
// height, signed/unsigned input, SegByteLimit, DCStop, BitPlaneStop,
// StageStop) follows the document; the address map, the bus and the
// status bits are this design's own.
//
// Register map (32-bit words, word addresses):
//   0 CTRL      W: bit0 = start (self-clearing)
//   1 WIDTH     R/W: image width  (multiple of 8, 32 .. MAX_W)
//   2 HEIGHT    R/W: image height (multiple of 8, 32 .. MAX_H)
//   3 FORMAT    R/W: bit0 = signed pixels
//   4 SEGBYTES  R/W: SegByteLimit (bytes per segment, 0 = no limit)
//   5 STOP      R/W: bit0 = DCStop, bits5:1 = BitPlaneStop, bits7:6 = StageStop
//   6 STATUS    R:   bit0 busy, bit1 done, bit2 error (bad shape at start)
//   7 SEGCOUNT  R:   segments finished since the last start
// Bus: reg_we/reg_re with reg_addr and reg_wdata in the same clock; read
// data is valid in the clock after reg_re.
module ctrl_regs #(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned MAX_H = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic        reg_re,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // configuration to the data path
  output logic        start,
  output logic [$clog2(MAX_W+1)-1:0] width,
  output logic [$clog2(MAX_H+1)-1:0] height,
  output logic        px_signed,
  output logic [26:0] seg_byte_limit,
  output logic        dc_stop,
  output logic [4:0]  bitplane_stop,
  output logic [1:0]  stage_stop,
  // status from the data path
  input  logic        core_busy,
  input  logic        core_done,
  input  logic        seg_done
);
  typedef enum logic [2:0] {
    A_CTRL = 3'd0, A_WIDTH = 3'd1, A_HEIGHT = 3'd2, A_FORMAT = 3'd3,
    A_SEGBYTES = 3'd4, A_STOP = 3'd5, A_STATUS = 3'd6, A_SEGCOUNT = 3'd7
  } addr_e;

  localparam int unsigned WW = $clog2(MAX_W+1);
  localparam int unsigned HW = $clog2(MAX_H+1);

  logic        err, started;
  logic [15:0] seg_count;
  logic        shape_ok;

  assign shape_ok = (width[2:0] == 3'd0) && (height[2:0] == 3'd0) &&
                    (width >= WW'(32)) && (height >= HW'(32)) &&
                    (width <= WW'(MAX_W)) && (height <= HW'(MAX_H));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start          <= 1'b0;
      width          <= WW'(MAX_W);
      height         <= HW'(MAX_H);
      px_signed      <= 1'b0;
      seg_byte_limit <= '0;
      dc_stop        <= 1'b0;
      bitplane_stop  <= '0;
      stage_stop     <= 2'd3;
      err            <= 1'b0;
      started        <= 1'b0;
      seg_count      <= '0;
      reg_rdata      <= '0;
    end else begin
      start <= 1'b0;
      if (seg_done) seg_count <= seg_count + 1'b1;
      if (reg_we) begin
        unique case (addr_e'(reg_addr))
          A_CTRL:
            if (reg_wdata[0] && !core_busy && !start) begin
              if (shape_ok) begin
                start     <= 1'b1;
                started   <= 1'b1;
                err       <= 1'b0;
                seg_count <= '0;
              end else begin
                err <= 1'b1;
              end
            end
          A_WIDTH:    if (!core_busy) width  <= WW'(reg_wdata);
          A_HEIGHT:   if (!core_busy) height <= HW'(reg_wdata);
          A_FORMAT:   if (!core_busy) px_signed <= reg_wdata[0];
          A_SEGBYTES: if (!core_busy) seg_byte_limit <= reg_wdata[26:0];
          A_STOP:
            if (!core_busy) begin
              dc_stop       <= reg_wdata[0];
              bitplane_stop <= reg_wdata[5:1];
              stage_stop    <= reg_wdata[7:6];
            end
          default: ;
        endcase
      end
      if (reg_re) begin
        unique case (addr_e'(reg_addr))
          A_WIDTH:    reg_rdata <= 32'(width);
          A_HEIGHT:   reg_rdata <= 32'(height);
          A_FORMAT:   reg_rdata <= {31'd0, px_signed};
          A_SEGBYTES: reg_rdata <= {5'd0, seg_byte_limit};
          A_STOP:     reg_rdata <= {24'd0, stage_stop, bitplane_stop, dc_stop};
          A_STATUS:   reg_rdata <= {29'd0, err, core_done && started, core_busy || start};
          A_SEGCOUNT: reg_rdata <= {16'd0, seg_count};
          default:    reg_rdata <= '0;
        endcase
      end
    end
  end
endmodule
