// DWT Coefficient Buffer of the Bit Plane Encoder.
//
// Ten double-port memories, one per subband, keep the DWT coefficients
// until the BPE coders read them block by block. Each memory is a ring of
// subband rows: level-1 subbands keep 17 rows of up to 1024 words, level-2
// subbands 7 rows of 512, level-3 subbands (and LL3) 2 rows of 256. That
// is enough for two strip segments plus the rows the faster DWT levels
// write ahead of level 3 before a segment is complete, so the BPE can code
// one segment while the DWT fills the next. Words are stored at the widths
// given for a 16-bit image (18 to 21 bits, see WB below) and sign-extended
// on reading. Row counts, widths and the one-memory-per-subband
// organisation follow the document; the ring addressing, the read port and
// its one-clock latency are this design's choices.
//
// Interface: the write side takes the dwt_core outputs directly (all ten
// memories can be written in the same clock). The read side takes
// rd_en with rd_level (0..2), rd_band (0 LL, 1 LH, 2 HL, 3 HH; LL only at
// level index 2) and the subband coordinates rd_row/rd_col, and returns
// rd_data in the next clock. The reader must not fall more than one
// segment behind the DWT (the document's BPE is faster than the DWT).
module coef_buffer
  import idc_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned MAX_H = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sb_valid [3][4],
  input  coef_t sb_data  [3][4],
  input  logic [$clog2(MAX_H+1)-1:0]   sb_row [3][2],
  input  logic [$clog2(MAX_W/2+1)-1:0] sb_col [3][2],
  input  logic  rd_en,
  input  logic [1:0] rd_level,
  input  logic [1:0] rd_band,
  input  logic [$clog2(MAX_H+1)-1:0]   rd_row,
  input  logic [$clog2(MAX_W/2+1)-1:0] rd_col,
  output coef_t rd_data
);
  // rows kept per level and stored word width per level and band
  function automatic int unsigned rows_of(int l);
    return (l == 0) ? 17 : (l == 1) ? 7 : 2;
  endfunction
  function automatic int unsigned width_of(int l, int b);
    if (l == 0) return (b == 3) ? 19 : 18;
    if (l == 1) return 19;
    return (b == 0) ? 21 : 20;
  endfunction

  logic [1:0] rd_level_q, rd_band_q;
  coef_t      q [3][4];

  for (genvar l = 0; l < 3; l++) begin : g_lvl
    localparam int unsigned NL = MAX_W >> (l + 1);
    localparam int unsigned NR = rows_of(l);
    localparam int unsigned AW = $clog2(NR * NL);
    for (genvar b = 0; b < 4; b++) begin : g_band
      if (l == 2 || b != 0) begin : g_mem
        localparam int unsigned DW = width_of(l, b);
        logic [DW-1:0] mem [NR * NL];
        logic [AW-1:0] wa, ra;
        assign wa = AW'((int'(sb_row[l][b/2]) % NR) * NL + int'(sb_col[l][b/2]));
        assign ra = AW'((int'(rd_row) % NR) * NL + int'(rd_col));
        always_ff @(posedge clk) begin
          if (sb_valid[l][b]) mem[wa] <= DW'(sb_data[l][b]);
          if (rd_en && rd_level == 2'(l) && rd_band == 2'(b))
            q[l][b] <= coef_t'(signed'(mem[ra]));
        end
        // the stored width must hold every coefficient written
        a_fits: assert property (@(posedge clk) disable iff (!rst_n)
          sb_valid[l][b] |-> (sb_data[l][b] == coef_t'(signed'(DW'(sb_data[l][b])))));
      end else begin : g_none
        assign q[l][b] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_level_q <= '0;
      rd_band_q  <= '0;
    end else if (rd_en) begin
      rd_level_q <= rd_level;
      rd_band_q  <= rd_band;
    end
  end

  assign rd_data = q[rd_level_q][rd_band_q];
endmodule
