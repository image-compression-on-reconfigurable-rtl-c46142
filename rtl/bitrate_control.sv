// Bit-rate control of the Bit Plane Encoder.
//
// It sits at the end of the coder and truncates each coded segment to at
// most SegByteLimit bytes, which is how the coder limits the size of a
// segment for lossy compression. The coded segment arrives as a stream of
// 16-bit words, the last one marked by in_last. Words pass through
// unchanged until the word that reaches the limit. That word is marked
// out_last, and every following word of the segment is taken from the
// input and dropped. When the limit is odd, the final word carries only
// one byte: out_half marks it, and its upper (first) byte is the valid one.
// A segment shorter than the limit passes whole. Truncation at
// SegByteLimit follows the document. The word stream with a last flag,
// SegByteLimit = 0 meaning "no limit", and the half-word marking are this
// design's choices.
//
// How it works: a byte counter per segment and a "dropping" flag. Valid
// and ready pass straight through (no register stage): out_valid =
// in_valid while not dropping, and in_ready = out_ready while not
// dropping, else 1.
//
// Interface: in_valid/in_ready/in_data/in_last; out_valid/out_ready/
// out_data/out_last/out_half; truncated pulses for one clock when a
// segment is cut. seg_byte_limit must not change within a segment.
module bitrate_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [26:0] seg_byte_limit,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  output logic        out_last,
  output logic        out_half,
  output logic        truncated
);
  logic [27:0] sent;        // bytes of the current segment already sent
  logic        dropping;    // rest of the segment is being discarded
  logic [27:0] rem;
  logic        cut;

  assign rem = {1'b0, seg_byte_limit} - sent;
  assign cut = (seg_byte_limit != '0) && (rem <= 28'd2);

  assign out_valid = in_valid && !dropping;
  assign in_ready  = dropping || out_ready;
  assign out_data  = in_data;
  assign out_last  = in_last || cut;
  assign out_half  = cut && (rem == 28'd1);

  logic take;
  assign take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent      <= '0;
      dropping  <= 1'b0;
      truncated <= 1'b0;
    end else begin
      truncated <= 1'b0;
      if (take) begin
        if (in_last) begin
          sent     <= '0;
          dropping <= 1'b0;
        end else if (dropping) begin
          sent <= sent;
        end else if (cut) begin
          dropping  <= 1'b1;
          truncated <= 1'b1;
        end else begin
          sent <= sent + 28'd2;
        end
      end
    end
  end

  a_limit_kept: assert property (@(posedge clk) disable iff (!rst_n)
    (seg_byte_limit != '0) |-> sent < {1'b0, seg_byte_limit});
endmodule
