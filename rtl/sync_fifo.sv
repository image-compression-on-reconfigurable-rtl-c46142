// Small synchronous FIFO used in front of each DWT buffer.
//
// DEPTH words of type coef_t, one push and one pop per clock, first-word
// fall-through (dout shows the oldest word while empty is low). count is
// the number of words held. Pushing when full or popping when empty is a
// usage error and is flagged by assertions.
module sync_fifo
  import idc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  coef_t din,
  input  logic  pop,
  output coef_t dout,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  coef_t mem [DEPTH];
  logic [AW-1:0] rp, wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop)
        rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  assign dout  = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
