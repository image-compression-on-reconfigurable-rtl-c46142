// nProcessor net Control Unit (nPCU).
//
// Runs the single 1D-DWT program and broadcasts one instruction per clock
// on the instruction bus shared by all nProcessors (SIMD). A program run
// ("step") lasts STEP_CYCLES clocks: slot 0 is a no-operation during which
// the buffers hand a new window to their processor, slots 1..PROG_LEN carry
// the program of idc_pkg::dwt_program, the remaining slots are padding.
// STEP_CYCLES defaults to 117, the program length the document gives for
// its DWT processors; the program written here needs only 30 slots, so a
// shorter step can be chosen for a faster core.
//
// Interface: run (hold high to keep stepping), instr (broadcast bus),
// step_start (high in slot 0), step_end (high in the last slot).
// Timing: a new step starts every STEP_CYCLES clocks while run is high.
module npcu
  import idc_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 117
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  output instr_t instr,
  output logic   step_start,
  output logic   step_end
);
  localparam int unsigned PCW = $clog2(STEP_CYCLES);

  // the program and the load slot must fit in one step
  if (STEP_CYCLES < PROG_LEN + 1) begin : g_step_too_short
    $error("npcu: STEP_CYCLES must be at least PROG_LEN + 1");
  end

  logic [PCW-1:0] pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      pc <= '0;
    else if (pc != '0 || run)
      pc <= (pc == PCW'(STEP_CYCLES - 1)) ? '0 : pc + 1'b1;
  end

  always_comb begin
    instr      = dwt_program(32'(pc));
    step_start = (pc == '0) && run;
    step_end   = (pc == PCW'(STEP_CYCLES - 1));
  end

  initial assert (STEP_CYCLES >= PROG_LEN + 1)
    else $error("STEP_CYCLES must hold the whole program");
endmodule
