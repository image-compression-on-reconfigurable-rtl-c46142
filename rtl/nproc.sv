// nProcessor: one processing element of the SIMD DWT core.
//
// It holds eight 32-bit integer registers and executes the instruction the
// nPCU broadcasts each clock, reading its operands from the 9-sample window
// its buffer presents (win, stable during a step). The ALU does integer
// add/subtract and shifts, which is all the integer 9/7 DWT needs; the
// floating-point ALU option the document offers for the float DWT is not
// built. A processor whose buffer did not issue a window in slot 0
// (issue low at step_start) stays idle for that step.
//
// Interface: instr/step_start/step_end from the nPCU, issue from its buffer,
// win[0..8] the window. Outputs lo (low-pass C) and hi (high-pass D) with
// res_valid, a one-clock pulse at the end of a step that was issued.
module nproc
  import idc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t instr,
  input  logic   step_start,
  input  logic   step_end,
  input  logic   issue,
  input  coef_t  win [9],
  output coef_t  lo,
  output coef_t  hi,
  output logic   res_valid
);
  coef_t regs [8];
  coef_t a, b, res;
  logic  active;
  coef_t immx;

  always_comb begin
    a    = regs[instr.ra];
    b    = regs[instr.rb];
    immx = coef_t'(instr.imm);
    res  = '0;
    unique case (instr.op)
      OP_LDW:  res = (instr.imm < 9) ? win[instr.imm[3:0]] : '0;
      OP_ADD:  res = a + b;
      OP_SUB:  res = a - b;
      OP_SHL:  res = a << instr.imm[4:0];
      OP_SRA:  res = a >>> instr.imm[4:0];
      OP_ADDI: res = a + immx;
      default: res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      res_valid <= 1'b0;
      lo        <= '0;
      hi        <= '0;
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      res_valid <= 1'b0;
      if (step_start) active <= issue;
      if (active) begin
        unique case (instr.op)
          OP_LDW, OP_ADD, OP_SUB, OP_SHL, OP_SRA, OP_ADDI: regs[instr.rd] <= res;
          OP_OUTL: lo <= a;
          OP_OUTH: hi <= a;
          default: ;
        endcase
        if (step_end) begin
          res_valid <= 1'b1;
          active    <= 1'b0;
        end
      end
    end
  end
endmodule
