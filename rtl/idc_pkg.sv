// Shared types and constants of the CCSDS 122.0 image coder.
//
// The DWT core is a small SIMD machine: one control unit (npcu) broadcasts
// one instruction per clock to nine nProcessors (nproc). The instruction
// format, the opcode set and the 1D-DWT program live here so that the
// control unit, the processors and the testbenches agree on them. The
// instruction set is this design's own; the document only says that a
// single 1D-DWT program is broadcast on one instruction bus.
//
// The program computes one low-pass / high-pass pair of the CCSDS 122.0
// integer 9/7 DWT from a 9-sample window w[0..8] = x[2j-4 .. 2j+4]:
//   D(j-1) = w3 - ((9*(w2+w4) - (w0+w6) + 8) >>> 4)
//   D(j)   = w5 - ((9*(w4+w6) - (w2+w8) + 8) >>> 4)
//   C(j)   = w4 + ((D(j-1) + D(j) + 1) >>> 2)
// Border handling (symmetric extension) is done by the buffers, which
// mirror the window before the program reads it.
package idc_pkg;

  // Coefficient word width: buffers hold 32-bit words.
  parameter int unsigned COEF_W = 32;

  typedef logic signed [COEF_W-1:0] coef_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_LDW  = 4'd1,  // rd <= window[imm]
    OP_ADD  = 4'd2,  // rd <= ra + rb
    OP_SUB  = 4'd3,  // rd <= ra - rb
    OP_SHL  = 4'd4,  // rd <= ra << imm
    OP_SRA  = 4'd5,  // rd <= ra >>> imm
    OP_ADDI = 4'd6,  // rd <= ra + imm (imm signed)
    OP_OUTL = 4'd7,  // low-pass result  <= ra
    OP_OUTH = 4'd8   // high-pass result <= ra
  } opcode_e;

  typedef struct packed {
    opcode_e          op;
    logic [2:0]       rd;
    logic [2:0]       ra;
    logic [2:0]       rb;
    logic signed [5:0] imm;
  } instr_t;

  // Length of the 1D-DWT program in instructions (slot 0 is kept free for
  // the buffers to load a new window).
  parameter int unsigned PROG_LEN = 29;

  function automatic instr_t mk(opcode_e op, logic [2:0] rd, logic [2:0] ra,
                                logic [2:0] rb, logic signed [5:0] imm);
    instr_t i;
    i.op  = op;
    i.rd  = rd;
    i.ra  = ra;
    i.rb  = rb;
    i.imm = imm;
    return i;
  endfunction

  // 1D-DWT program, one instruction per program counter value.
  function automatic instr_t dwt_program(int unsigned pc);
    case (pc)
      1:  return mk(OP_LDW , 0, 0, 0, 2);  // r0 = w2
      2:  return mk(OP_LDW , 1, 0, 0, 4);  // r1 = w4
      3:  return mk(OP_ADD , 2, 0, 1, 0);  // r2 = w2+w4
      4:  return mk(OP_SHL , 3, 2, 0, 3);
      5:  return mk(OP_ADD , 2, 2, 3, 0);  // r2 = 9*(w2+w4)
      6:  return mk(OP_LDW , 3, 0, 0, 0);
      7:  return mk(OP_LDW , 4, 0, 0, 6);  // r4 = w6
      8:  return mk(OP_ADD , 3, 3, 4, 0);  // r3 = w0+w6
      9:  return mk(OP_SUB , 2, 2, 3, 0);
      10: return mk(OP_ADDI, 2, 2, 0, 8);
      11: return mk(OP_SRA , 2, 2, 0, 4);
      12: return mk(OP_LDW , 3, 0, 0, 3);
      13: return mk(OP_SUB , 5, 3, 2, 0);  // r5 = D(j-1)
      14: return mk(OP_ADD , 2, 1, 4, 0);  // r2 = w4+w6
      15: return mk(OP_SHL , 3, 2, 0, 3);
      16: return mk(OP_ADD , 2, 2, 3, 0);
      17: return mk(OP_LDW , 3, 0, 0, 8);
      18: return mk(OP_ADD , 3, 3, 0, 0);  // r3 = w8+w2
      19: return mk(OP_SUB , 2, 2, 3, 0);
      20: return mk(OP_ADDI, 2, 2, 0, 8);
      21: return mk(OP_SRA , 2, 2, 0, 4);
      22: return mk(OP_LDW , 3, 0, 0, 5);
      23: return mk(OP_SUB , 6, 3, 2, 0);  // r6 = D(j)
      24: return mk(OP_OUTH, 0, 6, 0, 0);
      25: return mk(OP_ADD , 2, 5, 6, 0);
      26: return mk(OP_ADDI, 2, 2, 0, 1);
      27: return mk(OP_SRA , 2, 2, 0, 2);
      28: return mk(OP_ADD , 2, 1, 2, 0);  // r2 = C(j)
      29: return mk(OP_OUTL, 0, 2, 0, 0);
      default: return mk(OP_NOP, 0, 0, 0, 0);
    endcase
  endfunction

  // Bits needed for the magnitude |v| (0 for v == 0).
  function automatic logic [5:0] mag_bits(coef_t v);
    logic [COEF_W-1:0] a;
    logic [5:0] n;
    a = v[COEF_W-1] ? COEF_W'(-v) : COEF_W'(v);
    n = '0;
    for (int i = 0; i < COEF_W; i++)
      if (a[i]) n = 6'(i + 1);
    return n;
  endfunction

  // Bits needed for v in two's complement (at least 1).
  function automatic logic [5:0] tc_bits(coef_t v);
    logic [COEF_W-1:0] a;
    logic [5:0] n;
    a = v[COEF_W-1] ? ~COEF_W'(v) : COEF_W'(v);
    n = 6'd1;
    for (int i = 0; i < COEF_W; i++)
      if (a[i]) n = 6'(i + 2);
    return n;
  endfunction

endpackage
