// pipe_pkg: instruction set constants, field helpers and the control
// decode functions shared by the five-stage pipeline.
//
// The instruction formats follow the three formats of the design:
//   R-type  op[31:26] rs[25:21] rt[20:16] rd[15:11] (unused)[10:6] func[5:0]
//   I-type  op[31:26] rs[25:21] rt[20:16] immediate16[15:0]
//   J-type  op[31:26] immediate26[25:0]
// The field positions and the source/destination register of each
// instruction class (ALU, ALUi, LW, SW, BEQZ/BNEZ, J, JAL, JR, JALR) are the
// design's. The numeric opcode and function codes are this implementation's
// choice (DLX-style values); any other unique assignment works as well.
// Branch and jump offsets are byte offsets added to the address of the next
// instruction (a J 200 at address 100 goes to 304).
package pipe_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Opcodes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQZ  = 6'h04;
  localparam logic [5:0] OP_BNEZ  = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_JR    = 6'h12;
  localparam logic [5:0] OP_JALR  = 6'h13;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes (bits 5:0)
  localparam logic [5:0] F_ADD = 6'h20;
  localparam logic [5:0] F_SUB = 6'h22;
  localparam logic [5:0] F_AND = 6'h24;
  localparam logic [5:0] F_OR  = 6'h25;
  localparam logic [5:0] F_XOR = 6'h26;
  localparam logic [5:0] F_SLT = 6'h2A;

  // The bubble inserted on a stall or a kill: an R-type with rd = r0, which
  // writes nothing because its write enable requires ws != 0.
  localparam word_t NOP = '0;

  // Instruction classes of the source/destination table.
  typedef enum logic [3:0] {
    C_NONE, C_ALU, C_ALUI, C_LW, C_SW, C_BEQZ, C_BNEZ, C_J, C_JAL, C_JR, C_JALR
  } iclass_e;

  // Next-PC selection of the PCSrc mux.
  typedef enum logic [1:0] {PC_PLUS4, PC_JABS, PC_RIND, PC_BR} pcsrc_e;

  // Operand B selection (B-register mux in the decode stage).
  typedef enum logic [1:0] {BSRC_RD2, BSRC_IMM, BSRC_LINK} bsrc_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_PASSA, ALU_PASSB
  } alu_op_e;

  function automatic logic [5:0] op_of(word_t ir);   return ir[31:26]; endfunction
  function automatic reg_idx_t   rs_of(word_t ir);   return ir[25:21]; endfunction
  function automatic reg_idx_t   rt_of(word_t ir);   return ir[20:16]; endfunction
  function automatic reg_idx_t   rd_of(word_t ir);   return ir[15:11]; endfunction
  function automatic logic [5:0] func_of(word_t ir); return ir[5:0];   endfunction

  function automatic iclass_e classify(word_t ir);
    case (op_of(ir))
      OP_RTYPE:                               return C_ALU;
      OP_ADDI, OP_SLTI, OP_ANDI, OP_ORI, OP_XORI: return C_ALUI;
      OP_LW:                                  return C_LW;
      OP_SW:                                  return C_SW;
      OP_BEQZ:                                return C_BEQZ;
      OP_BNEZ:                                return C_BNEZ;
      OP_J:                                   return C_J;
      OP_JAL:                                 return C_JAL;
      OP_JR:                                  return C_JR;
      OP_JALR:                                return C_JALR;
      default:                                return C_NONE;
    endcase
  endfunction

  // ALU operation of an instruction in the execute stage.
  function automatic alu_op_e alu_op_of(word_t ir);
    case (classify(ir))
      C_ALU:
        case (func_of(ir))
          F_SUB:   return ALU_SUB;
          F_AND:   return ALU_AND;
          F_OR:    return ALU_OR;
          F_XOR:   return ALU_XOR;
          F_SLT:   return ALU_SLT;
          default: return ALU_ADD;
        endcase
      C_ALUI:
        case (op_of(ir))
          OP_SLTI: return ALU_SLT;
          OP_ANDI: return ALU_AND;
          OP_ORI:  return ALU_OR;
          OP_XORI: return ALU_XOR;
          default: return ALU_ADD;
        endcase
      C_BEQZ, C_BNEZ:  return ALU_PASSA;  // zero? test on (rs)
      C_JAL, C_JALR:   return ALU_PASSB;  // link value travels in B
      default:         return ALU_ADD;    // LW/SW address, bubbles
    endcase
  endfunction

  // Source of the B operand, chosen in the decode stage.
  function automatic bsrc_e bsrc_of(word_t ir);
    case (classify(ir))
      C_ALUI, C_LW, C_SW: return BSRC_IMM;
      C_JAL, C_JALR:      return BSRC_LINK;
      default:            return BSRC_RD2;
    endcase
  endfunction

  // Logical immediates are zero-extended, all others sign-extended.
  function automatic logic imm_zext_of(word_t ir);
    return op_of(ir) inside {OP_ANDI, OP_ORI, OP_XORI};
  endfunction

  // Instruction encoders (for programs built in SystemVerilog).
  function automatic word_t enc_r(logic [5:0] func, reg_idx_t rd, reg_idx_t rs, reg_idx_t rt);
    return {OP_RTYPE, rs, rt, rd, 5'd0, func};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, reg_idx_t rt, reg_idx_t rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic word_t enc_j(logic [5:0] op, logic [25:0] imm);
    return {op, imm};
  endfunction

endpackage
