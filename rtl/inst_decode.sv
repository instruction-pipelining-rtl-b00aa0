// inst_decode: the per-stage control decode of one instruction register.
//
// Combinational. From an IR it derives the signals the interlock and bypass
// logic compare across stages, exactly as the design's decode tables give
// them:
//   ws  (C_dest): ALU -> rd; ALUi, LW -> rt; JAL, JALR -> r31
//   we          : ALU, ALUi, LW -> (ws != 0); JAL, JALR -> on; else off
//   we_bypass   : ALU, ALUi -> (ws != 0); else off   (result ready in EX)
//   we_stall    : LW -> (ws != 0); JAL, JALR -> on; else off
//   re1 (C_re)  : ALU, ALUi, LW, SW, BZ, JR, JALR -> on; J, JAL -> off
//   re2         : ALU, SW -> on; else off
// we = we_bypass | we_stall. It also returns the instruction class and the
// rs/rt fields. ws is 0 for instructions that write nothing (this
// implementation's choice; it is never used then because we is off).
// Unknown opcodes decode like a bubble: they read and write nothing.
module inst_decode
  import pipe_pkg::*;
(
  input  word_t    ir,
  output iclass_e  cls,
  output reg_idx_t rs,
  output reg_idx_t rt,
  output reg_idx_t ws,
  output logic     we,
  output logic     we_bypass,
  output logic     we_stall,
  output logic     re1,
  output logic     re2
);

  always_comb begin
    cls = classify(ir);
    rs  = rs_of(ir);
    rt  = rt_of(ir);

    unique case (cls)
      C_ALU:          ws = rd_of(ir);
      C_ALUI, C_LW:   ws = rt_of(ir);
      C_JAL, C_JALR:  ws = 5'd31;
      default:        ws = '0;
    endcase

    we_bypass = (cls inside {C_ALU, C_ALUI}) && (ws != '0);
    we_stall  = ((cls == C_LW) && (ws != '0)) || (cls inside {C_JAL, C_JALR});
    we        = we_bypass || we_stall;

    re1 = cls inside {C_ALU, C_ALUI, C_LW, C_SW, C_BEQZ, C_BNEZ, C_JR, C_JALR};
    re2 = cls inside {C_ALU, C_SW};
  end

endmodule
