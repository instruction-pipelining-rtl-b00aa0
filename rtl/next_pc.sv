// next_pc: next-PC datapath of the fetch stage.
//
// Combinational. Four candidate addresses feed the PCSrc mux:
//   pc+4 : pc_f + 4, the speculative guess used for every instruction
//   jabs : pc_f + sign-extended imm26 of the J/JAL in decode. While a jump is
//          in decode the fetch PC is already that jump's address + 4, so
//          this is "PC of next instruction + offset".
//   rind : the register value (rs) read for a JR/JALR in decode
//   br   : pc_d + sign-extended imm16 of the BEQZ/BNEZ in execute. While the
//          branch is in execute, the decode-stage PC register holds the
//          branch's address + 4.
// With BR_IN_DECODE = 1 (branches resolved in decode) the branch is still
// in decode when it redirects, so br = pc_f + imm16 of the decode
// instruction (imm16_d) instead, the same arithmetic as jabs.
// It also returns link = pc_d + 4, the return address a JAL/JALR in decode
// writes to r31. Offsets are in bytes. The four inputs and the adders follow
// the design's fetch datapath; the link output is this implementation's.
module next_pc
  import pipe_pkg::*;
#(
  parameter bit BR_IN_DECODE = 1'b0
) (
  input  pcsrc_e      pcsrc,
  input  word_t       pc_f,      // PC register (fetch stage)
  input  word_t       pc_d,      // PC of the instruction in decode
  input  logic [25:0] imm26_d,   // offset of J/JAL in decode
  input  logic [15:0] imm16_e,   // offset of BEQZ/BNEZ in execute
  input  logic [15:0] imm16_d,   // offset of BEQZ/BNEZ in decode (BR_IN_DECODE)
  input  word_t       rind,      // (rs) of JR/JALR in decode
  output word_t       pc_next,
  output word_t       pc_plus4,
  output word_t       link
);

  word_t jabs, br;

  assign pc_plus4 = pc_f + word_t'(4);
  assign jabs     = pc_f + {{(XLEN-26){imm26_d[25]}}, imm26_d};
  assign br       = BR_IN_DECODE ? pc_f + {{(XLEN-16){imm16_d[15]}}, imm16_d}
                                 : pc_d + {{(XLEN-16){imm16_e[15]}}, imm16_e};
  assign link     = pc_d + word_t'(4);

  always_comb begin
    unique case (pcsrc)
      PC_JABS: pc_next = jabs;
      PC_RIND: pc_next = rind;
      PC_BR:   pc_next = br;
      default: pc_next = pc_plus4;
    endcase
  end

endmodule
