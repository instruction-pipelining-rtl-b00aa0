// hazard_ctrl: interlock, bypass and kill/restart control of the pipeline.
//
// Combinational. It decodes the instruction registers of the decode (D),
// execute (E), memory (M) and write-back (W) stages with inst_decode and
// evaluates the design's control equations:
//
//   taken  = (opcode_E = BEQZ)·z + (opcode_E = BNEZ)·!z
//   stall  = ( ((rs_D = ws_E)·weS_E + (rs_D = ws_M)·we_M + (rs_D = ws_W)·we_W)·re1_D
//            + ((rt_D = ws_E)·we_E  + (rt_D = ws_M)·we_M + (rt_D = ws_W)·we_W)·re2_D )
//            · !taken
//   asrc   = (rs_D = ws_E)·we_bypass_E·re1_D        (ALU output -> A register)
//   IRSrc_D = nop if taken, else nop for J/JAL/JR/JALR in D, else inst memory
//   IRSrc_E = nop if taken or stall, else IR_D
//   PCSrc   = br if taken, else jabs for J/JAL, rind for JR/JALR, else pc+4
//
// The execute instruction has priority over the decode instruction: a taken
// branch kills the two younger instructions and its stall request is ignored
// because the instruction in decode is invalid.
//
// With BYPASS = 1, weS_E in the rs term is we_stall_E (LW, JAL, JALR), since
// results of ALU/ALUi instructions in E are forwarded into A. A JR/JALR in
// decode uses (rs) directly as its target, not through A, so for it weS_E is
// the full we_E; that exception is this implementation's addition, without
// which a JR right after the ALU instruction producing its target would jump
// to a stale address. With BYPASS = 0 asrc is never set and weS_E = we_E,
// the plain interlocked pipeline. The rt operand is never bypassed.
//
// BR_IN_DECODE = 1 selects the reduced-penalty variant in which BEQZ/BNEZ
// are resolved in decode by a zero detector on the register-file output
// (z_d): a taken branch then kills only the instruction being fetched, like
// a jump (IRSrc_D = nop, PCSrc = br), and branches in execute do nothing.
// Like JR, a branch in decode needs (rs) from the register file, so its rs
// term uses the full we_E (this implementation's rule). The default, 0, is
// the execute-stage resolution described above.
module hazard_ctrl
  import pipe_pkg::*;
#(
  parameter bit BYPASS       = 1'b1,
  parameter bit BR_IN_DECODE = 1'b0
) (
  input  word_t  ir_d,
  input  word_t  ir_e,
  input  word_t  ir_m,
  input  word_t  ir_w,
  input  logic   z_e,        // zero? of the ALU output in execute
  input  logic   z_d,        // zero? of register-file output rd1 (BR_IN_DECODE)
  output logic   stall,      // freeze PC and IR_D, insert a bubble into E
  output logic   asrc,       // load A from the ALU output (bypass)
  output logic   irsrc_d_nop,// load a nop into IR_D (kill the fetched instruction)
  output logic   irsrc_e_nop,// load a nop into IR_E
  output pcsrc_e pcsrc,
  output logic   br_taken,   // branch in E taken (restart at br)
  output logic   br_taken_d  // branch in D taken (BR_IN_DECODE; restart at br
                             // once the branch is not stalled)
);

  iclass_e  cls_d, cls_e;
  reg_idx_t rs_d, rt_d, ws_e, ws_m, ws_w;
  logic     re1_d, re2_d;
  logic     we_e, wb_e, wsl_e, we_m, we_w;

  // Only the signals each stage contributes to the equations are used.
  inst_decode u_dec_d (.ir(ir_d), .cls(cls_d), .rs(rs_d), .rt(rt_d), .ws(),
                       .we(), .we_bypass(), .we_stall(), .re1(re1_d), .re2(re2_d));
  inst_decode u_dec_e (.ir(ir_e), .cls(cls_e), .rs(), .rt(), .ws(ws_e),
                       .we(we_e), .we_bypass(wb_e), .we_stall(wsl_e), .re1(), .re2());
  inst_decode u_dec_m (.ir(ir_m), .cls(), .rs(), .rt(), .ws(ws_m),
                       .we(we_m), .we_bypass(), .we_stall(), .re1(), .re2());
  inst_decode u_dec_w (.ir(ir_w), .cls(), .rs(), .rt(), .ws(ws_w),
                       .we(we_w), .we_bypass(), .we_stall(), .re1(), .re2());

  logic jreg_d, jabs_d, bz_d, wes_e, stall_rs, stall_rt;

  always_comb begin
    jabs_d = cls_d inside {C_J, C_JAL};
    jreg_d = cls_d inside {C_JR, C_JALR};
    bz_d   = BR_IN_DECODE && (cls_d inside {C_BEQZ, C_BNEZ});

    br_taken   = !BR_IN_DECODE &&
                 (((cls_e == C_BEQZ) && z_e) || ((cls_e == C_BNEZ) && !z_e));
    br_taken_d = BR_IN_DECODE &&
                 (((cls_d == C_BEQZ) && z_d) || ((cls_d == C_BNEZ) && !z_d));

    // E-stage write enable seen by the rs comparison
    wes_e = (BYPASS && !jreg_d && !bz_d) ? wsl_e : we_e;

    stall_rs = (((rs_d == ws_e) && wes_e) ||
                ((rs_d == ws_m) && we_m)  ||
                ((rs_d == ws_w) && we_w)) && re1_d;
    stall_rt = (((rt_d == ws_e) && we_e) ||
                ((rt_d == ws_m) && we_m) ||
                ((rt_d == ws_w) && we_w)) && re2_d;
    stall    = (stall_rs || stall_rt) && !br_taken;

    asrc = BYPASS && (rs_d == ws_e) && wb_e && re1_d;

    irsrc_d_nop = br_taken || br_taken_d || jabs_d || jreg_d;
    irsrc_e_nop = br_taken || stall;

    if (br_taken || br_taken_d) pcsrc = PC_BR;
    else if (jabs_d)            pcsrc = PC_JABS;
    else if (jreg_d)            pcsrc = PC_RIND;
    else                        pcsrc = PC_PLUS4;
  end

endmodule
