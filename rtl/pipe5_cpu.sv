// pipe5_cpu: a five-stage in-order pipelined processor that resolves its
// hazards by interlocking, by one bypass path and by speculation.
//
// Stages and pipeline registers
//   IF  PC -> instruction memory -> (IRSrc_D mux) -> IR_D, PC_D
//   ID  IR_D -> GPR read (rd1, rd2), immediate extension
//       -> A (ASrc mux: rd1 or ALU output), B (rd2 / immediate / link),
//          MD1 (store data), IR_E (IRSrc_E mux: IR_D or nop)
//   EX  ALU(A, B) -> Y; zero? of the ALU output decides BEQZ/BNEZ;
//       MD1 -> MD2, IR_E -> IR_M
//   MA  data memory (addr = Y, wdata = MD2) -> R (load data or Y), IR_M -> IR_W
//   WB  GPR[ws_W] <= R when we_W; ws is rd, rt or r31 by opcode
//
// Hazard handling (hazard_ctrl)
//   * Data hazards: the decode instruction stalls (PC and IR_D hold, a nop
//     enters E) while a source register it reads matches the destination of
//     an uncommitted instruction in E, M or W. The result of an ALU/ALUi
//     instruction in E is forwarded from the ALU output into A, so that
//     back-to-back dependent ALU instructions do not stall (BYPASS = 1).
//     Loads, JAL and JALR in E and any producer in M or W still stall the
//     consumer, and so does any match on rt.
//   * Control hazards: the next PC is speculated to be PC+4. A J/JAL/JR/JALR
//     in decode kills the instruction being fetched (one bubble) and restarts
//     fetch at its target; a taken BEQZ/BNEZ in execute kills the
//     instructions in fetch and decode (two bubbles) and restarts at the
//     branch target. The execute-stage branch has priority and overrides a
//     stall. There are no delay slots.
//   * With BR_IN_DECODE = 1 a zero detector on the register-file output
//     resolves BEQZ/BNEZ in decode instead, so a taken branch costs one
//     bubble like a jump; the branch then waits for its rs operand like a
//     JR (no bypass reaches the detector).
//   * Store-then-load to the same address needs no interlock: the data
//     memory completes a write in the cycle of the store's MA stage.
//
// Interface: clk, rst (synchronous, active high: PC <= RESET_PC, all
// instruction registers <= nop, GPRs <= 0). prog_* writes instruction
// memory words; dbg_* read a GPR and a data-memory word. pc_o is the fetch
// PC; stall_o, bypass_o, jump_o and branch_o pulse in each cycle in which the
// pipeline stalls, uses the bypass, restarts after a jump in decode or
// restarts after a taken branch (in execute, or in decode with
// BR_IN_DECODE). retire_o/retire_ir_o show the
// instruction in write-back when it is not a bubble.
//
// Timing: one instruction per cycle without hazards; a load followed by a
// dependent instruction costs 3 bubbles (the consumer waits until the load
// has left write-back, since GPR writes are seen by reads only in the next
// cycle); a jump costs 1 bubble and a taken branch 2 (1 with BR_IN_DECODE).
// An untaken branch costs nothing.
//
// The stage structure, the control equations and the bypass follow the
// design. The opcode values, memory sizes, the link path (the return
// address travels through B and the ALU), the JR/JALR exception to the
// bypass, the reset and the load/debug ports are this implementation's.
module pipe5_cpu
  import pipe_pkg::*;
#(
  parameter bit          BYPASS       = 1'b1,
  parameter bit          BR_IN_DECODE = 1'b0,
  parameter int unsigned IMEM_DEPTH   = 256,
  parameter int unsigned DMEM_DEPTH   = 256,
  parameter word_t       RESET_PC     = '0
) (
  input  logic                          clk,
  input  logic                          rst,
  // instruction memory load port
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  word_t                         prog_data,
  // debug read ports
  input  reg_idx_t                      dbg_reg_addr,
  output word_t                         dbg_reg_data,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dbg_mem_addr,
  output word_t                         dbg_mem_data,
  // status
  output word_t                         pc_o,
  output logic                          stall_o,
  output logic                          bypass_o,
  output logic                          jump_o,
  output logic                          branch_o,
  output logic                          retire_o,
  output word_t                         retire_ir_o
);

  // ---------------------------------------------------------------- state
  word_t pc_f;                         // IF
  word_t ir_d, pc_d;                   // ID
  word_t ir_e, a_e, b_e, md1_e;        // EX
  word_t ir_m, y_m, md2_m;             // MA
  word_t ir_w, r_w;                    // WB

  // ------------------------------------------------------------- control
  logic   stall, asrc, irsrc_d_nop, irsrc_e_nop, br_taken, br_taken_d;
  pcsrc_e pcsrc;
  logic   z_e, z_d;

  hazard_ctrl #(.BYPASS(BYPASS), .BR_IN_DECODE(BR_IN_DECODE)) u_hazard (
    .ir_d, .ir_e, .ir_m, .ir_w, .z_e, .z_d,
    .stall, .asrc, .irsrc_d_nop, .irsrc_e_nop, .pcsrc, .br_taken, .br_taken_d
  );

  // ------------------------------------------------------------------- IF
  word_t inst, pc_next, link_d, rd1, rd2;

  inst_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .addr(pc_f), .inst, .prog_we, .prog_addr, .prog_data
  );

  next_pc #(.BR_IN_DECODE(BR_IN_DECODE)) u_next_pc (
    .pcsrc, .pc_f, .pc_d,
    .imm26_d(ir_d[25:0]), .imm16_e(ir_e[15:0]), .imm16_d(ir_d[15:0]), .rind(rd1),
    .pc_next, .pc_plus4(), .link(link_d)
  );

  // ------------------------------------------------------------------- ID
  reg_idx_t ws_w;
  logic     we_w;
  word_t    imm_d, b_d;

  regfile #(.NREGS(32)) u_gprs (
    .clk, .rst,
    .rs1(rs_of(ir_d)), .rs2(rt_of(ir_d)), .rd1, .rd2,
    .we(we_w), .ws(ws_w), .wd(r_w),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  // zero detector on the register-file output (used when BR_IN_DECODE = 1)
  assign z_d = (rd1 == '0);

  imm_ext u_imm (.imm16(ir_d[15:0]), .zext(imm_zext_of(ir_d)), .imm(imm_d));

  always_comb begin
    unique case (bsrc_of(ir_d))
      BSRC_IMM:  b_d = imm_d;
      BSRC_LINK: b_d = link_d;
      default:   b_d = rd2;
    endcase
  end

  // ------------------------------------------------------------------- EX
  word_t alu_y;

  alu u_alu (.op(alu_op_of(ir_e)), .a(a_e), .b(b_e), .y(alu_y), .zero(z_e));

  // ------------------------------------------------------------------- MA
  word_t    rdata;
  iclass_e  cls_m;
  assign cls_m = classify(ir_m);

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .we(cls_m == C_SW), .addr(y_m), .wdata(md2_m), .rdata,
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  // ------------------------------------------------------------------- WB
  // ws mux (rd / rt / r31) and write enable of the write-back instruction
  inst_decode u_dec_w (
    .ir(ir_w), .cls(), .rs(), .rt(), .ws(ws_w),
    .we(we_w), .we_bypass(), .we_stall(), .re1(), .re2()
  );

  // ------------------------------------------------------ pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_f  <= RESET_PC;
      ir_d  <= NOP;
      pc_d  <= RESET_PC;
      ir_e  <= NOP;
      a_e   <= '0;
      b_e   <= '0;
      md1_e <= '0;
      ir_m  <= NOP;
      y_m   <= '0;
      md2_m <= '0;
      ir_w  <= NOP;
      r_w   <= '0;
    end else begin
      if (!stall) begin
        pc_f <= pc_next;
        ir_d <= irsrc_d_nop ? NOP : inst;
        pc_d <= pc_f;
      end
      ir_e  <= irsrc_e_nop ? NOP : ir_d;
      a_e   <= asrc ? alu_y : rd1;
      b_e   <= b_d;
      md1_e <= rd2;
      ir_m  <= ir_e;
      y_m   <= alu_y;
      md2_m <= md1_e;
      ir_w  <= ir_m;
      r_w   <= (cls_m == C_LW) ? rdata : y_m;
    end
  end

  // ----------------------------------------------------------- assertions
  // A taken branch in execute overrides any stall request from decode.
  a_branch_beats_stall: assert property (@(posedge clk) disable iff (rst)
    !(stall && br_taken));
  // A stall holds PC and IR_D and sends a bubble into execute.
  a_stall_bubble: assert property (@(posedge clk) disable iff (rst)
    stall |=> (ir_e == NOP) && $stable(pc_f) && $stable(ir_d));
  // A taken branch leaves bubbles in decode and execute.
  a_branch_kills: assert property (@(posedge clk) disable iff (rst)
    br_taken |=> (ir_d == NOP) && (ir_e == NOP));

  // --------------------------------------------------------------- status
  assign pc_o        = pc_f;
  assign stall_o     = stall;
  assign bypass_o    = asrc && !irsrc_e_nop;
  assign jump_o      = (pcsrc inside {PC_JABS, PC_RIND}) && !stall;
  assign branch_o    = br_taken || (br_taken_d && !stall);
  assign retire_o    = (ir_w != NOP);
  assign retire_ir_o = ir_w;

endmodule
