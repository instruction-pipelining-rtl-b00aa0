// tb_hazard_ctrl: self-checking test of the stall, bypass and kill/restart
// control.
// Three instances are driven with the same four instruction registers: one
// with the bypass (BYPASS = 1), one without (BYPASS = 0), and one with the
// bypass and branches resolved in decode (BR_IN_DECODE = 1). Directed cases
// replay the design's examples (ALU->ALU dependence, load->use, JAL->use of
// r31, taken branch over a stalled decode instruction, jumps); random
// instruction mixes over a few registers then compare every output with a
// reference model of the control equations written out here.
module tb_hazard_ctrl;
  import pipe_pkg::*;

  logic   clk = 1'b0;
  word_t  ir_d, ir_e, ir_m, ir_w;
  logic   z_e, z_d;
  logic   stall2, asrc2, dnop2, enop2, taken2, tkd2, tkd1, tkd0;
  pcsrc_e pcsrc2;
  logic   stall1, asrc1, dnop1, enop1, taken1;
  logic   stall0, asrc0, dnop0, enop0, taken0;
  pcsrc_e pcsrc1, pcsrc0;
  int     checks = 0, failures = 0;
  int     n_stall = 0, n_asrc = 0, n_taken = 0;

  hazard_ctrl #(.BYPASS(1'b1)) dut1 (.ir_d, .ir_e, .ir_m, .ir_w, .z_e, .z_d, .stall(stall1),
    .asrc(asrc1), .irsrc_d_nop(dnop1), .irsrc_e_nop(enop1), .pcsrc(pcsrc1), .br_taken(taken1),
    .br_taken_d(tkd1));
  hazard_ctrl #(.BYPASS(1'b0)) dut0 (.ir_d, .ir_e, .ir_m, .ir_w, .z_e, .z_d, .stall(stall0),
    .asrc(asrc0), .irsrc_d_nop(dnop0), .irsrc_e_nop(enop0), .pcsrc(pcsrc0), .br_taken(taken0),
    .br_taken_d(tkd0));
  hazard_ctrl #(.BYPASS(1'b1), .BR_IN_DECODE(1'b1)) dut2 (.ir_d, .ir_e, .ir_m, .ir_w, .z_e, .z_d,
    .stall(stall2), .asrc(asrc2), .irsrc_d_nop(dnop2), .irsrc_e_nop(enop2), .pcsrc(pcsrc2),
    .br_taken(taken2), .br_taken_d(tkd2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic [4:0] ws;
    logic we, wb, wsl, re1, re2;
  } dec_t;

  function automatic dec_t dec(word_t x);
    dec_t d;
    d = '0;
    case (x[31:26])
      6'h00: begin d.ws = x[15:11]; d.wb = d.ws != 0; d.re1 = 1; d.re2 = 1; end
      6'h08, 6'h0A, 6'h0C, 6'h0D, 6'h0E: begin d.ws = x[20:16]; d.wb = d.ws != 0; d.re1 = 1; end
      6'h23: begin d.ws = x[20:16]; d.wsl = d.ws != 0; d.re1 = 1; end
      6'h2B: begin d.re1 = 1; d.re2 = 1; end
      6'h04, 6'h05, 6'h12: d.re1 = 1;
      6'h03: begin d.ws = 31; d.wsl = 1; end
      6'h13: begin d.ws = 31; d.wsl = 1; d.re1 = 1; end
      default: ;
    endcase
    d.we = d.wb | d.wsl;
    return d;
  endfunction

  task automatic check_ref(bit byp, bit brd, logic st, logic as, logic dn, logic en, pcsrc_e ps,
                           logic tk, logic tkd);
    dec_t dd, de, dm, dw;
    logic [4:0] rs, rt;
    logic taken, takend, weS, e_st, e_as, jreg, jabs, bzd;
    pcsrc_e e_ps;
    dd = dec(ir_d); de = dec(ir_e); dm = dec(ir_m); dw = dec(ir_w);
    rs = ir_d[25:21]; rt = ir_d[20:16];
    jabs = ir_d[31:26] inside {6'h02, 6'h03};
    jreg = ir_d[31:26] inside {6'h12, 6'h13};
    bzd  = brd && (ir_d[31:26] inside {6'h04, 6'h05});
    taken  = !brd && ((ir_e[31:26] == 6'h04 && z_e) || (ir_e[31:26] == 6'h05 && !z_e));
    takend = brd && ((ir_d[31:26] == 6'h04 && z_d) || (ir_d[31:26] == 6'h05 && !z_d));
    weS = (byp && !jreg && !bzd) ? de.wsl : de.we;
    e_st = ((((rs == de.ws) && weS) || ((rs == dm.ws) && dm.we) || ((rs == dw.ws) && dw.we)) && dd.re1 ||
            (((rt == de.ws) && de.we) || ((rt == dm.ws) && dm.we) || ((rt == dw.ws) && dw.we)) && dd.re2)
           && !taken;
    e_as = byp && (rs == de.ws) && de.wb && dd.re1;
    e_ps = (taken || takend) ? PC_BR : jabs ? PC_JABS : jreg ? PC_RIND : PC_PLUS4;
    checks++;
    if (st !== e_st || as !== e_as || tk !== taken || tkd !== takend ||
        dn !== (taken || takend || jabs || jreg) ||
        en !== (taken || e_st) || ps !== e_ps) begin
      failures++;
      $display("FAIL byp=%0d brd=%0d D=%h E=%h M=%h W=%h z=%b: stall %b/%b asrc %b/%b taken %b/%b pcsrc %0d/%0d",
               byp, brd, ir_d, ir_e, ir_m, ir_w, z_e, st, e_st, as, e_as, tk, taken, ps, e_ps);
    end
  endtask

  task automatic apply(word_t d, word_t e, word_t m, word_t w, logic z, logic zd = 1'b0);
    ir_d = d; ir_e = e; ir_m = m; ir_w = w; z_e = z; z_d = zd;
    @(posedge clk);
    check_ref(1'b1, 1'b0, stall1, asrc1, dnop1, enop1, pcsrc1, taken1, tkd1);
    check_ref(1'b0, 1'b0, stall0, asrc0, dnop0, enop0, pcsrc0, taken0, tkd0);
    check_ref(1'b1, 1'b1, stall2, asrc2, dnop2, enop2, pcsrc2, taken2, tkd2);
    n_stall += int'(stall1); n_asrc += int'(asrc1); n_taken += int'(taken1);
  endtask

  task automatic expect1(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b expected %b", what, got, exp);
    end
  endtask

  function automatic reg_idx_t rr();
    logic [2:0] k = 3'($urandom);
    return (k == 3'd7) ? 5'd31 : 5'(k % 4);
  endfunction

  function automatic word_t rand_ir();
    logic [5:0] ops [15] = '{6'h00, 6'h00, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h0A,
                             6'h0C, 6'h12, 6'h13, 6'h23, 6'h23, 6'h2B, 6'h3F};
    logic [5:0] op = ops[$urandom_range(0, 14)];
    return {op, rr(), rr(), rr(), 5'd0, F_ADD};
  endfunction

  initial begin
    // r4 <- r1 + 17 in D, r1 <- r0 + 10 in E: bypass, no stall
    apply(enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17), enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10), NOP, NOP, 1'b0);
    expect1("alu->alu bypass", asrc1, 1'b1);
    expect1("alu->alu no stall", stall1, 1'b0);
    expect1("alu->alu stall without bypass", stall0, 1'b1);
    // same dependence one and two stages further: stall in both configurations
    apply(enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17), NOP, enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10), NOP, 1'b0);
    expect1("dep in M", stall1, 1'b1);
    apply(enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17), NOP, NOP, enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10), 1'b0);
    expect1("dep in W", stall1, 1'b1);
    // r1 <- M[r0+10] in E: no bypass, stall
    apply(enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17), enc_i(OP_LW, 5'd1, 5'd0, 16'd10), NOP, NOP, 1'b0);
    expect1("load-use stall", stall1, 1'b1);
    expect1("load-use no bypass", asrc1, 1'b0);
    // JAL 500 in E, r4 <- r31 + 17 in D: stall
    apply(enc_i(OP_ADDI, 5'd4, 5'd31, 16'd17), enc_j(OP_JAL, 26'd500), NOP, NOP, 1'b0);
    expect1("jal-use stall", stall1, 1'b1);
    // rt operand is never bypassed
    apply(enc_r(F_ADD, 5'd4, 5'd2, 5'd1), enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10), NOP, NOP, 1'b0);
    expect1("rt dependence stalls", stall1, 1'b1);
    // JR whose target is being computed in E must stall
    apply(enc_i(OP_JR, 5'd0, 5'd1, 16'd0), enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10), NOP, NOP, 1'b0);
    expect1("jr waits for target", stall1, 1'b1);
    // BEQZ taken in E overrides a stall of the decode instruction
    apply(enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17), enc_i(OP_BEQZ, 5'd0, 5'd2, 16'd200), enc_i(OP_LW, 5'd1, 5'd0, 16'd0), NOP, 1'b1);
    expect1("taken beqz", taken1, 1'b1);
    expect1("taken overrides stall", stall1, 1'b0);
    expect1("taken kills D", dnop1, 1'b1);
    expect1("taken kills E", enop1, 1'b1);
    // BNEZ not taken when zero
    apply(NOP, enc_i(OP_BNEZ, 5'd0, 5'd2, 16'd200), NOP, NOP, 1'b1);
    expect1("bnez not taken", taken1, 1'b0);
    // branch resolved in decode: taken BEQZ kills only the fetched instruction
    apply(enc_i(OP_BEQZ, 5'd0, 5'd2, 16'd8), NOP, NOP, NOP, 1'b0, 1'b1);
    expect1("decode branch taken", tkd2, 1'b1);
    expect1("decode branch kills fetch", dnop2, 1'b1);
    expect1("decode branch leaves E", enop2, 1'b0);
    // ... and waits for an ALU result in E (no bypass into the detector)
    apply(enc_i(OP_BEQZ, 5'd0, 5'd2, 16'd8), enc_i(OP_ADDI, 5'd2, 5'd0, 16'd1), NOP, NOP, 1'b0, 1'b1);
    expect1("decode branch waits for rs", stall2, 1'b1);
    // J in D: kill fetch, restart at jabs
    apply(enc_j(OP_J, 26'd200), NOP, NOP, NOP, 1'b0);
    expect1("J kills fetch", dnop1, 1'b1);
    checks++;
    if (pcsrc1 !== PC_JABS) begin failures++; $display("FAIL J pcsrc"); end
    // random mixes
    for (int n = 0; n < 20000; n++)
      apply(rand_ir(), rand_ir(), rand_ir(), rand_ir(), 1'($urandom), 1'($urandom));
    $display("events: stall=%0d bypass=%0d taken=%0d", n_stall, n_asrc, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
