// tb_pipe5_brdecode: end-to-end test of the pipeline built with branches
// resolved in decode (BR_IN_DECODE = 1, bypass on).
//
// It runs the same directed program and random programs as tb_pipe5_cpu
// against the same instruction-set reference model. The expected timing
// differs only for taken branches: they now behave like jumps, killing just
// the instruction being fetched, so the branch target retires 2 cycles
// after the branch instead of 3. Random programs also contain branches
// whose rs is produced just before them, which must wait in decode.
module tb_pipe5_brdecode;
  import pipe_pkg::*;
  `include "pipe5_iss.svh"

  localparam int unsigned IMEM_DEPTH = 256;
  localparam int unsigned DMEM_DEPTH = 256;
  localparam word_t       HALT       = {OP_J, 26'h3FF_FFFC};   // J -4: jump to itself
  localparam word_t       FILL       = {OP_ADDI, 5'd0, 5'd0, 16'd1}; // writes r0: no effect

  logic     clk = 1'b0, rst = 1'b1;
  logic     prog_we = 1'b0;
  logic [7:0] prog_addr = '0;
  word_t    prog_data = '0;
  reg_idx_t dbg_reg_addr = '0;
  word_t    dbg_reg_data, dbg_mem_data, pc_o, retire_ir_o;
  logic [7:0] dbg_mem_addr = '0;
  logic     stall_o, bypass_o, jump_o, branch_o, retire_o;

  pipe5_cpu #(.BR_IN_DECODE(1'b1)) dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data,
    .pc_o, .stall_o, .bypass_o, .jump_o, .branch_o, .retire_o, .retire_ir_o
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_stall = 0, n_bypass = 0, n_jump = 0, n_branch = 0;
  bit halted = 1'b0;
  word_t  ret_ir [$];
  longint ret_cyc [$];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && !halted) begin
      n_stall  += int'(stall_o);
      n_bypass += int'(bypass_o);
      n_jump   += int'(jump_o);
      n_branch += int'(branch_o);
      if (retire_o) begin
        ret_ir.push_back(retire_ir_o);
        ret_cyc.push_back(cycle);
        if (retire_ir_o == HALT) halted <= 1'b1;
      end
    end
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  // load a program (rest of memory filled with HALT), reset, run to HALT
  task automatic run(const ref word_t prog[$], input int max_cycles);
    rst = 1'b1;
    for (int i = 0; i < int'(IMEM_DEPTH); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 8'(i);
      prog_data = (i < prog.size()) ? prog[i] : HALT;
    end
    @(negedge clk);
    prog_we = 1'b0;
    ret_ir.delete(); ret_cyc.delete();
    halted = 1'b0;
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < max_cycles && !halted; c++) @(negedge clk);
    checks++;
    if (!halted) begin
      failures++;
      $display("FAIL program did not reach HALT");
    end
    @(negedge clk);
  endtask

  function automatic longint retired_at(word_t x);
    foreach (ret_ir[i]) if (ret_ir[i] == x) return ret_cyc[i];
    return -1000;
  endfunction

  function automatic bit retired(word_t x);
    foreach (ret_ir[i]) if (ret_ir[i] == x) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_gap(string what, word_t first, word_t second, int exp);
    longint g = retired_at(second) - retired_at(first);
    checks++;
    if (g != exp) begin
      failures++;
      $display("FAIL %s: retirement distance %0d, expected %0d", what, g, exp);
    end
  endtask

  task automatic check_reg(int r, word_t exp);
    dbg_reg_addr = 5'(r);
    #1 check($sformatf("r%0d", r), dbg_reg_data, exp);
  endtask

  // compare DUT state and retirement order with the reference model
  task automatic compare_with_iss(const ref word_t prog[$], input string tag);
    int k = 0;
    word_t x;
    int mism = 0;
    iss_reset();
    forever begin
      x = (iss_pc < 4 * prog.size()) ? prog[iss_pc >> 2] : HALT;
      if (k >= ret_ir.size() || ret_ir[k] !== x) mism++;
      k++;
      if (x == HALT || k > 5000) break;
      iss_step(x);
    end
    checks++;
    if (mism != 0 || k != ret_ir.size()) begin
      failures++;
      $display("FAIL %s: retirement order differs (%0d mismatches, %0d vs %0d)", tag, mism, k, ret_ir.size());
    end
    for (int r = 0; r < 32; r++) check_reg(r, iss_reg[r]);
    foreach (iss_mem[a]) begin
      dbg_mem_addr = 8'(a);
      #1 check($sformatf("%s mem[%0d]", tag, a), dbg_mem_data, iss_mem[a]);
    end
  endtask

  // ------------------------------------------------------------ part 1
  word_t p[$];
  word_t a1, a2, s, l, u, j, t, jj, t2, b, t3, bn, n1, jr, t4, jalr, t5, a18, jr2, t6, lw2, b2, t7;

  function automatic void emit(word_t x); p.push_back(x); endfunction
  function automatic void fills(int n); repeat (n) p.push_back(FILL); endfunction

  task automatic directed();
    int st0, by0, ju0, br0;
    p.delete();
    a1  = enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10);     emit(a1);   // r1 <- r0 + 10
    a2  = enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17);     emit(a2);   // r4 <- r1 + 17
    fills(3);
    emit(enc_i(OP_ADDI, 5'd2, 5'd0, 16'd8));
    emit(enc_i(OP_ADDI, 5'd3, 5'd0, 16'd12));
    fills(3);
    s   = enc_i(OP_SW, 5'd4, 5'd2, 16'd4);        emit(s);    // M[(r2)+4] <- r4
    l   = enc_i(OP_LW, 5'd6, 5'd3, 16'd0);        emit(l);    // r6 <- M[(r3)+0], same word
    u   = enc_i(OP_ADDI, 5'd7, 5'd6, 16'd1);      emit(u);    // load-use
    fills(3);
    j   = enc_j(OP_JAL, 26'd8);                   emit(j);    // index 16
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd99));
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd98));
    t   = enc_i(OP_ADDI, 5'd10, 5'd31, 16'd17);   emit(t);    // index 19
    fills(3);
    jj  = enc_j(OP_J, 26'd4);                     emit(jj);   // index 23
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd77));
    t2  = enc_i(OP_ADDI, 5'd11, 5'd0, 16'd5);     emit(t2);   // index 25
    fills(3);
    b   = enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd8);      emit(b);    // index 29, taken
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd66));
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd65));
    t3  = enc_i(OP_ADDI, 5'd12, 5'd0, 16'd6);     emit(t3);   // index 32
    bn  = enc_i(OP_BNEZ, 5'd0, 5'd0, 16'd8);      emit(bn);   // not taken
    n1  = enc_i(OP_ADDI, 5'd13, 5'd0, 16'd7);     emit(n1);
    emit(enc_i(OP_ADDI, 5'd14, 5'd0, 16'd164));               // index 35: &t4
    fills(3);
    jr  = enc_i(OP_JR, 5'd0, 5'd14, 16'd0);       emit(jr);   // index 39
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd55));
    t4  = enc_i(OP_ADDI, 5'd15, 5'd0, 16'd9);     emit(t4);   // index 41
    emit(enc_i(OP_ADDI, 5'd16, 5'd0, 16'd192));               // &t5
    fills(3);
    jalr = enc_i(OP_JALR, 5'd0, 5'd16, 16'd0);    emit(jalr); // index 46
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd44));
    t5  = enc_i(OP_ADDI, 5'd17, 5'd0, 16'd1);     emit(t5);   // index 48
    a18 = enc_i(OP_ADDI, 5'd18, 5'd0, 16'd208);   emit(a18);  // &t6
    jr2 = enc_i(OP_JR, 5'd0, 5'd18, 16'd0);       emit(jr2);  // index 50
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd33));
    t6  = enc_i(OP_ADDI, 5'd19, 5'd0, 16'd3);     emit(t6);   // index 52
    fills(3);
    lw2 = enc_i(OP_LW, 5'd21, 5'd3, 16'd0);       emit(lw2);  // index 56
    b2  = enc_i(OP_BEQZ, 5'd1, 5'd0, 16'd8);      emit(b2);   // taken (rt unused)
    emit(enc_i(OP_ADDI, 5'd22, 5'd21, 16'd1));                // would stall; killed
    emit(enc_i(OP_ADDI, 5'd8, 5'd0, 16'd22));
    t7  = enc_i(OP_ADDI, 5'd23, 5'd0, 16'd4);     emit(t7);   // index 60
    fills(3);
    emit(HALT);

    st0 = n_stall; by0 = n_bypass; ju0 = n_jump; br0 = n_branch;
    run(p, 2000);

    check_gap("ALU->ALU with bypass", a1, a2, 1);
    check_gap("store then load, same word", s, l, 1);
    check_gap("load-use interlock", l, u, 4);
    check_gap("JAL then use of r31", j, t, 4);
    check_gap("J restart", jj, t2, 2);
    check_gap("taken BEQZ restart", b, t3, 2);
    check_gap("untaken BNEZ", bn, n1, 1);
    check_gap("JR restart", jr, t4, 2);
    check_gap("JALR restart", jalr, t5, 2);
    check_gap("JR waits for its target", a18, jr2, 4);
    check_gap("JR restart after wait", jr2, t6, 2);
    check_gap("taken branch over stalled decode", b2, t7, 2);
    check("stall cycles", n_stall - st0, 8);
    check("bypass uses", n_bypass - by0, 1);
    check("taken branches", n_branch - br0, 2);
    checks++;
    if (n_jump - ju0 < 5) begin failures++; $display("FAIL jump restarts %0d", n_jump - ju0); end

    check_reg(1, 10);   check_reg(2, 8);    check_reg(3, 12);  check_reg(4, 27);
    check_reg(6, 27);   check_reg(7, 28);   check_reg(8, 0);   check_reg(10, 68 + 17);
    check_reg(11, 5);   check_reg(12, 6);   check_reg(13, 7);  check_reg(15, 9);
    check_reg(17, 1);   check_reg(19, 3);   check_reg(21, 27); check_reg(22, 0);
    check_reg(23, 4);   check_reg(31, 188);
    dbg_mem_addr = 8'd3;
    #1 check("M[12]", dbg_mem_data, 27);
    compare_with_iss(p, "directed");
  endtask

  // ------------------------------------------------------------ part 2
  function automatic reg_idx_t rsrc();
    int k = $urandom_range(0, 7);
    return (k == 7) ? 5'd31 : 5'(k);
  endfunction

  task automatic random_program(int seed_no, int n);
    logic [5:0] f [6] = '{F_ADD, F_SUB, F_AND, F_OR, F_XOR, F_SLT};
    logic [5:0] oi [5] = '{OP_ADDI, OP_SLTI, OP_ANDI, OP_ORI, OP_XORI};
    int left;
    p.delete();
    // clear the data words the program may touch: byte addresses 0..252
    for (int w = 0; w < 64; w++) emit(enc_i(OP_SW, 5'd0, 5'd0, 16'(4 * w)));
    emit(enc_i(OP_ADDI, 5'd7, 5'd0, 16'd64));   // r7: base address, never rewritten
    for (int i = 0; i < n; i++) begin
      left = n - 1 - i;
      case ($urandom_range(0, 11))
        0, 1, 2: emit(enc_r(f[$urandom_range(0, 5)], 5'($urandom_range(1, 6)), rsrc(), rsrc()));
        3, 4:    emit(enc_i(oi[$urandom_range(0, 4)], 5'($urandom_range(1, 6)), rsrc(), 16'($urandom)));
        5, 6:    emit(enc_i(OP_LW, 5'($urandom_range(1, 6)), $urandom_range(0, 1) ? 5'd7 : 5'd0,
                            16'(4 * $urandom_range(0, 47))));
        7, 8:    emit(enc_i(OP_SW, rsrc(), $urandom_range(0, 1) ? 5'd7 : 5'd0,
                            16'(4 * $urandom_range(0, 47))));
        9, 10:   emit(enc_i($urandom_range(0, 1) ? OP_BEQZ : OP_BNEZ, 5'd0, rsrc(),
                            16'(4 * $urandom_range(0, left < 3 ? left : 3))));
        default: emit(enc_j($urandom_range(0, 1) ? OP_J : OP_JAL,
                            26'(4 * $urandom_range(0, left < 2 ? left : 2))));
      endcase
    end
    emit(HALT);
    run(p, 20 * p.size() + 100);
    compare_with_iss(p, $sformatf("random %0d", seed_no));
  endtask

  initial begin
    @(negedge clk);
    directed();
    for (int k = 0; k < 20; k++) random_program(k, 100);
    $display("events: stall=%0d bypass=%0d jump=%0d branch=%0d", n_stall, n_bypass, n_jump, n_branch);
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL no stall happened");  end
    checks++; if (n_bypass == 0) begin failures++; $display("FAIL no bypass happened"); end
    checks++; if (n_jump == 0)   begin failures++; $display("FAIL no jump restart");    end
    checks++; if (n_branch == 0) begin failures++; $display("FAIL no branch restart");  end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
