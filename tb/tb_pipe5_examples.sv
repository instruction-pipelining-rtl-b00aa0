// tb_pipe5_examples: runs the pipeline's textbook instruction sequences at
// their own addresses on the default configuration and checks the timing
// of each against its pipeline diagram.
//
//   jump:    096 ADD; 100 J 200; 104 ADD (killed); 304 ADD
//            I1 and I2 retire in consecutive cycles, I4 two cycles after I2.
//   branch:  096 ADD; 100 BEQZ r1 200 (r1 = 0, taken); 104 ADD and
//            108 (killed); 304 ADD. I5 retires three cycles after I2.
//   JAL:     100 JAL 500; 604 r4 <- r31 + 17. The use of r31 cannot be
//            bypassed: it retires four cycles after the JAL; r4 = 104 + 17.
//   stall:   r1 <- r0 + 10; r4 <- r1 + 17 with the bypass: one cycle apart.
// The rest of instruction memory holds r0-writing fillers before the
// sequence and "J -4" (a jump to itself) after it, which ends the run.
module tb_pipe5_examples;
  import pipe_pkg::*;

  localparam word_t HALT = {OP_J, 26'h3FF_FFFC};
  localparam word_t FILL = {OP_ADDI, 5'd0, 5'd0, 16'd1};

  logic       clk = 1'b0, rst = 1'b1;
  logic       prog_we = 1'b0;
  logic [7:0] prog_addr = '0;
  word_t      prog_data = '0;
  reg_idx_t   dbg_reg_addr = '0;
  logic [7:0] dbg_mem_addr = '0;
  word_t      dbg_reg_data, dbg_mem_data, pc_o, retire_ir_o;
  logic       stall_o, bypass_o, jump_o, branch_o, retire_o;

  pipe5_cpu dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data,
    .pc_o, .stall_o, .bypass_o, .jump_o, .branch_o, .retire_o, .retire_ir_o
  );

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  bit     halted = 1'b0;
  word_t  ret_ir [$];
  longint ret_cyc [$];
  word_t  img [256];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && !halted && retire_o) begin
      ret_ir.push_back(retire_ir_o);
      ret_cyc.push_back(cycle);
      if (retire_ir_o == HALT) halted <= 1'b1;
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint at(word_t x);
    foreach (ret_ir[i]) if (ret_ir[i] == x) return ret_cyc[i];
    return -1000;
  endfunction

  // image: fillers up to 'first', then HALT everywhere else unless placed
  function automatic void blank(int first);
    foreach (img[i]) img[i] = (i < first) ? FILL : HALT;
  endfunction

  task automatic run();
    rst = 1'b1;
    foreach (img[i]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 8'(i); prog_data = img[i];
    end
    @(negedge clk) prog_we = 1'b0;
    ret_ir.delete(); ret_cyc.delete(); halted = 1'b0;
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 2000 && !halted; c++) @(negedge clk);
    check("reached HALT", longint'(halted), 1);
    @(negedge clk);
  endtask

  initial begin
    word_t i1, i2, i3, i4, i5;
    // jump example
    i1 = enc_r(F_ADD, 5'd5, 5'd0, 5'd0);
    i2 = enc_j(OP_J, 26'd200);
    i3 = enc_r(F_ADD, 5'd6, 5'd0, 5'd0);
    i4 = enc_r(F_ADD, 5'd7, 5'd0, 5'd0);
    blank(24);
    img[96/4] = i1; img[100/4] = i2; img[104/4] = i3; img[304/4] = i4;
    run();
    check("jump: I2 after I1", at(i2) - at(i1), 1);
    check("jump: I4 after I2", at(i4) - at(i2), 2);
    check("jump: I3 killed", at(i3), -1000);

    // branch example
    i2 = enc_i(OP_BEQZ, 5'd0, 5'd1, 16'd200);
    i5 = enc_r(F_ADD, 5'd9, 5'd0, 5'd0);
    i4 = enc_r(F_ADD, 5'd8, 5'd0, 5'd0);
    blank(24);
    img[96/4] = i1; img[100/4] = i2; img[104/4] = i3; img[108/4] = i4; img[304/4] = i5;
    run();
    check("branch: I2 after I1", at(i2) - at(i1), 1);
    check("branch: I5 after I2", at(i5) - at(i2), 3);
    check("branch: I3 killed", at(i3), -1000);
    check("branch: I4 killed", at(i4), -1000);

    // JAL 500 then use of r31
    i1 = enc_j(OP_JAL, 26'd500);
    i2 = enc_i(OP_ADDI, 5'd4, 5'd31, 16'd17);
    blank(25);
    img[100/4] = i1; img[604/4] = i2;
    run();
    check("JAL: use after JAL", at(i2) - at(i1), 4);
    dbg_reg_addr = 5'd4;
    #1 check("JAL: r4 = 104 + 17", longint'(dbg_reg_data), 121);

    // ALU -> ALU dependence with the bypass
    i1 = enc_i(OP_ADDI, 5'd1, 5'd0, 16'd10);
    i2 = enc_i(OP_ADDI, 5'd4, 5'd1, 16'd17);
    blank(0);
    img[0] = i1; img[1] = i2;
    run();
    check("bypass: I2 after I1", at(i2) - at(i1), 1);
    dbg_reg_addr = 5'd4;
    #1 check("bypass: r4", longint'(dbg_reg_data), 27);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
