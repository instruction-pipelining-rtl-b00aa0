// tb_next_pc: self-checking test of the next-PC datapath.
// Checks the two worked examples of the design (J 200 at address 100 and a
// taken BEQZ 200 at address 100, both restarting at 304), then random
// inputs for each PCSrc value against integer address arithmetic. A second
// instance, built for branches resolved in decode, must add the decode
// offset to the fetch PC instead.
module tb_next_pc;
  import pipe_pkg::*;

  logic        clk = 1'b0;
  pcsrc_e      pcsrc;
  word_t       pc_f, pc_d, rind, pc_next, pc_plus4, link;
  logic [25:0] imm26_d;
  logic [15:0] imm16_e, imm16_d;
  word_t       pc_next_d, pc_plus4_d, link_d;
  int          checks = 0, failures = 0;

  next_pc dut (.pcsrc, .pc_f, .pc_d, .imm26_d, .imm16_e, .imm16_d, .rind, .pc_next, .pc_plus4, .link);
  // variant with branches resolved in decode
  next_pc #(.BR_IN_DECODE(1'b1)) dut_d (.pcsrc, .pc_f, .pc_d, .imm26_d, .imm16_e, .imm16_d, .rind,
    .pc_next(pc_next_d), .pc_plus4(pc_plus4_d), .link(link_d));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint off;
    // J 200 in decode at 100: fetch PC is 104
    pcsrc = PC_JABS; pc_f = 32'd104; pc_d = 32'd100; imm26_d = 26'd200; imm16_e = 16'd0; imm16_d = 16'd0; rind = 0;
    @(posedge clk);
    check("J 200 at 100", pc_next, 32'd304);
    check("link of 100", link, 32'd104);
    // BEQZ 200 at 100 in execute: decode PC register holds 104
    pcsrc = PC_BR; pc_f = 32'd108; pc_d = 32'd104; imm16_e = 16'd200;
    @(posedge clk);
    check("BEQZ 200 at 100", pc_next, 32'd304);
    // same branch resolved in decode: fetch PC is 104
    pc_f = 32'd104; pc_d = 32'd100; imm16_d = 16'd200; imm16_e = 16'd0;
    @(posedge clk);
    check("BEQZ 200 at 100, decode", pc_next_d, 32'd304);
    for (int n = 0; n < 1000; n++) begin
      pcsrc = pcsrc_e'($urandom_range(0, 3));
      pc_f = $urandom & ~32'h3; pc_d = $urandom & ~32'h3;
      imm26_d = 26'($urandom); imm16_e = 16'($urandom); imm16_d = 16'($urandom); rind = $urandom;
      @(posedge clk);
      check("pc+4", pc_plus4, word_t'(longint'(pc_f) + 4));
      check("link", link, word_t'(longint'(pc_d) + 4));
      case (pcsrc)
        PC_PLUS4: check("next pc+4", pc_next, word_t'(longint'(pc_f) + 4));
        PC_JABS: begin
          off = imm26_d[25] ? longint'(imm26_d) - 64'sd67108864 : longint'(imm26_d);
          check("next jabs", pc_next, word_t'(longint'(pc_f) + off));
        end
        PC_RIND: check("next rind", pc_next, rind);
        default: begin
          off = imm16_e[15] ? longint'(imm16_e) - 64'sd65536 : longint'(imm16_e);
          check("next br", pc_next, word_t'(longint'(pc_d) + off));
          off = imm16_d[15] ? longint'(imm16_d) - 64'sd65536 : longint'(imm16_d);
          check("next br, decode", pc_next_d, word_t'(longint'(pc_f) + off));
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
