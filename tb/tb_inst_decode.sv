// tb_inst_decode: self-checking test of the per-stage control decode.
// Builds instructions of every class with random register fields and checks
// ws, we, we_bypass, we_stall, re1 and re2 against the destination and
// read-enable tables of the design, written out here per opcode.
module tb_inst_decode;
  import pipe_pkg::*;

  logic     clk = 1'b0;
  word_t    ir;
  iclass_e  cls;
  reg_idx_t rs, rt, ws;
  logic     we, we_bypass, we_stall, re1, re2;
  int       checks = 0, failures = 0;

  inst_decode dut (.ir, .cls, .rs, .rt, .ws, .we, .we_bypass, .we_stall, .re1, .re2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {ws_valid, ws, we, web, wes, re1, re2}
  task automatic check_one(word_t x);
    logic [5:0] op;
    reg_idx_t   e_ws;
    logic       e_we, e_wb, e_wsl, e_re1, e_re2, wsv;
    op = x[31:26];
    e_ws = 0; e_we = 0; e_wb = 0; e_wsl = 0; e_re1 = 0; e_re2 = 0; wsv = 0;
    case (op)
      6'h00: begin e_ws = x[15:11]; wsv = 1; e_we = e_ws != 0; e_wb = e_we; e_re1 = 1; e_re2 = 1; end
      6'h08, 6'h0A, 6'h0C, 6'h0D, 6'h0E:
             begin e_ws = x[20:16]; wsv = 1; e_we = e_ws != 0; e_wb = e_we; e_re1 = 1; end
      6'h23: begin e_ws = x[20:16]; wsv = 1; e_we = e_ws != 0; e_wsl = e_we; e_re1 = 1; end
      6'h2B: begin e_re1 = 1; e_re2 = 1; end
      6'h04, 6'h05: e_re1 = 1;
      6'h02: ;
      6'h03: begin e_ws = 31; wsv = 1; e_we = 1; e_wsl = 1; end
      6'h12: e_re1 = 1;
      6'h13: begin e_ws = 31; wsv = 1; e_we = 1; e_wsl = 1; e_re1 = 1; end
      default: ;
    endcase
    ir = x;
    @(posedge clk);
    checks++;
    if ((wsv && ws !== e_ws) || we !== e_we || we_bypass !== e_wb || we_stall !== e_wsl ||
        re1 !== e_re1 || re2 !== e_re2 || rs !== x[25:21] || rt !== x[20:16]) begin
      failures++;
      $display("FAIL ir=%h ws=%0d/%0d we=%b/%b wb=%b/%b wsl=%b/%b re1=%b/%b re2=%b/%b",
               x, ws, e_ws, we, e_we, we_bypass, e_wb, we_stall, e_wsl, re1, e_re1, re2, e_re2);
    end
  endtask

  initial begin
    logic [5:0] ops [15] = '{6'h00, 6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h0A, 6'h0C,
                             6'h0D, 6'h0E, 6'h12, 6'h13, 6'h23, 6'h2B, 6'h3F};
    ir = '0;
    // the bubble writes and reads nothing that matters: ws = 0, we = 0
    check_one(NOP);
    // destination r0 never enables a write, for every writing class
    check_one(enc_r(F_ADD, 5'd0, 5'd3, 5'd4));
    check_one(enc_i(OP_ADDI, 5'd0, 5'd3, 16'd1));
    check_one(enc_i(OP_LW, 5'd0, 5'd3, 16'd1));
    foreach (ops[i])
      for (int n = 0; n < 200; n++)
        check_one({ops[i], 26'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
