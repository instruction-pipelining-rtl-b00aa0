// tb_imm_ext: self-checking test of the immediate extension unit.
// Checks sign and zero extension of corner and random 16-bit immediates
// against arithmetic references (signed value and unsigned value).
module tb_imm_ext;
  import pipe_pkg::*;

  logic        clk = 1'b0;
  logic [15:0] imm16;
  logic        zext;
  word_t       imm;
  int          checks = 0, failures = 0;

  imm_ext dut (.imm16, .zext, .imm);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] v, logic z);
    int signed sval;
    word_t e;
    imm16 = v; zext = z;
    @(posedge clk);
    sval = (v >= 16'h8000) ? int'(v) - 65536 : int'(v);
    e = z ? word_t'(int'(v)) : word_t'(sval);
    checks++;
    if (imm !== e) begin
      failures++;
      $display("FAIL imm16=%h zext=%b got %h expected %h", v, z, imm, e);
    end
  endtask

  initial begin
    logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    foreach (corner[i]) begin
      check_one(corner[i], 1'b0);
      check_one(corner[i], 1'b1);
    end
    for (int n = 0; n < 500; n++) check_one(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
