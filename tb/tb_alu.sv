// tb_alu: self-checking test of the ALU.
// Drives every operation with corner values and random operands and compares
// y and zero with a reference computed here from the operation's definition.
module tb_alu;
  import pipe_pkg::*;

  logic    clk = 1'b0;
  alu_op_e op;
  word_t   a, b, y;
  logic    zero;
  int      checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .zero);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_y(alu_op_e o, word_t x, word_t w);
    logic signed [32:0] sx, sw;
    sx = {x[31], x};
    sw = {w[31], w};
    case (o)
      ALU_ADD:   return word_t'(64'(x) + 64'(w));
      ALU_SUB:   return word_t'(64'(x) + 64'(~w) + 64'd1);
      ALU_AND:   return ~(~x | ~w);
      ALU_OR:    return ~(~x & ~w);
      ALU_XOR:   return (x & ~w) | (~x & w);
      ALU_SLT:   return (sx - sw) < 0 ? 32'd1 : 32'd0;
      ALU_PASSA: return x;
      default:   return w;
    endcase
  endfunction

  task automatic check_one(alu_op_e o, word_t x, word_t w);
    word_t e;
    op = o; a = x; b = w;
    @(posedge clk);
    e = ref_y(o, x, w);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h zero=%b expected %h", o.name(), x, w, y, zero, e);
    end
  endtask

  initial begin
    word_t corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};
    for (int o = 0; o < 8; o++)
      foreach (corner[i]) foreach (corner[j]) check_one(alu_op_e'(o), corner[i], corner[j]);
    for (int n = 0; n < 2000; n++)
      check_one(alu_op_e'($urandom_range(0, 7)), $urandom, $urandom);
    // zero flag for the branch test: PASSA of 0 and non-zero
    check_one(ALU_PASSA, 32'h0, 32'h5);
    check_one(ALU_PASSA, 32'h8, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
