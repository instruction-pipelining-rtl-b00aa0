// tb_regfile: self-checking test of the register file.
// Checks reset to zero, writes through the write port becoming visible on
// both read ports and the debug port one cycle later (not in the write
// cycle), that a write with we low changes nothing, and random traffic
// against a shadow array.
module tb_regfile;
  import pipe_pkg::*;

  logic     clk = 1'b0, rst;
  reg_idx_t rs1, rs2, ws, dbg_addr;
  word_t    rd1, rd2, wd, dbg_data;
  logic     we;
  word_t    shadow [32];
  int       checks = 0, failures = 0;

  regfile #(.NREGS(32)) dut (.clk, .rst, .rs1, .rs2, .rd1, .rd2, .we, .ws, .wd,
                             .dbg_addr, .dbg_data);

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
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_all();
    for (int r = 0; r < 32; r++) begin
      rs1 = 5'(r); rs2 = 5'(31 - r); dbg_addr = 5'(r);
      #1;
      check("rd1", rd1, shadow[r]);
      check("rd2", rd2, shadow[31-r]);
      check("dbg", dbg_data, shadow[r]);
    end
  endtask

  initial begin
    we = 0; ws = 0; wd = 0; rs1 = 0; rs2 = 0; dbg_addr = 0;
    rst = 1;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    check_all();

    // write r5 and confirm it is not visible before the edge
    @(negedge clk);
    we = 1; ws = 5'd5; wd = 32'hCAFE_0005; rs1 = 5'd5;
    #1 check("no write-through", rd1, 32'h0);
    @(posedge clk); #1;
    shadow[5] = 32'hCAFE_0005;
    check("after edge", rd1, 32'hCAFE_0005);

    // we low must not write
    @(negedge clk);
    we = 0; ws = 5'd6; wd = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    check_all();

    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom); ws = 5'($urandom); wd = $urandom;
      rs1 = 5'($urandom); rs2 = 5'($urandom);
      #1;
      check("rand rd1", rd1, shadow[rs1]);
      check("rand rd2", rd2, shadow[rs2]);
      @(posedge clk);
      if (we) shadow[ws] = wd;
    end
    @(negedge clk); we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
