// tb_data_mem: self-checking test of the data memory.
// Checks that a store completes in one cycle (a load of the same address in
// the next cycle sees it), that reads are combinational, that we low writes
// nothing, and random store/load traffic against a shadow array.
module tb_data_mem;
  import pipe_pkg::*;

  localparam int unsigned DEPTH = 64;
  logic                     clk = 1'b0, we;
  word_t                    addr, wdata, rdata, dbg_data;
  logic [$clog2(DEPTH)-1:0] dbg_addr;
  word_t                    shadow [DEPTH];
  int                       checks = 0, failures = 0;

  data_mem #(.DEPTH(DEPTH)) dut (.clk, .we, .addr, .wdata, .rdata, .dbg_addr, .dbg_data);

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

  initial begin
    we = 0; addr = 0; wdata = 0; dbg_addr = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1; addr = word_t'(4 * i); wdata = word_t'(i * 3 + 7);
      shadow[i] = word_t'(i * 3 + 7);
    end
    // store then load the same address in back-to-back cycles
    @(negedge clk);
    we = 1; addr = 32'd40; wdata = 32'hA5A5_0001;
    @(negedge clk);
    we = 0; addr = 32'd40;
    #1 check("load after store", rdata, 32'hA5A5_0001);
    shadow[10] = 32'hA5A5_0001;
    // we low writes nothing
    @(negedge clk);
    we = 0; addr = 32'd44; wdata = 32'hFFFF_FFFF;
    @(negedge clk);
    #1 check("we low", rdata, shadow[11]);
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); addr = word_t'($urandom_range(0, DEPTH - 1) * 4); wdata = $urandom;
      dbg_addr = 6'($urandom);
      #1;
      check("rand read", rdata, shadow[addr[7:2]]);
      check("dbg read", dbg_data, shadow[dbg_addr]);
      @(posedge clk);
      if (we) shadow[addr[7:2]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
