// tb_inst_mem: self-checking test of the instruction memory.
// Loads every word through the program port, then reads them back by byte
// address (including addresses whose two low bits are set) and checks that
// the read is combinational: the word is there in the same cycle as addr.
module tb_inst_mem;
  import pipe_pkg::*;

  localparam int unsigned DEPTH = 64;
  logic                     clk = 1'b0;
  word_t                    addr, inst, prog_data;
  logic                     prog_we;
  logic [$clog2(DEPTH)-1:0] prog_addr;
  int                       checks = 0, failures = 0;

  inst_mem #(.DEPTH(DEPTH)) dut (.clk, .addr, .inst, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pattern(int i);
    return word_t'(32'h9E37_79B9 * (i + 1)) ^ word_t'(i);
  endfunction

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; addr = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 6'(i); prog_data = pattern(i);
    end
    @(negedge clk) prog_we = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      addr = word_t'(4 * i) | word_t'(i % 4);
      #1;
      checks++;
      if (inst !== pattern(i)) begin
        failures++;
        $display("FAIL addr=%h got %h expected %h", addr, inst, pattern(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
