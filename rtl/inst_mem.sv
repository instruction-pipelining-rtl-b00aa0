// inst_mem: instruction memory of the fetch stage.
//
// DEPTH words, read combinationally: inst = M[addr/4] in the same cycle the
// PC presents addr, so the fetched word is captured by the decode-stage IR at
// the next edge. addr is a byte address; its two low bits are ignored.
// A synchronous write port (prog_we/prog_addr/prog_data, word-indexed) loads
// the program. The size and the load port are this implementation's choices;
// the design only names the memory.
module inst_mem
  import pipe_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  word_t                    addr,
  output word_t                    inst,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  word_t                    prog_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign inst = mem[addr[$clog2(DEPTH)+1:2]];

endmodule
