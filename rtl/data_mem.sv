// data_mem: data memory of the memory-access (MA) stage.
//
// DEPTH words. Reads are combinational (rdata = M[addr/4]) so a load's data
// reaches the write-back register R at the end of MA; writes (we, wdata)
// complete at the rising edge that ends the cycle, i.e. in one cycle, which
// is what makes a store followed by a load to the same address safe without
// any pipeline interlock. addr is a byte address; the two low bits are
// ignored. dbg_addr/dbg_data is an extra word-indexed read port for tests.
// The size is this implementation's choice.
module data_mem
  import pipe_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  word_t                    addr,
  input  word_t                    wdata,
  output word_t                    rdata,
  input  logic [$clog2(DEPTH)-1:0] dbg_addr,
  output word_t                    dbg_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr[$clog2(DEPTH)+1:2]] <= wdata;
  end

  assign rdata    = mem[addr[$clog2(DEPTH)+1:2]];
  assign dbg_data = mem[dbg_addr];

endmodule
