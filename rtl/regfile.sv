// regfile: the general-purpose register file (GPRs).
//
// NREGS registers of XLEN bits with two combinational read ports (rs1/rd1,
// rs2/rd2, used by the decode stage) and one write port (ws, wd, we, written
// by the write-back stage at the rising clock edge). A write becomes visible
// to the read ports in the cycle after the edge; there is no write-through,
// which is why the stall condition also compares against the write-back stage.
// A third read port (dbg_addr/dbg_data) lets a test bench inspect state.
// Synchronous active-high reset clears every register, so r0 reads zero as
// long as nothing writes it (the write enable logic never writes r0).
// Port names follow the design's GPR block; the reset and the debug port
// are this implementation's additions.
module regfile
  import pipe_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  output word_t                    rd1,
  output word_t                    rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] ws,
  input  word_t                    wd,
  input  logic [$clog2(NREGS)-1:0] dbg_addr,
  output word_t                    dbg_data
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[ws] <= wd;
    end
  end

  assign rd1      = regs[rs1];
  assign rd2      = regs[rs2];
  assign dbg_data = regs[dbg_addr];

endmodule
