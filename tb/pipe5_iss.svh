// pipe5_iss.svh: instruction-set reference model for the pipeline test
// benches, included inside a test bench module that imports pipe_pkg.
// It executes one instruction at a time on its own register file and data
// memory, with the architectural semantics and no notion of pipelining:
//   ALU   rd <- (rs) func (rt)        ALUi rt <- (rs) op imm
//   LW    rt <- M[(rs)+imm]           SW   M[(rs)+imm] <- (rt)
//   BEQZ/BNEZ  PC <- PC+4+imm if (rs) ==/!= 0, else PC+4
//   J     PC <- PC+4+imm26            JAL  r31 <- PC+4, PC <- PC+4+imm26
//   JR    PC <- (rs)                  JALR r31 <- PC+4, PC <- (rs)
// Writes to r0 are dropped. Memory is word addressed by address/4.

  word_t iss_reg [32];
  word_t iss_mem [int];
  word_t iss_pc;

  function automatic word_t iss_sext16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  function automatic word_t iss_alu(logic [5:0] f, word_t x, word_t y);
    case (f)
      6'h22:   return x - y;
      6'h24:   return x & y;
      6'h25:   return x | y;
      6'h26:   return x ^ y;
      6'h2A:   return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return x + y;
    endcase
  endfunction

  function automatic void iss_reset();
    foreach (iss_reg[i]) iss_reg[i] = '0;
    iss_mem.delete();
    iss_pc = '0;
  endfunction

  function automatic word_t iss_load(word_t a);
    int k = int'(a >> 2);
    return iss_mem.exists(k) ? iss_mem[k] : '0;
  endfunction

  function automatic void iss_wr(logic [4:0] r, word_t v);
    if (r != 0) iss_reg[r] = v;
  endfunction

  // executes the instruction x located at iss_pc
  function automatic void iss_step(word_t x);
    logic [5:0] op = x[31:26];
    logic [4:0] rs = x[25:21], rt = x[20:16], rd = x[15:11];
    word_t a = iss_reg[rs], b = iss_reg[rt], imm = iss_sext16(x[15:0]);
    word_t zimm = {16'd0, x[15:0]};
    word_t pc4 = iss_pc + 4;
    word_t j26 = {{6{x[25]}}, x[25:0]};
    iss_pc = pc4;
    case (op)
      6'h00: iss_wr(rd, iss_alu(x[5:0], a, b));
      6'h08: iss_wr(rt, a + imm);
      6'h0A: iss_wr(rt, ($signed(a) < $signed(imm)) ? 32'd1 : 32'd0);
      6'h0C: iss_wr(rt, a & zimm);
      6'h0D: iss_wr(rt, a | zimm);
      6'h0E: iss_wr(rt, a ^ zimm);
      6'h23: iss_wr(rt, iss_load(a + imm));
      6'h2B: iss_mem[int'((a + imm) >> 2)] = b;
      6'h04: if (a == 0) iss_pc = pc4 + imm;
      6'h05: if (a != 0) iss_pc = pc4 + imm;
      6'h02: iss_pc = pc4 + j26;
      6'h03: begin iss_pc = pc4 + j26; iss_wr(5'd31, pc4); end
      6'h12: iss_pc = a;
      6'h13: begin iss_pc = a; iss_wr(5'd31, pc4); end
      default: ;
    endcase
  endfunction
