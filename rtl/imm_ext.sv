// imm_ext: immediate extension unit of the decode stage ("Imm Ext").
//
// Combinational. Widens the 16-bit immediate of an I-type instruction to a
// full word: by sign extension, or by zero extension when zext is set (the
// logical immediates ANDI/ORI/XORI). Which instructions zero-extend is this
// implementation's choice; the design only names the unit.
module imm_ext
  import pipe_pkg::*;
(
  input  logic [15:0] imm16,
  input  logic        zext,
  output word_t       imm
);

  assign imm = zext ? {{(XLEN-16){1'b0}}, imm16}
                    : {{(XLEN-16){imm16[15]}}, imm16};

endmodule
