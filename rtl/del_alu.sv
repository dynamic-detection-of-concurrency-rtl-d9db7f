// del_alu: the operator unit of one instruction queue line.
//
// Combines the left source d1 and right source d2 as the operator says and
// gives e := d1 op d2. Relational operators, the only ones a branch may
// use, give 1 or 0; a branch is taken when bit 0 of the result equals the
// sense given by its format. Purely combinational: the whole unit works
// inside the single machine cycle in which an instruction executes.
// The operator set and its numbering are this design's own choice; the
// model only requires ceil(log2 F) operator bits.
module del_alu
  import del_pkg::*;
#(
  parameter int WIDTH = DATA_W
) (
  input  op_e              op,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  output logic [WIDTH-1:0] e
);
  logic signed [WIDTH-1:0] s1, s2;
  assign s1 = d1;
  assign s2 = d2;

  always_comb begin
    unique case (op)
      OP_MOVE: e = d2;
      OP_ADD:  e = d1 + d2;
      OP_SUB:  e = d1 - d2;
      OP_MUL:  e = d1 * d2;
      OP_AND:  e = d1 & d2;
      OP_OR:   e = d1 | d2;
      OP_XOR:  e = d1 ^ d2;
      OP_NEG:  e = -d2;
      OP_LT:   e = WIDTH'(s1 <  s2);
      OP_LE:   e = WIDTH'(s1 <= s2);
      OP_EQ:   e = WIDTH'(d1 == d2);
      OP_NE:   e = WIDTH'(d1 != d2);
      OP_GT:   e = WIDTH'(s1 >  s2);
      OP_GE:   e = WIDTH'(s1 >= s2);
      OP_TRUE: e = WIDTH'(1);
      default: e = '0;
    endcase
  end
endmodule
