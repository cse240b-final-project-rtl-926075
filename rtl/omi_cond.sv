// omi_cond: condition unit for cmp, ncmp, gt, gte, lt and lte.
//
// Compares operand a (a register) with operand b (a register or an
// immediate) and reports whether the relation named by the opcode holds.
// The core uses the result to predicate the next instruction or to decide
// whether a condition-controlled loop runs another iteration.
// Comparisons are signed two's complement; an opcode that is not a
// condition gives 0. Purely combinational.
// The six relations follow the ISA; signed comparison is this design's choice.
module omi_cond
  import omi_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  opcode_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         result
);
  logic eq, lt;
  assign eq = (a == b);
  assign lt = ($signed(a) < $signed(b));

  always_comb begin
    unique case (op)
      OP_CMP:  result = eq;
      OP_NCMP: result = !eq;
      OP_GT:   result = !lt && !eq;
      OP_GTE:  result = !lt;
      OP_LT:   result = lt;
      OP_LTE:  result = lt || eq;
      default: result = 1'b0;
    endcase
  end
endmodule
