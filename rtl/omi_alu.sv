// omi_alu: the default OMI module, the arithmetic unit every core carries.
//
// Functions 0-7 are the eight basic operations that the ISA requires every
// OMI module to implement, in the ISA's order: add, sub, sll, srl, sra, and,
// or, xor. Function 8 is mod, which the default module also offers. Shifts
// use the low log2(XLEN) bits of b. mod is an unsigned remainder; a zero
// divisor returns a unchanged. Function numbers above 8 are not part of the
// default set: `legal` is low and y is zero.
//
// Purely combinational; the result is used in the same cycle.
// The operation list follows the ISA; numbering mod as function 8, the
// unsigned remainder and the divide-by-zero result are this design's choices.
module omi_alu
  import omi_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic [7:0]   func,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         legal
);
  localparam int unsigned SHW = $clog2(W);
  logic [SHW-1:0] sh;
  assign sh = b[SHW-1:0];

  always_comb begin
    legal = 1'b1;
    unique case (func)
      F_ADD:   y = a + b;
      F_SUB:   y = a - b;
      F_SLL:   y = a << sh;
      F_SRL:   y = a >> sh;
      F_SRA:   y = W'($signed(a) >>> sh);
      F_AND:   y = a & b;
      F_OR:    y = a | b;
      F_XOR:   y = a ^ b;
      F_MOD:   y = (b == '0) ? a : (a % b);
      default: begin y = '0; legal = 1'b0; end
    endcase
  end
endmodule
