// omi_regfile: the general registers $0..$15, shared by every thread.
//
// Forked code segments communicate through these registers, so there is one
// register file per core rather than one per thread. Two asynchronous read
// ports serve operands a and b; one write port updates a register on the
// rising clock edge. A read in the same cycle as a write to the same
// register returns the old value. All registers reset to zero.
// Sharing the registers follows the ISA's code samples; the register count,
// the ports and the reset value are this design's choices.
module omi_regfile
  import omi_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned NREGS = NGPR
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra_idx,
  input  logic [$clog2(NREGS)-1:0] rb_idx,
  output logic [W-1:0]             ra_data,
  output logic [W-1:0]             rb_data,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [W-1:0]             wd
);
  logic [W-1:0] regs [NREGS];

  assign ra_data = regs[ra_idx];
  assign rb_data = regs[rb_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end
endmodule
