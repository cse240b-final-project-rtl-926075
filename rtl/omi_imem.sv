// omi_imem: code memory holding 96-bit instruction words.
//
// One asynchronous fetch port, addressed by the program counter of the thread
// issuing this cycle, and one synchronous write port through which the host
// loads a program. Not reset: the host must load every word a program can
// reach before it starts a thread.
// The code memory's size and load port are this design's choices.
module omi_imem
  import omi_pkg::*;
#(
  parameter int unsigned DEPTH = 2**PCW
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output instr_t                   rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata
);
  instr_t mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
endmodule
