// omi_data_mem: word-addressed data memory behind the magic data registers.
//
// NRD asynchronous read ports (the core uses four, one per data counter, so
// $rd, $rl, $wr and $wl can all be read in one instruction; the host uses a
// fifth) and one synchronous write port. Addresses are full XLEN-bit words;
// only the low log2(DEPTH) bits select a word, so the memory wraps around.
// Like an SRAM the contents are not reset: software (or the host) must write
// a word before it is read.
// Memory access through data counters follows the ISA; the depth, port count
// and wrap-around are this design's choices.
module omi_data_mem
  import omi_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NRD   = 5
) (
  input  logic         clk,
  input  logic [W-1:0] raddr [NRD],
  output logic [W-1:0] rdata [NRD],
  input  logic         we,
  input  logic [W-1:0] waddr,
  input  logic [W-1:0] wdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];

  always_comb begin
    for (int p = 0; p < NRD; p++) rdata[p] = mem[raddr[p][AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end
endmodule
