// omi_data_counters: the data counters $rdaddr, $rladdr, $wraddr, $wladdr.
//
// All memory access goes through these four address registers, which play
// the role of a program counter for data. Like a program counter they are
// per thread: every thread context owns its own four counters. A thread
// created by fork starts with a copy of its parent's counters (so a parent
// can hand a data pointer to the code it forks); a thread started by the
// host starts with all four at zero.
//
// For the thread `tid` issuing this cycle, the outputs give its counters and
// any instruction may write one of them (widx 0..3 = rdaddr, rladdr, wraddr,
// wladdr). At the end of each iteration of an lr/lw/lrw loop the loop read
// and/or loop write counter moves by a signed stride; if the same
// instruction also writes that counter, the stride is added to the written
// value. fork_mask marks the context a fork claims this cycle (it receives
// the parent's values before this cycle's update), host_mask the context the
// host claims. Updates happen on the rising clock edge; reset clears all.
//
// The four counters and stride stepping follow the ISA; keeping them per
// thread, the copy at fork and the write/step ordering are this design's
// reading of it.
module omi_data_counters
  import omi_pkg::*;
#(
  parameter int unsigned THREADS = 4,
  parameter int unsigned W       = XLEN
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(THREADS)-1:0] tid,
  input  logic                       active,
  input  logic [THREADS-1:0]         fork_mask,
  input  logic [THREADS-1:0]         host_mask,
  input  logic                       we,
  input  logic [1:0]                 widx,
  input  logic [W-1:0]               wdata,
  input  logic                       step_rl,
  input  logic [W-1:0]               stride_rl,
  input  logic                       step_wl,
  input  logic [W-1:0]               stride_wl,
  output logic [W-1:0]               rdaddr,
  output logic [W-1:0]               rladdr,
  output logic [W-1:0]               wraddr,
  output logic [W-1:0]               wladdr
);
  typedef logic [3:0][W-1:0] dc_t;   // [0]=rd, [1]=rl, [2]=wr, [3]=wl
  dc_t dc [THREADS];
  dc_t cur, nxt;

  assign cur    = dc[tid];
  assign rdaddr = cur[0];
  assign rladdr = cur[1];
  assign wraddr = cur[2];
  assign wladdr = cur[3];

  always_comb begin
    nxt = cur;
    if (we) nxt[widx] = wdata;
    if (step_rl) nxt[1] = nxt[1] + stride_rl;
    if (step_wl) nxt[3] = nxt[3] + stride_wl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) dc[t] <= '0;
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        if (fork_mask[t])      dc[t] <= cur;
        else if (host_mask[t]) dc[t] <= '0;
      end
      if (active) dc[tid] <= nxt;
    end
  end
endmodule
