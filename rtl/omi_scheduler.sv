// omi_scheduler: thread contexts, fork, round-robin issue, wait and kill.
//
// The core runs up to THREADS threads, one instruction per cycle, picking a
// ready thread round-robin after the one that issued last. Each context holds
// a state (free, ready, waiting), a program counter, the data address a
// waiting thread sleeps on, its OMI set and its predication flags.
//
//  * fork: fork_req claims the lowest free context for a new thread at
//    fork_pc (fork_ok reports success in the same cycle; with no free context
//    the core stalls the forking thread and retries).
//  * wait: the issuing thread can be put to sleep on a data address
//    (upd_act = ACT_WAIT). A write to that address on the data memory write
//    port, by the core or the host, makes it ready again. This is the
//    lightweight free/busy synchronisation between threads.
//  * kill: every thread waiting on kill_addr is released (killed_mask).
//    A kill beats a wake-up in the same cycle.
//  * host_start claims a free context for a thread at host_pc.
// alloc_mask marks contexts claimed this cycle (fork_mask by a fork,
// host_mask by the host). All state changes on the
// rising clock edge; issue_* and fork_ok are combinational.
//
// Fork, wait-until-written and kill-waiting-threads follow the ISA; the
// context count, round-robin issue, stall-on-full fork and host start are
// this design's choices.
module omi_scheduler
  import omi_pkg::*;
#(
  parameter int unsigned THREADS = 4,
  localparam int unsigned TW = $clog2(THREADS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // host
  input  logic                host_start,
  input  logic [PCW-1:0]      host_pc,
  output logic                host_start_ok,
  // issue
  output logic                issue_valid,
  output logic [TW-1:0]       issue_tid,
  output ctx_t                issue_ctx,
  // update of the issued thread
  input  act_e                upd_act,
  input  ctx_t                upd_ctx,
  // fork
  input  logic                fork_req,
  input  logic [PCW-1:0]      fork_pc,
  input  logic [7:0]          fork_set,
  output logic                fork_ok,
  // kill and wake
  input  logic                kill_req,
  input  logic [XLEN-1:0]     kill_addr,
  input  logic                mem_we,
  input  logic [XLEN-1:0]     mem_waddr,
  // status
  output logic [THREADS-1:0]  alloc_mask,
  output logic [THREADS-1:0]  fork_mask,
  output logic [THREADS-1:0]  host_mask,
  output logic [THREADS-1:0]  killed_mask,
  output logic [THREADS-1:0]  woken_mask,
  output tstate_e             thread_state [THREADS],
  output logic                busy,
  output logic                active
);
  ctx_t          ctx [THREADS];
  logic [TW-1:0] rr_last;

  // ---- round-robin pick ----
  always_comb begin
    issue_valid = 1'b0;
    issue_tid   = '0;
    for (int k = THREADS; k >= 1; k--) begin
      logic [TW-1:0] c;
      c = TW'((32'(rr_last) + k) % THREADS);
      if (ctx[c].st == TS_READY) begin
        issue_valid = 1'b1;
        issue_tid   = c;
      end
    end
  end
  assign issue_ctx = ctx[issue_tid];

  // ---- allocation of free contexts: fork first, then host start ----
  logic          f_found, h_found;
  logic [TW-1:0] f_idx, h_idx;
  always_comb begin
    f_found = 1'b0; f_idx = '0;
    h_found = 1'b0; h_idx = '0;
    for (int t = THREADS - 1; t >= 0; t--) begin
      if (ctx[t].st == TS_FREE) begin
        f_found = 1'b1; f_idx = TW'(t);
      end
    end
    for (int t = THREADS - 1; t >= 0; t--) begin
      if (ctx[t].st == TS_FREE && !(fork_req && f_found && f_idx == TW'(t))) begin
        h_found = 1'b1; h_idx = TW'(t);
      end
    end
  end
  assign fork_ok       = fork_req && issue_valid && f_found;
  assign host_start_ok = host_start && h_found;

  always_comb begin
    fork_mask   = '0;
    host_mask   = '0;
    killed_mask = '0;
    woken_mask  = '0;
    if (fork_ok)       fork_mask[f_idx] = 1'b1;
    if (host_start_ok) host_mask[h_idx] = 1'b1;
    alloc_mask = fork_mask | host_mask;
    for (int t = 0; t < THREADS; t++) begin
      if (ctx[t].st == TS_WAITING) begin
        if (kill_req && ctx[t].waddr == kill_addr)      killed_mask[t] = 1'b1;
        else if (mem_we && ctx[t].waddr == mem_waddr)   woken_mask[t]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) ctx[t] <= '0;
      rr_last <= TW'(THREADS - 1);
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        if (killed_mask[t])     ctx[t].st <= TS_FREE;
        else if (woken_mask[t]) ctx[t].st <= TS_READY;
      end
      if (issue_valid) begin
        rr_last <= issue_tid;
        ctx[issue_tid].pc      <= upd_ctx.pc;
        ctx[issue_tid].omi_set <= upd_ctx.omi_set;
        ctx[issue_tid].flag    <= upd_ctx.flag;
        ctx[issue_tid].skip    <= upd_ctx.skip;
        unique case (upd_act)
          ACT_WAIT: begin
            ctx[issue_tid].st    <= TS_WAITING;
            ctx[issue_tid].waddr <= upd_ctx.waddr;
          end
          ACT_FREE: ctx[issue_tid].st <= TS_FREE;
          default:  ctx[issue_tid].st <= TS_READY;
        endcase
      end
      if (fork_ok)       ctx[f_idx] <= '{st: TS_READY, pc: fork_pc, waddr: '0,
                                         omi_set: fork_set, flag: 1'b0, skip: 1'b0};
      if (host_start_ok) ctx[h_idx] <= '{st: TS_READY, pc: host_pc, waddr: '0,
                                         omi_set: 8'd0, flag: 1'b0, skip: 1'b0};
    end
  end

  always_comb begin
    busy   = 1'b0;
    active = 1'b0;
    for (int t = 0; t < THREADS; t++) begin
      thread_state[t] = ctx[t].st;
      if (ctx[t].st == TS_READY) busy = 1'b1;
      if (ctx[t].st != TS_FREE)  active = 1'b1;
    end
  end

  // A context is never claimed while it is in use.
  for (genvar t = 0; t < THREADS; t++) begin : g_chk
    a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
                                   alloc_mask[t] |-> ctx[t].st == TS_FREE)
      else $error("context %0d claimed while in use", t);
  end
endmodule
