// omi_core: a fine-grained multithreaded core for the OMI instruction set.
//
// Each cycle the scheduler picks one ready thread; the core fetches the
// instruction at that thread's pc from code memory, reads its operands,
// executes it and writes the results back, all in the same cycle (no
// pipeline, so there are no hazards between instructions of any thread).
//
// Operands and destinations are register specifiers: $0..$15 are the shared
// general registers; $rdaddr, $rladdr, $wraddr, $wladdr are the thread's own
// data counters (omi_data_counters, copied from the parent on fork); $rd, $rl, $wr, $wl read the data word each counter points at, and
// writing $wr or $wl stores to it; $cnt is the thread's loop counter. Writes to
// $rd, $rl and $cnt are ignored.
//
// Control:
//  * a condition instruction (cmp..lte) sets the thread's flag and squashes
//    the next instruction when false; a loop instruction is never squashed,
//    and predication does not carry from the end of a loop body into the
//    next iteration or past the loop;
//  * l/lr/lw/lrw run the following `len` instructions as a loop body
//    (omi_loop_unit), stepping the loop pointers after each iteration;
//  * exec jumps, fork starts a thread (stalling the forking thread while all
//    contexts are busy), wait sleeps until the data address is written, kill
//    ends the threads waiting on an address;
//  * omi N switches the thread's OMI set. This core implements set 0 (the
//    default module, omi_alu); switching to any other set hands the thread
//    off through the migrate_* port and frees its context.
// The host starts the first thread through host_start/host_pc.
//
// Interface timing: the fetch address pc_out and the data memory read
// addresses are combinational from the scheduler; instruction and read data
// must come back in the same cycle (asynchronous memories). Writes happen on
// the rising clock edge. mem_obs_* must carry the write that memory actually
// performs (core or host) so that waiting threads can be woken.
//
// The instruction set follows the ISA description. The single-cycle
// organisation, the register numbering, the encoding (omi_pkg) and the
// handling of unsupported OMI sets are this design's choices.
module omi_core
  import omi_pkg::*;
#(
  parameter int unsigned THREADS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // host
  input  logic                host_start,
  input  logic [PCW-1:0]      host_pc,
  output logic                host_start_ok,
  // code memory
  output logic [PCW-1:0]      pc_out,
  input  instr_t              instr,
  // data memory: read ports 0..3 follow rdaddr, rladdr, wraddr, wladdr
  output logic [XLEN-1:0]     dm_raddr [4],
  input  logic [XLEN-1:0]     dm_rdata [4],
  output logic                dm_we,
  output logic [XLEN-1:0]     dm_waddr,
  output logic [XLEN-1:0]     dm_wdata,
  input  logic                mem_obs_we,
  input  logic [XLEN-1:0]     mem_obs_waddr,
  // thread hand-off to a core with another OMI set
  output logic                migrate_valid,
  output logic [PCW-1:0]      migrate_pc,
  output logic [7:0]          migrate_set,
  // status
  output logic                busy,
  output logic                active,
  output tstate_e             thread_state [THREADS],
  output core_ev_t            ev
);
  localparam int unsigned TW = $clog2(THREADS);

  // ---------------- scheduler ----------------
  logic          issue_valid;
  logic [TW-1:0] tid;
  ctx_t          ctx, upd;
  act_e          act;
  logic          fork_req, fork_ok, kill_req;
  logic [THREADS-1:0] alloc_mask, fork_mask, host_mask, killed_mask, woken_mask;
  logic [XLEN-1:0] opb;

  instr_t i;
  assign pc_out = ctx.pc;
  assign i      = instr;

  omi_scheduler #(.THREADS(THREADS)) u_sched (
    .clk, .rst_n,
    .host_start, .host_pc, .host_start_ok,
    .issue_valid, .issue_tid(tid), .issue_ctx(ctx),
    .upd_act(act), .upd_ctx(upd),
    .fork_req, .fork_pc(opb[PCW-1:0]), .fork_set(ctx.omi_set), .fork_ok,
    .kill_req, .kill_addr(opb),
    .mem_we(mem_obs_we), .mem_waddr(mem_obs_waddr),
    .alloc_mask, .fork_mask, .host_mask, .killed_mask, .woken_mask,
    .thread_state, .busy, .active
  );

  // ---------------- operand read ----------------
  logic [XLEN-1:0] gpr_a, gpr_b;
  logic [XLEN-1:0] rdaddr, rladdr, wraddr, wladdr, cnt;
  logic            gpr_we, dc_we;
  logic [XLEN-1:0] wval;

  omi_regfile u_rf (
    .clk, .rst_n,
    .ra_idx(i.ra[3:0]), .rb_idx(i.rb[3:0]),
    .ra_data(gpr_a), .rb_data(gpr_b),
    .we(gpr_we), .wa(i.dst[3:0]), .wd(wval)
  );

  assign dm_raddr[0] = rdaddr;
  assign dm_raddr[1] = rladdr;
  assign dm_raddr[2] = wraddr;
  assign dm_raddr[3] = wladdr;

  function automatic logic [XLEN-1:0] read_reg(reg_idx_t r, logic [XLEN-1:0] g);
    if (r < reg_idx_t'(NGPR)) return g;
    unique case (r)
      R_RDADDR: return rdaddr;
      R_RLADDR: return rladdr;
      R_WRADDR: return wraddr;
      R_WLADDR: return wladdr;
      R_RD:     return dm_rdata[0];
      R_RL:     return dm_rdata[1];
      R_WR:     return dm_rdata[2];
      R_WL:     return dm_rdata[3];
      R_CNT:    return cnt;
      default:  return '0;
    endcase
  endfunction

  logic [XLEN-1:0] opa;
  assign opa = read_reg(i.ra, gpr_a);
  assign opb = i.b_imm ? i.imm : read_reg(i.rb, gpr_b);

  // ---------------- execute ----------------
  logic            cond_res, alu_legal;
  logic [XLEN-1:0] alu_y;

  omi_cond u_cond (.op(i.op), .a(opa), .b(opb), .result(cond_res));
  omi_alu  u_alu  (.func(i.func), .a(opa), .b(opb), .y(alu_y), .legal(alu_legal));

  logic run, squash, stall;
  assign squash = issue_valid && ctx.skip && !is_loop(i.op);
  assign run    = issue_valid && !squash;
  assign stall  = fork_req && !fork_ok;

  assign fork_req = run && (i.op == OP_FORK);
  assign kill_req = run && (i.op == OP_KILL);

  logic is_omiop_ok, is_illegal, do_migrate;
  assign is_omiop_ok = (i.op == OP_OMIOP) && (ctx.omi_set == 8'd0) && alu_legal;
  assign is_illegal  = run && (i.op == OP_OMIOP) && !is_omiop_ok;
  assign do_migrate  = run && (i.op == OP_OMI) && (i.imm[7:0] != 8'd0);

  logic dst_we;
  always_comb begin
    unique case (i.op)
      OP_MOV:  wval = opa;
      OP_SET:  wval = i.imm;
      default: wval = alu_y;
    endcase
  end
  assign dst_we = run && ((i.op == OP_MOV) || (i.op == OP_SET) || is_omiop_ok);
  assign gpr_we = dst_we && (i.dst < reg_idx_t'(NGPR));
  assign dc_we  = dst_we && (i.dst >= R_RDADDR) && (i.dst <= R_WLADDR);

  assign dm_we    = dst_we && ((i.dst == R_WR) || (i.dst == R_WL));
  assign dm_waddr = (i.dst == R_WL) ? wladdr : wraddr;
  assign dm_wdata = wval;

  // ---------------- loops ----------------
  logic            lp_start, lp_zero, lp_cancel, flag_after;
  logic            iter_end, again, step_rl, step_wl;
  logic [PCW-1:0]  body_pc, exit_pc;
  logic [XLEN-1:0] stride_rl, stride_wl, trips;
  logic            zero;

  assign trips = (i.lmode == LM_REG) ? opa : i.imm;
  assign zero  = (i.len == '0) ||
                 ((i.lmode == LM_COND) ? !ctx.flag : (trips == '0));
  assign lp_start   = run && is_loop(i.op) && !zero;
  assign lp_zero    = run && is_loop(i.op) && zero;
  assign lp_cancel  = run && ((i.op == OP_EXEC) || do_migrate);
  assign flag_after = (run && is_cond(i.op)) ? cond_res : ctx.flag;

  omi_loop_unit #(.THREADS(THREADS)) u_loop (
    .clk, .rst_n, .tid, .alloc_mask, .pc(ctx.pc),
    .advance(issue_valid && !stall), .flag_after,
    .start(lp_start), .zero_trip(lp_zero),
    .start_len(i.len), .start_mode(i.lmode), .start_trips(trips),
    .start_step_r(i.op inside {OP_LR, OP_LRW}),
    .start_step_w(i.op inside {OP_LW, OP_LRW}),
    .start_stride_r(i.stride_r), .start_stride_w(i.stride_w),
    .cancel(lp_cancel),
    .iter_end, .again, .body_pc, .exit_pc,
    .step_rl, .step_wl, .stride_rl, .stride_wl, .cnt
  );

  omi_data_counters #(.THREADS(THREADS)) u_dc (
    .clk, .rst_n, .tid, .active(issue_valid && !stall), .fork_mask, .host_mask,
    .we(dc_we), .widx(i.dst[1:0]), .wdata(wval),
    .step_rl, .stride_rl, .step_wl, .stride_wl,
    .rdaddr, .rladdr, .wraddr, .wladdr
  );

  // ---------------- next context ----------------
  logic body_end;   // this instruction closes a loop iteration
  assign body_end = iter_end && !lp_start && !lp_zero && !lp_cancel;

  logic [PCW-1:0] next_pc;
  always_comb begin
    if (stall)                            next_pc = ctx.pc;
    else if (run && i.op == OP_EXEC)      next_pc = opb[PCW-1:0];
    else if (lp_zero)                     next_pc = ctx.pc + PCW'(i.len) + PCW'(1);
    else if (body_end)                    next_pc = again ? body_pc : exit_pc;
    else                                  next_pc = ctx.pc + PCW'(1);
  end

  always_comb begin
    upd       = ctx;
    upd.pc    = next_pc;
    upd.waddr = opb;
    if (!stall) begin
      upd.flag = flag_after;
      upd.skip = run && is_cond(i.op) && !cond_res && !body_end;
    end
    if (run && i.op == OP_OMI)            upd.omi_set = i.imm[7:0];
    if (do_migrate)                       act = ACT_FREE;
    else if (run && i.op == OP_WAIT)      act = ACT_WAIT;
    else                                  act = ACT_CONT;
  end

  assign migrate_valid = do_migrate;
  assign migrate_pc    = next_pc;
  assign migrate_set   = i.imm[7:0];

  // ---------------- events ----------------
  always_comb begin
    ev            = '0;
    ev.retire     = issue_valid && !stall;
    ev.squash     = squash;
    ev.forked     = fork_ok;
    ev.fork_stall = stall;
    ev.sleep      = run && (i.op == OP_WAIT);
    ev.wake       = |woken_mask;
    ev.kill       = |killed_mask;
    ev.loop_again = issue_valid && !stall && body_end && again;
    ev.loop_exit  = issue_valid && !stall && body_end && !again;
    ev.zero_trip  = lp_zero;
    ev.exec       = run && (i.op == OP_EXEC);
    ev.migrate    = do_migrate;
    ev.illegal    = is_illegal;
    ev.mem_write  = dm_we;
  end
endmodule
