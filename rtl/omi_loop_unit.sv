// omi_loop_unit: per-thread hardware loop state for l, lr, lw and lrw.
//
// A loop instruction at address P with body length L makes P+1..P+L its body.
// The trip count comes from an immediate, from a register, or from the
// thread's condition flag (repeat while the flag is true). Every thread keeps
// its own loop: a start pc, an end pc, a trip count, the iteration counter
// read as $cnt, and the strides by which the loop read and loop write data
// counters move at the end of each iteration.
//
// Interface, all for the thread `tid` issuing this cycle:
//   iter_end  the instruction at `pc` is the last of an active loop body
//   again     another iteration follows (count not reached / flag true)
//   body_pc   where the next iteration starts, exit_pc where the loop exits
//   step_*    pointer steps to apply this cycle, with sign-extended strides
//   cnt       the thread's $cnt: the iteration number inside the loop, the
//             number of iterations run right after it
// start enters a loop body (trips >= 1); zero_trip records a loop that ran
// no iteration ($cnt becomes 0); cancel drops the loop (control transfer);
// alloc_mask clears the state of newly created threads. State changes on
// the rising clock edge and only when `advance` says the instruction retired.
//
// Loop formats, strides and $cnt follow the ISA. One loop level per thread,
// the body-length field, the while-semantics of condition loops and stepping
// after every iteration including the last are this design's choices.
module omi_loop_unit
  import omi_pkg::*;
#(
  parameter int unsigned THREADS = 4,
  parameter int unsigned W       = XLEN
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(THREADS)-1:0]  tid,
  input  logic [THREADS-1:0]          alloc_mask,
  input  logic [PCW-1:0]              pc,
  input  logic                        advance,
  input  logic                        flag_after,
  input  logic                        start,
  input  logic                        zero_trip,
  input  logic [LENW-1:0]             start_len,
  input  loop_mode_e                  start_mode,
  input  logic [W-1:0]                start_trips,
  input  logic                        start_step_r,
  input  logic                        start_step_w,
  input  logic [15:0]                 start_stride_r,
  input  logic [15:0]                 start_stride_w,
  input  logic                        cancel,
  output logic                        iter_end,
  output logic                        again,
  output logic [PCW-1:0]              body_pc,
  output logic [PCW-1:0]              exit_pc,
  output logic                        step_rl,
  output logic                        step_wl,
  output logic [W-1:0]                stride_rl,
  output logic [W-1:0]                stride_wl,
  output logic [W-1:0]                cnt
);
  typedef struct packed {
    logic             active;
    loop_mode_e       mode;
    logic [PCW-1:0]   first;
    logic [PCW-1:0]   last;
    logic [W-1:0]     trips;
    logic [W-1:0]     cnt;
    logic             step_r;
    logic             step_w;
    logic [15:0]      stride_r;
    logic [15:0]      stride_w;
  } loop_t;

  loop_t lp [THREADS];
  loop_t cur;
  assign cur = lp[tid];

  logic [W-1:0] cnt_next;
  assign cnt_next = cur.cnt + W'(1);

  assign iter_end  = cur.active && (pc == cur.last);
  assign again     = (cur.mode == LM_COND) ? flag_after : (cnt_next < cur.trips);
  assign body_pc   = cur.first;
  assign exit_pc   = cur.last + PCW'(1);
  assign cnt       = cur.cnt;

  logic retire_iter;
  assign retire_iter = advance && iter_end && !start && !cancel;
  assign step_rl   = retire_iter && cur.step_r;
  assign step_wl   = retire_iter && cur.step_w;
  assign stride_rl = W'(signed'(cur.stride_r));
  assign stride_wl = W'(signed'(cur.stride_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) lp[t] <= '0;
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        if (alloc_mask[t]) lp[t] <= '0;
      end
      if (advance) begin
        if (start) begin
          lp[tid].active   <= 1'b1;
          lp[tid].mode     <= start_mode;
          lp[tid].first    <= pc + PCW'(1);
          lp[tid].last     <= pc + PCW'(start_len);
          lp[tid].trips    <= start_trips;
          lp[tid].cnt      <= '0;
          lp[tid].step_r   <= start_step_r;
          lp[tid].step_w   <= start_step_w;
          lp[tid].stride_r <= start_stride_r;
          lp[tid].stride_w <= start_stride_w;
        end else if (zero_trip) begin
          lp[tid].active <= 1'b0;
          lp[tid].cnt    <= '0;
        end else if (cancel) begin
          lp[tid].active <= 1'b0;
        end else if (iter_end) begin
          lp[tid].cnt <= cnt_next;
          if (!again) lp[tid].active <= 1'b0;
        end
      end
    end
  end
endmodule
