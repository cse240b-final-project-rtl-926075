// tb_omi_loop_unit: walks loop bodies pc by pc, the way the core does, and
// checks iteration ends, repeat decisions, pointer steps, strides and $cnt
// for counted and condition loops, two threads at once, a zero-trip loop,
// cancellation and clearing on thread allocation.
module tb_omi_loop_unit;
  import omi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] tid;
  logic [3:0] alloc_mask;
  logic [7:0] pc;
  logic advance, flag_after, start, zero_trip, cancel, start_step_r, start_step_w;
  logic [7:0] start_len;
  loop_mode_e start_mode;
  logic [31:0] start_trips;
  logic [15:0] start_stride_r, start_stride_w;
  logic iter_end, again, step_rl, step_wl;
  logic [7:0] body_pc, exit_pc;
  logic [31:0] stride_rl, stride_wl, cnt;
  int checks = 0, failures = 0;

  omi_loop_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic idle();
    advance = 0; start = 0; zero_trip = 0; cancel = 0; flag_after = 0; alloc_mask = 0;
  endtask

  // Issue one non-loop instruction of thread t at address p.
  task automatic step(logic [1:0] t, logic [7:0] p, logic f = 0);
    @(negedge clk);
    idle(); tid = t; pc = p; advance = 1; flag_after = f;
    #1;
  endtask

  task automatic begin_loop(logic [1:0] t, logic [7:0] p, logic [7:0] len, loop_mode_e m,
                            logic [31:0] trips, logic sr, logic sw,
                            logic [15:0] rs, logic [15:0] ws);
    @(negedge clk);
    idle(); tid = t; pc = p; advance = 1; start = 1;
    start_len = len; start_mode = m; start_trips = trips;
    start_step_r = sr; start_step_w = sw; start_stride_r = rs; start_stride_w = ws;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); tid = 0; pc = 0; start_len = 0; start_mode = LM_IMM; start_trips = 0;
    start_step_r = 0; start_step_w = 0; start_stride_r = 0; start_stride_w = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // lrw 3, -1, 2 at pc 10 on thread 1: body 11..13
    begin_loop(1, 10, 3, LM_IMM, 3, 1, 1, 16'hffff, 16'd2);
    for (int it = 0; it < 3; it++) begin
      for (int p = 11; p <= 13; p++) begin
        step(1, 8'(p));
        chk("cnt in body", cnt, it);
        chk("iter_end", iter_end, p == 13);
        chk("step_rl", step_rl, p == 13);
        chk("step_wl", step_wl, p == 13);
        if (p == 13) begin
          chk("again", again, it < 2);
          chk("body_pc", body_pc, 11);
          chk("exit_pc", exit_pc, 14);
          chk("stride_rl", stride_rl, 32'hffff_ffff);
          chk("stride_wl", stride_wl, 2);
        end
      end
    end
    step(1, 14);
    chk("after loop iter_end", iter_end, 0);
    chk("after loop cnt", cnt, 3);

    // condition loop on thread 2 (lr, stride 4), interleaved with thread 1
    begin_loop(2, 40, 2, LM_COND, 0, 1, 0, 16'd4, 16'd0);
    for (int it = 0; it < 4; it++) begin
      step(2, 41);
      chk("cond cnt", cnt, it);
      step(1, 15);
      chk("thread 1 untouched", cnt, 3);
      step(2, 42, it < 3);
      chk("cond end", iter_end, 1);
      chk("cond again", again, it < 3);
      chk("cond step_wl off", step_wl, 0);
      chk("cond stride", stride_rl, 4);
    end
    step(2, 43);
    chk("cond loop cnt", cnt, 4);
    chk("cond inactive", iter_end, 0);

    // a stalled (not advancing) last instruction does not end the iteration
    begin_loop(0, 60, 1, LM_IMM, 2, 0, 0, 0, 0);
    @(negedge clk); idle(); tid = 0; pc = 61; #1;
    chk("no step when stalled", step_rl, 0);
    @(posedge clk);
    step(0, 61); chk("cnt before", cnt, 0);
    step(0, 61); chk("cnt second", cnt, 1); chk("last", again, 0);
    step(0, 62); chk("cnt two", cnt, 2);

    // zero-trip loop resets $cnt
    @(negedge clk); idle(); tid = 0; pc = 70; advance = 1; zero_trip = 1;
    step(0, 74); chk("zero trip cnt", cnt, 0);

    // cancel drops the loop
    begin_loop(3, 80, 4, LM_IMM, 5, 0, 0, 0, 0);
    @(negedge clk); idle(); tid = 3; pc = 81; advance = 1; cancel = 1;
    step(3, 84); chk("cancelled", iter_end, 0);

    // allocation clears the state
    begin_loop(3, 90, 1, LM_IMM, 5, 0, 0, 0, 0);
    @(negedge clk); idle(); alloc_mask = 4'b1000;
    step(3, 91); chk("cleared by alloc", iter_end, 0); chk("cleared cnt", cnt, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
