// tb_omi_scheduler: plays the core's part for the scheduler: starts a
// thread from the host, forks until the contexts are full, checks that fork
// then fails, checks round-robin issue order, puts threads to sleep on data
// addresses, wakes one by a write, kills two waiting on the same address,
// and frees a context through ACT_FREE.
module tb_omi_scheduler;
  import omi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_start, host_start_ok, issue_valid, fork_req, fork_ok, kill_req, mem_we;
  logic busy, active;
  logic [7:0] host_pc, fork_pc, fork_set;
  logic [1:0] issue_tid;
  ctx_t issue_ctx, upd_ctx;
  act_e upd_act;
  logic [31:0] kill_addr, mem_waddr;
  logic [3:0] alloc_mask, fork_mask, host_mask, killed_mask, woken_mask;
  tstate_e thread_state [4];
  int checks = 0, failures = 0;

  omi_scheduler dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Default behaviour of the "core": advance the issued thread by one.
  always_comb begin
    upd_ctx    = issue_ctx;
    upd_ctx.pc = issue_ctx.pc + 8'd1;
  end

  task automatic quiet();
    host_start = 0; fork_req = 0; kill_req = 0; mem_we = 0; upd_act = ACT_CONT;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    quiet(); host_pc = 0; fork_pc = 0; fork_set = 0; kill_addr = 0; mem_waddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle", issue_valid, 0);
    chk("not active", active, 0);

    // host start at pc 5 -> context 0
    host_start = 1; host_pc = 5; #1;
    chk("start ok", host_start_ok, 1);
    chk("alloc ctx0", alloc_mask, 4'b0001);
    chk("host mask", host_mask, 4'b0001);
    @(negedge clk); quiet(); #1;
    chk("issue t0", issue_valid, 1); chk("tid 0", issue_tid, 0); chk("pc 5", issue_ctx.pc, 5);

    // thread 0 forks three times (targets 20, 30, 40, OMI set 0)
    for (int k = 1; k <= 3; k++) begin
      // wait until thread 0 is the one issuing
      while (issue_tid != 0) begin @(negedge clk); #1; end
      fork_req = 1; fork_pc = 8'(10 * (k + 1)); #1;
      chk("fork ok", fork_ok, 1);
      chk("fork slot", alloc_mask, 4'b1 << k);
      chk("fork mask", fork_mask, 4'b1 << k);
      @(negedge clk); quiet(); #1;
    end
    foreach (thread_state[t]) chk("all ready", thread_state[t], TS_READY);

    // full: fork must fail
    fork_req = 1; fork_pc = 99; #1;
    chk("fork full", fork_ok, 0);
    chk("no alloc", alloc_mask, 0);
    @(negedge clk); quiet(); #1;

    // round robin: four consecutive issues visit all four threads
    begin
      logic [3:0] seen;
      logic [1:0] prev;
      seen = 0; prev = issue_tid;
      for (int n = 0; n < 4; n++) begin
        seen[issue_tid] = 1'b1;
        @(negedge clk); #1;
        chk("rr next", issue_tid, 2'(prev + 1));
        prev = issue_tid;
      end
      chk("rr all seen", seen, 4'hf);
    end

    // thread 1 sleeps on address 100, threads 2 and 3 on 300
    for (int t = 1; t <= 3; t++) begin
      while (issue_tid != 2'(t)) begin @(negedge clk); #1; end
      upd_act = ACT_WAIT;
      upd_ctx.waddr = (t == 1) ? 100 : 300;
      @(negedge clk); quiet(); #1;
    end
    chk("t1 waiting", thread_state[1], TS_WAITING);
    chk("t2 waiting", thread_state[2], TS_WAITING);
    chk("t3 waiting", thread_state[3], TS_WAITING);
    chk("only t0 issues", issue_tid, 0);

    // write elsewhere: nothing; write to 100: thread 1 wakes
    mem_we = 1; mem_waddr = 200; #1;
    chk("no wake", woken_mask, 0);
    @(negedge clk); mem_waddr = 100; #1;
    chk("wake t1", woken_mask, 4'b0010);
    @(negedge clk); quiet(); #1;
    chk("t1 ready", thread_state[1], TS_READY);

    // kill 300 together with a write to 300: kill wins, both freed
    kill_req = 1; kill_addr = 300; mem_we = 1; mem_waddr = 300; #1;
    chk("kill mask", killed_mask, 4'b1100);
    chk("kill beats wake", woken_mask, 0);
    @(negedge clk); quiet(); #1;
    chk("t2 free", thread_state[2], TS_FREE);
    chk("t3 free", thread_state[3], TS_FREE);

    // thread 1 releases its context
    while (issue_tid != 1) begin @(negedge clk); #1; end
    upd_act = ACT_FREE;
    @(negedge clk); quiet(); #1;
    chk("t1 free", thread_state[1], TS_FREE);

    // fork from thread 0 now takes the lowest free slot, 1, and inherits its set
    while (issue_tid != 0) begin @(negedge clk); #1; end
    fork_req = 1; fork_pc = 77; fork_set = 8'd3; #1;
    chk("refork slot", alloc_mask, 4'b0010);
    @(negedge clk); quiet(); #1;
    while (issue_tid != 1) begin @(negedge clk); #1; end
    chk("forked pc", issue_ctx.pc, 77);
    chk("forked set", issue_ctx.omi_set, 3);

    // last thread leaves: core inactive
    for (int t = 0; t < 2; t++) begin
      upd_act = ACT_FREE;
      @(negedge clk); quiet(); #1;
    end
    chk("inactive", active, 0);
    chk("not busy", busy, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
