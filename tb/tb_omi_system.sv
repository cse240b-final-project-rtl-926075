// tb_omi_system: end-to-end run of the whole system at its default sizes.
//
// The host loads a small multithreaded pipeline, in the style of a forked
// block-cipher round: a main thread forks three stage threads that sleep on
// mailbox addresses.
//   stage A (wait 500): lrw loop, out[i] = in[i] ^ 0xff, reading from the
//                       $rdaddr it inherited from main, then posts 501
//   stage B (wait 501): lr loop sums out[], stores it to 502, then switches
//                       to OMI set 3, which this core lacks: it migrates
//   stage C (wait 600): killed by the main thread before anyone writes 600
//   stage D (wait 502): predicated store (squashed), zero-trip loop, then
//                       copies the sum to 504
//   stage E:            forked while all contexts are busy; the fork stalls
//                       until B's migration frees a context
// The main thread sleeps on 505 until the host writes it, then posts 500,
// forks D and E and execs to its epilogue. The test counts every mechanism
// (fork, fork stall, sleep, wake by core and by host, kill, loop repeat and
// exit, zero-trip loop, squash, exec, migration) and fails if one never
// happens, then checks the data in memory.
module tb_omi_system;
  import omi_pkg::*;
  import omi_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prog_we, host_we, host_wready, start_valid, start_ok, migrate_valid, busy, active;
  logic [7:0] prog_addr, start_pc, migrate_pc, migrate_set;
  instr_t prog_data;
  logic [31:0] host_addr, host_wdata, host_rdata;
  tstate_e thread_state [4];
  core_ev_t ev;
  int checks = 0, failures = 0;

  omi_system dut (.*);
  always #5 clk = ~clk;

  localparam reg_idx_t R2 = 2, R3 = 3, R9 = 9;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) exp %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic load(logic [7:0] a, instr_t x);
    @(negedge clk);
    prog_we = 1; prog_addr = a; prog_data = x;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic hwrite(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    #1;
    while (!host_wready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic logic [31:0] hread(logic [31:0] a);
    return dut.u_dmem.mem[a[9:0]];
  endfunction

  // event counters
  int n_fork, n_stall, n_sleep, n_wake, n_kill, n_again, n_exit, n_zero, n_squash,
      n_exec, n_migrate, n_cycles;
  logic [7:0] mig_pc, mig_set;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (ev.forked)     n_fork++;
    if (ev.fork_stall) n_stall++;
    if (ev.sleep)      n_sleep++;
    if (ev.wake)       n_wake++;
    if (ev.kill)       n_kill++;
    if (ev.loop_again) n_again++;
    if (ev.loop_exit)  n_exit++;
    if (ev.zero_trip)  n_zero++;
    if (ev.squash)     n_squash++;
    if (ev.exec)       n_exec++;
    if (migrate_valid) begin n_migrate++; mig_pc = migrate_pc; mig_set = migrate_set; end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, t0;
    {n_fork, n_stall, n_sleep, n_wake, n_kill, n_again, n_exit, n_zero, n_squash,
     n_exec, n_migrate, n_cycles} = '0;
    mig_pc = 0; mig_set = 0;
    prog_we = 0; prog_addr = 0; prog_data = '0;
    host_we = 0; host_addr = 0; host_wdata = 0;
    start_valid = 0; start_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // every unused word parks a thread
    for (int a = 0; a < 256; a++) load(8'(a), flowi(OP_WAIT, 800));
    // main
    load(0,  set(300, R_RDADDR));
    load(1,  flowi(OP_FORK, 40));
    load(2,  flowi(OP_FORK, 60));
    load(3,  flowi(OP_FORK, 80));
    load(4,  set(600, R9));
    load(5,  flowr(OP_KILL, R9));
    load(6,  flowi(OP_WAIT, 505));
    load(7,  set(500, R_WRADDR));
    load(8,  set(1, R_WR));
    load(9,  flowi(OP_FORK, 90));
    load(10, flowi(OP_FORK, 110));
    load(11, flowi(OP_EXEC, 20));
    load(20, set(506, R_WRADDR));
    load(21, set(1, R_WR));
    load(22, flowi(OP_WAIT, 700));
    // stage A
    load(40, flowi(OP_WAIT, 500));
    load(41, mov(R_RDADDR, R_RLADDR));
    load(42, set(400, R_WLADDR));
    load(43, loopi(OP_LRW, 8, 1, 1, 1));
    load(44, omii(F_XOR, R_RL, 32'hff, R_WL));
    load(45, set(501, R_WRADDR));
    load(46, set(1, R_WR));
    load(47, flowi(OP_WAIT, 700));
    // stage B
    load(60, flowi(OP_WAIT, 501));
    load(61, set(400, R_RLADDR));
    load(62, set(0, R2));
    load(63, loopi(OP_LR, 8, 1, 1));
    load(64, omir(F_ADD, R2, R_RL, R2));
    load(65, set(502, R_WRADDR));
    load(66, mov(R2, R_WR));
    load(67, omi(3));
    // stage C
    load(80, flowi(OP_WAIT, 600));
    load(81, set(503, R_WRADDR));
    load(82, set(666, R_WR));
    // stage D
    load(90, flowi(OP_WAIT, 502));
    load(91, set(504, R_WRADDR));
    load(92, condi(OP_LT, R2, 0));
    load(93, set(777, R_WR));
    load(94, set(0, R3));
    load(95, loopr(OP_L, R3, 1));
    load(96, set(888, R_WR));
    load(97, mov(R2, R_WR));
    load(98, flowi(OP_WAIT, 700));
    // stage E
    load(110, set(507, R_WRADDR));
    load(111, set(32'h1234, R_WR));
    load(112, flowi(OP_WAIT, 700));

    // data memory has no reset: clear the mailbox and result area
    for (int a = 400; a < 520; a++) hwrite(a, 0);
    sum = 0;
    for (int k = 0; k < 8; k++) begin
      hwrite(300 + k, 10 + k);
      sum += (10 + k) ^ 8'hff;
    end

    @(negedge clk);
    start_valid = 1; start_pc = 0;
    #1 chk("start ok", start_ok, 1);
    @(negedge clk);
    start_valid = 0;

    // wait for main to sleep on 505, then release it from the host
    t0 = n_cycles;
    while (!(thread_state[0] == TS_WAITING && dut.u_core.u_sched.ctx[0].waddr == 505)
           && n_cycles - t0 < 200) @(negedge clk);
    chk("main sleeping on 505", thread_state[0], TS_WAITING);
    chk("C killed", thread_state[3], TS_FREE);
    hwrite(505, 1);

    // run until every thread sleeps
    t0 = n_cycles;
    do @(negedge clk); while (busy && n_cycles - t0 < 2000);
    chk("all asleep", busy, 0);

    for (int k = 0; k < 8; k++) chk("stage A output", hread(400 + k), (10 + k) ^ 32'hff);
    chk("stage B sum", hread(502), sum);
    chk("stage C never ran", hread(503), 0);
    chk("stage D copy", hread(504), sum);
    chk("main epilogue", hread(506), 1);
    chk("stage E", hread(507), 32'h1234);
    chk("migrate pc", mig_pc, 68);
    chk("migrate set", mig_set, 3);
    @(negedge clk); host_addr = 502; #1;
    chk("host read", host_rdata, sum);
    chk("threads left", active, 1);
    for (int t = 0; t < 4; t++) chk("parked", thread_state[t], TS_WAITING);

    $display("events: fork=%0d stall=%0d sleep=%0d wake=%0d kill=%0d again=%0d exit=%0d zero=%0d squash=%0d exec=%0d migrate=%0d",
             n_fork, n_stall, n_sleep, n_wake, n_kill, n_again, n_exit, n_zero, n_squash,
             n_exec, n_migrate);
    checks++; if (n_fork < 5)    begin failures++; $display("FAIL forks"); end
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL no fork stall"); end
    checks++; if (n_sleep == 0)  begin failures++; $display("FAIL no sleep"); end
    checks++; if (n_wake < 4)    begin failures++; $display("FAIL wakes"); end
    checks++; if (n_kill != 1)   begin failures++; $display("FAIL kill count"); end
    checks++; if (n_again != 14) begin failures++; $display("FAIL loop repeats"); end
    checks++; if (n_exit != 2)   begin failures++; $display("FAIL loop exits"); end
    checks++; if (n_zero != 1)   begin failures++; $display("FAIL zero trip"); end
    checks++; if (n_squash != 1) begin failures++; $display("FAIL squash"); end
    checks++; if (n_exec != 1)   begin failures++; $display("FAIL exec"); end
    checks++; if (n_migrate != 1) begin failures++; $display("FAIL migrate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
