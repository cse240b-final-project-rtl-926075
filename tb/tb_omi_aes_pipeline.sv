// tb_omi_aes_pipeline: two AES round steps as a forked pipeline of threads.
//
// For each of NB 16-byte blocks (one byte per data word, column-major, byte
// i = row i%4, column i/4) the main thread forks a ShiftRows stage and an
// AddRoundKey stage, posts the block address to mailbox 900 and sleeps on
// 902. Stage ShiftRows sleeps on 900, then writes
//     out[r + 4c] = in[r + 4((c + r) mod 4)]
// with an lw loop driven by $cnt and the default module's mod, and posts its
// output address to 901. Stage AddRoundKey sleeps on 901, xors the block
// with the round key in an lrw loop (reading the key through $rdaddr = 80 +
// $cnt) and writes 902. Both stages then park on 999, and main kills them
// before the next block. The results are checked against a reference model
// of ShiftRows and AddRoundKey; the cycle count is reported.
module tb_omi_aes_pipeline;
  import omi_pkg::*;
  import omi_asm_pkg::*;

  localparam int NB  = 4;
  localparam int IN  = 100, SRO = 300, ARO = 500, KEY = 80;

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

  localparam reg_idx_t R2 = 2, R3 = 3, R4 = 4, R5 = 5, R6 = 6;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
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

  task automatic hread(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    host_addr = a;
    #1 d = host_rdata;
  endtask

  int n_cycles, n_fork, n_kill, n_sleep, n_wake;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (ev.forked) n_fork++;
    if (ev.kill)   n_kill++;
    if (ev.sleep)  n_sleep++;
    if (ev.wake)   n_wake++;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] blk [NB][16];
    logic [7:0] key [16];
    logic [31:0] d;
    int t0, cyc;
    {n_cycles, n_fork, n_kill, n_sleep, n_wake} = '0;
    prog_we = 0; prog_addr = 0; prog_data = '0;
    host_we = 0; host_addr = 0; host_wdata = 0;
    start_valid = 0; start_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int a = 0; a < 256; a++) load(8'(a), flowi(OP_WAIT, 997));
    // main
    load(0,  set(IN, R2));
    load(1,  loopi(OP_L, NB, 7));
    load(2,  flowi(OP_FORK, 40));
    load(3,  flowi(OP_FORK, 80));
    load(4,  set(900, R_WRADDR));
    load(5,  mov(R2, R_WR));
    load(6,  flowi(OP_WAIT, 902));
    load(7,  omii(F_ADD, R2, 16, R2));
    load(8,  flowi(OP_KILL, 999));
    load(9,  flowi(OP_WAIT, 998));
    // ShiftRows stage
    load(40, flowi(OP_WAIT, 900));
    load(41, set(900, R_RDADDR));
    load(42, mov(R_RD, R3));
    load(43, omii(F_ADD, R3, SRO - IN, R4));
    load(44, mov(R4, R_WLADDR));
    load(45, loopi(OP_LW, 16, 8, 0, 1));
    load(46, omii(F_AND, R_CNT, 3, R5));          // r
    load(47, omii(F_SRL, R_CNT, 2, R6));          // c
    load(48, omir(F_ADD, R6, R5, R6));            // c + r
    load(49, omii(F_MOD, R6, 4, R6));             // (c + r) mod 4
    load(50, omii(F_SLL, R6, 2, R6));
    load(51, omir(F_ADD, R6, R5, R6));
    load(52, omir(F_ADD, R6, R3, R_RDADDR));
    load(53, mov(R_RD, R_WL));
    load(54, set(901, R_WRADDR));
    load(55, mov(R4, R_WR));
    load(56, flowi(OP_WAIT, 999));
    // AddRoundKey stage
    load(80, flowi(OP_WAIT, 901));
    load(81, set(901, R_RDADDR));
    load(82, mov(R_RD, R_RLADDR));
    load(83, omii(F_ADD, R_RLADDR, ARO - SRO, R_WLADDR));
    load(84, loopi(OP_LRW, 16, 2, 1, 1));
    load(85, omii(F_ADD, R_CNT, KEY, R_RDADDR));
    load(86, omir(F_XOR, R_RL, R_RD, R_WL));
    load(87, set(902, R_WRADDR));
    load(88, set(1, R_WR));
    load(89, flowi(OP_WAIT, 999));

    foreach (key[i]) begin key[i] = 8'($urandom); hwrite(KEY + i, 32'(key[i])); end
    for (int b = 0; b < NB; b++)
      foreach (blk[b][i]) begin blk[b][i] = 8'($urandom); hwrite(IN + 16 * b + i, 32'(blk[b][i])); end

    @(negedge clk);
    start_valid = 1; start_pc = 0;
    @(negedge clk);
    start_valid = 0;
    t0 = n_cycles;
    while (!(thread_state[0] == TS_WAITING && dut.u_core.u_sched.ctx[0].waddr == 998)
           && n_cycles - t0 < 20000) @(negedge clk);
    cyc = n_cycles - t0;
    chk("main finished", thread_state[0], TS_WAITING);
    for (int t = 1; t < 4; t++) chk("stages killed", thread_state[t], TS_FREE);

    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        logic [7:0] sr;
        sr = blk[b][r + 4 * ((c + r) % 4)];
        hread(SRO + 16 * b + r + 4 * c, d);
        chk($sformatf("ShiftRows b%0d r%0d c%0d", b, r, c), d, 32'(sr));
        hread(ARO + 16 * b + r + 4 * c, d);
        chk($sformatf("AddRoundKey b%0d r%0d c%0d", b, r, c), d, 32'(sr ^ key[r + 4 * c]));
      end
    end
    checks++; if (n_fork != 2 * NB) begin failures++; $display("FAIL forks %0d", n_fork); end
    checks++; if (n_kill != NB)     begin failures++; $display("FAIL kills %0d", n_kill); end
    $display("%0d blocks in %0d cycles (%0d sleeps, %0d wake-ups)", NB, cyc, n_sleep, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
