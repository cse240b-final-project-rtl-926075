// tb_omi_core: runs a single-thread program on the core with behavioural
// code and data memories and checks the data it stores. The program covers
// set/mov, the default OMI functions including mod and sra, the magic data
// registers ($rd, $rl, $wr, $wl, the four counters, $cnt), predication,
// l/lr/lw/lrw loops with immediate, register and condition trip counts,
// a zero-trip loop, exec, ignored writes to $cnt and an unimplemented OMI
// function. The core issues one instruction per cycle, so the thread must
// reach its final wait after exactly as many retired instructions as the
// program executes (82).
module tb_omi_core;
  import omi_pkg::*;
  import omi_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_start, host_start_ok, dm_we, busy, active, migrate_valid;
  logic [7:0] host_pc, pc_out, migrate_pc, migrate_set;
  instr_t instr;
  logic [31:0] dm_raddr [4];
  logic [31:0] dm_rdata [4];
  logic [31:0] dm_waddr, dm_wdata;
  tstate_e thread_state [4];
  core_ev_t ev;

  instr_t      imem [256];
  logic [31:0] dmem [1024];
  int checks = 0, failures = 0;

  omi_core dut (
    .clk, .rst_n, .host_start, .host_pc, .host_start_ok,
    .pc_out, .instr, .dm_raddr, .dm_rdata, .dm_we, .dm_waddr, .dm_wdata,
    .mem_obs_we(dm_we), .mem_obs_waddr(dm_waddr),
    .migrate_valid, .migrate_pc, .migrate_set, .busy, .active, .thread_state, .ev
  );

  always #5 clk = ~clk;
  assign instr = imem[pc_out];
  always_comb for (int p = 0; p < 4; p++) dm_rdata[p] = dmem[dm_raddr[p][9:0]];
  always_ff @(posedge clk) if (dm_we) dmem[dm_waddr[9:0]] <= dm_wdata;

  localparam reg_idx_t R1 = 1, R2 = 2, R3 = 3, R4 = 4, R5 = 5, R6 = 6, R7 = 7, R8 = 8;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) exp %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int retired;
    foreach (imem[k]) imem[k] = flowi(OP_WAIT, 1000);
    foreach (dmem[k]) dmem[k] = 0;
    imem[0]  = set(100, R_WRADDR);
    imem[1]  = set(7, R1);
    imem[2]  = omii(F_ADD, R1, 5, R2);            // $2 = 12
    imem[3]  = mov(R2, R_WR);                     // [100] = 12
    imem[4]  = set(101, R_WRADDR);
    imem[5]  = omii(F_SUB, R1, 10, R_WR);         // [101] = -3
    imem[6]  = set(102, R_WRADDR);
    imem[7]  = omii(F_MOD, R2, 5, R_WR);          // [102] = 2
    imem[8]  = set(103, R_WRADDR);
    imem[9]  = set(32'h8000_0000, R3);
    imem[10] = omii(F_SRA, R3, 4, R_WR);          // [103] = f8000000
    imem[11] = condi(OP_CMP, R1, 7);              // true
    imem[12] = set(111, R4);                      // runs
    imem[13] = condi(OP_NCMP, R1, 7);             // false
    imem[14] = set(222, R4);                      // squashed
    imem[15] = set(104, R_WRADDR);
    imem[16] = mov(R4, R_WR);                     // [104] = 111
    imem[17] = set(200, R_WLADDR);
    imem[18] = loopi(OP_LW, 5, 1, 0, 1);          // lw 5, 1
    imem[19] = mov(R_CNT, R_WL);                  //   [200+i] = i
    imem[20] = set(105, R_WRADDR);
    imem[21] = mov(R_CNT, R_WR);                  // [105] = 5
    imem[22] = set(204, R_RLADDR);
    imem[23] = set(210, R_WLADDR);
    imem[24] = loopi(OP_LRW, 5, 1, 16'hffff, 1);  // lrw 5, -1, 1
    imem[25] = omii(F_ADD, R_RL, 100, R_WL);      //   [210+i] = [204-i] + 100
    imem[26] = set(0, R5);
    imem[27] = set(3, R6);
    imem[28] = set(200, R_RLADDR);
    imem[29] = loopr(OP_LR, R6, 1, 1);            // lr $6, 1
    imem[30] = omir(F_ADD, R5, R_RL, R5);         //   $5 += [200+i]
    imem[31] = set(106, R_WRADDR);
    imem[32] = mov(R5, R_WR);                     // [106] = 3
    imem[33] = set(1, R7);
    imem[34] = condi(OP_LT, R7, 100);
    imem[35] = loopc(OP_L, 2);                    // l cond
    imem[36] = omii(F_SLL, R7, 1, R7);            //   $7 <<= 1
    imem[37] = condi(OP_LT, R7, 100);             //   while $7 < 100
    imem[38] = set(107, R_WRADDR);
    imem[39] = mov(R7, R_WR);                     // [107] = 128
    imem[40] = set(108, R_WRADDR);
    imem[41] = mov(R_CNT, R_WR);                  // [108] = 7
    imem[42] = loopi(OP_L, 0, 1);                 // l 0: body skipped
    imem[43] = set(999, R8);
    imem[44] = set(109, R_WRADDR);
    imem[45] = mov(R_CNT, R_WR);                  // [109] = 0
    imem[46] = set(110, R_WRADDR);
    imem[47] = flowi(OP_EXEC, 50);
    imem[48] = set(666, R_WR);
    imem[49] = set(666, R_WR);
    imem[50] = set(555, R_WR);                    // [110] = 555
    imem[51] = set(100, R_RDADDR);
    imem[52] = set(111, R_WRADDR);
    imem[53] = omii(F_ADD, R_RD, 1, R_WR);        // [111] = 13
    imem[54] = set(112, R_WRADDR);
    imem[55] = mov(R_RDADDR, R_WR);               // [112] = 100
    imem[56] = set(5, R_CNT);                     // ignored
    imem[57] = set(113, R_WRADDR);
    imem[58] = mov(R_CNT, R_WR);                  // [113] = 0
    imem[59] = set(114, R_WRADDR);
    imem[60] = set(42, R_WR);
    imem[61] = omii(8'd9, R1, 1, R_WR);           // not implemented: [114] stays 42
    imem[62] = flowi(OP_WAIT, 900);

    host_start = 0; host_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    host_start = 1; host_pc = 0;
    #1 chk("start accepted", host_start_ok, 1);
    @(negedge clk);
    host_start = 0;
    retired = 0;
    while (thread_state[0] != TS_WAITING && retired < 1000) begin
      @(posedge clk);
      if (ev.retire) retired++;
      #1;
    end
    chk("instructions to the final wait", retired, 82);
    chk("wait address", dut.u_sched.ctx[0].waddr, 900);
    chk("add/mov $wr", dmem[100], 12);
    chk("sub", dmem[101], 32'hffff_fffd);
    chk("mod", dmem[102], 2);
    chk("sra", dmem[103], 32'hf800_0000);
    chk("predication", dmem[104], 111);
    for (int k = 0; k < 5; k++) chk("lw + $cnt", dmem[200 + k], k);
    chk("$cnt after loop", dmem[105], 5);
    for (int k = 0; k < 5; k++) chk("lrw", dmem[210 + k], 104 - k);
    chk("lr reg count", dmem[106], 3);
    chk("cond loop value", dmem[107], 128);
    chk("cond loop $cnt", dmem[108], 7);
    chk("zero trip $cnt", dmem[109], 0);
    chk("exec", dmem[110], 555);
    chk("$rd", dmem[111], 13);
    chk("read $rdaddr", dmem[112], 100);
    chk("$cnt not writable", dmem[113], 0);
    chk("unimplemented func", dmem[114], 42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
