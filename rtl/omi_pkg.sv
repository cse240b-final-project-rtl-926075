// omi_pkg: types and constants shared by the OMI multithreaded core.
//
// The ISA has register-to-register instructions, loops with optional
// pointer strides, condition instructions that predicate the next
// instruction or end a loop, flow control (exec, fork, wait, kill) and
// OMI (operation module) instructions. Memory is reached only through
// "magic" registers: four data counters holding addresses and four data
// registers that read or write the word each counter points at, plus the
// loop iteration counter $cnt.
//
// The instruction set, the magic registers and the default OMI function
// list (add, sub, sll, srl, sra, and, or, xor, then mod) follow the ISA
// description. The binary encoding below (a 96-bit instruction word with
// wide immediate and stride fields), the register numbering, the 32-bit
// data width and all sizes are this design's own choices.
package omi_pkg;

  parameter int unsigned XLEN  = 32;   // data and address width
  parameter int unsigned NGPR  = 16;   // general registers $0..$15
  parameter int unsigned PCW   = 8;    // program counter width (256-entry code memory)
  parameter int unsigned LENW  = 8;    // loop body length field

  // 5-bit register specifiers: 0..15 general, then the magic registers.
  typedef logic [4:0] reg_idx_t;
  localparam reg_idx_t R_RDADDR = 5'd16;  // global read address
  localparam reg_idx_t R_RLADDR = 5'd17;  // loop read address
  localparam reg_idx_t R_WRADDR = 5'd18;  // global write address
  localparam reg_idx_t R_WLADDR = 5'd19;  // loop write address
  localparam reg_idx_t R_RD     = 5'd20;  // mem[rdaddr], read
  localparam reg_idx_t R_RL     = 5'd21;  // mem[rladdr], read
  localparam reg_idx_t R_WR     = 5'd22;  // mem[wraddr], write (reads return it too)
  localparam reg_idx_t R_WL     = 5'd23;  // mem[wladdr], write (reads return it too)
  localparam reg_idx_t R_CNT    = 5'd24;  // loop iteration count, read only

  typedef enum logic [4:0] {
    OP_MOV   = 5'd0,   // mov  src(ra), dst
    OP_SET   = 5'd1,   // set  imm, dst
    OP_L     = 5'd2,   // loop, no pointer stride
    OP_LR    = 5'd3,   // loop, loop read pointer += stride_r per iteration
    OP_LW    = 5'd4,   // loop, loop write pointer += stride_w per iteration
    OP_LRW   = 5'd5,   // loop, both pointers stepped
    OP_CMP   = 5'd6,   // a == b
    OP_NCMP  = 5'd7,   // a != b
    OP_GT    = 5'd8,   // a >  b
    OP_GTE   = 5'd9,   // a >= b
    OP_LT    = 5'd10,  // a <  b
    OP_LTE   = 5'd11,  // a <= b
    OP_EXEC  = 5'd12,  // continue at code address b
    OP_FORK  = 5'd13,  // start a new thread at code address b
    OP_WAIT  = 5'd14,  // sleep until data address b is written
    OP_KILL  = 5'd15,  // end every thread waiting on data address b
    OP_OMI   = 5'd16,  // switch this thread to OMI set imm
    OP_OMIOP = 5'd17   // OMI function func: dst = f(a, b)
  } opcode_e;

  // Trip-count source of a loop instruction.
  typedef enum logic [1:0] {
    LM_IMM  = 2'd0,    // imm iterations
    LM_REG  = 2'd1,    // value of register ra iterations
    LM_COND = 2'd2     // while the thread's condition flag is true
  } loop_mode_e;

  // Default OMI module function numbers.
  localparam logic [7:0] F_ADD = 8'd0, F_SUB = 8'd1, F_SLL = 8'd2, F_SRL = 8'd3,
                         F_SRA = 8'd4, F_AND = 8'd5, F_OR  = 8'd6, F_XOR = 8'd7,
                         F_MOD = 8'd8;

  typedef struct packed {
    opcode_e          op;        // 5
    reg_idx_t         dst;       // 5
    reg_idx_t         ra;        // 5
    reg_idx_t         rb;        // 5
    logic             b_imm;     // 1: operand b is imm instead of rb
    loop_mode_e       lmode;     // 2
    logic [LENW-1:0]  len;       // 8: loop body length in instructions
    logic [7:0]       func;      // 8: OMI function number
    logic [12:0]      rsvd;      // 13: unused, write zero
    logic [15:0]      stride_r;  // 16: signed loop read stride
    logic [15:0]      stride_w;  // 16: signed loop write stride
    logic [XLEN-1:0]  imm;       // 32
  } instr_t;                     // 96 bits in total

  typedef enum logic [1:0] {
    TS_FREE    = 2'd0,
    TS_READY   = 2'd1,
    TS_WAITING = 2'd2
  } tstate_e;

  // Architectural state of one thread besides its loop state.
  typedef struct packed {
    tstate_e          st;
    logic [PCW-1:0]   pc;
    logic [XLEN-1:0]  waddr;     // data address a waiting thread sleeps on
    logic [7:0]       omi_set;   // current OMI instruction set
    logic             flag;      // last condition result
    logic             skip;      // squash the next instruction
  } ctx_t;

  // What the core does with the issued thread at the end of a cycle.
  typedef enum logic [1:0] {
    ACT_CONT = 2'd0,   // stay ready with the updated context
    ACT_WAIT = 2'd1,   // go to sleep on upd.waddr
    ACT_FREE = 2'd2    // release the context (thread migrates away)
  } act_e;

  // One-cycle event strobes of the core, for monitoring and tests.
  typedef struct packed {
    logic retire;      // an instruction left the issue slot (not stalled)
    logic squash;      // it was squashed by a false condition
    logic forked;      // a new thread was created
    logic fork_stall;  // fork found no free context and will retry
    logic sleep;       // a thread went to sleep on a data address
    logic wake;        // a write woke at least one waiting thread
    logic kill;        // at least one waiting thread was killed
    logic loop_again;  // a loop body ended and starts another iteration
    logic loop_exit;   // a loop body ended for the last time
    logic zero_trip;   // a loop ran no iteration
    logic exec;        // control moved to another code address
    logic migrate;     // a thread left the core for another OMI set
    logic illegal;     // an OMI function this core does not implement
    logic mem_write;   // the core wrote data memory
  } core_ev_t;

  function automatic logic is_cond(opcode_e op);
    return op inside {OP_CMP, OP_NCMP, OP_GT, OP_GTE, OP_LT, OP_LTE};
  endfunction

  function automatic logic is_loop(opcode_e op);
    return op inside {OP_L, OP_LR, OP_LW, OP_LRW};
  endfunction

endpackage
