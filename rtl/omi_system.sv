// omi_system: one OMI core with its code memory, data memory and host port.
//
// The host loads a program into code memory (prog_*), can read and write
// data memory (host_*), and starts a thread at a code address (start_*).
// Threads then run until they sleep, are killed or migrate; `busy` is high
// while any thread is ready to run and `active` while any context is in use.
//
// Data memory has one write port. A core write wins; a host write is
// performed only in a cycle where the core does not write (host_wready
// tells the host whether its write was taken). Either kind of write wakes
// threads waiting on that address, so the host can release a waiting thread
// by storing to the address it waits on. Host reads are asynchronous.
//
// Threads that switch to an OMI set this core lacks leave through the
// migrate_* port (pc to resume at and the requested set) for whatever
// system places them on another core.
//
// The memory sizes, the host port and the write priority are this design's
// choices; everything the threads do follows the ISA (see omi_core).
module omi_system
  import omi_pkg::*;
#(
  parameter int unsigned THREADS     = 4,
  parameter int unsigned DMEM_DEPTH  = 1024,
  localparam int unsigned IMEM_DEPTH = 2**PCW
) (
  input  logic             clk,
  input  logic             rst_n,
  // program load
  input  logic             prog_we,
  input  logic [PCW-1:0]   prog_addr,
  input  instr_t           prog_data,
  // host data access
  input  logic             host_we,
  input  logic [XLEN-1:0]  host_addr,
  input  logic [XLEN-1:0]  host_wdata,
  output logic             host_wready,
  output logic [XLEN-1:0]  host_rdata,
  // thread start
  input  logic             start_valid,
  input  logic [PCW-1:0]   start_pc,
  output logic             start_ok,
  // migration requests
  output logic             migrate_valid,
  output logic [PCW-1:0]   migrate_pc,
  output logic [7:0]       migrate_set,
  // status
  output logic             busy,
  output logic             active,
  output tstate_e          thread_state [THREADS],
  output core_ev_t         ev
);
  logic [PCW-1:0]  pc;
  instr_t          instr;
  logic [XLEN-1:0] c_raddr [4];
  logic [XLEN-1:0] c_rdata [4];
  logic            c_we;
  logic [XLEN-1:0] c_waddr, c_wdata;

  logic [XLEN-1:0] m_raddr [5];
  logic [XLEN-1:0] m_rdata [5];
  logic            m_we;
  logic [XLEN-1:0] m_waddr, m_wdata;

  omi_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .raddr(pc), .rdata(instr),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      m_raddr[p] = c_raddr[p];
      c_rdata[p] = m_rdata[p];
    end
    m_raddr[4] = host_addr;
  end
  assign host_rdata  = m_rdata[4];
  assign host_wready = !c_we;
  assign m_we        = c_we || host_we;
  assign m_waddr     = c_we ? c_waddr : host_addr;
  assign m_wdata     = c_we ? c_wdata : host_wdata;

  omi_data_mem #(.DEPTH(DMEM_DEPTH), .NRD(5)) u_dmem (
    .clk, .raddr(m_raddr), .rdata(m_rdata),
    .we(m_we), .waddr(m_waddr), .wdata(m_wdata)
  );

  omi_core #(.THREADS(THREADS)) u_core (
    .clk, .rst_n,
    .host_start(start_valid), .host_pc(start_pc), .host_start_ok(start_ok),
    .pc_out(pc), .instr,
    .dm_raddr(c_raddr), .dm_rdata(c_rdata),
    .dm_we(c_we), .dm_waddr(c_waddr), .dm_wdata(c_wdata),
    .mem_obs_we(m_we), .mem_obs_waddr(m_waddr),
    .migrate_valid, .migrate_pc, .migrate_set,
    .busy, .active, .thread_state, .ev
  );
endmodule
