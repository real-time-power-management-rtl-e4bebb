// mpp_pkg: shared constants and types of the multi-performance processor.
//
// The processor holds several PE-cores with the same instruction set but
// different speed/voltage points. Only one core of an MPU runs at a time; the
// rest are clock gated and their inputs are held at constants (signal
// gating). Every clock in the design is derived from one reference clock by
// clock-enable strobes: with a 400 MHz reference the high-end core runs at
// 1/2 (200 MHz), the middle-end core at 1/3 (133 MHz), the low-end core and
// the AHB bus at 1/6 (67 MHz), which makes each core clock a whole multiple
// of the bus clock as in the prototype. The reference frequency and the
// divider scheme are this design's choice; the three core frequencies and the
// bus frequency are the prototype's.
//
// The PE-core itself is not part of this RTL. Its connection to an MPU is the
// pair of structs pe_out_t (core to MPU) and pe_in_t (MPU to core):
//   * instruction fetch: if_req/if_addr held until if_ready, if_rdata valid
//     with if_ready;
//   * data access: d_req/d_we/d_addr/d_wdata held until d_ready, d_rdata
//     valid with d_ready;
//   * halt/halted: the MPU asks the core to stop issuing accesses; the core
//     answers halted once nothing is outstanding;
//   * the dedicated context bus: ctx_addr selects a general purpose register
//     (0..NUM_GPR-1) or a special purpose register (NUM_GPR..), the core
//     answers ctx_rdata combinationally and writes ctx_wdata on a clock
//     edge where clk_en and ctx_we are high.
package mpp_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned NUM_GPR  = 16;  // general purpose registers moved through the stack
  localparam int unsigned NUM_SPR  = 8;   // special purpose registers moved on the dedicated bus
  localparam int unsigned CTX_AW   = $clog2(NUM_GPR + NUM_SPR);
  localparam int unsigned MAX_PE   = 3;
  localparam int unsigned PE_IDX_W = 2;

  // Speed grades of the PE-cores, with their divider of the reference clock.
  typedef enum logic [1:0] {
    PE_HIGH   = 2'd0,   // 1.0 V  / 200 MHz
    PE_MIDDLE = 2'd1,   // 0.68 V / 133 MHz
    PE_LOW    = 2'd2    // 0.52 V / 67 MHz
  } pe_kind_e;

  localparam int unsigned REF_MHZ  = 400;
  localparam int unsigned DIV_HIGH = 2;
  localparam int unsigned DIV_MID  = 3;
  localparam int unsigned DIV_LOW  = 6;
  localparam int unsigned DIV_BUS  = 6;

  // Address map seen by a PE-core (upper 12 address bits select the region).
  localparam logic [11:0] REGION_ISPM = 12'h001;  // 8 KB instruction scratchpad
  localparam logic [11:0] REGION_DSPM = 12'h002;  // 16 KB data scratchpad
  localparam logic [11:0] REGION_CTRL = 12'h003;  // power management registers
  // every other instruction address is cacheable external memory

  // Power management registers (word offsets inside REGION_CTRL).
  localparam logic [3:0] REG_PE_SEL = 4'h0;  // write: select the PE-core to run
  localparam logic [3:0] REG_WAY_EN = 4'h1;  // active cache-way flags
  localparam logic [3:0] REG_TIMER  = 4'h2;  // free-running timer, bus-clock ticks

  // Word offset of the context save area (stack) inside the data scratchpad.
  localparam int unsigned CTX_STACK_WORD = 4096 - NUM_GPR;  // top of the 16 KB D-SPM

  typedef struct packed {
    logic             if_req;
    logic [XLEN-1:0]  if_addr;
    logic             d_req;
    logic             d_we;
    logic [XLEN-1:0]  d_addr;
    logic [XLEN-1:0]  d_wdata;
    logic             halted;
    logic [XLEN-1:0]  ctx_rdata;
  } pe_out_t;

  typedef struct packed {
    logic              clk_en;
    logic              if_ready;
    logic [XLEN-1:0]   if_rdata;
    logic              d_ready;
    logic [XLEN-1:0]   d_rdata;
    logic              halt;
    logic [CTX_AW-1:0] ctx_addr;
    logic              ctx_we;
    logic [XLEN-1:0]   ctx_wdata;
  } pe_in_t;

  // AMBA AHB transfer types and control values used here.
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  localparam logic [2:0] HSIZE_WORD  = 3'b010;
  localparam logic [2:0] HBURST_INCR4 = 3'b011;
  localparam logic [2:0] HBURST_INCR  = 3'b001;

  // Master-side AHB signals of one bus master.
  typedef struct packed {
    logic             hbusreq;
    logic [XLEN-1:0]  haddr;
    htrans_e          htrans;
    logic             hwrite;
    logic [2:0]       hsize;
    logic [2:0]       hburst;
  } ahb_m_t;

  // Slave responses broadcast to every master.
  typedef struct packed {
    logic [XLEN-1:0]  hrdata;
    logic             hready;
    logic [1:0]       hresp;
  } ahb_s_t;

  // Reference-clock divider of a speed grade.
  function automatic int unsigned pe_div(pe_kind_e k);
    case (k)
      PE_HIGH:   return DIV_HIGH;
      PE_MIDDLE: return DIV_MID;
      default:   return DIV_LOW;
    endcase
  endfunction

endpackage
