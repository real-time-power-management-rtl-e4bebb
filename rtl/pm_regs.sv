// pm_regs: power-management registers of one MPU and its real-time timer.
//
// Software chooses the PE-core to run and the cache ways to keep active by
// storing to special purpose registers; this block holds them on the data
// port of the running core (word offsets of mpp_pkg::REGION_CTRL):
//   REG_PE_SEL  write: request a switch to PE-core wdata; read: running core
//   REG_WAY_EN  the active-way flags of the instruction cache (reset: all 1)
//   REG_TIMER   read only: a free-running counter of bus-clock ticks, the
//               timer a program reads at each loop checkpoint to measure the
//               time an iteration took
// A write of REG_PE_SEL pulses sel_wr for one MPU clock cycle with sel_val;
// the switch controller decides whether it is a valid request. The timer
// counts on the bus strobe so that its rate does not depend on which core
// runs. Accesses complete in the cycle they are presented (ready = req).
// Register offsets, reset values and the timer width are this design's
// choices; the registers themselves and the timer are the prototype's.
module pm_regs
  import mpp_pkg::*;
#(
  parameter int unsigned WAYS    = 4,
  parameter int unsigned TIMER_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,        // MPU clock enable
  input  logic                tick,      // bus clock strobe
  input  logic                req,
  input  logic                we,
  input  logic [3:0]          word,      // register offset
  input  logic [31:0]         wdata,
  output logic                ready,
  output logic [31:0]         rdata,
  input  logic [PE_IDX_W-1:0] active_pe,
  output logic                sel_wr,
  output logic [PE_IDX_W-1:0] sel_val,
  output logic [WAYS-1:0]     way_en,
  output logic [TIMER_W-1:0]  timer
);
  always_ff @(posedge clk) begin
    if (!rst_n)    timer <= '0;
    else if (tick) timer <= timer + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      way_en <= '1;
    else if (ce && req && we && word == REG_WAY_EN)
      way_en <= wdata[WAYS-1:0];
  end

  assign sel_wr  = ce && req && we && word == REG_PE_SEL;
  assign sel_val = wdata[PE_IDX_W-1:0];
  assign ready   = req;

  always_comb begin
    case (word)
      REG_PE_SEL: rdata = 32'(active_pe);
      REG_WAY_EN: rdata = 32'(way_en);
      REG_TIMER:  rdata = 32'(timer);
      default:    rdata = '0;
    endcase
  end
endmodule
