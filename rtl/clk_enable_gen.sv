// clk_enable_gen: clock-enable strobes for the three PE-core speed grades and
// the AHB bus, all derived from one reference clock.
//
// A single counter runs modulo the bus divider (6). The high-end strobe is
// high when the count is a multiple of DIV_HIGH (every 2nd reference cycle),
// the middle-end strobe every DIV_MID-th cycle and the low-end and bus strobes
// every 6th cycle. Because all strobes come from one counter, every bus
// strobe coincides with a strobe of each core clock, so a core clock is
// always a whole multiple of the bus clock (200/133/67 MHz against a 67 MHz
// bus with a 400 MHz reference). The three core frequencies and the bus
// frequency are the prototype's; the single-reference divider scheme is this
// design's own choice.
//
// Interface: clk, rst_n (active-low, synchronous); outputs pe_stb[3] indexed
// by mpp_pkg::pe_kind_e and bus_stb. Strobes are combinational from the
// counter register, the first strobe of each kind appears in the first cycle
// after reset.
module clk_enable_gen
  import mpp_pkg::*;
#(
  parameter int unsigned DIV_H = DIV_HIGH,
  parameter int unsigned DIV_M = DIV_MID,
  parameter int unsigned DIV_L = DIV_LOW,
  parameter int unsigned DIV_B = DIV_BUS
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] pe_stb,
  output logic       bus_stb
);
  localparam int unsigned CW = $clog2(DIV_B + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                     cnt <= '0;
    else if (cnt == CW'(DIV_B - 1)) cnt <= '0;
    else                            cnt <= cnt + 1'b1;
  end

  always_comb begin
    pe_stb[PE_HIGH]   = (cnt % CW'(DIV_H)) == '0;
    pe_stb[PE_MIDDLE] = (cnt % CW'(DIV_M)) == '0;
    pe_stb[PE_LOW]    = (cnt % CW'(DIV_L)) == '0;
    bus_stb           = cnt == '0;
  end

  initial begin
    assert (DIV_B % DIV_H == 0 && DIV_B % DIV_M == 0 && DIV_B % DIV_L == 0)
      else $error("core dividers must divide the bus divider");
  end
endmodule
