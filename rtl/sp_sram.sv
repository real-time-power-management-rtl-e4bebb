// sp_sram: single-port synchronous SRAM with one read/write port.
//
// One access per enabled clock edge: with en and we the word at addr is
// written, with en alone it is read and appears on rdata after the edge and
// stays until the next read. All on-chip memories of an MPU are single-port
// because only one PE-core uses them at a time. ce is the clock enable of the
// MPU the memory belongs to. Contents are not reset. Single-port memories
// are the prototype's; the registered read is this design's choice.
module sp_sram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce && en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
