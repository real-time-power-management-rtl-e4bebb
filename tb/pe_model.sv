// pe_model: behavioural stand-in for a PE-core, for testbenches only.
//
// It holds the architectural registers that a core switch must carry (NUM_GPR
// general purpose and NUM_SPR special purpose registers, reset to a pattern
// that names the core and the register) and offers tasks that perform one
// instruction fetch or one data access with the MPU handshake. All requests
// are driven at the falling edge and complete on the rising edge where the
// core's clock enable and the ready are both high. halted is reported while
// halt is high and no access is outstanding; the context bus reads
// combinationally and writes on an enabled edge.
module pe_model
  import mpp_pkg::*;
#(
  parameter logic [7:0] ID = 8'h00
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_in_t  pi,
  output pe_out_t po
);
  logic [31:0] regs [NUM_GPR + NUM_SPR];
  logic        if_req, d_req, d_we;
  logic [31:0] if_addr, d_addr, d_wdata;
  int unsigned active_edges;

  initial begin
    if_req = 0; d_req = 0; d_we = 0; if_addr = 0; d_addr = 0; d_wdata = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_GPR + NUM_SPR; i++) regs[i] <= {8'hC0, ID, 16'(i)};
      active_edges <= 0;
    end else if (pi.clk_en) begin
      active_edges <= active_edges + 1;
      if (pi.ctx_we) regs[pi.ctx_addr] <= pi.ctx_wdata;
    end
  end

  always_comb begin
    po           = '0;
    po.if_req    = if_req;
    po.if_addr   = if_addr;
    po.d_req     = d_req;
    po.d_we      = d_we;
    po.d_addr    = d_addr;
    po.d_wdata   = d_wdata;
    po.halted    = pi.halt && !if_req && !d_req;
    po.ctx_rdata = regs[pi.ctx_addr];
  end

  task automatic wait_run();
    @(negedge clk);
    while (pi.halt) @(negedge clk);
  endtask

  task automatic fetch(input logic [31:0] addr, output logic [31:0] data);
    wait_run();
    if_addr = addr;
    if_req  = 1'b1;
    forever begin
      #1;
      if (pi.clk_en && pi.if_ready) begin
        data = pi.if_rdata;
        break;
      end
      @(negedge clk);
    end
    @(posedge clk);
    #1 if_req = 1'b0;
  endtask

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                        output logic [31:0] rdata);
    wait_run();
    d_addr  = addr;
    d_we    = we;
    d_wdata = wdata;
    d_req   = 1'b1;
    forever begin
      #1;
      if (pi.clk_en && pi.d_ready) begin
        rdata = pi.d_rdata;
        break;
      end
      @(negedge clk);
    end
    @(posedge clk);
    #1 d_req = 1'b0;
  endtask
endmodule
