// ahb_mem_model: behavioural AHB read-only memory slave, for testbenches.
//
// Every word reads as mem_word(address), a fixed function, so a testbench can
// compute expected data without a table. Each data phase is stretched by 0
// to MAX_WAIT bus cycles of hready low, chosen with $urandom. The slave steps
// on the bus strobe ce of clk. It counts transfers and checks that a write
// never arrives and that a SEQ beat follows the previous beat's address + 4.
module ahb_mem_model
  import mpp_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  ahb_m_t req,
  output ahb_s_t rsp
);
  logic        pend;
  logic [31:0] paddr;
  int unsigned wait_cnt;
  int unsigned transfers;
  int unsigned wait_cycles;
  int unsigned errors;

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0F0F;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      pend <= 0; wait_cnt <= 0; transfers <= 0; wait_cycles <= 0; errors <= 0; paddr <= 0;
    end else if (ce) begin
      if (rsp.hready) begin
        if (req.htrans == HTRANS_NONSEQ || req.htrans == HTRANS_SEQ) begin
          if (req.hwrite) errors <= errors + 1;
          if (req.htrans == HTRANS_SEQ && req.haddr != paddr + 4) errors <= errors + 1;
          pend      <= 1;
          paddr     <= req.haddr;
          wait_cnt  <= (MAX_WAIT == 0) ? 0 : $urandom % (MAX_WAIT + 1);
          transfers <= transfers + 1;
        end else pend <= 0;
      end else begin
        wait_cnt    <= wait_cnt - 1;
        wait_cycles <= wait_cycles + 1;
      end
    end
  end

  always_comb begin
    rsp.hready = !pend || wait_cnt == 0;
    rsp.hrdata = pend ? mem_word(paddr) : 32'h0;
    rsp.hresp  = 2'b00;
  end
endmodule
