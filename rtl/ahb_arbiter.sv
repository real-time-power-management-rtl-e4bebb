// ahb_arbiter: arbiter and master-to-slave multiplexer of the AMBA AHB bus
// that connects the MPUs.
//
// Each MPU's global bus interface is an AHB master that raises hbusreq for
// the whole of a transaction. Ownership changes only on a bus clock edge
// where hready is high and the owning master no longer requests; the next
// owner is the first requester after the current owner in round-robin order.
// With no request the last owner keeps the grant (it drives IDLE transfers),
// which makes it the default master. The address and control signals of the
// owner are forwarded to the slave side; slave responses go to all masters.
// Because a master keeps hbusreq until its last data phase has finished, a
// hand-over never splits an address phase from its data phase. The AHB bus
// at 67 MHz is the prototype's; round-robin order, whole-transaction
// ownership and the default master are this design's choices.
//
// Interface: clk with the bus strobe ce, rst_n synchronous active low;
// m[NM] master requests, hgrant[NM] one-hot grants, hmaster the owner index,
// s the multiplexed address/control for the slave, hready from the slave.
module ahb_arbiter
  import mpp_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  ahb_m_t [NM-1:0]        m,
  input  logic                   hready,
  output logic [NM-1:0]          hgrant,
  output logic [$clog2(NM)-1:0]  hmaster,
  output ahb_m_t                 s
);
  localparam int unsigned MW = $clog2(NM);

  logic [MW-1:0] next;
  logic          any_other;

  always_comb begin
    next      = hmaster;
    any_other = 1'b0;
    for (int unsigned k = 1; k <= NM; k++) begin
      int unsigned idx;
      idx = (int'(hmaster) + k) % NM;
      if (!any_other && m[idx].hbusreq) begin
        next      = MW'(idx);
        any_other = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      hmaster <= '0;
    else if (ce && hready && !m[hmaster].hbusreq && any_other)
      hmaster <= next;
  end

  always_comb begin
    hgrant          = '0;
    hgrant[hmaster] = 1'b1;
    s               = m[hmaster];
  end
endmodule
