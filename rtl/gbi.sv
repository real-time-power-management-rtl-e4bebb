// gbi: global bus interface of an MPU, an AHB master that fills instruction
// cache lines from memory on the shared AHB bus.
//
// When the cache raises refill_req with a line address, the interface asks
// for the bus (hbusreq) and, once granted, reads the line as one INCR4 burst
// of word transfers: NONSEQ for the first beat, SEQ for the rest, the address
// phase of each beat overlapping the data phase of the previous one and every
// phase stretched while hready is low. With the last word in, it releases
// the bus and raises refill_done with the whole line; refill_done falls after
// the cache has dropped refill_req (four-phase handshake). The handshake is
// level based because the cache runs on its MPU's clock enable and this block
// on the bus strobe, both edges of the same reference clock. The prototype
// names the interface and the AMBA AHB bus; burst type, handshake and the
// omission of write and error handling (hresp is not checked, only reads are
// made) are this design's choices.
module gbi
  import mpp_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,           // bus strobe
  input  logic                    refill_req,
  input  logic [31:0]             refill_addr,  // line aligned
  output logic                    refill_done,
  output logic [LINE_BYTES*8-1:0] refill_line,
  output ahb_m_t                  m,
  input  logic                    hgrant,
  input  ahb_s_t                  s
);
  localparam int unsigned BEATS = LINE_BYTES / 4;
  localparam int unsigned BW    = $clog2(BEATS + 1);

  typedef enum logic [1:0] {G_IDLE, G_REQ, G_BUS, G_DONE} state_e;
  state_e        state;
  logic [BW-1:0] acnt, dcnt;
  logic          dphase;
  logic [31:0]   base;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= G_IDLE;
      acnt   <= '0;
      dcnt   <= '0;
      dphase <= 1'b0;
      base   <= '0;
    end else if (ce) begin
      case (state)
        G_IDLE: if (refill_req) begin
          base  <= refill_addr;
          state <= G_REQ;
        end
        G_REQ: if (hgrant && s.hready) begin
          acnt   <= '0;
          dcnt   <= '0;
          dphase <= 1'b0;
          state  <= G_BUS;
        end
        G_BUS: if (s.hready) begin
          if (dphase) begin
            refill_line[dcnt*32 +: 32] <= s.hrdata;
            dcnt <= dcnt + 1'b1;
          end
          dphase <= acnt < BW'(BEATS);
          if (acnt < BW'(BEATS)) acnt <= acnt + 1'b1;
          if (dphase && dcnt == BW'(BEATS - 1)) state <= G_DONE;
        end
        G_DONE: if (!refill_req) state <= G_IDLE;
        default: state <= G_IDLE;
      endcase
    end
  end

  always_comb begin
    m.hbusreq = (state == G_REQ) || (state == G_BUS);
    m.hwrite  = 1'b0;
    m.hsize   = HSIZE_WORD;
    m.hburst  = (BEATS == 4) ? HBURST_INCR4 : HBURST_INCR;
    m.haddr   = base + 32'(acnt) * 32'd4;
    if (state == G_BUS && acnt < BW'(BEATS))
      m.htrans = (acnt == '0) ? HTRANS_NONSEQ : HTRANS_SEQ;
    else
      m.htrans = HTRANS_IDLE;
  end

  assign refill_done = (state == G_DONE);

  // AHB: a master drives transfers only while it owns the bus, and a burst
  // is requested for its whole length
  assert property (@(posedge clk) disable iff (!rst_n) (m.htrans != HTRANS_IDLE) |-> (hgrant && m.hbusreq))
    else $error("transfer driven without the bus grant");
endmodule
