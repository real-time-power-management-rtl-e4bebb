// spm: scratchpad memory with two requesters sharing one single-port SRAM.
//
// The prototype gives each MPU an 8 KB instruction scratchpad (I-SPM) and a
// 16 KB data scratchpad (D-SPM) built from single-port SRAM and shared by the
// PE-cores. Here two request ports reach the one SRAM port: port A has fixed
// priority over port B. In the I-SPM port A is instruction fetch and port B
// the data port; in the D-SPM port A is the data port and port B the
// controller that saves and restores general purpose registers during a
// PE-core switch.
//
// Protocol per port: req/we/addr (byte address, word aligned)/wdata held
// until ready. The SRAM is accessed on the enabled edge where the request is
// granted; ready is high, with rdata, during the following enabled cycle. An
// access therefore takes two MPU clock cycles; back-to-back accesses of one
// port are spaced two cycles apart. Arbitration and latency are this design's
// choice. rst_n is synchronous, active low.
module spm #(
  parameter int unsigned SIZE_BYTES = 16384
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        a_req,
  input  logic        a_we,
  input  logic [31:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic        a_ready,
  output logic [31:0] a_rdata,
  input  logic        b_req,
  input  logic        b_we,
  input  logic [31:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic        b_ready,
  output logic [31:0] b_rdata
);
  localparam int unsigned DEPTH = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_A, S_B} state_e;
  state_e state;

  logic          grant_a, grant_b, en, we;
  logic [AW-1:0] addr;
  logic [31:0]   wdata, rdata;

  always_comb begin
    grant_a = (state == S_IDLE) && a_req;
    grant_b = (state == S_IDLE) && !a_req && b_req;
    en      = grant_a || grant_b;
    we      = grant_a ? a_we : b_we;
    addr    = grant_a ? a_addr[AW+1:2] : b_addr[AW+1:2];
    wdata   = grant_a ? a_wdata : b_wdata;
  end

  sp_sram #(.DEPTH(DEPTH), .WIDTH(32)) u_sram (
    .clk, .ce, .en, .we, .addr, .wdata, .rdata
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       state <= S_IDLE;
    else if (ce) begin
      case (state)
        S_IDLE:  state <= grant_a ? S_A : (grant_b ? S_B : S_IDLE);
        default: state <= S_IDLE;
      endcase
    end
  end

  assign a_ready = (state == S_A);
  assign b_ready = (state == S_B);
  assign a_rdata = rdata;
  assign b_rdata = rdata;
endmodule
