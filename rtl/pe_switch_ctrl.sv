// pe_switch_ctrl: moves the running program from one PE-core to another.
//
// Software requests a switch by storing the number of the wanted core to the
// PE-select register (sel_wr/sel_val). A request for the running core or for
// a core that does not exist is ignored. A switch runs as follows:
//   HALT  the running core is asked to halt and the controller waits until it
//         reports that no access is outstanding;
//   SAVE  over the dedicated context bus it reads the NGPR general purpose
//         registers of the old core and pushes them to a stack area in the
//         data scratchpad, then reads the NSPR special purpose registers
//         into a holding register file;
//   SWAP  the active-core number changes, which moves the clock (and with it
//         the whole MPU clock) and the signal gating to the new core;
//   LOAD  it writes the held special purpose registers straight into the new
//         core over the dedicated bus, then pops the general purpose
//         registers from the stack into it;
//   the halt is released and the new core continues with the copied state.
// The controller steps on the MPU clock enable, so SAVE runs at the old
// core's rate and LOAD at the new one's. Every scratchpad access takes two
// cycles and every special purpose register one, so a switch takes
// 1 + 2*NGPR + NSPR + 1 cycles of the old core and 2*NGPR + NSPR cycles of
// the new core (at defaults 42 and 40).
//
// The transfer of general purpose registers through a stack in the data
// scratchpad and of special purpose registers over a dedicated bus is the
// prototype's. Sequencing it in hardware rather than by instructions, the
// holding registers (so that each core is clocked only while it is active)
// and the stack location are this design's choices.
module pe_switch_ctrl
  import mpp_pkg::*;
#(
  parameter int unsigned NUM_PE     = 3,
  parameter int unsigned NGPR       = NUM_GPR,
  parameter int unsigned NSPR       = NUM_SPR,
  parameter logic [31:0] STACK_ADDR = 32'(CTX_STACK_WORD * 4)  // byte offset in the D-SPM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  // switch request from the PE-select register
  input  logic                sel_wr,
  input  logic [PE_IDX_W-1:0] sel_val,
  output logic [PE_IDX_W-1:0] active_pe,
  output logic                busy,
  output logic                switched,   // one-cycle pulse when a switch ends
  // halt handshake with the running core
  output logic                halt,
  input  logic                halted,
  // dedicated context bus (goes to the active core)
  output logic [CTX_AW-1:0]   ctx_addr,
  output logic                ctx_we,
  output logic [31:0]         ctx_wdata,
  input  logic [31:0]         ctx_rdata,
  // stack port into the data scratchpad
  output logic                sp_req,
  output logic                sp_we,
  output logic [31:0]         sp_addr,
  output logic [31:0]         sp_wdata,
  input  logic                sp_ready,
  input  logic [31:0]         sp_rdata
);
  localparam int unsigned NREG = NGPR + NSPR;
  localparam int unsigned IW   = $clog2(NREG + 1);

  typedef enum logic [2:0] {S_RUN, S_HALT, S_SAVE, S_SWAP, S_LOAD} state_e;
  state_e               state;
  logic [IW-1:0]        idx;
  logic [PE_IDX_W-1:0]  target;
  logic [31:0]          spr_buf [NSPR];
  logic                 is_gpr, step;
  logic [$clog2(NSPR)-1:0] spr_i;

  assign is_gpr = idx < IW'(NGPR);
  assign spr_i  = $bits(spr_i)'(idx - IW'(NGPR));

  always_comb begin
    ctx_addr  = CTX_AW'(idx);
    ctx_we    = 1'b0;
    ctx_wdata = '0;
    sp_req    = 1'b0;
    sp_we     = 1'b0;
    sp_addr   = STACK_ADDR + 32'(idx) * 32'd4;
    sp_wdata  = ctx_rdata;
    step      = 1'b0;
    case (state)
      S_SAVE: begin
        sp_req = is_gpr;
        sp_we  = 1'b1;
        step   = is_gpr ? sp_ready : 1'b1;
      end
      S_LOAD: begin
        if (is_gpr) begin
          sp_req    = 1'b1;
          ctx_we    = sp_ready;
          ctx_wdata = sp_rdata;
          step      = sp_ready;
        end else begin
          ctx_we    = 1'b1;
          ctx_wdata = spr_buf[spr_i];
          step      = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_RUN;
      active_pe <= '0;
      target    <= '0;
      idx       <= '0;
    end else if (ce) begin
      case (state)
        S_RUN: if (sel_wr && sel_val != active_pe && sel_val < PE_IDX_W'(NUM_PE)) begin
          target <= sel_val;
          state  <= S_HALT;
        end
        S_HALT: if (halted) begin
          idx   <= '0;
          state <= S_SAVE;
        end
        S_SAVE: if (step) begin
          if (!is_gpr) spr_buf[spr_i] <= ctx_rdata;
          idx <= idx + 1'b1;
          if (idx == IW'(NREG - 1)) state <= S_SWAP;
        end
        S_SWAP: begin
          active_pe <= target;
          // special purpose registers first, then the stack pops
          idx       <= IW'(NGPR);
          state     <= S_LOAD;
        end
        S_LOAD: if (step) begin
          if (idx == IW'(NREG - 1))  idx <= '0;
          else                       idx <= idx + 1'b1;
          if (idx == IW'(NGPR - 1))  state <= S_RUN;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  assign halt     = (state != S_RUN);
  assign busy     = (state != S_RUN);
  assign switched = ce && state == S_LOAD && step && idx == IW'(NGPR - 1);

  // the halt handshake: the stack port is used only while the core is halted
  assert property (@(posedge clk) disable iff (!rst_n) sp_req |-> halt)
    else $error("stack access while the core runs");
endmodule
