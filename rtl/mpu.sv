// mpu: one multi-performance MPU.
//
// Up to three PE-cores of one instruction set but different speed grades
// share one set of single-port on-chip memories: an 8 KB selective-way
// instruction cache, an 8 KB instruction scratchpad (I-SPM) and a 16 KB data
// scratchpad (D-SPM). Exactly one core is active. Its clock enable runs, its
// accesses reach the memories, and the whole MPU (memories, cache, power
// registers, switch controller) steps at its rate. Every other core has its
// clock gated off and sees its inputs held at constants with halt high
// (signal gating). Software picks the core and the active cache ways by
// storing to the power-management registers; a core switch moves the
// register contents to the new core (see pe_switch_ctrl). Cache misses are
// filled from external memory through the global bus interface, an AHB
// master.
//
// The cores are outside this module: pe_o/pe_i carry their fetch port, data
// port, halt handshake and dedicated context bus (mpp_pkg), pe_gclk their
// gated clocks. A core in this design is clocked by the reference clock
// qualified with pe_i.clk_en; pe_gclk is the same clock as a gated clock
// for a core that wants one. Address map (upper 12 bits): 0x001 I-SPM,
// 0x002 D-SPM, 0x003 power registers; any other fetch address is cached
// external memory; data accesses elsewhere return zero.
//
// The memory sizes, the core speed grades, the shared single-port memories,
// the gating and the register-controlled switching are the prototype's. The
// address map, the reference-clock enables and the omission of the
// level converters (pure voltage translation) and the DMA controller are
// this design's.
module mpu
  import mpp_pkg::*;
#(
  parameter int unsigned NUM_PE              = 3,
  parameter pe_kind_e    PE_KIND [MAX_PE]    = '{PE_HIGH, PE_MIDDLE, PE_LOW},
  parameter int unsigned ISPM_BYTES          = 8192,
  parameter int unsigned DSPM_BYTES          = 16384,
  parameter int unsigned IC_BYTES            = 8192,
  parameter int unsigned IC_WAYS             = 4,
  parameter int unsigned LINE_BYTES          = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          pe_stb,    // speed-grade strobes
  input  logic                bus_stb,   // bus clock strobe
  input  pe_out_t             pe_o    [NUM_PE],
  output pe_in_t              pe_i    [NUM_PE],
  output logic [NUM_PE-1:0]   pe_gclk,
  output ahb_m_t              ahb_m,
  input  logic                hgrant,
  input  ahb_s_t              ahb_s,
  // status
  output logic [PE_IDX_W-1:0] active_pe,
  output logic                switching,
  output logic                switched,
  output logic [IC_WAYS-1:0]  way_en,
  output logic                ic_hit,
  output logic                ic_miss
);
  logic    ce;
  pe_out_t a;          // the active core's outputs
  pe_in_t  rsp;        // what the active core receives
  logic    halt;

  localparam int unsigned PW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;

  assign ce = pe_stb[PE_KIND[active_pe]];
  assign a  = pe_o[PW'(active_pe)];

  // ---------------- clock and signal gating ----------------
  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    logic en;
    assign en = (active_pe == PE_IDX_W'(p)) && pe_stb[PE_KIND[p]];
    clock_gate u_cg (.clk, .en, .gclk(pe_gclk[p]));
    always_comb begin
      if (active_pe == PE_IDX_W'(p)) begin
        pe_i[p]        = rsp;
        pe_i[p].clk_en = en;
      end else begin
        pe_i[p]      = '0;
        pe_i[p].halt = 1'b1;
      end
    end
  end

  // ---------------- address decode ----------------
  logic if_ispm, d_ispm, d_dspm, d_ctrl;
  assign if_ispm = a.if_addr[31:20] == REGION_ISPM;
  assign d_ispm  = a.d_addr[31:20]  == REGION_ISPM;
  assign d_dspm  = a.d_addr[31:20]  == REGION_DSPM;
  assign d_ctrl  = a.d_addr[31:20]  == REGION_CTRL;

  // ---------------- I-SPM: fetch (A) and data (B) ----------------
  logic        is_a_rdy, is_b_rdy;
  logic [31:0] is_a_rd, is_b_rd;
  spm #(.SIZE_BYTES(ISPM_BYTES)) u_ispm (
    .clk, .rst_n, .ce,
    .a_req(a.if_req && if_ispm), .a_we(1'b0), .a_addr(a.if_addr), .a_wdata('0),
    .a_ready(is_a_rdy), .a_rdata(is_a_rd),
    .b_req(a.d_req && d_ispm), .b_we(a.d_we), .b_addr(a.d_addr), .b_wdata(a.d_wdata),
    .b_ready(is_b_rdy), .b_rdata(is_b_rd)
  );

  // ---------------- instruction cache ----------------
  logic                    ic_rdy, rf_req, rf_done;
  logic [31:0]             ic_rd, rf_addr;
  logic [LINE_BYTES*8-1:0] rf_line;
  sel_way_icache #(.SIZE_BYTES(IC_BYTES), .WAYS(IC_WAYS), .LINE_BYTES(LINE_BYTES)) u_icache (
    .clk, .rst_n, .ce, .way_en,
    .req(a.if_req && !if_ispm), .addr(a.if_addr), .ready(ic_rdy), .rdata(ic_rd),
    .refill_req(rf_req), .refill_addr(rf_addr), .refill_done(rf_done), .refill_line(rf_line),
    .hit(ic_hit), .miss(ic_miss)
  );

  gbi #(.LINE_BYTES(LINE_BYTES)) u_gbi (
    .clk, .rst_n, .ce(bus_stb),
    .refill_req(rf_req), .refill_addr(rf_addr), .refill_done(rf_done), .refill_line(rf_line),
    .m(ahb_m), .hgrant, .s(ahb_s)
  );

  // ---------------- D-SPM: data (A) and context stack (B) ----------------
  logic        ds_a_rdy, ds_b_rdy, sp_req, sp_we;
  logic [31:0] ds_a_rd, ds_b_rd, sp_addr, sp_wdata;
  spm #(.SIZE_BYTES(DSPM_BYTES)) u_dspm (
    .clk, .rst_n, .ce,
    .a_req(a.d_req && d_dspm), .a_we(a.d_we), .a_addr(a.d_addr), .a_wdata(a.d_wdata),
    .a_ready(ds_a_rdy), .a_rdata(ds_a_rd),
    .b_req(sp_req), .b_we(sp_we), .b_addr(sp_addr), .b_wdata(sp_wdata),
    .b_ready(ds_b_rdy), .b_rdata(ds_b_rd)
  );

  // ---------------- power-management registers ----------------
  logic                pr_rdy, sel_wr;
  logic [31:0]         pr_rd;
  logic [PE_IDX_W-1:0] sel_val;
  pm_regs #(.WAYS(IC_WAYS), .TIMER_W(32)) u_regs (
    .clk, .rst_n, .ce, .tick(bus_stb),
    .req(a.d_req && d_ctrl), .we(a.d_we), .word(a.d_addr[5:2]), .wdata(a.d_wdata),
    .ready(pr_rdy), .rdata(pr_rd), .active_pe, .sel_wr, .sel_val, .way_en, .timer()
  );

  // ---------------- core switch ----------------
  logic [CTX_AW-1:0] ctx_addr;
  logic              ctx_we;
  logic [31:0]       ctx_wdata;
  pe_switch_ctrl #(.NUM_PE(NUM_PE), .STACK_ADDR(32'(DSPM_BYTES - 4 * NUM_GPR))) u_switch (
    .clk, .rst_n, .ce, .sel_wr, .sel_val, .active_pe, .busy(switching), .switched,
    .halt, .halted(a.halted),
    .ctx_addr, .ctx_we, .ctx_wdata, .ctx_rdata(a.ctx_rdata),
    .sp_req, .sp_we, .sp_addr, .sp_wdata, .sp_ready(ds_b_rdy), .sp_rdata(ds_b_rd)
  );

  // ---------------- responses to the active core ----------------
  always_comb begin
    rsp           = '0;
    rsp.halt      = halt;
    rsp.ctx_addr  = ctx_addr;
    rsp.ctx_we    = ctx_we;
    rsp.ctx_wdata = ctx_wdata;
    if (if_ispm) begin
      rsp.if_ready = is_a_rdy;
      rsp.if_rdata = is_a_rd;
    end else begin
      rsp.if_ready = ic_rdy;
      rsp.if_rdata = ic_rd;
    end
    if (d_ispm) begin
      rsp.d_ready = is_b_rdy;
      rsp.d_rdata = is_b_rd;
    end else if (d_dspm) begin
      rsp.d_ready = ds_a_rdy;
      rsp.d_rdata = ds_a_rd;
    end else if (d_ctrl) begin
      rsp.d_ready = pr_rdy;
      rsp.d_rdata = pr_rd;
    end else begin
      rsp.d_ready = a.d_req;   // unmapped: complete at once, read zero
    end
  end
endmodule
