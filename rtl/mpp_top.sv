// mpp_top: multi-performance processor with three MPUs on an AHB bus.
//
// The chip follows the prototype's arrangement: MPU0 carries a high-end
// (200 MHz), a middle-end (133 MHz) and a low-end (67 MHz) PE-core, MPU1 a
// high-end and a middle-end core, MPU2 a high-end and a low-end core. Each
// MPU runs one of its cores at a time with its own selective-way instruction
// cache and scratchpads (see mpu) and reaches external memory through its
// global bus interface, one master of the shared 67 MHz AMBA AHB bus. One
// reference clock (400 MHz) drives everything; clk_enable_gen makes the
// speed-grade and bus strobes.
//
// Interface: the PE-cores are outside: pe_o[m][p] and pe_i[m][p] connect
// core p of MPU m (slots that an MPU does not have are driven with halt high
// and otherwise zero), pe_gclk[m][p] are the gated core clocks. The AHB
// slave side (external memory) is ahb_req (address and control of the
// owning master, hmaster), ahb_rsp, and bus_stb, the bus clock as a strobe
// of clk. Status outputs give each MPU's active core, switch activity, way
// flags and cache hit/miss pulses. rst_n is synchronous, active low.
module mpp_top
  import mpp_pkg::*;
#(
  parameter int unsigned NUM_MPU    = 3,
  parameter int unsigned ISPM_BYTES = 8192,
  parameter int unsigned DSPM_BYTES = 16384,
  parameter int unsigned IC_BYTES   = 8192,
  parameter int unsigned IC_WAYS    = 4,
  parameter int unsigned LINE_BYTES = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  pe_out_t                           pe_o    [NUM_MPU][MAX_PE],
  output pe_in_t                            pe_i    [NUM_MPU][MAX_PE],
  output logic [NUM_MPU-1:0][MAX_PE-1:0]    pe_gclk,
  output logic                              bus_stb,
  output ahb_m_t                            ahb_req,
  output logic [$clog2(NUM_MPU)-1:0]        hmaster,
  input  ahb_s_t                            ahb_rsp,
  output logic [NUM_MPU-1:0][PE_IDX_W-1:0]  active_pe,
  output logic [NUM_MPU-1:0]                switching,
  output logic [NUM_MPU-1:0]                switched,
  output logic [NUM_MPU-1:0][IC_WAYS-1:0]   way_en,
  output logic [NUM_MPU-1:0]                ic_hit,
  output logic [NUM_MPU-1:0]                ic_miss
);
  logic [2:0]   pe_stb;
  ahb_m_t       m      [NUM_MPU];
  ahb_m_t [NUM_MPU-1:0] m_packed;
  logic [NUM_MPU-1:0] hgrant;

  clk_enable_gen u_clk (.clk, .rst_n, .pe_stb, .bus_stb);

  for (genvar i = 0; i < NUM_MPU; i++) begin : g_mpu
    // cores per MPU as in the prototype: {H,M,L}, {H,M}, {H,L}
    localparam int unsigned NPE = (i == 0) ? 3 : 2;
    localparam pe_kind_e KIND [MAX_PE] =
      (i == 0) ? '{PE_HIGH, PE_MIDDLE, PE_LOW} :
      (i == 1) ? '{PE_HIGH, PE_MIDDLE, PE_LOW} :
                 '{PE_HIGH, PE_LOW, PE_LOW};

    pe_out_t             po [NPE];
    pe_in_t              pi [NPE];
    logic [NPE-1:0]      gclk;

    for (genvar p = 0; p < MAX_PE; p++) begin : g_slot
      if (p < NPE) begin : g_used
        assign po[p]         = pe_o[i][p];
        assign pe_i[i][p]    = pi[p];
        assign pe_gclk[i][p] = gclk[p];
      end else begin : g_absent
        always_comb begin
          pe_i[i][p]      = '0;
          pe_i[i][p].halt = 1'b1;
        end
        assign pe_gclk[i][p] = 1'b0;
      end
    end

    mpu #(
      .NUM_PE(NPE), .PE_KIND(KIND), .ISPM_BYTES(ISPM_BYTES), .DSPM_BYTES(DSPM_BYTES),
      .IC_BYTES(IC_BYTES), .IC_WAYS(IC_WAYS), .LINE_BYTES(LINE_BYTES)
    ) u_mpu (
      .clk, .rst_n, .pe_stb, .bus_stb,
      .pe_o(po), .pe_i(pi), .pe_gclk(gclk),
      .ahb_m(m[i]), .hgrant(hgrant[i]), .ahb_s(ahb_rsp),
      .active_pe(active_pe[i]), .switching(switching[i]), .switched(switched[i]),
      .way_en(way_en[i]), .ic_hit(ic_hit[i]), .ic_miss(ic_miss[i])
    );

    assign m_packed[i] = m[i];
  end

  ahb_arbiter #(.NM(NUM_MPU)) u_arb (
    .clk, .rst_n, .ce(bus_stb), .m(m_packed), .hready(ahb_rsp.hready),
    .hgrant, .hmaster, .s(ahb_req)
  );
endmodule
