// tb_pe_switch_ctrl: checks the core-switch sequencer on its own.
// Three core models (high, middle, low speed grade) with distinct register
// contents, a data scratchpad and the speed-grade strobes are wired around
// the controller. Every ordered pair of cores is switched (six switches),
// plus requests for the running core and for a core that does not exist,
// which must be ignored. After each switch the new core must hold all 24
// registers of the old one, the stack area must hold the old core's general
// purpose registers, the switch must take exactly 42 enabled cycles of the
// old core and 40 of the new one, and its time at a 400 MHz reference must
// stay below the transition time printed for that direction in the
// prototype's measurements (968 ns to 1,443 ns, which also include
// software).
module tb_pe_switch_ctrl;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] pe_stb;
  logic bus_stb;
  logic [PE_IDX_W-1:0] active_pe, sel_val = 0;
  logic sel_wr_raw = 0, sel_wr, busy, switched, halt;
  logic [CTX_AW-1:0] ctx_addr;
  logic ctx_we, sp_req, sp_we, sp_ready;
  logic [31:0] ctx_wdata, sp_addr, sp_wdata, sp_rdata, unused_rd;
  logic unused_rdy;
  pe_in_t  pi [3];
  pe_out_t po [3];
  logic ce;
  int checks = 0, failures = 0;
  int old_cyc = 0, new_cyc = 0, ref_cyc = 0, n_switched = 0;
  logic [PE_IDX_W-1:0] from_pe;
  localparam pe_kind_e KIND [3] = '{PE_HIGH, PE_MIDDLE, PE_LOW};

  clk_enable_gen u_clk (.clk, .rst_n, .pe_stb, .bus_stb);
  assign ce     = pe_stb[KIND[active_pe]];
  assign sel_wr = sel_wr_raw && ce;

  pe_switch_ctrl #(.NUM_PE(3), .STACK_ADDR(32'h3FC0)) dut (
    .clk, .rst_n, .ce, .sel_wr, .sel_val, .active_pe, .busy, .switched,
    .halt, .halted(po[active_pe].halted),
    .ctx_addr, .ctx_we, .ctx_wdata, .ctx_rdata(po[active_pe].ctx_rdata),
    .sp_req, .sp_we, .sp_addr, .sp_wdata, .sp_ready, .sp_rdata
  );

  spm #(.SIZE_BYTES(16384)) u_dspm (
    .clk, .rst_n, .ce,
    .a_req(1'b0), .a_we(1'b0), .a_addr('0), .a_wdata('0), .a_ready(unused_rdy), .a_rdata(unused_rd),
    .b_req(sp_req), .b_we(sp_we), .b_addr(sp_addr), .b_wdata(sp_wdata), .b_ready(sp_ready), .b_rdata(sp_rdata)
  );

  for (genvar p = 0; p < 3; p++) begin : g_pe
    always_comb begin
      pi[p] = '0;
      if (active_pe == 2'(p)) begin
        pi[p].clk_en    = pe_stb[KIND[p]];
        pi[p].halt      = halt;
        pi[p].ctx_addr  = ctx_addr;
        pi[p].ctx_we    = ctx_we;
        pi[p].ctx_wdata = ctx_wdata;
      end else pi[p].halt = 1'b1;
    end
    pe_model #(.ID(8'(p))) u_pe (.clk, .rst_n, .pi(pi[p]), .po(po[p]));
  end

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (busy) ref_cyc++;
    if (ce && busy && active_pe == from_pe) old_cyc++;
    if (ce && busy && active_pe != from_pe) new_cyc++;
    if (switched) n_switched++;
  end

  function automatic int table2_ns(input int f, input int t);
    // prototype's transition times, High=0 Middle=1 Low=2
    case ({f[1:0], t[1:0]})
      4'b0001: return 1113;  4'b0010: return 1290;
      4'b0100: return 968;   4'b0110: return 1443;
      4'b1000: return 1205;  4'b1001: return 1286;
      default: return 0;
    endcase
  endfunction

  task automatic request(input int t);
    @(negedge clk);
    while (!ce) @(negedge clk);
    sel_val = 2'(t); sel_wr_raw = 1;
    @(posedge clk);
    #1 sel_wr_raw = 0;
  endtask

  task automatic do_switch(input int t);
    logic [31:0] saved [NUM_GPR + NUM_SPR];
    int f;
    f = int'(active_pe);
    from_pe = active_pe;
    for (int r = 0; r < NUM_GPR + NUM_SPR; r++) saved[r] = f == 0 ? g_pe[0].u_pe.regs[r] :
                                                          f == 1 ? g_pe[1].u_pe.regs[r] : g_pe[2].u_pe.regs[r];
    old_cyc = 0; new_cyc = 0; ref_cyc = 0;
    request(t);
    while (busy || active_pe != 2'(t)) @(negedge clk);
    @(negedge clk);
    checks++;
    if (old_cyc != 42 || new_cyc != 40) begin failures++; $display("%0d->%0d took %0d old + %0d new cycles", f, t, old_cyc, new_cyc); end
    checks++;
    if (real'(ref_cyc) * 2.5 >= real'(table2_ns(f, t))) begin failures++; $display("%0d->%0d took %0d ns", f, t, ref_cyc * 5 / 2); end
    $display("switch %0d->%0d: %0d ns", f, t, ref_cyc * 5 / 2);
    for (int r = 0; r < NUM_GPR + NUM_SPR; r++) begin
      logic [31:0] now;
      now = t == 0 ? g_pe[0].u_pe.regs[r] : t == 1 ? g_pe[1].u_pe.regs[r] : g_pe[2].u_pe.regs[r];
      checks++;
      if (now != saved[r]) begin failures++; $display("reg %0d = %h expected %h", r, now, saved[r]); end
      if (r < NUM_GPR) begin
        checks++;
        if (u_dspm.u_sram.mem[4096 - 16 + r] != saved[r]) begin failures++; $display("stack word %0d", r); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    do_switch(1); do_switch(2); do_switch(0); do_switch(2); do_switch(1); do_switch(0);
    // ignored requests: the running core and a core that does not exist
    request(0);
    request(3);
    repeat (20) @(posedge clk);
    checks++;
    if (busy || active_pe != 0 || n_switched != 6) begin failures++; $display("invalid request acted: %0d switches", n_switched); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
