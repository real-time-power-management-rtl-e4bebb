// tb_mpu: runs one MPU with three PE-core models and an AHB memory model.
// The program the running core performs: fetches from external memory (miss,
// then hits), code written into the I-SPM through the data port and fetched
// back, D-SPM stores and loads, timer reads, cache-way changes through the
// way register (direct-mapped operation must turn repeated conflicting
// fetches into misses, all ways back on must hit again), and switches
// High -> Middle -> Low -> High through the PE-select register. After each
// switch the new core must carry the old core's registers and its clock
// enable must run at its own rate (1/2, 1/3, 1/6 of the reference); a core
// that is not running must see no gated clock edge.
module tb_mpu;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] pe_stb;
  logic bus_stb;
  pe_out_t pe_o [3];
  pe_in_t  pe_i [3];
  logic [2:0] pe_gclk;
  ahb_m_t ahb_m;
  ahb_s_t ahb_s;
  logic [PE_IDX_W-1:0] active_pe;
  logic switching, switched, ic_hit, ic_miss;
  logic [3:0] way_en;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_switch = 0;
  int idle_gclk [3];

  clk_enable_gen u_clk (.clk, .rst_n, .pe_stb, .bus_stb);
  mpu dut (.clk, .rst_n, .pe_stb, .bus_stb, .pe_o, .pe_i, .pe_gclk, .ahb_m, .hgrant(1'b1), .ahb_s,
           .active_pe, .switching, .switched, .way_en, .ic_hit, .ic_miss);
  ahb_mem_model #(.MAX_WAIT(1)) u_mem (.clk, .rst_n, .ce(bus_stb), .req(ahb_m), .rsp(ahb_s));

  for (genvar p = 0; p < 3; p++) begin : g_pe
    pe_model #(.ID(8'(p))) u_pe (.clk, .rst_n, .pi(pe_i[p]), .po(pe_o[p]));
    always @(posedge pe_gclk[p]) if (active_pe != 2'(p)) idle_gclk[p]++;
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ic_hit) n_hit++;
    if (ic_miss) n_miss++;
    if (switched) n_switch++;
  end

  task automatic fetch(input logic [31:0] a, output logic [31:0] d);
    case (active_pe)
      2'd0: g_pe[0].u_pe.fetch(a, d);
      2'd1: g_pe[1].u_pe.fetch(a, d);
      default: g_pe[2].u_pe.fetch(a, d);
    endcase
  endtask
  task automatic acc(input logic we, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] d);
    case (active_pe)
      2'd0: g_pe[0].u_pe.access(we, a, wd, d);
      2'd1: g_pe[1].u_pe.access(we, a, wd, d);
      default: g_pe[2].u_pe.access(we, a, wd, d);
    endcase
  endtask
  function automatic logic [31:0] reg_of(input int p, input int r);
    return p == 0 ? g_pe[0].u_pe.regs[r] : p == 1 ? g_pe[1].u_pe.regs[r] : g_pe[2].u_pe.regs[r];
  endfunction

  task automatic check_fetch(input logic [31:0] a, input logic [31:0] exp);
    logic [31:0] d;
    fetch(a, d);
    checks++;
    if (d != exp) begin failures++; $display("fetch %h = %h expected %h", a, d, exp); end
  endtask

  task automatic switch_to(input int t);
    logic [31:0] d, saved [NUM_GPR + NUM_SPR];
    int f, en0, e;
    f = int'(active_pe);
    for (int r = 0; r < NUM_GPR + NUM_SPR; r++) saved[r] = reg_of(f, r);
    acc(1, {REGION_CTRL, 20'h0} | 32'(REG_PE_SEL) << 2, 32'(t), d);
    while (active_pe != 2'(t) || switching) @(negedge clk);
    for (int r = 0; r < NUM_GPR + NUM_SPR; r++) begin
      checks++;
      if (reg_of(t, r) != saved[r]) begin failures++; $display("after %0d->%0d reg %0d = %h", f, t, r, reg_of(t, r)); end
    end
    acc(0, {REGION_CTRL, 20'h0} | 32'(REG_PE_SEL) << 2, 0, d);
    checks++;
    if (d != 32'(t)) begin failures++; $display("PE_SEL reads %0d", d); end
    // clock enable rate of the new core over 60 reference cycles
    e = 0;
    repeat (60) begin @(negedge clk); if (pe_i[t].clk_en) e++; end
    checks++;
    if (e != 60 / pe_div(t == 0 ? PE_HIGH : t == 1 ? PE_MIDDLE : PE_LOW)) begin
      failures++; $display("core %0d clock enable rate %0d/60", t, e);
    end
    en0 = 0;
  endtask

  task automatic exercise(input int base);
    logic [31:0] d, t0, t1;
    // external code: first fetch of each line misses, the rest hit
    for (int i = 0; i < 16; i++) check_fetch(32'h0040_0000 + 32'(base + 4 * i), u_mem.mem_word(32'h0040_0000 + 32'(base + 4 * i)));
    // code in the I-SPM
    for (int i = 0; i < 4; i++) acc(1, {REGION_ISPM, 20'h0} + 32'(base + 4 * i), 32'hD000_0000 + 32'(base + i), d);
    for (int i = 0; i < 4; i++) check_fetch({REGION_ISPM, 20'h0} + 32'(base + 4 * i), 32'hD000_0000 + 32'(base + i));
    // data scratchpad
    for (int i = 0; i < 4; i++) acc(1, {REGION_DSPM, 20'h0} + 32'(base + 4 * i), 32'hAB00_0000 + 32'(base + i), d);
    for (int i = 0; i < 4; i++) begin
      acc(0, {REGION_DSPM, 20'h0} + 32'(base + 4 * i), 0, d);
      checks++;
      if (d != 32'hAB00_0000 + 32'(base + i)) begin failures++; $display("D-SPM %0d = %h", i, d); end
    end
    // timer at the loop checkpoint
    acc(0, {REGION_CTRL, 20'h0} | 32'(REG_TIMER) << 2, 0, t0);
    repeat (120) @(posedge clk);
    acc(0, {REGION_CTRL, 20'h0} | 32'(REG_TIMER) << 2, 0, t1);
    checks++;
    if (t1 - t0 < 20 || t1 - t0 > 40) begin failures++; $display("timer advanced %0d in ~120+ cycles", t1 - t0); end
  endtask

  initial begin
    logic [31:0] d;
    int m0, h0;
    for (int p = 0; p < 3; p++) idle_gclk[p] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    exercise(0);
    switch_to(1);
    exercise(64);
    // direct-mapped: two lines of one set alternate and always miss
    acc(1, {REGION_CTRL, 20'h0} | 32'(REG_WAY_EN) << 2, 32'h1, d);
    m0 = n_miss;
    for (int i = 0; i < 6; i++) check_fetch(32'h0050_0000 + 32'((i % 2) * 2048), u_mem.mem_word(32'h0050_0000 + 32'((i % 2) * 2048)));
    checks++;
    if (n_miss - m0 != 6) begin failures++; $display("direct mapped: %0d misses of 6", n_miss - m0); end
    acc(1, {REGION_CTRL, 20'h0} | 32'(REG_WAY_EN) << 2, 32'hF, d);
    for (int i = 0; i < 2; i++) check_fetch(32'h0050_0000 + 32'(i * 2048), u_mem.mem_word(32'h0050_0000 + 32'(i * 2048)));
    h0 = n_hit;
    for (int i = 0; i < 4; i++) check_fetch(32'h0050_0000 + 32'((i % 2) * 2048), u_mem.mem_word(32'h0050_0000 + 32'((i % 2) * 2048)));
    checks++;
    if (n_hit - h0 != 4) begin failures++; $display("4-way: %0d hits of 4", n_hit - h0); end
    switch_to(2);
    exercise(128);
    switch_to(0);
    exercise(192);
    checks++;
    if (n_switch != 3 || idle_gclk[0] + idle_gclk[1] + idle_gclk[2] != 0) begin
      failures++; $display("switches %0d, clock edges of idle cores %0d %0d %0d", n_switch, idle_gclk[0], idle_gclk[1], idle_gclk[2]);
    end
    $display("hits %0d misses %0d bus transfers %0d", n_hit, n_miss, u_mem.transfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
