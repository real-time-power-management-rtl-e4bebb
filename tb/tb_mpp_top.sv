// tb_mpp_top: end-to-end run of the three-MPU processor at its default size.
// Seven PE-core models sit on the core ports (MPU0: high/middle/low, MPU1:
// high/middle, MPU2: high/low) and an AHB memory model with random wait
// states on the bus. The three MPUs run at the same time; each runs a loop
// whose checkpoint reads the timer and then switches to another core, so
// that MPU0 goes through all six switch directions, MPU1 through
// High<->Middle and MPU2 through High<->Low. Every iteration fetches code
// from external memory (refills over the shared bus, then hits), from the
// I-SPM, and stores and loads D-SPM data. Part of the loop runs with one
// cache way only. All data are checked against the memory function or the
// stored values, registers against the core they came from, and the test
// counts each mechanism: hits, misses, bus hand-overs between MPUs, wait
// states, switches per direction, direct-mapped operation, timer reads,
// and confirms that no idle core ever got a clock edge and that idle cores
// see only halt on their inputs. A mechanism that never happened is a
// failure.
module tb_mpp_top;
  import mpp_pkg::*;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0;
  pe_out_t pe_o [NM][MAX_PE];
  pe_in_t  pe_i [NM][MAX_PE];
  logic [NM-1:0][MAX_PE-1:0] pe_gclk;
  logic bus_stb;
  ahb_m_t ahb_req;
  ahb_s_t ahb_rsp;
  logic [1:0] hmaster;
  logic [NM-1:0][PE_IDX_W-1:0] active_pe;
  logic [NM-1:0] switching, switched, ic_hit, ic_miss;
  logic [NM-1:0][3:0] way_en;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_handover = 0, n_switch = 0, n_dm = 0, n_timer = 0, n_ispm = 0;
  int n_dir [3][3];
  int idle_edges = 0, gating_viol = 0;
  logic [1:0] last_master;

  mpp_top dut (.*);
  ahb_mem_model #(.MAX_WAIT(2)) u_mem (.clk, .rst_n, .ce(bus_stb), .req(ahb_req), .rsp(ahb_rsp));

  for (genvar m = 0; m < NM; m++) begin : g_m
    for (genvar p = 0; p < MAX_PE; p++) begin : g_p
      pe_model #(.ID(8'(16 * m + p))) u_pe (.clk, .rst_n, .pi(pe_i[m][p]), .po(pe_o[m][p]));
      always @(posedge pe_gclk[m][p]) if (active_pe[m] != 2'(p)) idle_edges++;
      always @(negedge clk) if (rst_n && active_pe[m] != 2'(p)) begin
        pe_in_t idle;
        idle = '0; idle.halt = 1'b1;
        if (pe_i[m][p] != idle) gating_viol++;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) begin
      if (ic_hit[m]) n_hit++;
      if (ic_miss[m]) n_miss++;
      if (switched[m]) n_switch++;
    end
    if (bus_stb) begin
      if (hmaster != last_master) n_handover++;
      last_master <= hmaster;
    end
  end

  task automatic fetch(input int m, input logic [31:0] a, output logic [31:0] d);
    case ({m[1:0], active_pe[m]})
      4'b0000: g_m[0].g_p[0].u_pe.fetch(a, d);
      4'b0001: g_m[0].g_p[1].u_pe.fetch(a, d);
      4'b0010: g_m[0].g_p[2].u_pe.fetch(a, d);
      4'b0100: g_m[1].g_p[0].u_pe.fetch(a, d);
      4'b0101: g_m[1].g_p[1].u_pe.fetch(a, d);
      4'b1000: g_m[2].g_p[0].u_pe.fetch(a, d);
      default: g_m[2].g_p[1].u_pe.fetch(a, d);
    endcase
  endtask
  task automatic acc(input int m, input logic we, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] d);
    case ({m[1:0], active_pe[m]})
      4'b0000: g_m[0].g_p[0].u_pe.access(we, a, wd, d);
      4'b0001: g_m[0].g_p[1].u_pe.access(we, a, wd, d);
      4'b0010: g_m[0].g_p[2].u_pe.access(we, a, wd, d);
      4'b0100: g_m[1].g_p[0].u_pe.access(we, a, wd, d);
      4'b0101: g_m[1].g_p[1].u_pe.access(we, a, wd, d);
      4'b1000: g_m[2].g_p[0].u_pe.access(we, a, wd, d);
      default: g_m[2].g_p[1].u_pe.access(we, a, wd, d);
    endcase
  endtask
  function automatic logic [31:0] reg_of(input int m, input int p, input int r);
    case ({m[1:0], p[1:0]})
      4'b0000: return g_m[0].g_p[0].u_pe.regs[r];
      4'b0001: return g_m[0].g_p[1].u_pe.regs[r];
      4'b0010: return g_m[0].g_p[2].u_pe.regs[r];
      4'b0100: return g_m[1].g_p[0].u_pe.regs[r];
      4'b0101: return g_m[1].g_p[1].u_pe.regs[r];
      4'b1000: return g_m[2].g_p[0].u_pe.regs[r];
      default: return g_m[2].g_p[1].u_pe.regs[r];
    endcase
  endfunction

  localparam logic [31:0] CTRL = {REGION_CTRL, 20'h0};

  task automatic checkpoint(input int m, input int t);
    logic [31:0] d, saved [NUM_GPR + NUM_SPR];
    int f;
    acc(m, 0, CTRL | 32'(REG_TIMER) << 2, 0, d);
    n_timer++;
    f = int'(active_pe[m]);
    for (int r = 0; r < NUM_GPR + NUM_SPR; r++) saved[r] = reg_of(m, f, r);
    acc(m, 1, CTRL | 32'(REG_PE_SEL) << 2, 32'(t), d);
    while (active_pe[m] != 2'(t) || switching[m]) @(negedge clk);
    n_dir[f][t]++;
    for (int r = 0; r < NUM_GPR + NUM_SPR; r++) begin
      checks++;
      if (reg_of(m, t, r) != saved[r]) begin failures++; $display("MPU%0d %0d->%0d reg %0d", m, f, t, r); end
    end
  endtask

  task automatic body(input int m, input int it);
    logic [31:0] a, d;
    int m0;
    // external code shared by all MPUs (the same loop body)
    for (int i = 0; i < 12; i++) begin
      a = 32'h0080_0000 + 32'(((it % 3) * 64 + 4 * i));
      fetch(m, a, d);
      checks++;
      if (d != u_mem.mem_word(a)) begin failures++; $display("MPU%0d fetch %h = %h", m, a, d); end
    end
    // I-SPM code and D-SPM data
    acc(m, 1, {REGION_ISPM, 20'h0} + 32'(4 * it), 32'hC0DE_0000 + 32'(16 * m + it), d);
    fetch(m, {REGION_ISPM, 20'h0} + 32'(4 * it), d);
    n_ispm++;
    checks++;
    if (d != 32'hC0DE_0000 + 32'(16 * m + it)) begin failures++; $display("MPU%0d I-SPM %h", m, d); end
    acc(m, 1, {REGION_DSPM, 20'h0} + 32'(4 * it), 32'hDA7A_0000 + 32'(16 * m + it), d);
    acc(m, 0, {REGION_DSPM, 20'h0} + 32'(4 * it), 0, d);
    checks++;
    if (d != 32'hDA7A_0000 + 32'(16 * m + it)) begin failures++; $display("MPU%0d D-SPM %h", m, d); end
    // a stretch with one active way: conflicting lines always miss
    if (it == 3) begin
      acc(m, 1, CTRL | 32'(REG_WAY_EN) << 2, 32'h1, d);
      m0 = n_miss;
      for (int i = 0; i < 4; i++) begin
        a = 32'h0090_0000 + 32'(m * 16 + (i % 2) * 2048);
        fetch(m, a, d);
        checks++;
        if (d != u_mem.mem_word(a)) begin failures++; $display("MPU%0d dm fetch %h", m, d); end
      end
      n_dm++;
      acc(m, 1, CTRL | 32'(REG_WAY_EN) << 2, 32'hF, d);
    end
  endtask

  task automatic run_mpu(input int m);
    // switch order per MPU: every direction its cores allow
    int seq0 [7] = '{1, 2, 0, 2, 1, 0, 1};
    int seq1 [7] = '{1, 0, 1, 0, 1, 0, 1};
    int t;
    for (int it = 0; it < 7; it++) begin
      body(m, it);
      t = m == 0 ? seq0[it] : seq1[it];
      checkpoint(m, t);
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) n_dir[i][j] = 0;
    last_master = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      run_mpu(0);
      run_mpu(1);
      run_mpu(2);
    join
    for (int f = 0; f < 3; f++) for (int t = 0; t < 3; t++) if (f != t) begin
      checks++;
      if (n_dir[f][t] == 0) begin failures++; $display("switch %0d->%0d never happened", f, t); end
    end
    checks++; if (n_hit == 0)      begin failures++; $display("no cache hit"); end
    checks++; if (n_miss == 0)     begin failures++; $display("no cache miss"); end
    checks++; if (n_handover == 0) begin failures++; $display("no bus hand-over"); end
    checks++; if (u_mem.wait_cycles == 0) begin failures++; $display("no wait state"); end
    checks++; if (n_dm != 3)       begin failures++; $display("direct-mapped stretch ran %0d times", n_dm); end
    checks++; if (n_timer != 21 || n_ispm != 21) begin failures++; $display("timer reads %0d I-SPM fetches %0d", n_timer, n_ispm); end
    checks++; if (n_switch != 21)  begin failures++; $display("%0d switches", n_switch); end
    checks++; if (idle_edges != 0 || gating_viol != 0) begin failures++; $display("idle core clock edges %0d, gating violations %0d", idle_edges, gating_viol); end
    checks++; if (u_mem.errors != 0) begin failures++; $display("bus protocol errors %0d", u_mem.errors); end
    $display("hits %0d misses %0d hand-overs %0d wait cycles %0d switches %0d", n_hit, n_miss, n_handover, u_mem.wait_cycles, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
