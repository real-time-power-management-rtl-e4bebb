// tb_its_schedule: intra-task voltage scheduling on one MPU.
//
// A loop with a checkpoint at its top runs on MPU0. Each iteration does a
// random amount of work (instruction fetches from the I-SPM) between the
// average and the worst case, in the ratio of the execution times published
// for the main loops of an ADPCM decoder, a JPEG encoder and an MPEG2
// encoder (average/worst 0.36/0.45, 1.8/2.4 and 2.3/3.3 ms at 200 MHz, here
// scaled to 36/45, 180/240 and 230/330 work units). Each iteration has a
// virtual deadline, k times the time constraint TC after the start. Two TCs
// per program are run, in the published ratio to the worst case (ADPCM 0.45
// and 0.5, JPEG 2.4 and 2.8, MPEG2 3.3 and 3.6 ms).
//
// At each checkpoint the program reads the timer and picks the 133 MHz core
// if the worst case of the next iteration at that speed, plus a switch,
// still ends by the next virtual deadline; otherwise the 200 MHz core. The
// worst case per work unit of each core is 1.2 times a measured value, as in
// the published method. The test fails on any missed virtual deadline, if
// the slower core is never used, or if the energy estimate (published power
// of the two speeds times the time spent) is not below always running at
// 200 MHz.
module tb_its_schedule;
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
  localparam logic [31:0] CTRL = {REGION_CTRL, 20'h0};
  localparam logic [31:0] CODE = {REGION_ISPM, 20'h0};

  clk_enable_gen u_clk (.clk, .rst_n, .pe_stb, .bus_stb);
  mpu dut (.clk, .rst_n, .pe_stb, .bus_stb, .pe_o, .pe_i, .pe_gclk, .ahb_m, .hgrant(1'b1), .ahb_s,
           .active_pe, .switching, .switched, .way_en, .ic_hit, .ic_miss);
  ahb_mem_model #(.MAX_WAIT(0)) u_mem (.clk, .rst_n, .ce(bus_stb), .req(ahb_m), .rsp(ahb_s));

  for (genvar p = 0; p < 3; p++) begin : g_pe
    pe_model #(.ID(8'(p))) u_pe (.clk, .rst_n, .pi(pe_i[p]), .po(pe_o[p]));
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
  task automatic timer(output int t);
    logic [31:0] d;
    acc(0, CTRL | 32'(REG_TIMER) << 2, 0, d);
    t = int'(d);
  endtask
  task automatic work(input int units);
    logic [31:0] d;
    for (int i = 0; i < units; i++) begin
      fetch(CODE + 32'(4 * (i % 16)), d);
      if (d != 32'h600D_0000 + 32'(i % 16)) begin failures++; $display("code word %0d = %h", i % 16, d); end
    end
  endtask
  task automatic select(input int c);
    logic [31:0] d;
    if (int'(active_pe) != c) begin
      acc(1, CTRL | 32'(REG_PE_SEL) << 2, 32'(c), d);
      while (active_pe != 2'(c) || switching) @(negedge clk);
    end
  endtask

  // timer ticks per 100 work units, worst case (1.2 x measured), per core
  int u_high, u_mid, sw_ticks;

  task automatic calibrate();
    int t0, t1;
    select(1);
    timer(t0); work(100); timer(t1);
    u_mid = (t1 - t0) * 12 / 10 + 1;
    timer(t0); select(0); timer(t1);
    sw_ticks = (t1 - t0) * 12 / 10 + 2;
    timer(t0); work(100); timer(t1);
    u_high = (t1 - t0) * 12 / 10 + 1;
    $display("worst case ticks per 100 units: high %0d middle %0d, switch %0d ticks", u_high, u_mid, sw_ticks);
  endtask

  task automatic run(input string name, input int avg, input int wc, input int tc_x100,
                     input int p_high, input int p_mid);
    int start, now, deadline, units, n_mid, misses;
    int t_high, t_mid, t0, t1, tc;
    real e_mpp, e_orig;
    tc = wc * u_high * tc_x100 / 10000;  // time constraint per iteration, ticks
    select(0);
    timer(start);
    n_mid = 0; misses = 0; t_high = 0; t_mid = 0;
    for (int k = 0; k < 10; k++) begin
      // checkpoint: time now, slack to the next virtual deadline
      timer(now);
      deadline = start + (k + 1) * tc;
      if (now + sw_ticks + wc * u_mid / 100 <= deadline) select(1);
      else select(0);
      if (active_pe == 1) n_mid++;
      units = avg - (wc - avg) / 2 + int'($urandom % (3 * (wc - avg) / 2 + 1));
      if (units > wc) units = wc;
      timer(t0);
      work(units);
      timer(t1);
      if (active_pe == 0) t_high += t1 - t0; else t_mid += t1 - t0;
      if (t1 > deadline) begin misses++; $display("%s: iteration %0d missed its deadline by %0d", name, k, t1 - deadline); end
    end
    // energy: power x time; always-200 MHz runs the mid-speed work at 1/1.5 of the time
    e_mpp  = real'(p_high) * t_high + real'(p_mid) * t_mid;
    e_orig = real'(p_high) * (t_high + real'(t_mid) * u_high / real'(u_mid));
    $display("%s TC=%0d.%02d x WCET: %0d of 10 iterations at 133 MHz, energy %0.2f of 200 MHz-only",
             name, tc_x100 / 100, tc_x100 % 100, n_mid, e_mpp / e_orig);
    checks++; if (misses != 0) failures++;
    checks++; if (n_mid == 0) begin failures++; $display("%s: slower core never used", name); end
    checks++; if (!(e_mpp < e_orig)) begin failures++; $display("%s: no energy saved", name); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 16; i++) acc(1, CODE + 32'(4 * i), 32'h600D_0000 + 32'(i), d);
    calibrate();
    // published power at 200 / 133 MHz with the best way count (mW):
    // ADPCM 32/12 (1 way), JPEG 33/13, MPEG2 35/14 (2 ways)
    run("ADPCM", 36, 45, 100, 32, 12);
    run("ADPCM", 36, 45, 111, 32, 12);
    run("JPEG",  180, 240, 100, 33, 13);
    run("JPEG",  180, 240, 117, 33, 13);
    run("MPEG2", 230, 330, 100, 35, 14);
    run("MPEG2", 230, 330, 109, 35, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
