// tb_pm_regs: checks the power-management registers and the timer.
// Writes to the PE-select register must pulse sel_wr once with the value,
// the way flags must reset to all ones and follow writes, reads must return
// the running core, the flags and the timer, and the timer must advance by
// exactly one per bus strobe whatever the MPU clock enable does.
module tb_pm_regs;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, tick = 0;
  logic req = 0, we = 0;
  logic [3:0] word = 0;
  logic [31:0] wdata = 0, rdata, timer;
  logic ready, sel_wr;
  logic [PE_IDX_W-1:0] active_pe = 2'd1, sel_val;
  logic [3:0] way_en;
  int checks = 0, failures = 0;
  int ticks = 0, sel_pulses = 0;
  logic [PE_IDX_W-1:0] last_sel;

  pm_regs #(.WAYS(4), .TIMER_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase = 0;
  always @(negedge clk) begin
    phase = (phase + 1) % 6;
    tick  = (phase == 0);
    ce    = (phase % 3 == 0) || (($urandom % 4) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (tick) ticks++;
    if (sel_wr) begin sel_pulses++; last_sel = sel_val; end
  end

  task automatic acc(input logic w, input logic [3:0] r, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    req = 1; we = w; word = r; wdata = d;
    forever begin
      #1;
      if (ce && ready) begin q = rdata; break; end
      @(negedge clk);
    end
    @(posedge clk);
    #1 req = 0; we = 0;
  endtask

  initial begin
    logic [31:0] q, t0, t1;
    int k0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (way_en != 4'hF) begin failures++; $display("way flags reset %h", way_en); end
    acc(0, REG_PE_SEL, 0, q);
    checks++; if (q != 32'd1) begin failures++; $display("PE_SEL read %0d", q); end
    for (int i = 0; i < 20; i++) begin
      logic [3:0] f;
      f = 4'($urandom);
      acc(1, REG_WAY_EN, {28'h0, f}, q);
      acc(0, REG_WAY_EN, 0, q);
      checks++; if (way_en != f || q != {28'h0, f}) begin failures++; $display("way flags %h read %h want %h", way_en, q, f); end
    end
    for (int i = 0; i < 10; i++) begin
      int p0;
      p0 = sel_pulses;
      acc(1, REG_PE_SEL, 32'(i % 3), q);
      @(negedge clk);
      checks++; if (sel_pulses != p0 + 1 || last_sel != 2'(i % 3)) begin failures++; $display("sel pulse %0d val %0d", sel_pulses - p0, last_sel); end
    end
    acc(0, REG_TIMER, 0, t0);
    k0 = ticks;
    repeat (500) @(posedge clk);
    acc(0, REG_TIMER, 0, t1);
    checks++;
    if (t1 - t0 != 32'(ticks - k0) && t1 - t0 != 32'(ticks - k0 + 1) && t1 - t0 != 32'(ticks - k0 - 1)) begin
      failures++; $display("timer advanced %0d, ticks %0d", t1 - t0, ticks - k0);
    end
    checks++; if (timer != 32'(ticks)) begin failures++; $display("timer %0d ticks %0d", timer, ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
