// tb_spm: checks the two-requester scratchpad.
// Ports A and B run random write/read streams at the same time (A in the
// lower half, B in the upper half of the memory) under an irregular clock
// enable; every read is compared with a reference copy. Each access must
// take exactly two enabled cycles when the other port is idle, and when both
// ports ask in the same cycle port A must be served first. Finally port B
// reads back words port A wrote, to show both reach one memory.
module tb_spm;
  logic clk = 0, rst_n = 0, ce = 1;
  logic        a_req = 0, a_we = 0, b_req = 0, b_we = 0;
  logic [31:0] a_addr = 0, a_wdata = 0, b_addr = 0, b_wdata = 0;
  logic        a_ready, b_ready;
  logic [31:0] a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [4096];
  logic        ref_ok  [4096];

  spm #(.SIZE_BYTES(16384)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // irregular clock enable, as when the MPU runs at 133 MHz or below
  always @(negedge clk) ce <= ($urandom % 3) != 0;

  task automatic acc(input bit port_b, input logic we, input logic [31:0] addr,
                     input logic [31:0] wdata, output logic [31:0] rdata, output int ce_edges);
    ce_edges = 0;
    @(negedge clk);
    if (!port_b) begin a_req = 1; a_we = we; a_addr = addr; a_wdata = wdata; end
    else         begin b_req = 1; b_we = we; b_addr = addr; b_wdata = wdata; end
    forever begin
      #1;
      if (ce && (port_b ? b_ready : a_ready)) begin
        rdata = port_b ? b_rdata : a_rdata;
        break;
      end
      if (ce) ce_edges++;
      @(negedge clk);
    end
    @(posedge clk);
    #1;
    if (!port_b) a_req = 0; else b_req = 0;
  endtask

  task automatic stream(input bit port_b, input int n);
    logic [31:0] rd, wd;
    int e, w;
    for (int i = 0; i < n; i++) begin
      w  = (port_b ? 2048 : 0) + int'($urandom % 64);
      wd = $urandom;
      if (($urandom % 2) == 0 || !ref_ok[w]) begin
        acc(port_b, 1, 32'(w * 4), wd, rd, e);
        ref_mem[w] = wd; ref_ok[w] = 1;
      end else begin
        acc(port_b, 0, 32'(w * 4), 0, rd, e);
        checks++;
        if (rd !== ref_mem[w]) begin failures++; $display("port %0d read %h expected %h", port_b, rd, ref_mem[w]); end
      end
    end
  endtask

  initial begin
    logic [31:0] rd;
    int ea, eb;
    for (int i = 0; i < 4096; i++) ref_ok[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // latency with the other port idle: one enabled edge to be granted,
    // ready in the next enabled cycle
    acc(0, 1, 32'h40, 32'h1234_5678, rd, ea);
    checks++; if (ea != 1) begin failures++; $display("A write latency %0d", ea); end
    acc(1, 0, 32'h40, 0, rd, eb);
    checks++; if (eb != 1 || rd != 32'h1234_5678) begin failures++; $display("B read latency %0d data %h", eb, rd); end
    // both ports in the same cycle: A first, B one access later
    ce = 1;
    fork
      acc(0, 0, 32'h40, 0, rd, ea);
      acc(1, 0, 32'h40, 0, rd, eb);
    join
    checks++; if (!(ea < eb)) begin failures++; $display("priority: A %0d B %0d", ea, eb); end
    ref_mem[16] = 32'h1234_5678; ref_ok[16] = 1;
    fork
      stream(0, 400);
      stream(1, 400);
    join
    // cross check: B sees what A wrote
    for (int w = 0; w < 64; w++) if (ref_ok[w]) begin
      acc(1, 0, 32'(w * 4), 0, rd, eb);
      checks++;
      if (rd !== ref_mem[w]) begin failures++; $display("cross read %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
