// tb_gbi: checks the bus interface's line refill.
// Random line addresses are requested with the four-phase handshake; the
// grant is withheld for a random number of bus cycles and the memory model
// inserts random wait states. Each refilled line must hold the four words the
// memory model defines for its address, exactly four transfers must be made
// per line (checked as SEQ beats by the model), and hbusreq must be low once the
// line is delivered.
module tb_gbi;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  logic refill_req = 0, refill_done;
  logic [31:0] refill_addr = 0;
  logic [127:0] refill_line;
  ahb_m_t m;
  ahb_s_t s;
  logic hgrant = 0;
  int checks = 0, failures = 0;
  int phase = 0;
  int grant_delay = 0;

  gbi #(.LINE_BYTES(16)) dut (.clk, .rst_n, .ce, .refill_req, .refill_addr, .refill_done,
                              .refill_line, .m, .hgrant, .s);
  ahb_mem_model #(.MAX_WAIT(2)) mem (.clk, .rst_n, .ce, .req(m), .rsp(s));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    phase = (phase + 1) % 6;
    ce    = (phase == 0);
  end
  // grant after grant_delay bus cycles of request; withdrawn when idle
  int waited = 0;
  always @(posedge clk) if (ce) begin
    if (!m.hbusreq) begin hgrant <= 0; waited <= 0; end
    else if (waited >= grant_delay) hgrant <= 1;
    else waited <= waited + 1;
  end

  task automatic refill(input logic [31:0] a, output int bus_cycles);
    bus_cycles = 0;
    @(negedge clk);
    refill_addr = a; refill_req = 1;
    while (!refill_done) begin
      @(negedge clk);
      if (ce) bus_cycles++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (refill_line[k*32 +: 32] != mem.mem_word(a + 32'(4 * k))) begin
        failures++; $display("line %h word %0d = %h", a, k, refill_line[k*32 +: 32]);
      end
    end
    checks++;
    if (m.hbusreq) begin failures++; $display("bus still requested after the line"); end
    refill_req = 0;
    while (refill_done) @(negedge clk);
  endtask

  initial begin
    int n0, bc;
    repeat (13) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      grant_delay = $urandom % 4;
      n0 = mem.transfers;
      refill({$urandom, 4'h0} & 32'hFFFF_FFF0, bc);
      checks++;
      if (mem.transfers - n0 != 4) begin failures++; $display("%0d transfers for one line", mem.transfers - n0); end
    end
    checks++;
    if (mem.errors != 0 || mem.wait_cycles == 0) begin failures++; $display("bus errors %0d waits %0d", mem.errors, mem.wait_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
