// tb_sel_way_icache: checks the selective-way instruction cache against a
// reference model.
// Fetch addresses are drawn from a few sets with several tags each so that
// lines conflict. The model keeps tags, valid bits and the per-set
// round-robin pointer over the active ways, and predicts for every fetch
// whether it hits, which way a miss fills and what data comes back. The way
// flags go through 1111, 0001 (direct mapped), 0011, 1010, 0000 (no way) and
// back to 1111. The test checks hit/miss against the prediction, data
// against the memory function, that a switched-off way's arrays are never
// read, that a hit answers one enabled cycle after it is accepted, and that
// with no active way nothing is stored.
module tb_sel_way_icache;
  localparam int WAYS = 4, SETS = 128;
  logic clk = 0, rst_n = 0, ce = 1;
  logic [3:0] way_en = 4'hF;
  logic req = 0, ready, refill_req, hit, miss;
  logic [31:0] addr = 0, rdata, refill_addr;
  logic refill_done = 0;
  logic [127:0] refill_line = 0;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, off_reads = 0;

  logic [20:0] m_tag   [SETS][WAYS];
  logic        m_valid [SETS][WAYS];
  int          m_rr    [SETS];

  sel_way_icache #(.SIZE_BYTES(8192), .WAYS(4), .LINE_BYTES(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return {a[31:2], 2'b00} * 32'd2654435761 + 32'd17;
  endfunction

  always @(negedge clk) ce <= ($urandom % 4) != 0;

  // refill responder: a line after a random delay, four-phase handshake
  initial begin
    forever begin
      @(negedge clk);
      if (refill_req && !refill_done) begin
        repeat ($urandom % 8) @(negedge clk);
        for (int k = 0; k < 4; k++) refill_line[k*32 +: 32] = mem_word(refill_addr + 32'(4 * k));
        refill_done = 1;
        while (refill_req) @(negedge clk);
        refill_done = 0;
      end
    end
  end

  // a switched-off way must not be read
  always @(posedge clk) if (rst_n && ce) begin
    if (dut.g_way[0].rd_en && !way_en[0]) off_reads++;
    if (dut.g_way[1].rd_en && !way_en[1]) off_reads++;
    if (dut.g_way[2].rd_en && !way_en[2]) off_reads++;
    if (dut.g_way[3].rd_en && !way_en[3]) off_reads++;
    if (hit) n_hit++;
    if (miss) n_miss++;
  end

  task automatic fetch(input logic [31:0] a, output logic [31:0] d, output int ce_edges);
    ce_edges = 0;
    @(negedge clk);
    addr = a; req = 1;
    forever begin
      #1;
      if (ce && ready) begin d = rdata; break; end
      if (ce) ce_edges++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 req = 0;
  endtask

  task automatic one(input logic [31:0] a);
    int s, e, hw, v;
    logic [20:0] t;
    logic exp_hit;
    logic [31:0] d;
    int h0, m0;
    s = int'(a[10:4]);
    t = a[31:11];
    exp_hit = 0;
    for (int w = 0; w < WAYS; w++) if (way_en[w] && m_valid[s][w] && m_tag[s][w] == t) exp_hit = 1;
    h0 = n_hit; m0 = n_miss;
    fetch(a, d, e);
    @(negedge clk);
    checks++;
    if (d != mem_word(a)) begin failures++; $display("data %h at %h", d, a); end
    checks++;
    if (exp_hit ? (n_hit != h0 + 1 || n_miss != m0) : (n_miss != m0 + 1 || n_hit != h0)) begin
      failures++; $display("addr %h expected %s flags %b", a, exp_hit ? "hit" : "miss", way_en);
    end
    if (exp_hit) begin
      checks++;
      if (e != 1) begin failures++; $display("hit took %0d enabled edges", e); end
    end else begin
      v = -1;
      for (int k = 0; k < WAYS; k++) begin
        hw = (m_rr[s] + k) % WAYS;
        if (v < 0 && way_en[hw]) v = hw;
      end
      if (v >= 0) begin
        m_valid[s][v] = 1; m_tag[s][v] = t; m_rr[s] = (v + 1) % WAYS;
      end
    end
  endtask

  function automatic logic [31:0] pick();
    // 4 sets x 6 tags x 4 words
    return {18'h0, 3'($urandom % 6), 4'h0, 3'($urandom % 4), 2'($urandom), 2'b00} |
           32'h0040_0000;
  endfunction

  initial begin
    logic [3:0] flags [6] = '{4'hF, 4'h1, 4'h3, 4'hA, 4'h0, 4'hF};
    for (int s = 0; s < SETS; s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) begin m_valid[s][w] = 0; m_tag[s][w] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (flags[f]) begin
      @(negedge clk) way_en = flags[f];
      for (int i = 0; i < 300; i++) one(pick());
    end
    checks++;
    if (off_reads != 0) begin failures++; $display("%0d reads of switched-off ways", off_reads); end
    checks++;
    if (n_hit < 200 || n_miss < 200) begin failures++; $display("too few hits %0d / misses %0d", n_hit, n_miss); end
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
