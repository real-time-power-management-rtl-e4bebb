// sel_way_icache: selective-way set-associative instruction cache.
//
// An 8 KB, 4-way set-associative cache whose ways can be switched off by
// software. Each way has an active flag (way_en, set through a special
// purpose register). For a way whose flag is 0 the tag and data arrays are
// not read (their read enables, which stand for the sense amplifiers, stay
// low), the way can never hit and it is never chosen for replacement, so
// every access that would have hit it misses. Fewer active ways trade hit
// rate for read energy. Lines left in a switched-off way stay valid and hit
// again once the way is switched back on; an instruction cache holds no
// dirty data, so nothing has to be written back.
//
// Organisation: LINE_BYTES-byte lines, SETS = SIZE_BYTES/(WAYS*LINE_BYTES)
// sets, one tag SRAM and one line-wide data SRAM per way, valid bits in
// flip-flops cleared by reset. Replacement is round-robin per set over the
// active ways only: the victim is the first active way at or after the set's
// pointer, and the pointer moves past it. If no way is active the line is
// fetched and returned without being stored.
//
// Timing (MPU clock-enable cycles): a request held on req/addr is looked up
// in the cycle after it is accepted; a hit returns ready with rdata in that
// cycle (2 cycles per access). A miss raises refill_req with the line address
// until refill_done (four-phase handshake with the bus interface), writes
// the line, and answers in the next cycle. hit/miss pulse once per lookup.
// The size, associativity and the way flags are the prototype's; the line
// size, the replacement order, the latencies and the uncached behaviour
// with all ways off are this design's choices.
module sel_way_icache #(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic [WAYS-1:0]         way_en,
  input  logic                    req,
  input  logic [31:0]             addr,
  output logic                    ready,
  output logic [31:0]             rdata,
  output logic                    refill_req,
  output logic [31:0]             refill_addr,
  input  logic                    refill_done,
  input  logic [LINE_BYTES*8-1:0] refill_line,
  output logic                    hit,
  output logic                    miss
);
  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = 32 - OFF_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LINE_W = LINE_BYTES * 8;

  typedef enum logic [2:0] {C_IDLE, C_LOOK, C_MISS, C_FILL, C_RESP} state_e;
  state_e state;

  logic [31:0]      addr_q;
  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic [WAYS-1:0]  valid [SETS];
  logic [WAY_W-1:0] rr    [SETS];

  logic [TAG_W-1:0]  tag_q  [WAYS];
  logic [LINE_W-1:0] line_q [WAYS];
  logic [WAYS-1:0]   way_hit;
  logic [WAY_W-1:0]  hit_way, victim;
  logic              victim_ok;
  logic [LINE_W-1:0] line_buf;

  assign idx = (state == C_IDLE) ? addr[OFF_W +: IDX_W] : addr_q[OFF_W +: IDX_W];
  assign tag = addr_q[31 -: TAG_W];

  // Victim: first active way at or after the round-robin pointer of the set.
  always_comb begin
    victim    = '0;
    victim_ok = 1'b0;
    for (int unsigned k = 0; k < WAYS; k++) begin
      int unsigned w;
      w = (int'(rr[idx]) + k) % WAYS;
      if (!victim_ok && way_en[w]) begin
        victim    = WAY_W'(w);
        victim_ok = 1'b1;
      end
    end
  end


  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic rd_en, wr_en;
    // read only the active ways: a switched-off way keeps its sense
    // amplifiers idle
    assign rd_en = (state == C_IDLE) && req && way_en[w];
    assign wr_en = (state == C_FILL) && refill_done && victim_ok && victim == WAY_W'(w);

    sp_sram #(.DEPTH(SETS), .WIDTH(TAG_W)) u_tag (
      .clk, .ce, .en(rd_en || wr_en), .we(wr_en), .addr(idx),
      .wdata(tag), .rdata(tag_q[w])
    );
    sp_sram #(.DEPTH(SETS), .WIDTH(LINE_W)) u_data (
      .clk, .ce, .en(rd_en || wr_en), .we(wr_en), .addr(idx),
      .wdata(refill_line), .rdata(line_q[w])
    );

    assign way_hit[w] = way_en[w] && valid[idx][w] && tag_q[w] == tag;
  end

  always_comb begin
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (way_hit[w]) hit_way = WAY_W'(w);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_IDLE;
      for (int unsigned s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
    end else if (ce) begin
      case (state)
        C_IDLE: if (req) begin
          addr_q <= addr;
          state  <= C_LOOK;
        end
        C_LOOK: state <= (|way_hit) ? C_IDLE : C_MISS;
        C_MISS: if (!refill_done) state <= C_FILL;
        C_FILL: if (refill_done) begin
          line_buf <= refill_line;
          if (victim_ok) begin
            valid[idx][victim] <= 1'b1;
            rr[idx]            <= WAY_W'((int'(victim) + 1) % WAYS);
          end
          state <= C_RESP;
        end
        C_RESP: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    ready       = 1'b0;
    rdata       = '0;
    if (state == C_LOOK && |way_hit) begin
      ready = 1'b1;
      rdata = line_q[hit_way][addr_q[OFF_W-1:2]*32 +: 32];
    end else if (state == C_RESP) begin
      ready = 1'b1;
      rdata = line_buf[addr_q[OFF_W-1:2]*32 +: 32];
    end
  end

  assign refill_req  = (state == C_FILL);

  // four-phase refill handshake: a new request only after done has fallen
  assert property (@(posedge clk) disable iff (!rst_n) $rose(refill_req) |-> !$past(refill_done))
    else $error("refill requested while the previous one is still acknowledged");
  assign refill_addr = {addr_q[31:OFF_W], {OFF_W{1'b0}}};
  assign hit         = ce && state == C_LOOK && |way_hit;
  assign miss        = ce && state == C_LOOK && !(|way_hit);
endmodule
