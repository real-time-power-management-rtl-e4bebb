// tb_ahb_arbiter: checks ownership of the AHB bus.
// Three masters raise and drop hbusreq at random while hready stalls at
// random. The testbench keeps its own owner register: ownership may change
// only on a bus strobe with hready high while the owner does not request,
// and must then go to the next requester in round-robin order. The grant
// must always be one-hot, equal hmaster, and the slave side must carry the
// owner's address and control. It also counts hand-overs to each master.
module tb_ahb_arbiter;
  import mpp_pkg::*;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0, ce = 0, hready = 1;
  ahb_m_t [NM-1:0] m;
  logic [NM-1:0] hgrant;
  logic [1:0] hmaster;
  ahb_m_t s;
  int checks = 0, failures = 0;
  int exp_owner = 0;
  int handovers [NM];
  int phase = 0;

  ahb_arbiter #(.NM(NM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    phase = (phase + 1) % 6;
    ce    = (phase == 0);
    if (ce) begin
      hready = ($urandom % 4) != 0;
      for (int i = 0; i < NM; i++) begin
        m[i].haddr   = $urandom;
        m[i].htrans  = htrans_e'($urandom);
        m[i].hwrite  = 0;
        m[i].hsize   = HSIZE_WORD;
        m[i].hburst  = 3'($urandom);
        // requests are sticky for a while
        if (($urandom % 5) == 0) m[i].hbusreq = ~m[i].hbusreq;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (hgrant != NM'(1 << hmaster) || int'(hmaster) != exp_owner || s != m[hmaster]) begin
      failures++; $display("owner %0d expected %0d grant %b", hmaster, exp_owner, hgrant);
    end
    if (ce && hready && !m[exp_owner].hbusreq) begin
      for (int k = 1; k <= NM; k++) begin
        int idx;
        idx = (exp_owner + k) % NM;
        if (m[idx].hbusreq) begin
          if (idx != exp_owner) handovers[idx]++;
          exp_owner = idx;
          break;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NM; i++) begin m[i] = '0; handovers[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (6000) @(posedge clk);
    for (int i = 0; i < NM; i++) begin
      checks++;
      if (handovers[i] == 0) begin failures++; $display("master %0d never got the bus", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
