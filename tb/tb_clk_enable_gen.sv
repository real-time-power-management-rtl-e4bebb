// tb_clk_enable_gen: checks the speed-grade and bus strobes.
// Over 600 reference cycles the high-end strobe must fire every 2nd cycle,
// the middle-end every 3rd and the low-end and bus strobes every 6th, with
// every bus strobe landing on a strobe of each core clock.
module tb_clk_enable_gen;
  import mpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] pe_stb;
  logic bus_stb;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_h = 0, n_m = 0, n_l = 0, n_b = 0;

  clk_enable_gen dut (.clk, .rst_n, .pe_stb, .bus_stb);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      checks++;
      if (pe_stb[PE_HIGH]   != (cyc % 2 == 0)) begin failures++; $display("high strobe wrong at %0d", cyc); end
      checks++;
      if (pe_stb[PE_MIDDLE] != (cyc % 3 == 0)) begin failures++; $display("middle strobe wrong at %0d", cyc); end
      checks++;
      if (pe_stb[PE_LOW]    != (cyc % 6 == 0)) begin failures++; $display("low strobe wrong at %0d", cyc); end
      checks++;
      if (bus_stb           != (cyc % 6 == 0)) begin failures++; $display("bus strobe wrong at %0d", cyc); end
      checks++;
      if (bus_stb && pe_stb != 3'b111) begin failures++; $display("bus strobe not aligned at %0d", cyc); end
      n_h += int'(pe_stb[PE_HIGH]); n_m += int'(pe_stb[PE_MIDDLE]);
      n_l += int'(pe_stb[PE_LOW]);  n_b += int'(bus_stb);
    end
    // 400 MHz reference: 600 cycles = 1.5 us -> 300, 200, 100, 100 core/bus edges
    checks++;
    if (n_h != 300 || n_m != 200 || n_l != 100 || n_b != 100) begin
      failures++; $display("edge counts %0d %0d %0d %0d", n_h, n_m, n_l, n_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
