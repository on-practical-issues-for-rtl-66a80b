// Testbench for aer_filter: random events for random destination cores;
// events for this core must appear one cycle later with their synapse
// address, all others must vanish.
module tb_aer_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  core_addr = 8'd5;
  logic        aer_in_v = 1'b0;
  logic [17:0] aer_in = '0;
  logic        aerin_v;
  logic [9:0]  aerin;
  int checks = 0, failures = 0;

  aer_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp_v;
    logic [9:0] exp_a;
    int passed = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] dest;
      logic [9:0] syn;
      logic       v;
      if (i == 1000) core_addr <= 8'd200;
      dest = ($urandom_range(0, 2) == 0) ? core_addr : 8'($urandom);
      syn  = 10'($urandom);
      v    = 1'($urandom);
      @(negedge clk);
      aer_in_v = v; aer_in = {dest, syn};
      exp_v = v && (dest == core_addr);
      exp_a = syn;
      @(posedge clk); #1;
      checks++;
      if (aerin_v != exp_v || (exp_v && aerin != exp_a)) begin
        failures++;
        $display("FAIL event %0d: v=%0d a=%0d exp v=%0d a=%0d", i, aerin_v, aerin, exp_v, exp_a);
      end
      if (exp_v) passed++;
    end
    checks++;
    if (passed < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
