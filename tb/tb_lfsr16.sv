// Testbench for lfsr16: compares the sequence with an independent
// Galois-free reference computed in the testbench (same polynomial written
// as an XOR of shifted copies), checks that the enable holds the state,
// and checks the maximal period of 65535.
module tb_lfsr16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] state;
  logic [9:0]  rnd10;
  int checks = 0, failures = 0;

  lfsr16 #(.SEED(16'h1234)) dut (.clk, .rst_n, .en, .state, .rnd10);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_next(input logic [15:0] s);
    logic b;
    b = ^(s & 16'b1101_0000_0000_1000);
    return {s[14:0], b};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [15:0] r;
    int period;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(state == 16'h1234, "seed");
    r = state;
    en = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      r = ref_next(r);
      check(state == r, $sformatf("step %0d: %h vs %h", i, state, r));
      check(rnd10 == r[9:0], "rnd10 bits");
    end
    en = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(state == r, "hold when disabled");
    // period
    en = 1'b1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (state != r && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
