// Testbench for spike2aer. Without inhibition every spike must come out
// exactly once as an AER event (a scoreboard counts them per neuron); with
// inhibition only the lowest index of each simultaneous group comes out.
module tb_spike2aer;
  localparam int N = 256;
  logic clk = 1'b0, rst_n = 1'b0, inhibition_active = 1'b0;
  logic [N-1:0] spike = '0, pending;
  logic aer_out_v;
  logic [7:0] aer_out;
  int checks = 0, failures = 0;
  int sent [N], got [N];

  spike2aer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && aer_out_v) got[aer_out]++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // phase 1: no inhibition, sparse bursts
    for (int i = 0; i < 500; i++) begin
      logic [N-1:0] s;
      s = '0;
      if ($urandom_range(0, 3) == 0)
        for (int k = 0; k < 3; k++) s[$urandom_range(0, N-1)] = 1'b1;
      @(negedge clk);
      s = s & ~pending;   // a neuron cannot spike again before its event left
      spike = s;
      for (int k = 0; k < N; k++) if (s[k]) sent[k]++;
    end
    @(negedge clk) spike = '0;
    repeat (20) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (sent[k] != got[k]) begin failures++; $display("FAIL neuron %0d sent %0d got %0d", k, sent[k], got[k]); end
    end
    // phase 2: inhibition, simultaneous groups
    inhibition_active = 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] s;
      int lo;
      s = '0;
      for (int k = 0; k < 4; k++) s[$urandom_range(0, N-1)] = 1'b1;
      lo = 0;
      for (int k = N - 1; k >= 0; k--) if (s[k]) lo = k;
      @(negedge clk) spike = s;
      @(negedge clk) spike = '0;
      checks++;
      if (!aer_out_v || aer_out != 8'(lo)) begin failures++; $display("FAIL wta %0d got %0d", lo, aer_out); end
      @(negedge clk);
      checks++;
      if (aer_out_v) begin failures++; $display("FAIL losers emitted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
