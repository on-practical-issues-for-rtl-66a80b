// Testbench for stdp_arbiter: random request vectors; the lowest-index
// requester must be presented one cycle later with stdp_addr_v and
// stdp_event_out, and nothing when no neuron requests.
module tb_stdp_arbiter;
  localparam int N = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] stdp_req = '0;
  logic stdp_addr_v, stdp_event_out;
  logic [7:0] stdp_req_addr;
  int checks = 0, failures = 0;

  stdp_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] r;
      int exp_idx;
      r = '0;
      case ($urandom_range(0, 3))
        0: ;
        1: r[$urandom_range(0, N-1)] = 1'b1;
        2: begin r[$urandom_range(0, N-1)] = 1'b1; r[$urandom_range(0, N-1)] = 1'b1; end
        default: for (int k = 0; k < N/32; k++) r[k*32 +: 32] = $urandom & $urandom & $urandom;
      endcase
      exp_idx = -1;
      for (int k = N - 1; k >= 0; k--) if (r[k]) exp_idx = k;
      @(negedge clk);
      stdp_req = r;
      @(posedge clk); #1;
      stdp_req = '0;
      checks++;
      if (stdp_addr_v != (exp_idx >= 0) || stdp_event_out != stdp_addr_v ||
          (exp_idx >= 0 && stdp_req_addr != 8'(exp_idx))) begin
        failures++;
        $display("FAIL %0d: v=%0d addr=%0d exp %0d", i, stdp_addr_v, stdp_req_addr, exp_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
