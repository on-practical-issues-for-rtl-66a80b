// Testbench for syn_weight_mem: checks the all-ones reset value, then
// random writes on port B against a model array, pipelined reads on both
// ports with the three-cycle latency.
module tb_syn_weight_mem;
  localparam int DEPTH = 1024, AW = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] a_addr = '0, b_rd_addr = '0, b_wr_addr = '0;
  logic a_data, b_rd_data;
  logic b_wr_en = 1'b0, b_wr_data = 1'b0;
  logic model [DEPTH];
  logic [AW-1:0] a_hist [4], b_hist [4];
  int checks = 0, failures = 0;

  syn_weight_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // random traffic: each cycle one read per port and possibly one write,
    // writes only to addresses not read within the last 4 cycles
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic [AW-1:0] ra, rb, wa;
      logic          we, wd;
      ra = AW'($urandom); rb = AW'($urandom);
      wa = AW'($urandom);
      we = (cyc > 2000) && ($urandom_range(0, 1) == 1);
      wd = 1'($urandom);
      for (int k = 0; k < 4; k++) if (a_hist[k] == wa || b_hist[k] == wa) we = 1'b0;
      if (wa == ra || wa == rb) we = 1'b0;
      @(negedge clk);
      a_addr = ra; b_rd_addr = rb; b_wr_en = we; b_wr_addr = wa; b_wr_data = wd;
      if (cyc >= 3) begin
        checks += 2;
        if (a_data != model[a_hist[2]]) begin failures++; $display("FAIL A %0d", cyc); end
        if (b_rd_data != model[b_hist[2]]) begin failures++; $display("FAIL B %0d", cyc); end
      end
      a_hist[3] = a_hist[2]; a_hist[2] = a_hist[1]; a_hist[1] = a_hist[0]; a_hist[0] = ra;
      b_hist[3] = b_hist[2]; b_hist[2] = b_hist[1]; b_hist[1] = b_hist[0]; b_hist[0] = rb;
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
