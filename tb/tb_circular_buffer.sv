// Testbench for circular_buffer (small depth): keeps its own list of the
// written addresses, reads entries back by age and checks data, the
// two-cycle read latency, the saturating count, wrap-around and flush.
module tb_circular_buffer;
  localparam int DEPTH = 16, W = 10, AW = 4;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [AW-1:0] rd_offset = '0;
  logic rd_valid;
  logic [AW:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  circular_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic push(input logic [W-1:0] d);
    @(posedge clk);
    wr_en <= 1'b1; wr_data <= d;
    @(posedge clk);
    wr_en <= 1'b0;
    hist.push_front(d);
  endtask

  task automatic read_check(input int off);
    @(posedge clk);
    rd_en <= 1'b1; rd_offset <= AW'(off);
    @(posedge clk);
    rd_en <= 1'b0;
    #1 check(!rd_valid, "no early valid");
    @(posedge clk); #1;
    check(rd_valid, "valid after 2 cycles");
    check(rd_data == hist[off], $sformatf("age %0d: %0d vs %0d", off, rd_data, hist[off]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1 check(count == 0, "empty after reset");
    for (int i = 0; i < 5; i++) push(W'($urandom));
    #1 check(count == 5, "count 5");
    for (int i = 0; i < 5; i++) read_check(i);
    for (int i = 0; i < 30; i++) push(W'($urandom));
    #1 check(count == DEPTH, "count saturates");
    for (int i = 0; i < DEPTH; i++) read_check(i);
    @(posedge clk); flush <= 1'b1;
    @(posedge clk); flush <= 1'b0;
    #1 check(count == 0, "flush empties");
    hist.delete();
    for (int i = 0; i < 3; i++) push(W'($urandom));
    for (int i = 0; i < 3; i++) read_check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
