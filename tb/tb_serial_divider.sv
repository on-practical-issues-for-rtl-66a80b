// Testbench for serial_divider: random and corner divisions of a 21-bit
// numerator by an 11-bit denominator, compared with the / and % operators;
// checks that done arrives exactly NUM_W cycles after start.
module tb_serial_divider;
  localparam int NUM_W = 21, DEN_W = 11;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NUM_W-1:0] num = '0, quotient;
  logic [DEN_W-1:0] den = '0, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  serial_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [NUM_W-1:0] n, input logic [DEN_W-1:0] d);
    int cyc;
    @(posedge clk);
    num <= n; den <= d; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!done && cyc < 100);
    checks++;
    if (cyc != NUM_W) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if (d != 0 && (quotient != n / d || remainder != n % d)) begin
      failures++;
      $display("FAIL %0d / %0d -> %0d r %0d", n, d, quotient, remainder);
    end
    if (d == 0 && quotient != '1) begin failures++; $display("FAIL div0"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    divide(21'd1024 * 21'd100, 11'd300);
    divide(21'd1024 * 21'd1024, 11'd1024);
    divide(21'd0, 11'd5);
    divide(21'd7, 11'd0);
    divide(21'h1FFFFF, 11'd1);
    for (int i = 0; i < 300; i++) begin
      logic [10:0] w, dw;
      w  = 11'($urandom_range(1, 1024));
      dw = 11'($urandom_range(0, w));
      divide({dw, 10'b0}, w);
    end
    for (int i = 0; i < 200; i++) divide(NUM_W'($urandom), DEN_W'($urandom_range(1, 2047)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
