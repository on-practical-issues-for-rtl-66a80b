// Testbench for leak_timer: counts the cycles between pulses of both
// outputs for several rates and checks the period, and checks that a rate
// of zero gives no pulses.
module tb_leak_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] neuron_leak_rate = '0, threshold_leak_rate = '0;
  logic leak_event, th_leak_event;
  int checks = 0, failures = 0;

  leak_timer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(input int nr, input int tr);
    int last_n, last_t, n_seen, t_seen, cyc;
    neuron_leak_rate    <= 16'(nr);
    threshold_leak_rate <= 16'(tr);
    repeat (3 * (nr > tr ? nr : tr) + 5) @(posedge clk);   // settle
    last_n = -1; last_t = -1; n_seen = 0; t_seen = 0;
    for (cyc = 0; cyc < 10 * (nr > tr ? nr : tr) + 10; cyc++) begin
      @(posedge clk); #1;
      if (leak_event) begin
        if (last_n >= 0) check(cyc - last_n == nr, $sformatf("leak period %0d want %0d", cyc - last_n, nr));
        last_n = cyc; n_seen++;
      end
      if (th_leak_event) begin
        if (last_t >= 0) check(cyc - last_t == tr, $sformatf("th period %0d want %0d", cyc - last_t, tr));
        last_t = cyc; t_seen++;
      end
    end
    if (nr == 0) check(n_seen == 0, "no leak when rate 0");
    else check(n_seen >= 9, "leak pulses seen");
    if (tr == 0) check(t_seen == 0, "no th leak when rate 0");
    else check(t_seen >= 9, "th pulses seen");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    measure(7, 13);
    measure(1, 2);
    measure(100, 0);
    measure(0, 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
