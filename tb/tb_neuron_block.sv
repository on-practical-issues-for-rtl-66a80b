// Testbench for neuron_block: directed checks of integration through the
// synaptic memory, spike and STDP-request generation, threshold increment
// and saturation, threshold relaxation, resets by inhibition and STDP
// events, the STDP bus read/write path (three-cycle read, write five cycles
// after the read address, only when selected), neuron_active, and the shift
// leak against an independently written formula.
module tb_neuron_block;
  import stdp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  neuron_addr_t neuron_addr = 8'd7;
  logic neuron_active = 1'b1, aerin_v = 1'b0;
  logic [9:0] aerin = '0;
  cnt_t spike_threshold = 12'd5, stdp_threshold_init = 12'd3, stdp_threshold_max = 12'd5;
  logic leak_event = 0, th_leak_event = 0, inh_event = 0, stdp_event = 0, stdp_activate = 1;
  neuron_addr_t stdp_active_addr = 8'd0;
  logic [9:0] stdp_rd_addr = '0;
  logic stdp_wr_en = 0, stdp_wr_data = 0, stdp_rd_data;
  logic spike_out, stdp_req;
  cnt_t firing_count, learning_count, stdp_threshold;
  int checks = 0, failures = 0, spikes = 0, reqs = 0;

  neuron_block dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && spike_out) spikes++;
    if (rst_n && stdp_req) reqs++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ev(input int a);
    @(negedge clk); aerin_v = 1'b1; aerin = 10'(a);
    @(negedge clk); aerin_v = 1'b0;
  endtask

  task automatic settle();
    repeat (6) @(posedge clk); #1;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1;
    @(negedge clk); s = 1'b0;
  endtask

  // bus write of value d to synapse a, with the neuron addressed as sel
  task automatic bus_write(input int a, input logic d, input neuron_addr_t sel);
    @(negedge clk); stdp_active_addr = sel;
    @(negedge clk); stdp_rd_addr = 10'(a);
    @(negedge clk); stdp_rd_addr = 10'h3FF;
    repeat (4) @(negedge clk);
    stdp_wr_en = 1'b1; stdp_wr_data = d;          // 5 cycles after the address
    @(negedge clk); stdp_wr_en = 1'b0;
  endtask

  task automatic bus_read(input int a, output logic d);
    @(negedge clk); stdp_active_addr = neuron_addr;
    @(negedge clk); stdp_rd_addr = 10'(a);
    repeat (3) @(posedge clk);
    #1 d = stdp_rd_data;                          // valid 3 cycles later
    @(negedge clk); stdp_rd_addr = 10'h3FF;
  endtask

  function automatic int ref_leak(input int s);
    int p, st;
    if (s == 0) return 0;
    p = 1;
    while (p * 2 <= s) p = p * 2;
    st = p / 8;
    if (st < 1) st = 1;
    return (s > st) ? s - st : 0;
  endfunction

  initial begin
    logic d;
    int s;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(stdp_threshold == 3, "threshold init");
    check(firing_count == 0 && learning_count == 0, "states reset");

    // integration and STDP request
    for (int i = 0; i < 4; i++) ev(10);
    settle();
    check(firing_count == 4, $sformatf("firing 4 (%0d)", firing_count));
    check(reqs == 1, "one STDP request at learning count 3");
    check(stdp_threshold == 4, "threshold +1 after request");
    check(learning_count == 1, $sformatf("learning restarted (%0d)", learning_count));
    ev(11);
    settle();
    check(spikes == 1, "spike at threshold 5");
    check(firing_count == 0, "firing reset after spike");

    // bus path
    bus_read(20, d);
    check(d == 1'b1, "initial weight 1");
    bus_write(20, 1'b0, neuron_addr);
    bus_read(20, d);
    check(d == 1'b0, "weight written to 0");
    bus_read(21, d);
    check(d == 1'b1, "neighbour untouched");
    bus_write(30, 1'b0, 8'd8);                    // other neuron selected
    bus_read(30, d);
    check(d == 1'b1, "write ignored when not selected");
    @(negedge clk) stdp_active_addr = 8'd8;
    @(negedge clk) stdp_rd_addr = 10'd20;
    repeat (4) @(negedge clk);
    stdp_rd_addr = 10'd21;
    repeat (4) @(negedge clk);
    check(stdp_rd_data == 1'b0, "read line silent when not selected");
    s = firing_count;
    ev(20);
    settle();
    check(firing_count == cnt_t'(s), "0-weight synapse does not integrate");

    // resets
    ev(1); ev(2);
    settle();
    check(firing_count == cnt_t'(s + 2), "integrate two");
    ev(3);
    settle();
    s = learning_count;
    check(s != 0, "learning state nonzero");
    pulse(inh_event);
    #1 check(firing_count == 0, "inhibition clears firing state");
    check(learning_count == cnt_t'(s), "inhibition leaves learning state");
    pulse(stdp_event);
    #1 check(learning_count == 0, "STDP event clears learning state");

    // threshold saturation at max (5)
    spike_threshold = 12'd4000;
    for (int i = 0; i < 40; i++) ev(i + 100);
    settle();
    check(stdp_threshold == 5, $sformatf("threshold saturates (%0d)", stdp_threshold));
    // relaxation down to the initial value, not below
    for (int i = 0; i < 5; i++) pulse(th_leak_event);
    #1 check(stdp_threshold == 3, $sformatf("threshold relaxes to init (%0d)", stdp_threshold));

    // stdp_activate low: no requests, learning state held at 0
    stdp_activate = 1'b0;
    s = reqs;
    for (int i = 0; i < 20; i++) ev(i + 300);
    settle();
    check(reqs == s && learning_count == 0, "no learning when deactivated");

    // leak against the reference formula
    pulse(inh_event);
    for (int i = 0; i < 200; i++) ev(i + 400);
    settle();
    s = firing_count;
    check(s == 200, $sformatf("200 events integrated (%0d)", s));
    while (s > 0) begin
      pulse(leak_event);
      s = ref_leak(s);
      #1 check(firing_count == cnt_t'(s), $sformatf("leak step -> %0d got %0d", s, firing_count));
    end

    // inactive neuron ignores events
    neuron_active = 1'b0;
    for (int i = 0; i < 10; i++) ev(i);
    settle();
    check(firing_count == 0, "inactive neuron does not integrate");
    check(spikes == 1, "spike count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
