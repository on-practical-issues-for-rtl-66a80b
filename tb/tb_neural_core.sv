// End-to-end testbench of neural_core at its default size (256 neurons,
// 1024 synapses each, 1024-entry pre-list). It needs no parameter override.
//
// Phases:
//  1. Inference without inhibition: all weights start at 1, so T events
//     make every active neuron reach spike_threshold T together; all of
//     them must come out of Spike2AER, each exactly once.
//  2. Winner-takes-all: same with inhibition on; exactly one event, from
//     the lowest active index; a neuron given a head start fires alone and
//     clears the others; general_inhibition clears all states.
//  3. AER filter: events for another core change nothing.
//  4. Leak: integrated states decay to zero with the leak timer running.
//  5. On-line learning: random input patterns with STDP on (all neurons,
//     then four). Every STDP
//     process must leave the trained neuron with a number of 1-weights near
//     num_active_weights (counted here from the weight arrays), requests
//     made while the unit is busy must be ignored, and each process must
//     take n + 2093 cycles.
// Mechanisms counted (each must occur at least once): filtered events,
// output spikes, inhibition events, simultaneous spikes resolved, STDP
// events, completed STDP processes, requests ignored while busy,
// potentiation writes, depression writes, leak ticks, threshold leak ticks,
// external STDP events, pre-list flushes.
module tb_neural_core;
  import stdp_pkg::*;
  localparam int NN = 256, NS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  core_addr = 8'd9;
  logic        aer_in_v = 1'b0;
  logic [17:0] aer_in = '0;
  logic [15:0] neuron_leak_rate = '0, threshold_leak_rate = '0;
  cnt_t        spike_threshold = 12'd8, stdp_threshold_init = 12'd20, stdp_threshold_max = 12'd100;
  logic [NN-1:0] neuron_active = '1;
  logic        inhibition_active = 1'b0, general_inhibition = 1'b0;
  logic        stdp_activate = 1'b0;
  prob_t       ltp_probability = prob_t'(307);
  logic [9:0]  num_active_weights = 10'd100, num_potentiation = 10'd90;
  logic        stdp_event_in = 1'b0;
  logic        aer_out_v;
  logic [7:0]  aer_out;
  logic        stdp_event_out, stdp_busy, stdp_done;

  neural_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_filtered = 0, n_spikes = 0, n_inh = 0, n_multi = 0, n_stdp_ev = 0, n_done = 0,
      n_ignored = 0, n_ltp_w = 0, n_ltd_w = 0, n_leak = 0, n_thleak = 0, n_ext_ev = 0,
      n_flush = 0;
  int got [NN];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-neuron weight counts and firing states, read from the hierarchy
  int   ones [NN];
  cnt_t fcnt [NN];
  for (genvar i = 0; i < NN; i++) begin : g_probe
    always_comb ones[i] = $countones(dut.g_neuron[i].u_neuron.u_mem.mem);
    always_comb fcnt[i] = dut.g_neuron[i].fc;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (aer_in_v && aer_in[17:10] != core_addr) n_filtered++;
    if (aer_out_v) begin n_spikes++; got[aer_out]++; end
    if (dut.inh_event) n_inh++;
    if ($countones(dut.spike) > 1) n_multi++;
    if (stdp_event_out) n_stdp_ev++;
    if (stdp_event_out && stdp_busy) n_ignored++;
    if (stdp_done) n_done++;
    if (dut.bus.wr_en && dut.bus.wr_data) n_ltp_w++;
    if (dut.bus.wr_en && !dut.bus.wr_data) n_ltd_w++;
    if (dut.leak_event) n_leak++;
    if (dut.th_leak_event) n_thleak++;
    if (stdp_event_in) n_ext_ev++;
    if (dut.u_stdp.state == dut.u_stdp.S_FLUSH) n_flush++;
  end

  task automatic ev(input int core, input int syn);
    @(negedge clk);
    aer_in_v = 1'b1; aer_in = {8'(core), 10'(syn)};
    @(negedge clk);
    aer_in_v = 1'b0;
  endtask

  task automatic pulse_general_inhibition();
    @(negedge clk) general_inhibition = 1'b1;
    @(negedge clk) general_inhibition = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // one STDP process: follows the unit and checks the trained neuron
  int proc_busy, proc_n;
  always @(posedge clk) if (rst_n && stdp_busy) proc_busy++;

  initial begin
    int first_active, s0, lo;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    idle(2);

    // ---- 1. inference, no inhibition ----
    neuron_active = '1;
    neuron_active[0] = 1'b0; neuron_active[77] = 1'b0;
    for (int i = 0; i < NN; i++) got[i] = 0;
    for (int i = 0; i < 8; i++) ev(9, 5 * i);
    idle(NN + 20);
    check(n_spikes == NN - 2, $sformatf("every active neuron fired (%0d)", n_spikes));
    for (int i = 0; i < NN; i++)
      check(got[i] == ((i == 0 || i == 77) ? 0 : 1), $sformatf("neuron %0d fired %0d times", i, got[i]));

    // ---- 2. winner takes all ----
    inhibition_active = 1'b1;
    s0 = n_spikes;
    for (int i = 0; i < NN; i++) got[i] = 0;
    for (int i = 0; i < 8; i++) ev(9, 100 + i);
    idle(20);
    check(n_spikes == s0 + 1 && got[1] == 1, "only the lowest active neuron fires");
    // a head start for neuron 5: its spike must clear everybody else
    neuron_active = '0; neuron_active[5] = 1'b1;
    for (int i = 0; i < 3; i++) ev(9, 110 + i);
    neuron_active = '1;
    s0 = n_spikes;
    for (int i = 0; i < NN; i++) got[i] = 0;
    for (int i = 0; i < 8; i++) ev(9, 120 + i);
    idle(20);
    check(n_spikes == s0 + 1 && got[5] == 1, "the leading neuron wins");
    check(fcnt[6] == 3 && fcnt[255] == 3, $sformatf("losers were reset (%0d)", fcnt[6]));
    pulse_general_inhibition();
    for (int i = 0; i < 5; i++) ev(9, 200 + i);
    idle(6);
    check(fcnt[5] == 5, "states integrate");
    @(negedge clk) general_inhibition = 1'b1;
    @(negedge clk) general_inhibition = 1'b0;
    check(fcnt[5] == 0 && fcnt[200] == 0, "general inhibition clears all states");

    // ---- 3. filter ----
    for (int i = 0; i < 5; i++) ev(3, 300 + i);
    idle(6);
    check(fcnt[5] == 0 && fcnt[255] == 0, "events for another core ignored");

    // ---- 4. leak ----
    for (int i = 0; i < 7; i++) ev(9, 400 + i);
    idle(6);
    check(fcnt[10] == 7, "seven events integrated");
    neuron_leak_rate = 16'd4;
    threshold_leak_rate = 16'd50;
    idle(60);
    check(fcnt[10] == 0, "leak empties the state");
    neuron_leak_rate = 16'd0;
    threshold_leak_rate = 16'd0;

    // ---- 5. on-line learning ----
    stdp_activate = 1'b1;
    spike_threshold = 12'd30;
    // first all neurons compete, then only four (as in the orientation
    // experiment) so that trained neurons are trained again
    for (int pat = 0; pat < 40; pat++) begin
      int base;
      if (pat == 10) neuron_active = {{(NN-4){1'b0}}, 4'hF};
      base = (pat % 4) * 256;
      // a burst of events from one of four input regions
      for (int k = 0; k < 120; k++) begin
        @(negedge clk);
        aer_in_v = 1'b1;
        aer_in = {8'd9, 10'(base + $urandom_range(0, 127))};
      end
      @(negedge clk) aer_in_v = 1'b0;
      if (pat == 3) begin
        @(negedge clk) stdp_event_in = 1'b1;
        @(negedge clk) stdp_event_in = 1'b0;
      end
      while (stdp_busy) @(negedge clk);
      idle(10);
    end

    $display("mechanisms: filtered=%0d spikes=%0d inh=%0d multi=%0d stdp_ev=%0d done=%0d ignored=%0d ltp_w=%0d ltd_w=%0d leak=%0d thleak=%0d ext=%0d flush=%0d",
             n_filtered, n_spikes, n_inh, n_multi, n_stdp_ev, n_done, n_ignored, n_ltp_w,
             n_ltd_w, n_leak, n_thleak, n_ext_ev, n_flush);
    check(n_filtered > 0, "filter exercised");
    check(n_spikes > 0, "spikes");
    check(n_inh > 0, "inhibition");
    check(n_multi > 0, "simultaneous spikes");
    check(n_stdp_ev > 0, "STDP events");
    check(n_done > 0, "STDP processes");
    check(n_ignored > 0, "requests ignored while busy");
    check(n_ltp_w > 0, "potentiation writes");
    check(n_ltd_w > 0, "depression writes");
    check(n_leak > 0, "leak ticks");
    check(n_thleak > 0, "threshold leak ticks");
    check(n_ext_ev > 0, "external STDP event");
    check(n_flush == n_done, "one flush per process");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-process checks
  int trained [$];
  always @(posedge clk) if (rst_n) begin
    if (stdp_event_out && !stdp_busy) begin
      proc_busy = 0;
      proc_n = (int'(num_potentiation) < int'(dut.u_stdp.prelist_count)) ?
               int'(num_potentiation) : int'(dut.u_stdp.prelist_count);
    end
    if (stdp_done) begin
      int k, tol, sum;
      k = int'(dut.u_stdp.stdp_active_addr);
      sum = int'(dut.u_stdp.weight_sum);
      tol = 4 * $rtoi($sqrt(real'(sum))) + 8;
      #1;
      checks++;
      if (proc_busy != proc_n + 2093) begin
        failures++;
        $display("FAIL process cycles %0d vs %0d", proc_busy, proc_n + 2093);
      end
      checks++;
      if (sum > int'(num_active_weights) &&
          (ones[k] < int'(num_active_weights) - tol || ones[k] > int'(num_active_weights) + tol)) begin
        failures++;
        $display("FAIL neuron %0d keeps %0d ones after normalisation", k, ones[k]);
      end
      trained.push_back(k);
    end
  end
endmodule
