// End-to-end testbench of the multi-core arrangement, at 3 cores of 4
// neurons (1024 synapses each, the cores' full pre-list and memories).
//
// Phases (each starts from reset, so all weights are 1):
//  A. Broadcast and merger: every neuron of every core reaches threshold
//     on the same input event with inhibition off. Every core must emit
//     its four neurons in index order, and the merged output is compared,
//     cycle by cycle, with a model of the merger (lowest core index first,
//     pending event before a new one, one-entry pending register per core
//     whose unserved event is replaced, reported on merger_drop).
//  B. General inhibition: core 0 fires after 3 events, core 1 (threshold
//     4) never does because the OR of the output valids resets it; core 0
//     emits only neuron 0 (winner takes all).
//  C. Shared STDP events: core 0 (STDP threshold 4) starts learning; its
//     STDP event clears core 1's learning states (threshold 6), so core 1
//     never starts a process within 9 events; core 0 completes one.
// Mechanisms counted (each must occur): merged events, merger waits,
// merger drops, general-inhibition pulses, shared STDP events, completed
// STDP processes.
module tb_multi_core;
  import stdp_pkg::*;
  localparam int NC = 3, NN = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic aer_in_v = 1'b0;
  syn_addr_t aer_in = '0;
  core_params_t [NC-1:0] params;
  logic [NC-1:0][NN-1:0] neuron_active;
  logic aer_out_v, merger_drop;
  logic [15:0] aer_out;
  logic [NC-1:0] stdp_busy, stdp_done;

  multi_core #(.NUM_CORES(NC), .NUM_NEURONS(NN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_merged = 0, n_wait = 0, n_drop = 0, n_ginh = 0, n_stdp_ev = 0, n_done = 0;
  int per_core [NC];
  int per_neuron [NC][NN];
  bit seen_busy [NC];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- merger reference model, fed from the cores' output events ----
  bit          m_pv [NC];
  logic [7:0]  m_pa [NC];
  bit          m_ov, m_drop;
  int          m_lost = 0;
  logic [15:0] m_oa;
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (m_pv[c]) m_pv[c] = 0;
      m_ov = 0; m_drop = 0; m_oa = '0;
    end else begin
      int s;
      bit nv [NC];
      logic [7:0] na [NC];
      s = -1;
      for (int c = 0; c < NC; c++) begin
        nv[c] = dut.core_v[c];
        na[c] = dut.core_a[c];
        if (s < 0 && (m_pv[c] || nv[c])) s = c;
      end
      m_drop = 0;
      m_ov = (s >= 0);
      if (s >= 0) m_oa = {8'(s), m_pv[s] ? m_pa[s] : na[s]};
      for (int c = 0; c < NC; c++) begin
        if (c == s) begin
          if (m_pv[c]) begin
            m_pv[c] = nv[c];
            if (nv[c]) m_pa[c] = na[c];
          end
        end else if (nv[c]) begin
          if (m_pv[c]) begin m_drop = 1; m_lost++; end
          m_pv[c] = 1;
          m_pa[c] = na[c];
        end
      end
    end
  end

  bit model_on = 0;
  always @(negedge clk) if (rst_n) begin
    if (model_on) begin
      check(aer_out_v == m_ov, "merged valid matches model");
      if (m_ov) check(aer_out == m_oa, $sformatf("merged event %h expected %h", aer_out, m_oa));
      check(merger_drop == m_drop, "merger_drop matches model");
    end
    if (aer_out_v) begin
      n_merged++;
      per_core[aer_out[15:8]]++;
      per_neuron[aer_out[15:8]][aer_out[1:0]]++;
    end
    if (merger_drop) n_drop++;
    if (|dut.pend_v) n_wait++;
    if (dut.general_inhibition) n_ginh++;
    if (dut.stdp_event_all) n_stdp_ev++;
    for (int c = 0; c < NC; c++) begin
      if (stdp_busy[c]) seen_busy[c] = 1;
      if (stdp_done[c]) n_done++;
    end
  end

  function automatic core_params_t base();
    core_params_t p;
    p.neuron_leak_rate    = '0;
    p.threshold_leak_rate = '0;
    p.spike_threshold     = 12'd4000;
    p.stdp_threshold_init = 12'd4000;
    p.stdp_threshold_max  = 12'd4000;
    p.inhibition_active   = 1'b0;
    p.stdp_activate       = 1'b0;
    p.ltp_probability     = prob_t'(819);
    p.num_active_weights  = 10'd100;
    p.num_potentiation    = 10'd90;
    return p;
  endfunction

  task automatic restart();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (per_core[c]) begin
      per_core[c] = 0;
      seen_busy[c] = 0;
      foreach (per_neuron[c][n]) per_neuron[c][n] = 0;
    end
  endtask

  task automatic send(input int addr, input int gap);
    @(negedge clk);
    aer_in_v = 1'b1;
    aer_in   = syn_addr_t'(addr);
    @(negedge clk);
    aer_in_v = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    int core_seq [NC][$];
    for (int c = 0; c < NC; c++) params[c] = base();
    neuron_active = '1;

    // ---- A: broadcast and merger ----
    for (int c = 0; c < NC; c++) params[c].spike_threshold = 12'd1;
    restart();
    model_on = 1;
    fork
      begin
        repeat (30) begin
          @(negedge clk);
          for (int c = 0; c < NC; c++) if (dut.core_v[c]) core_seq[c].push_back(int'(dut.core_a[c]));
        end
      end
      send(17, 0);
    join
    model_on = 0;
    for (int c = 0; c < NC; c++) begin
      check(core_seq[c].size() == NN, $sformatf("core %0d emits %0d events", c, core_seq[c].size()));
      for (int n = 0; n < NN && n < core_seq[c].size(); n++)
        check(core_seq[c][n] == n, $sformatf("core %0d event %0d order", c, n));
    end
    check(per_core[0] == NN, "core 0 fully merged (highest priority)");
    check(n_merged + m_lost == NC * NN, $sformatf("merged %0d + lost %0d = all", n_merged, m_lost));

    // ---- B: general inhibition across cores ----
    for (int c = 0; c < NC; c++) params[c] = base();
    params[0].spike_threshold = 12'd3; params[0].inhibition_active = 1'b1;
    params[1].spike_threshold = 12'd4; params[1].inhibition_active = 1'b1;
    neuron_active[2] = '0;
    restart();
    for (int e = 0; e < 12; e++) send(e, 8);
    repeat (10) @(negedge clk);
    check(per_core[0] == 4, $sformatf("core 0 spiked %0d times", per_core[0]));
    check(per_neuron[0][0] == 4, "core 0 winner is neuron 0");
    check(per_core[1] == 0, $sformatf("core 1 inhibited (%0d spikes)", per_core[1]));
    check(per_core[2] == 0, "inactive core silent");

    // ---- C: shared STDP events ----
    for (int c = 0; c < NC; c++) params[c] = base();
    params[0].stdp_activate = 1'b1; params[0].stdp_threshold_init = 12'd4; params[0].stdp_threshold_max = 12'd100;
    params[1].stdp_activate = 1'b1; params[1].stdp_threshold_init = 12'd6; params[1].stdp_threshold_max = 12'd6;
    neuron_active = '1;
    restart();
    for (int e = 0; e < 9; e++) send(100 + e, 8);
    begin
      int w = 0;
      while (stdp_busy[0] && w < 5000) begin @(negedge clk); w++; end
    end
    repeat (5) @(negedge clk);
    check(seen_busy[0], "core 0 ran an STDP process");
    check(!seen_busy[1], "core 1 learning states cleared by core 0's STDP event");
    check(!seen_busy[2], "core 2 (learning off) idle");
    check(n_done >= 1, "STDP process completed");

    $display("mechanisms: merged=%0d wait=%0d drop=%0d ginh=%0d stdp_ev=%0d done=%0d",
             n_merged, n_wait, n_drop, n_ginh, n_stdp_ev, n_done);
    check(n_merged > 0, "merged events occurred");
    check(n_wait > 0, "merger waits occurred");
    check(n_drop > 0, "merger drops occurred");
    check(n_ginh > 0, "general inhibition occurred");
    check(n_stdp_ev > 0, "shared STDP events occurred");
    check(n_done > 0, "STDP completions occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
