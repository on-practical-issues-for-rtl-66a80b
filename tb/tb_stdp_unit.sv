// Testbench for stdp_unit at its full sizes (1024 synapses, 1024-entry
// pre-list). The testbench plays the selected neuron on the STDP bus: it
// holds a weight array, answers reads three cycles after the address and
// applies writes five cycles after it, like the neuron block does.
// Checks, per STDP process:
//   * STDP_active_addr is the requested neuron; a request made while busy
//     is ignored; input events seen while busy are not recorded;
//   * potentiation writes only 1s, only to 0-weights, only to synapses in
//     the newest min(num_potentiation, entries) pre-list events, and with
//     the right frequency (p=1023/1024 and p=307/1024 cases);
//   * the weight count equals the ones present after LTP, and the LTD
//     probability equals min(1023, 1024*(Wsum-target)/Wsum) worked out here;
//   * depression writes only 0s over 1-weights and brings the count close
//     to the target; no depression when the count is not above the target;
//   * the process takes n + 2093 cycles (busy), and the pre-list is empty
//     afterwards.
module tb_stdp_unit;
  import stdp_pkg::*;
  localparam int NS = 1024;
  localparam int MY = 3;          // address of the modelled neuron

  logic clk = 1'b0, rst_n = 1'b0;
  logic stdp_addr_v = 1'b0;
  neuron_addr_t stdp_req_addr = '0;
  logic aerin_v = 1'b0;
  logic [9:0] aerin = '0;
  prob_t ltp_probability = '0;
  logic [9:0] num_active_weights = '0, num_potentiation = '0;
  neuron_addr_t stdp_active_addr;
  logic [9:0] stdp_rd_addr;
  logic stdp_wr_en, stdp_wr_data, stdp_rd_data;
  logic busy, done;
  logic [10:0] weight_sum;
  prob_t ltd_probability;
  logic [10:0] prelist_count;
  int checks = 0, failures = 0;

  stdp_unit dut (.*);

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

  // ---------------- neuron model on the bus ----------------
  logic       w [NS];
  logic [9:0] hist [5];
  logic [9:0] a1;
  logic       d2, d3, sel;
  assign stdp_rd_data = d3 && sel;
  // statistics of the current process
  int ltp_writes, ltp_bad, ltd_writes, ltd_bad, busy_cycles;
  bit in_window [NS];   // synapses of the newest n pre-list events
  bit phase_ltd;

  always @(posedge clk) begin
    a1  <= stdp_rd_addr;
    d2  <= w[a1];
    d3  <= d2;
    sel <= (stdp_active_addr == neuron_addr_t'(MY));
    hist[0] <= stdp_rd_addr;
    for (int i = 1; i < 5; i++) hist[i] <= hist[i-1];
    if (busy) busy_cycles++;
    if (stdp_wr_en && sel) begin
      if (stdp_wr_data) begin
        ltp_writes++;
        if (phase_ltd || w[hist[4]] || !in_window[hist[4]]) ltp_bad++;
      end else begin
        ltd_writes++;
        if (!phase_ltd || !w[hist[4]]) ltd_bad++;
      end
      w[hist[4]] <= stdp_wr_data;
    end
  end

  function automatic int ones();
    int c = 0;
    for (int i = 0; i < NS; i++) c += w[i];
    return c;
  endfunction

  // ---------------- stimulus helpers ----------------
  int evq [$];

  task automatic send_events(input int n);
    int perm [NS];
    for (int i = 0; i < NS; i++) perm[i] = i;
    perm.shuffle();
    evq.delete();
    for (int i = 0; i < n; i++) begin
      @(negedge clk); aerin_v = 1'b1; aerin = 10'(perm[i]);
      evq.push_front(perm[i]);
      @(negedge clk); aerin_v = 1'b0;
    end
    repeat (3) @(negedge clk);
  endtask

  // Runs one process and checks everything but the LTP statistics.
  task automatic run(input int npot, input int target, input int pltp,
                     input bit disturb, output int n_used);
    int n, ones_after_ltp, expect_p, ones_end, sum_seen;
    n = (npot < evq.size()) ? npot : evq.size();
    n_used = n;
    for (int i = 0; i < NS; i++) in_window[i] = 0;
    for (int i = 0; i < n; i++) in_window[evq[i]] = 1;
    check(prelist_count == 11'(evq.size() > NS ? NS : evq.size()), "pre-list count");
    num_potentiation   = 10'(npot);
    num_active_weights = 10'(target);
    ltp_probability    = prob_t'(pltp);
    ltp_writes = 0; ltp_bad = 0; ltd_writes = 0; ltd_bad = 0; busy_cycles = 0;
    phase_ltd = 0;
    @(negedge clk); stdp_addr_v = 1'b1; stdp_req_addr = neuron_addr_t'(MY);
    @(negedge clk); stdp_addr_v = 1'b0;
    check(busy, "busy after request");
    check(stdp_active_addr == neuron_addr_t'(MY), "active address");
    // wait for the end of LTP: count phase follows n+8 cycles of LTP
    repeat (n + 8) @(negedge clk);
    phase_ltd = 1;
    ones_after_ltp = ones();
    if (disturb) begin
      @(negedge clk); stdp_addr_v = 1'b1; stdp_req_addr = 8'd5;
      @(negedge clk); stdp_addr_v = 1'b0;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk); aerin_v = 1'b1; aerin = 10'(i);
      end
      @(negedge clk); aerin_v = 1'b0;
    end
    while (!done) @(negedge clk);
    sum_seen = weight_sum;
    ones_end = ones();
    expect_p = (ones_after_ltp > target) ? (1024 * (ones_after_ltp - target)) / ones_after_ltp : 0;
    if (expect_p > 1023) expect_p = 1023;
    check(sum_seen == ones_after_ltp, $sformatf("weight sum %0d vs %0d", sum_seen, ones_after_ltp));
    check(int'(ltd_probability) == expect_p, $sformatf("LTD prob %0d vs %0d", ltd_probability, expect_p));
    check(busy_cycles == n + 2093, $sformatf("cycles %0d vs %0d", busy_cycles, n + 2093));
    check(ltp_bad == 0, "potentiation writes legal");
    check(ltd_bad == 0, "depression writes legal");
    check(ones_end == ones_after_ltp - ltd_writes, "depression writes counted");
    check(stdp_active_addr == neuron_addr_t'(MY), "request while busy ignored");
    @(negedge clk);
    check(prelist_count == 0, "pre-list flushed");
    check(!busy, "idle again");
    if (ones_after_ltp > target) begin
      int tol;
      tol = 4 * $rtoi($sqrt(real'(ones_after_ltp))) + 8;
      check(ones_end >= target - tol && ones_end <= target + tol,
            $sformatf("normalised count %0d near %0d", ones_end, target));
    end else check(ltd_writes == 0, "no depression below target");
    evq.delete();
  endtask

  initial begin
    int n, zeros;
    for (int i = 0; i < NS; i++) w[i] = 1'b1;
    for (int i = 0; i < 5; i++) hist[i] = '0;
    a1 = '0; d2 = 0; d3 = 0; sel = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(!busy && prelist_count == 0, "idle after reset");

    // A: all weights 1, 90 events, normalise to 100, request while busy
    send_events(90);
    run(90, 100, 1023, 1'b1, n);
    check(ltp_writes == 0, "nothing to potentiate when all weights are 1");

    // B: sparse weights, p = 1023/1024, potentiation of the newest 120 of 150
    for (int i = 0; i < NS; i++) w[i] = 1'b0;
    for (int i = 0; i < 50; i++) w[$urandom_range(0, NS - 1)] = 1'b1;
    send_events(150);
    zeros = 0;
    for (int i = 0; i < 120; i++) zeros += !w[evq[i]];
    run(120, 300, 1023, 1'b0, n);
    check(ltp_writes >= zeros - 3 && ltp_writes <= zeros, $sformatf("LTP writes %0d of %0d", ltp_writes, zeros));

    // C: statistics at p = 307/1024 (30 %), 400 events, no depression
    for (int i = 0; i < NS; i++) w[i] = 1'b0;
    send_events(400);
    run(400, 1000, 307, 1'b0, n);
    check(ltp_writes >= 90 && ltp_writes <= 150, $sformatf("LTP writes %0d at 30%% of 400", ltp_writes));

    // D: fewer events than num_potentiation, then depression from 1024 to 16
    for (int i = 0; i < NS; i++) w[i] = 1'b1;
    send_events(30);
    run(200, 16, 512, 1'b0, n);
    check(n == 30, "potentiation limited to the pre-list entries");

    // E: LTP probability zero
    for (int i = 0; i < NS; i++) w[i] = 1'b0;
    send_events(60);
    run(60, 500, 0, 1'b0, n);
    check(ltp_writes == 0, "no potentiation at probability 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
