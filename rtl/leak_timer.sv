// Leak timer of a neural core: two independent programmable tick generators.
//
// leak_event pulses for one cycle every neuron_leak_rate clock cycles and
// drives the shift-based leak of every neuron's firing and learning state;
// th_leak_event pulses every threshold_leak_rate cycles and lets the STDP
// thresholds relax back towards their initial value. A rate of 0 disables
// the corresponding pulse. Each is a down-counter reloaded with rate-1, so a
// new rate takes effect after the current period ends. The reference names
// the timer and its two rate inputs; the counters and the 16-bit rate width
// are this design's choice.
module leak_timer #(
  parameter int unsigned RATE_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RATE_W-1:0] neuron_leak_rate,
  input  logic [RATE_W-1:0] threshold_leak_rate,
  output logic              leak_event,
  output logic              th_leak_event
);

  logic [RATE_W-1:0] n_cnt, t_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_cnt         <= '0;
      t_cnt         <= '0;
      leak_event    <= 1'b0;
      th_leak_event <= 1'b0;
    end else begin
      leak_event    <= 1'b0;
      th_leak_event <= 1'b0;
      if (neuron_leak_rate == '0) n_cnt <= '0;
      else if (n_cnt == '0) begin
        n_cnt      <= neuron_leak_rate - 1'b1;
        leak_event <= 1'b1;
      end else n_cnt <= n_cnt - 1'b1;
      if (threshold_leak_rate == '0) t_cnt <= '0;
      else if (t_cnt == '0) begin
        t_cnt         <= threshold_leak_rate - 1'b1;
        th_leak_event <= 1'b1;
      end else t_cnt <= t_cnt - 1'b1;
    end
  end

endmodule
