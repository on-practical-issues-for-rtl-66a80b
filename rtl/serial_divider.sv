// Small serial (restoring) divider: quotient = num / den, one quotient bit
// per clock cycle, so a division takes NUM_W cycles after start.
//
// Used once per STDP process to compute the depression probability
// 1024*dW / Wsum. A pulse on start loads num and den; busy is high while
// the bits are produced and done pulses for one cycle when quotient and
// remainder are valid (they then hold until the next start). Division by
// zero yields an all-ones quotient. The reference asks only for a slow and
// small serial divider; the restoring algorithm is this design's choice.
module serial_divider #(
  parameter int unsigned NUM_W = 21,
  parameter int unsigned DEN_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quotient,
  output logic [DEN_W-1:0] remainder
);

  localparam int unsigned CW = $clog2(NUM_W + 1);

  logic [DEN_W-1:0] rem_q;
  logic [NUM_W-1:0] num_q;
  logic [DEN_W-1:0] den_q;
  logic [CW-1:0]    bits_left;
  logic [DEN_W:0]   shifted;
  logic [DEN_W:0]   diff;

  assign shifted = {rem_q, num_q[NUM_W-1]};
  assign diff    = shifted - {1'b0, den_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rem_q     <= '0;
      num_q     <= '0;
      den_q     <= '0;
      bits_left <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem_q     <= '0;
        num_q     <= num;
        den_q     <= den;
        bits_left <= CW'(NUM_W);
        busy      <= 1'b1;
      end else if (busy) begin
        if (!diff[DEN_W]) begin
          rem_q <= diff[DEN_W-1:0];
          num_q <= {num_q[NUM_W-2:0], 1'b1};
        end else begin
          rem_q <= shifted[DEN_W-1:0];
          num_q <= {num_q[NUM_W-2:0], 1'b0};
        end
        bits_left <= bits_left - 1'b1;
        if (bits_left == CW'(1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= {num_q[NUM_W-2:0], ~diff[DEN_W]};
          remainder <= !diff[DEN_W] ? diff[DEN_W-1:0] : shifted[DEN_W-1:0];
        end
      end
    end
  end

endmodule
