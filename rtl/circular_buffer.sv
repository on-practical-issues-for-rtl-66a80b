// Circular pre-synaptic event buffer ("pre-list") of the STDP unit.
//
// Stores the addresses of the last DEPTH input spikes. Every cycle with
// wr_en writes wr_data at the write pointer and advances it; once full, the
// oldest entry is overwritten. count tells how many valid entries there are
// (saturating at DEPTH). Reads are addressed by age: rd_offset = 0 is the
// newest entry, 1 the one before, and so on. A read issued in cycle t
// (rd_en high) gives rd_data and rd_valid in cycle t+2; the STDP unit's
// output register on STDP_RD_addr makes up the third of the three cycles the
// reference quotes for a buffer read. flush empties the list in one cycle by
// resetting the pointer and the count (list flushing after each STDP process).
// The entries themselves are a plain array, never reset; only entries below
// count are ever read. DEPTH 1024 x 10 bits follows the reference.
module circular_buffer #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 10,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_offset,
  output logic [W-1:0]  rd_data,
  output logic          rd_valid,
  output logic [AW:0]   count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] rd_addr_q;
  logic          rd_en_q;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (wr_en) begin
      wr_ptr <= wr_ptr + 1'b1;
      if (count != (AW+1)'(DEPTH)) count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_addr_q <= '0;
      rd_en_q   <= 1'b0;
      rd_data   <= '0;
      rd_valid  <= 1'b0;
    end else begin
      rd_addr_q <= wr_ptr - AW'(1) - rd_offset;
      rd_en_q   <= rd_en;
      rd_data   <= mem[rd_addr_q];
      rd_valid  <= rd_en_q;
    end
  end

endmodule
