// ddfs_rate_gen: timing tick generator for one DDFS module.
//
// An M-bit accumulator adds the frequency tuning word FT on every clock;
// its carry out, registered, is the timing tick that drives the phase
// compensation counter.  The tick rate is f_clk * FT / 2^M, so the output
// frequency of the generator is linear in FT and FT = 0 freezes it.
// Ticks are single-cycle pulses, one clock after the carry.
//
// The architecture takes a frequency tuning word of length m and counts
// the system clock; the accumulator form of that divider is this design's
// choice.
module ddfs_rate_gen #(
  parameter int unsigned M = 16        // frequency tuning word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] ft,
  output logic         tick
);

  logic [M-1:0] acc;
  logic [M:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, ft};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= sum[M-1:0];
      tick <= sum[M];
    end
  end

endmodule
