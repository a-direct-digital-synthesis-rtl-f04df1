// ddfs_phase_comp: sample timing delay (phase compensation counter).
//
// The steps of the circle tracer do not advance the phase evenly: a y step
// at abscissa x turns the vector by |x|/r^2 and an x step at ordinate y by
// |y|/r^2.  Emitting one sample per tick would therefore distort the
// phase.  This counter holds each sample for a number of timing ticks
// proportional to the angle of the next step: the delay is perp_mag, the
// coordinate the step leaves unchanged, truncated by TRUNC least
// significant bits.  Truncation shortens every delay by 2^TRUNC, raising
// the highest output frequency at the cost of timing (phase) noise.
//
// Interface: 'tick' is the timing enable from ddfs_rate_gen.  'fire' is
// combinational and is high on the tick on which the pending step must be
// taken; the caller updates the coordinates on that edge.  Delays of 0 and
// 1 both give one tick, so at most one step is taken per tick.  'clr'
// restarts the count (used while new tuning words are loaded).
//
// The delay rule follows from the angle advance of each step and the
// optional truncation is the one the architecture describes; building it
// as an up-counter compared against the live delay is this design's choice.
module ddfs_phase_comp #(
  parameter int unsigned N     = 8,   // coordinate width; delays have N-1 bits
  parameter int unsigned TRUNC = 0    // delay LSBs dropped
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         tick,
  input  logic         valid,      // a step exists
  input  logic [N-2:0] perp_mag,
  output logic         fire,
  output logic [N-2:0] delay
);

  logic [N-2:0] elapsed;

  assign delay = perp_mag >> TRUNC;
  assign fire  = tick && valid && !clr && ({1'b0, elapsed} + N'(1) >= {1'b0, delay});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              elapsed <= '0;
    else if (clr || fire)    elapsed <= '0;
    else if (tick && valid)  elapsed <= elapsed + 1'b1;
  end

endmodule
