// ddfs_core: one amplitude-sequencing direct digital frequency synthesizer.
//
// Instead of a phase accumulator and a sine table, the module walks a point
// (x, y) around a circle of radius AT with unit steps and outputs the
// coordinates as the cosine and sine samples.  Each step is chosen by
// ddfs_step_sel (one compare of the two candidate values of
// f = x^2 + y^2 - r^2); f is kept incrementally in a register.  Because a
// step turns the vector by |perp|/r^2, where perp is the coordinate the
// step does not change, ddfs_phase_comp holds every sample for that many
// timing ticks, and ddfs_rate_gen makes the ticks at f_clk*FT/2^M.  A
// sample whose axis does not move on a step simply stays constant.
//
// One revolution therefore lasts about 2*pi*AT^2 / 2^TRUNC ticks and
//     f_out ~= f_clk * (FT / 2^M) * 2^TRUNC / (2*pi*AT^2).
//
// Tuning words are taken only at cycle start: after reset, and each time
// the point steps onto the positive x axis (phase 0).  There x is set to
// the new AT, y and f to 0, so amplitude and frequency changes (FSK) are
// phase continuous.  AT = 0 parks the output at the origin and re-reads
// the tuning words every other clock.
//
// Interface: at_i and ft_i are the amplitude and frequency tuning words;
// cos_o/sin_o are registered signed samples; sample_o pulses for one clock
// with every new sample, cycle_o for one clock when a new cycle starts
// (the sample is then (AT, 0)).  AT must be at most 2^(N-1)-1 (any value of
// the N-1 bit port) and FT small enough that the tick rate does not exceed
// one step per clock, which the phase counter enforces anyway.
//
// The circle walk, the delay by angle advance, the delay truncation and
// loading of tuning at cycle start follow the architecture; the start at
// (AT, 0), the counter-clockwise direction, the FT accumulator and the
// reset behaviour are this design's choices.  rst_n is an asynchronous
// reset only; lint sees it also in the disable condition of the on-circle
// assertion and reports it as used both ways.
module ddfs_core
  import ddfs_pkg::*;
#(
  parameter int unsigned N     = 8,    // amplitude word length n (samples signed N bits)
  parameter int unsigned M     = 16,   // frequency tuning word length m
  parameter int unsigned TRUNC = 0     // sample delay truncation, bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-2:0]        at_i,
  input  logic [M-1:0]        ft_i,
  output logic signed [N-1:0] cos_o,
  output logic signed [N-1:0] sin_o,
  output logic                sample_o,
  output logic                cycle_o
);

  localparam int unsigned FW = N + 3;

  logic signed [N-1:0]  x, y, x_nxt, y_nxt;
  logic signed [FW-1:0] f, f_nxt;
  logic [N-2:0]         perp_mag, delay;
  logic [M-1:0]         ft_q;
  logic                 load_pend, tick, fire, at_phase0;
  step_e                step;

  ddfs_step_sel #(.N(N), .FW(FW)) u_sel (
    .x, .y, .f, .step, .x_nxt, .y_nxt, .f_nxt, .perp_mag
  );

  ddfs_rate_gen #(.M(M)) u_rate (
    .clk, .rst_n, .ft(ft_q), .tick
  );

  ddfs_phase_comp #(.N(N), .TRUNC(TRUNC)) u_comp (
    .clk, .rst_n, .clr(load_pend), .tick, .valid(step != STEP_NONE),
    .perp_mag, .fire, .delay
  );

  // the pending step lands on the positive x axis: this is phase 0
  assign at_phase0 = (step == STEP_Y) && (y_nxt == '0) && !x[N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      f         <= '0;
      ft_q      <= '0;
      load_pend <= 1'b1;
      sample_o  <= 1'b0;
      cycle_o   <= 1'b0;
    end else begin
      sample_o <= 1'b0;
      cycle_o  <= 1'b0;
      if (load_pend || (fire && at_phase0)) begin
        x         <= N'(at_i);
        y         <= '0;
        f         <= '0;
        ft_q      <= ft_i;
        load_pend <= 1'b0;
        sample_o  <= 1'b1;
        cycle_o   <= 1'b1;
      end else if (step == STEP_NONE) begin
        load_pend <= 1'b1;               // parked at the origin
      end else if (fire) begin
        x        <= x_nxt;
        y        <= y_nxt;
        f        <= f_nxt;
        sample_o <= 1'b1;
      end
    end
  end

  assign cos_o = x;
  assign sin_o = y;

  // the tracer never leaves the circle by more than one unit of radius
  logic signed [FW-1:0] xw, yw, mag_sum;
  assign xw      = FW'(x);
  assign yw      = FW'(y);
  assign mag_sum = (xw < 0 ? -xw : xw) + (yw < 0 ? -yw : yw) + FW'(1);

  a_on_circle: assert property (@(posedge clk) disable iff (!rst_n)
    (f <= mag_sum) && (-f <= mag_sum));

  logic unused;
  assign unused = ^delay;

endmodule
