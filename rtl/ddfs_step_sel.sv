// ddfs_step_sel: next-step decision of the amplitude-sequencing generator.
//
// The generator tracks the circle x^2 + y^2 = r^2 counter-clockwise with
// unit steps, as in a midpoint/Jordan curve tracer.  f is the implicit
// function value x^2 + y^2 - r^2 of the present point, kept incrementally
// by the caller.  Two candidate moves exist: an x step (x moves towards
// the y axis, x' = x - sgn(y)) and a y step (y moves away from the x axis,
// y' = y + sgn(x)).  Their function values are
//     fx = f + 1 - 2*x*sgn(y)      fy = f + 1 + 2*y*sgn(x)
// so one comparison of |fx| with |fy| and two additions decide the step;
// the step with the smaller magnitude is taken (ties go to the x step).
// On an axis only one move is possible: y == 0 forces a y step, x == 0 an
// x step, and the origin gives STEP_NONE.
//
// perp_mag is the magnitude of the coordinate that the step leaves
// unchanged.  The angle the point advances by is perp_mag / r^2, so this
// value is the raw sample timing delay used by ddfs_phase_comp.
//
// Purely combinational.  The step rule and the x/y symmetry follow the
// algorithm of the amplitude-based architecture; the tie rule and the
// handling of the origin are this design's choices.
module ddfs_step_sel
  import ddfs_pkg::*;
#(
  parameter int unsigned N  = 8,       // coordinate width, signed
  parameter int unsigned FW = N + 3    // width of the implicit function value
) (
  input  logic signed [N-1:0]  x,
  input  logic signed [N-1:0]  y,
  input  logic signed [FW-1:0] f,
  output step_e                step,
  output logic signed [N-1:0]  x_nxt,
  output logic signed [N-1:0]  y_nxt,
  output logic signed [FW-1:0] f_nxt,
  output logic [N-2:0]         perp_mag
);

  logic signed [FW-1:0] x_w, y_w, fx, fy, afx, afy;
  logic [N-2:0] ax, ay;

  always_comb begin
    x_w = FW'(x);
    y_w = FW'(y);
    ax  = (N-1)'(x[N-1] ? -x : x);
    ay  = (N-1)'(y[N-1] ? -y : y);

    // candidate function values (sign of the 2x / 2y term by quadrant)
    fx = (y[N-1] ? f + FW'(1) + (x_w <<< 1) : f + FW'(1) - (x_w <<< 1));
    fy = (x[N-1] ? f + FW'(1) - (y_w <<< 1) : f + FW'(1) + (y_w <<< 1));
    afx = fx[FW-1] ? -fx : fx;
    afy = fy[FW-1] ? -fy : fy;

    if (x == '0 && y == '0)      step = STEP_NONE;
    else if (y == '0)            step = STEP_Y;
    else if (x == '0)            step = STEP_X;
    else if (afy < afx)          step = STEP_Y;
    else                         step = STEP_X;

    x_nxt    = x;
    y_nxt    = y;
    f_nxt    = f;
    perp_mag = '0;
    unique case (step)
      STEP_X: begin
        x_nxt    = y[N-1] ? x + N'(1) : x - N'(1);
        f_nxt    = fx;
        perp_mag = ay;
      end
      STEP_Y: begin
        y_nxt    = x[N-1] ? y - N'(1) : y + N'(1);
        f_nxt    = fy;
        perp_mag = ax;
      end
      default: ;
    endcase
  end

endmodule
