// tb_ddfs_step_sel: exhaustive check of the step decision.
//
// For several radii, every point (x, y) of the 8-bit plane that the tracer
// can occupy (|x^2 + y^2 - r^2| <= |x| + |y| + 1) is applied with its true
// function value.  The expected step is worked out here from directly
// squared candidate points: the y step is taken when its |f| is strictly
// smaller, y == 0 forces a y step, x == 0 an x step, the origin no step.
// Next coordinates, next function value and the delay magnitude are
// compared as well.
module tb_ddfs_step_sel;
  import ddfs_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned FW = N + 3;

  logic signed [N-1:0]  x, y, x_nxt, y_nxt;
  logic signed [FW-1:0] f, f_nxt;
  logic [N-2:0]         perp_mag;
  step_e                step;
  int checks = 0, failures = 0;

  ddfs_step_sel #(.N(N), .FW(FW)) dut (.*);

  function automatic int sq(input int v); return v * v; endfunction
  function automatic int sgn(input int v); return (v > 0) ? 1 : (v < 0) ? -1 : 0; endfunction
  function automatic int iabs(input int v); return (v < 0) ? -v : v; endfunction

  initial begin
    int radii[6] = '{1, 2, 5, 37, 100, 127};
    x = '0; y = '0; f = '0;
    foreach (radii[k]) begin
      int r;
      r = radii[k];
      for (int xi = -127; xi <= 127; xi++) begin
        for (int yi = -127; yi <= 127; yi++) begin
          int fv, cx, cy, fx, fy, ex, ey, ef, ep;
          step_e es;
          fv = sq(xi) + sq(yi) - sq(r);
          if (iabs(fv) > iabs(xi) + iabs(yi) + 1) continue;
          cx = xi - sgn(yi);  fx = sq(cx) + sq(yi) - sq(r);
          cy = yi + sgn(xi);  fy = sq(xi) + sq(cy) - sq(r);
          if (xi == 0 && yi == 0) begin
            es = STEP_NONE; ex = xi; ey = yi; ef = fv; ep = 0;
          end else if (yi == 0 || (xi != 0 && iabs(fy) < iabs(fx))) begin
            es = STEP_Y; ex = xi; ey = cy; ef = fy; ep = iabs(xi);
          end else begin
            es = STEP_X; ex = cx; ey = yi; ef = fx; ep = iabs(yi);
          end
          x = N'(xi); y = N'(yi); f = FW'(fv);
          #1;
          checks++;
          if (step != es || x_nxt != ex || y_nxt != ey || f_nxt != ef || perp_mag != ep) begin
            failures++;
            if (failures < 10)
              $display("FAIL r=%0d (%0d,%0d) f=%0d: got %s (%0d,%0d) f=%0d d=%0d, expected %s (%0d,%0d) f=%0d d=%0d",
                       r, xi, yi, fv, step.name(), x_nxt, y_nxt, f_nxt, perp_mag,
                       es.name(), ex, ey, ef, ep);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
