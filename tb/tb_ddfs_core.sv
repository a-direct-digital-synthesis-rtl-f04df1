// tb_ddfs_core: self-checking testbench for ddfs_core.
//
// Two generators run side by side from the same tuning words: one with full
// sample delay resolution (TRUNC = 0) and one with two delay bits truncated
// (TRUNC = 2).  A reference model in this file walks the same circle using
// directly computed squares x^2 + y^2 - r^2 (not the incremental value of
// the design) and predicts every sample.  Checked per channel:
//   * every sample equals the model's next point, and cycle start gives (AT, 0);
//   * the number of timing ticks between samples equals the delay of the
//     step, max(1, |unchanged coordinate| >> TRUNC);
//   * one revolution has 8*AT samples and lasts about 2*pi*AT^2/2^TRUNC ticks;
//   * every sample lies within one step of the circle (|x^2+y^2-r^2| <= |x|+|y|+1);
//   * a change of AT/FT in mid-cycle takes effect only at the next cycle start;
//   * AT = 0 parks the output at the origin.
module tb_ddfs_core;
  import ddfs_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned M = 16;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-2:0] at;
  logic [M-1:0] ft;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // cycles completed per channel with a given radius, for the stimulus
  int cyc_done [2];
  int last_r   [2];

  for (genvar g = 0; g < 2; g++) begin : g_ch
    localparam int unsigned T = 2 * g;
    logic signed [N-1:0] cos_o, sin_o;
    logic sample_o, cycle_o;

    ddfs_core #(.N(N), .M(M), .TRUNC(T)) dut (
      .clk, .rst_n, .at_i(at), .ft_i(ft),
      .cos_o, .sin_o, .sample_o, .cycle_o
    );

    int mx, my, r, at_last, ticks, ticks_cyc, samples_cyc, exp_delay;
    bit timed, cyc_timed;

    function automatic int sq(input int v); return v * v; endfunction
    function automatic int sgn(input int v); return (v > 0) ? 1 : (v < 0) ? -1 : 0; endfunction
    function automatic int iabs(input int v); return (v < 0) ? -v : v; endfunction

    initial begin
      mx = 0; my = 0; r = 0; ticks = 0; ticks_cyc = 0; samples_cyc = 0;
      exp_delay = 0; timed = 0; cyc_timed = 0; at_last = 0;
      cyc_done[g] = 0; last_r[g] = -1;
    end

    always @(posedge clk) if (rst_n) begin
      if (sample_o) begin
        int cx, cy, fx, fy, ndx, ndy;
        if (cycle_o) begin
          // a new cycle: whole-revolution checks of the cycle that ended
          if (cyc_timed && r > 0) begin
            real ideal;
            ideal = 2.0 * PI * r * r / (1 << T);
            check(samples_cyc + 1 == 8 * r, $sformatf("ch%0d samples/cycle %0d, expected %0d", g, samples_cyc + 1, 8 * r));
            check((ticks_cyc + ticks) > ideal * (T == 0 ? 0.98 : 0.93) &&
                  (ticks_cyc + ticks) < ideal * 1.02,
                  $sformatf("ch%0d ticks/cycle %0d, ideal %0f", g, ticks_cyc + ticks, ideal));
            cyc_done[g]++;
          end
          if (timed) check(ticks == exp_delay, $sformatf("ch%0d cycle-start delay %0d, expected %0d", g, ticks, exp_delay));
          cyc_timed   = timed && (at_last == r);   // a following full revolution is measurable
          r           = at_last;
          last_r[g]   = r;
          mx          = r;
          my          = 0;
          ticks_cyc   = 0;
          samples_cyc = 0;
        end else begin
          check(timed, $sformatf("ch%0d sample without a step", g));
          check(ticks == exp_delay, $sformatf("ch%0d delay %0d ticks, expected %0d", g, ticks, exp_delay));
          ticks_cyc += ticks;
          samples_cyc++;
        end
        check(cos_o == mx && sin_o == my,
              $sformatf("ch%0d sample (%0d,%0d), expected (%0d,%0d)", g, cos_o, sin_o, mx, my));
        check(iabs(sq(cos_o) + sq(sin_o) - sq(r)) <= iabs(cos_o) + iabs(sin_o) + 1,
              $sformatf("ch%0d sample (%0d,%0d) off circle r=%0d", g, cos_o, sin_o, r));
        // predict the next point and its delay
        timed = 1;
        if (mx == 0 && my == 0) begin
          timed = 0;
        end else begin
          cx = mx - sgn(my);  fx = sq(cx) + sq(my) - sq(r);
          cy = my + sgn(mx);  fy = sq(mx) + sq(cy) - sq(r);
          if (my == 0 || (mx != 0 && iabs(fy) < iabs(fx))) begin
            ndy = cy; ndx = mx; exp_delay = iabs(mx) >> T;
          end else begin
            ndx = cx; ndy = my; exp_delay = iabs(my) >> T;
          end
          if (exp_delay < 1) exp_delay = 1;
          if (ndy == 0 && ndx > 0) begin
            // next step reaches phase 0: the cycle-start branch takes it
            mx = ndx; my = ndy;
          end else begin
            mx = ndx; my = ndy;
          end
        end
        ticks = 0;
      end
      if (dut.tick) ticks++;
      at_last = int'(at);
    end
  end

  // AT = 0 parking
  int park_checks;
  always @(posedge clk) if (rst_n && at == 0 && last_r[0] == 0) begin
    check(g_ch[0].cos_o == 0 && g_ch[0].sin_o == 0 && g_ch[1].cos_o == 0 && g_ch[1].sin_o == 0,
          "AT=0 must park at the origin");
  end

  task automatic wait_cycles(input int ch, input int n);
    int start;
    start = cyc_done[ch];
    while (cyc_done[ch] < start + n) @(posedge clk);
  endtask

  initial begin
    at = 7'd100;
    ft = 16'hC000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait_cycles(0, 2);
    // change tuning in the middle of a revolution
    repeat (20000) @(posedge clk);
    @(negedge clk) begin at = 7'd37; ft = 16'h8000; end
    check(last_r[0] == 100 && last_r[1] == 100, "AT applied before cycle start");
    wait_cycles(0, 2);
    check(last_r[0] == 37 && last_r[1] == 37, "new AT applied at cycle start");
    // parking
    @(negedge clk) at = 7'd0;
    while (last_r[0] != 0) @(posedge clk);
    repeat (200) @(posedge clk);
    // largest radius, fastest tick rate
    @(negedge clk) begin at = 7'd127; ft = 16'hFFFF; end
    repeat (5) @(posedge clk);
    wait_cycles(0, 1);
    wait_cycles(1, 1);
    check(cyc_done[0] >= 5 && cyc_done[1] >= 5, "revolutions completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
