// tb_ddfs_word16: the double-byte (16-bit) version of the generator.
//
// Two ddfs_core instances are built with N = 16, one with full delay
// resolution and one with 4 delay bits truncated (a revolution 2^4 times
// shorter).  Both run at AT = 600 until the full-resolution one has made
// two revolutions, then at the largest radius, AT = 32767, for 300000
// clocks (the start of a revolution, where the coordinates are widest).
// A model using directly squared coordinates (64-bit arithmetic) predicts
// every sample.  Checked: every sample, the tick count between samples,
// 8*AT samples per revolution and a revolution of about
// 2*pi*AT^2/2^TRUNC ticks.
module tb_ddfs_word16;

  localparam int unsigned N = 16;
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

  function automatic longint sq(input longint v); return v * v; endfunction
  function automatic longint sgn(input longint v); return (v > 0) ? 1 : (v < 0) ? -1 : 0; endfunction
  function automatic longint iabs(input longint v); return (v < 0) ? -v : v; endfunction

  int revs [2];

  for (genvar g = 0; g < 2; g++) begin : g_ch
    localparam int unsigned T = 4 * g;
    logic signed [N-1:0] cos_o, sin_o;
    logic sample_o, cycle_o;
    longint mx, my, r, at_last, ticks, ticks_cyc, samples_cyc, exp_delay;
    bit timed, cyc_timed;

    ddfs_core #(.N(N), .M(M), .TRUNC(T)) dut (
      .clk, .rst_n, .at_i(at), .ft_i(ft), .cos_o, .sin_o, .sample_o, .cycle_o
    );

    initial begin
      mx = 0; my = 0; r = 0; ticks = 0; ticks_cyc = 0; samples_cyc = 0;
      exp_delay = 0; timed = 0; cyc_timed = 0; at_last = 0; revs[g] = 0;
    end

    always @(posedge clk) if (rst_n) begin
      if (sample_o) begin
        if (cycle_o) begin
          if (cyc_timed) begin
            real ideal;
            ideal = 2.0 * PI * real'(r) * real'(r) / real'(1 << T);
            check(samples_cyc + 1 == 8 * r, $sformatf("ch%0d samples/rev %0d, expected %0d", g, samples_cyc + 1, 8 * r));
            check(real'(ticks_cyc + ticks) > ideal * (T == 0 ? 0.99 : 0.95) &&
                  real'(ticks_cyc + ticks) < ideal * 1.01,
                  $sformatf("ch%0d ticks/rev %0d, ideal %0f", g, ticks_cyc + ticks, ideal));
            revs[g]++;
          end
          if (timed) check(ticks == exp_delay, "cycle-start delay");
          cyc_timed = timed && (at_last == r);
          r = at_last; mx = r; my = 0; ticks_cyc = 0; samples_cyc = 0;
        end else begin
          check(ticks == exp_delay, $sformatf("ch%0d delay %0d, expected %0d", g, ticks, exp_delay));
          ticks_cyc += ticks;
          samples_cyc++;
        end
        check(cos_o == mx && sin_o == my,
              $sformatf("ch%0d sample (%0d,%0d), expected (%0d,%0d)", g, cos_o, sin_o, mx, my));
        begin
          longint cx, cy, fx, fy;
          cx = mx - sgn(my);  fx = sq(cx) + sq(my) - sq(r);
          cy = my + sgn(mx);  fy = sq(mx) + sq(cy) - sq(r);
          if (my == 0 || (mx != 0 && iabs(fy) < iabs(fx))) begin
            exp_delay = iabs(mx) >> T; my = cy;
          end else begin
            exp_delay = iabs(my) >> T; mx = cx;
          end
          if (exp_delay < 1) exp_delay = 1;
          timed = 1;
        end
        ticks = 0;
      end
      if (dut.tick) ticks++;
      at_last = longint'(at);
    end
  end

  initial begin
    at = 15'd600;
    ft = 16'hFFFF;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (revs[0] < 2) @(posedge clk);
    @(negedge clk) at = 15'd32767;
    while (g_ch[0].r != 32767 || g_ch[1].r != 32767) @(posedge clk);
    repeat (300_000) @(posedge clk);
    check(revs[0] >= 2 && revs[1] >= 20, "revolutions completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
