// tb_ddfs_tri: end-to-end test of the three-frequency synthesizer pack at
// its default parameters (3 channels, 8-bit amplitude, 16-bit FT).
//
// Set-up of the reference application: all channels run from one clock
// with the same FT; their frequencies differ through the radius alone
// (AT = 31, 63, 127) and levelling by 0, 1 and 2 LSBs brings the three
// outputs to the same amplitude of 31.  A reference model per channel,
// built here from directly squared coordinates, predicts every sample
// before levelling; the output must equal it shifted right by lvl.
// Checked as well:
//   * period ratios follow (AT_a/AT_b)^2 and each period is ~2*pi*AT^2/rate;
//   * levelled peaks are equal across channels;
//   * an FT change (FSK) on channel 0 in mid-cycle leaves that cycle alone
//     and halves the frequency from the next cycle start;
//   * an AT change on channel 1 takes effect at its next cycle start;
//   * AT = 0 parks channel 2 at the origin.
// Each mechanism (x step, y step, held sample, cycle start, FSK reload,
// AT reload, levelling by 0/1/2 bits, parking) is counted and must occur.
module tb_ddfs_tri;

  localparam int unsigned CH = 3;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 16;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-2:0]        at_i     [CH];
  logic [M-1:0]        ft_i     [CH];
  logic [1:0]          lvl_i    [CH];
  logic signed [N-1:0] cos_o    [CH];
  logic signed [N-1:0] sin_o    [CH];
  logic                sample_o [CH];
  logic                cycle_o  [CH];
  int checks = 0, failures = 0;

  ddfs_tri dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic int sq(input int v); return v * v; endfunction
  function automatic int sgn(input int v); return (v > 0) ? 1 : (v < 0) ? -1 : 0; endfunction
  function automatic int iabs(input int v); return (v < 0) ? -v : v; endfunction
  function automatic int asr(input int v, input int s); return (v >= 0) ? (v >>> s) : -((-v + (1 << s) - 1) >>> s); endfunction

  // mechanism counters
  int n_xstep, n_ystep, n_hold, n_cycle, n_fsk, n_at_reload, n_park;
  int n_lvl [3];

  // per-channel model state, visible to the stimulus
  int period   [CH];   // clocks of the last complete revolution
  int cyc_cnt  [CH];   // complete revolutions measured
  int r_cur    [CH];
  int ft_cur   [CH];
  int peak     [CH];   // largest levelled cosine of the last revolution

  initial begin
    n_xstep = 0; n_ystep = 0; n_hold = 0; n_cycle = 0; n_fsk = 0;
    n_at_reload = 0; n_park = 0; n_lvl = '{0, 0, 0};
  end

  for (genvar c = 0; c < CH; c++) begin : g_model
    int mx, my, r, clocks, at_last, ft_last, pk;
    bit started, measurable;

    initial begin
      mx = 0; my = 0; r = 0; clocks = 0; started = 0; measurable = 0; pk = 0;
      period[c] = 0; cyc_cnt[c] = 0; r_cur[c] = -1; ft_cur[c] = -1; peak[c] = 0;
    end

    always @(posedge clk) if (rst_n) begin
      clocks++;
      if (sample_o[c]) begin
        if (cycle_o[c]) begin
          n_cycle++;
          if (measurable && r > 0 && at_last == r && ft_last == ft_cur[c]) begin
            period[c] = clocks;
            peak[c]   = pk;
            cyc_cnt[c]++;
          end
          if (started && ft_last != ft_cur[c]) n_fsk++;
          if (started && at_last != r && at_last != 0 && r != 0) n_at_reload++;
          measurable = started && at_last > 0;
          started    = 1;
          r          = at_last;
          r_cur[c]   = r;
          ft_cur[c]  = ft_last;
          mx = r; my = 0; clocks = 0; pk = 0;
        end
        check(cos_o[c] == asr(mx, lvl_i[c]) && sin_o[c] == asr(my, lvl_i[c]),
              $sformatf("ch%0d sample (%0d,%0d), expected (%0d,%0d)>>>%0d",
                        c, cos_o[c], sin_o[c], mx, my, lvl_i[c]));
        n_lvl[lvl_i[c]]++;
        if (cos_o[c] > pk) pk = cos_o[c];
        if (r == 0) begin
          n_park++;
          check(cos_o[c] == 0 && sin_o[c] == 0, $sformatf("ch%0d AT=0 not parked", c));
        end else begin
          int cx, cy, fx, fy;
          cx = mx - sgn(my);  fx = sq(cx) + sq(my) - sq(r);
          cy = my + sgn(mx);  fy = sq(mx) + sq(cy) - sq(r);
          if (my == 0 || (mx != 0 && iabs(fy) < iabs(fx))) begin
            my = cy; n_ystep++;
          end else begin
            mx = cx; n_xstep++; n_hold++;   // sine held across an x step
          end
        end
      end
      at_last = int'(at_i[c]);
      ft_last = int'(ft_i[c]);
    end
  end

  task automatic wait_revs(input int c, input int n);
    int start;
    start = cyc_cnt[c];
    while (cyc_cnt[c] < start + n) @(posedge clk);
  endtask

  initial begin
    int p0;
    real rate, ratio, want;
    at_i  = '{7'd31, 7'd63, 7'd127};
    ft_i  = '{16'hFFFF, 16'hFFFF, 16'hFFFF};
    lvl_i = '{2'd0, 2'd1, 2'd2};
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // three frequencies from one clock, levelled amplitudes
    wait_revs(2, 1);
    rate = 65535.0 / 65536.0;
    for (int c = 0; c < CH; c++) begin
      want = 2.0 * PI * r_cur[c] * r_cur[c] / rate;
      check(period[c] > want * 0.98 && period[c] < want * 1.02,
            $sformatf("ch%0d period %0d clocks, ideal %0f", c, period[c], want));
      check(peak[c] == 31, $sformatf("ch%0d levelled peak %0d, expected 31", c, peak[c]));
    end
    ratio = real'(period[2]) / real'(period[0]);
    want  = (127.0 / 31.0) ** 2;
    check(ratio > want * 0.97 && ratio < want * 1.03,
          $sformatf("period ratio ch2/ch0 %0f, expected %0f", ratio, want));
    $display("periods in clocks: %0d %0d %0d", period[0], period[1], period[2]);

    // FSK on channel 0 in mid-cycle: halve the tick rate
    p0 = period[0];
    repeat (p0 / 3) @(posedge clk);
    @(negedge clk) ft_i[0] = 16'h8000;
    check(ft_cur[0] == 16'hFFFF, "FT must not change before cycle start");
    wait_revs(0, 2);
    ratio = real'(period[0]) / real'(p0);
    check(ratio > 1.98 && ratio < 2.02, $sformatf("FSK period ratio %0f, expected 2", ratio));

    // amplitude change on channel 1 in mid-cycle
    @(negedge clk) at_i[1] = 7'd20;
    check(r_cur[1] == 63, "AT must not change before cycle start");
    wait_revs(1, 1);
    check(r_cur[1] == 20, "AT applied at cycle start");

    // parking channel 2
    @(negedge clk) at_i[2] = 7'd0;
    while (r_cur[2] != 0) @(posedge clk);
    repeat (100) @(posedge clk);

    check(n_xstep > 0, "x steps occurred");
    check(n_ystep > 0, "y steps occurred");
    check(n_hold > 0, "held samples occurred");
    check(n_cycle > 0, "cycle starts occurred");
    check(n_fsk > 0, "FSK reload occurred");
    check(n_at_reload > 0, "amplitude reload occurred");
    check(n_park > 0, "parking occurred");
    for (int s = 0; s < 3; s++) check(n_lvl[s] > 0, $sformatf("levelling by %0d bits occurred", s));
    $display("mechanisms: xstep=%0d ystep=%0d hold=%0d cycle=%0d fsk=%0d at_reload=%0d park=%0d lvl0=%0d lvl1=%0d lvl2=%0d",
             n_xstep, n_ystep, n_hold, n_cycle, n_fsk, n_at_reload, n_park, n_lvl[0], n_lvl[1], n_lvl[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
