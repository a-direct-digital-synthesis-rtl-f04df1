// tb_ddfs_spectrum: spectral purity of the generator with and without
// phase timing compensation.
//
// Three ddfs_core instances run at AT = 127 with a tick every other clock
// (FT = 2^15): TRUNC = 0 (full compensation), TRUNC = 4 (delays truncated
// by four bits) and TRUNC = 7, where every delay of an 8-bit generator
// truncates to one tick, so samples come at a uniform rate as in the plain
// circle walk without compensation.  After one revolution has been timed,
// the sine output of the next revolution is sampled every clock and single
// DFT bins at the fundamental and the 3rd and 5th harmonics are evaluated.
// Expected 3rd-harmonic levels relative to the fundamental, from a
// floating-point evaluation of the same walk and hold times: about -63.5 dB
// (TRUNC 0), -52.5 dB (TRUNC 4) and -35.6 dB (TRUNC 7, uniform timing).
// The 5th harmonic must stay below -72, -49 and -33 dB respectively.
// The limits below leave a few dB of margin.  The period in clocks must be
// twice the tick count of a revolution (101384 ticks at TRUNC 0).
module tb_ddfs_spectrum;

  localparam int unsigned N = 8;
  localparam int unsigned M = 16;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  localparam int  TR      [3] = '{0, 4, 7};
  localparam real H3_MAX  [3] = '{-60.0, -49.0, -33.0};
  localparam real H3_MIN  [3] = '{-90.0, -56.0, -38.0};
  localparam real H5_MAX  [3] = '{-72.0, -49.0, -33.0};
  localparam int  P_EXP   [3] = '{2 * 101384, 2 * 5776, 2 * 1016};

  for (genvar g = 0; g < 3; g++) begin : g_ch
    logic signed [N-1:0] cos_o, sin_o;
    logic sample_o, cycle_o;
    int revs, n, period;
    real re [3], im [3];

    ddfs_core #(.N(N), .M(M), .TRUNC(TR[g])) dut (
      .clk, .rst_n, .at_i(7'd127), .ft_i(16'h8000),
      .cos_o, .sin_o, .sample_o, .cycle_o
    );

    initial begin
      revs = 0; n = 0; period = 0;
      for (int k = 0; k < 3; k++) begin re[k] = 0.0; im[k] = 0.0; end
    end

    always @(posedge clk) if (rst_n && revs < 5) begin
      if (cycle_o) begin
        revs++;
        if (revs == 4) begin
          real a1, a3, a5, h3, h5;
          a1 = $sqrt(re[0] * re[0] + im[0] * im[0]);
          a3 = $sqrt(re[1] * re[1] + im[1] * im[1]);
          a5 = $sqrt(re[2] * re[2] + im[2] * im[2]);
          h3 = 20.0 * $log10(a3 / a1 + 1e-12);
          h5 = 20.0 * $log10(a5 / a1 + 1e-12);
          $display("TRUNC=%0d period=%0d clocks  H3=%0.1f dB  H5=%0.1f dB", TR[g], period, h3, h5);
          check(h3 < H3_MAX[g] && h3 > H3_MIN[g], $sformatf("TRUNC=%0d 3rd harmonic %0.1f dB", TR[g], h3));
          check(h5 < H5_MAX[g], $sformatf("TRUNC=%0d 5th harmonic %0.1f dB", TR[g], h5));
          check(n == period, "revolutions of equal length");
          done++;
          revs = 5;
        end
        if (revs == 3) period = n;
        if (revs == 3 || revs == 5) check(P_EXP[g] == n, $sformatf("TRUNC=%0d period %0d clocks, expected %0d", TR[g], n, P_EXP[g]));
        n = 0;
      end
      if (revs == 3 && period > 0) begin
        for (int k = 0; k < 3; k++) begin
          real w;
          w = 2.0 * PI * real'(2 * k + 1) * real'(n) / real'(period);
          re[k] += real'(sin_o) * $cos(w);
          im[k] -= real'(sin_o) * $sin(w);
        end
      end
      n++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (done < 3) @(posedge clk);
    check(g_ch[0].period > 0 && g_ch[2].period > 0, "spectra measured");
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
