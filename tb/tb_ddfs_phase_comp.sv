// tb_ddfs_phase_comp: checks the sample timing delay counter.
// Random delay magnitudes and a random tick pattern are applied, with
// TRUNC = 0 and TRUNC = 2 side by side.  After each fire the next delay
// value is drawn; the number of ticks counted here from one fire to the
// next (inclusive) must be max(1, perp >> TRUNC).  'valid' low and 'clr'
// must hold the counter.
module tb_ddfs_phase_comp;

  localparam int unsigned N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick, valid, clr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin tick = 0; valid = 0; clr = 0; end

  for (genvar g = 0; g < 2; g++) begin : g_ch
    localparam int unsigned T = 2 * g;
    logic [N-2:0] perp, delay;
    logic fire;
    int ticks, expd, fires;

    ddfs_phase_comp #(.N(N), .TRUNC(T)) dut (
      .clk, .rst_n, .clr, .tick, .valid, .perp_mag(perp), .fire, .delay
    );

    initial begin perp = 7'd5; ticks = 0; fires = 0; end

    always @(posedge clk) if (rst_n) begin
      if (tick && valid && !clr) ticks++;
      if (clr) ticks = 0;
      expd = int'(perp) >> T;
      if (expd < 1) expd = 1;
      check(fire == (tick && valid && !clr && ticks == expd),
            $sformatf("ch%0d fire=%0d after %0d ticks, delay %0d", g, fire, ticks, expd));
      check(delay == (perp >> T), "delay output");
      if (fire) begin
        ticks = 0;
        fires++;
        perp <= 7'($urandom_range(0, 127));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 60000; c++) begin
      @(negedge clk);
      tick  = ($urandom_range(0, 3) != 0);
      valid = ($urandom_range(0, 31) != 0);
      clr   = ($urandom_range(0, 499) == 0);
    end
    check(g_ch[0].fires > 500 && g_ch[1].fires > 1500, "enough delays completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
