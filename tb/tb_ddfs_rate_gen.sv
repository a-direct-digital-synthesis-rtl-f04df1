// tb_ddfs_rate_gen: checks the tick generator.
// For several tuning words the number of ticks in a window of W clocks is
// compared with the exact count floor((start + W*FT) / 2^M) - floor(start / 2^M)
// from an independent accumulator, ticks are checked to be one clock long,
// and FT = 0 must give no ticks.
module tb_ddfs_rate_gen;

  localparam int unsigned M = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [M-1:0] ft;
  logic tick;
  int checks = 0, failures = 0;

  ddfs_rate_gen #(.M(M)) dut (.clk, .rst_n, .ft, .tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // independent model: 64-bit running sum of FT, tick one clock after carry
  longint unsigned total;
  logic tick_m;
  always @(posedge clk) begin
    if (!rst_n) begin
      total  <= 0;
      tick_m <= 1'b0;
    end else begin
      tick_m <= ((total + ft) >> M) != (total >> M);
      total  <= total + ft;
    end
  end

  always @(posedge clk) if (rst_n) check(tick == tick_m, "tick differs from model");

  initial begin
    int words[6] = '{0, 1, 12345, 16'h8000, 16'hC000, 16'hFFFF};
    ft = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (words[k]) begin
      int n;
      longint exp_n;
      @(negedge clk) ft = M'(words[k]);
      n = 0;
      exp_n = 0;
      // count over 4096 clocks: rate must be FT/2^M within one tick
      for (int c = 0; c < 4096; c++) begin
        @(posedge clk);
        if (tick) n++;
      end
      exp_n = (longint'(words[k]) * 4096) >> M;
      check(n >= exp_n - 1 && n <= exp_n + 1,
            $sformatf("FT=%0d: %0d ticks in 4096 clocks, expected %0d", words[k], n, exp_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
