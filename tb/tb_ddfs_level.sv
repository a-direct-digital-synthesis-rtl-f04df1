// tb_ddfs_level: exhaustive check of amplitude levelling.
// Every 8-bit sample and every shift 0..3 is applied; the expected output
// is floor(sample / 2^shift), worked out with integer division.
module tb_ddfs_level;

  localparam int unsigned N  = 8;
  localparam int unsigned SW = 2;

  logic signed [N-1:0] din, dout;
  logic [SW-1:0]       shift;
  int checks = 0, failures = 0;

  ddfs_level #(.N(N), .SW(SW)) dut (.din, .shift, .dout);

  initial begin
    din = '0; shift = '0;
    for (int s = 0; s < 4; s++) begin
      for (int v = -128; v < 128; v++) begin
        int d, e;
        d = 1 << s;
        e = (v >= 0) ? v / d : -((-v + d - 1) / d);   // floor division
        din = N'(v); shift = SW'(s);
        #1;
        checks++;
        if (dout != e) begin
          failures++;
          if (failures < 10) $display("FAIL %0d >> %0d: got %0d, expected %0d", v, s, dout, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
