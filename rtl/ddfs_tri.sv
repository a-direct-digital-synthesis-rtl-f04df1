// ddfs_tri: three-frequency synthesizer pack (top level).
//
// Three independent amplitude-sequencing DDFS modules (ddfs_core) run from
// one clock, as for the coil drivers of a multi-frequency magnetic
// induction tomograph.  Each channel has its own amplitude word AT and
// frequency word FT, both taken at the channel's cycle start.  Since the
// period of a module grows with AT^2, channels on a common timing clock
// can be set to different frequencies through their radius alone; their
// outputs are then brought to a common level by ddfs_level, which drops
// lvl_i[c] least significant bits of both quadrature samples (two bits in
// the reference application).
//
// Interface: per channel c, at_i[c], ft_i[c], lvl_i[c] in; levelled
// cos_o[c]/sin_o[c], the sample strobe sample_o[c] and the cycle start
// strobe cycle_o[c] out.  Samples and strobes are registered and change
// on the same clock edge; levelling adds no delay.  The clock is
// expected to come from an on-chip clock manager, and the samples go to a
// DAC per channel; both lie outside this RTL.
//
// Three channels, the common clock and the two-bit levelling follow the
// application described for the architecture; making the level a run-time
// input per channel is this design's choice.
module ddfs_tri #(
  parameter int unsigned CH    = 3,    // number of generators
  parameter int unsigned N     = 8,    // amplitude word length
  parameter int unsigned M     = 16,   // frequency tuning word length
  parameter int unsigned TRUNC = 0,    // sample delay truncation, bits
  parameter int unsigned SW    = 2     // levelling shift control width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-2:0]        at_i     [CH],
  input  logic [M-1:0]        ft_i     [CH],
  input  logic [SW-1:0]       lvl_i    [CH],
  output logic signed [N-1:0] cos_o    [CH],
  output logic signed [N-1:0] sin_o    [CH],
  output logic                sample_o [CH],
  output logic                cycle_o  [CH]
);

  for (genvar c = 0; c < CH; c++) begin : g_ch
    logic signed [N-1:0] cos_raw, sin_raw;

    ddfs_core #(.N(N), .M(M), .TRUNC(TRUNC)) u_core (
      .clk, .rst_n,
      .at_i(at_i[c]), .ft_i(ft_i[c]),
      .cos_o(cos_raw), .sin_o(sin_raw),
      .sample_o(sample_o[c]), .cycle_o(cycle_o[c])
    );

    ddfs_level #(.N(N), .SW(SW)) u_lvl_cos (
      .din(cos_raw), .shift(lvl_i[c]), .dout(cos_o[c])
    );

    ddfs_level #(.N(N), .SW(SW)) u_lvl_sin (
      .din(sin_raw), .shift(lvl_i[c]), .dout(sin_o[c])
    );
  end

endmodule
