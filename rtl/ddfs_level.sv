// ddfs_level: amplitude levelling of a generator output.
//
// Generators sharing one timing clock run at frequencies set by their
// radius, so their amplitudes differ.  They are brought to a common level
// by dropping 'shift' least significant bits of the signed sample
// (arithmetic shift, i.e. truncation towards minus infinity).  The
// three-frequency application drops two bits; the run-time shift of
// 0..2^SW-1 bits is this design's generalisation.  Combinational.
module ddfs_level #(
  parameter int unsigned N  = 8,       // sample width, signed
  parameter int unsigned SW = 2        // width of the shift control
) (
  input  logic signed [N-1:0] din,
  input  logic [SW-1:0]       shift,
  output logic signed [N-1:0] dout
);

  assign dout = din >>> shift;

endmodule
