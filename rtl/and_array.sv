// and_array: an array of W two-input AND gates.
//
// In unipolar stochastic computing the AND of two bitstreams is their product.
// Applied to two deterministic (repeated and rotated) streams, the number of
// ones in the result is exactly the product of the two segment values.
//
// Interface: x[W-1:0], y[W-1:0] in, z[W-1:0] out. Timing: combinational.
// The block follows the design description; W defaults to 2^n = 16 for the
// 4-bit, R = 2 multiplier (16 AND gates per array).
module and_array #(
  parameter int unsigned W = 16   // gates in the array
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);

  assign z = x & y;

endmodule
