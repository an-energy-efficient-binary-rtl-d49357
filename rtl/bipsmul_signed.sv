// bipsmul_signed: signed multiplication with the unipolar BipSMul.
//
// The stochastic multiplier works on unipolar (non-negative) values, so a
// signed operand carries one extra sign bit beside its N-bit magnitude
// (sign-magnitude). The magnitudes go through the unsigned multiplier and the
// sign of the product is the XOR of the two sign bits.
//
// Interface: a_sign, a_mag[N-1:0], b_sign, b_mag[N-1:0] in;
// p_sign, p_mag[2N-1:0] out (sign-magnitude product; a zero magnitude with
// p_sign = 1 is a negative zero and equals 0).
// Timing: combinational.
//
// The extra sign bit and the XOR follow the design description; the
// sign-magnitude port format is this implementation's reading of it.
module bipsmul_signed #(
  parameter int unsigned N = 4,   // magnitude width
  parameter int unsigned R = 2    // segments per operand
) (
  input  logic           a_sign,
  input  logic [N-1:0]   a_mag,
  input  logic           b_sign,
  input  logic [N-1:0]   b_mag,
  output logic           p_sign,
  output logic [2*N-1:0] p_mag
);

  assign p_sign = a_sign ^ b_sign;

  bipsmul #(.N(N), .R(R)) u_mul (.a(a_mag), .b(b_mag), .p(p_mag));

endmodule
