// shift_accumulator: the accumulator that forms the binary product.
//
// The N x N product splits into R*R partial products, one per pair of an
// a-segment i and a b-segment j (segment 0 most significant). Each SUM output
// is that partial product; it is shifted left by its combined segment weight
// ((R-1-i) + (R-1-j)) * K (for R = 2: n, n/2, n/2 and 0) and all of them are
// added into the 2N-bit result.
//
// Interface: sums[i*R + j][CW-1:0] in, product[2N-1:0] out.
// Timing: combinational; the design calls the block an accumulator but gives
// the whole multiplier one clock cycle, so it is built here as a multi-operand
// adder (this implementation's choice); the shift amounts follow the design.
module shift_accumulator
  import bipsmul_pkg::*;
#(
  parameter int unsigned N  = 4,               // operand width
  parameter int unsigned R  = 2,               // segments per operand
  parameter int unsigned CW = 2 * (N / R) + 1  // width of one SUM output
) (
  input  logic [R*R-1:0][CW-1:0] sums,
  output logic [2*N-1:0]         product
);

  localparam int unsigned K = N / R;

  always_comb begin
    product = '0;
    for (int unsigned i = 0; i < R; i++) begin
      for (int unsigned j = 0; j < R; j++) begin
        product = product
                + ((2*N)'(sums[i*R + j]) << pair_shift(i, j, R, K));
      end
    end
  end

endmodule
