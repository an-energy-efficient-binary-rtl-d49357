// bipsmul: binary-interfaced parallel stochastic multiplier (unsigned).
//
// Multiplies two N-bit unsigned binary numbers exactly, in one combinational
// pass, through stochastic (unipolar) arithmetic on parallel bitstreams:
//   1. two hybrid bit splitting generators turn a and b into R streams each,
//      of L = 2^(N/R) bits, by wiring every bit to as many positions as its
//      weight within its segment;
//   2. the deterministic approach lengthens every stream to L*L bits, a by
//      repetition and b by rotation, so each a-bit meets each b-bit once;
//   3. R*R AND arrays pair every a-segment with every b-segment, and parallel
//      counters (SUM) count the ones, giving exact segment products;
//   4. the accumulator shifts each count by its segment weight and adds them.
// For N = 4, R = 2 this is four arrays of 16 AND gates and shifts of 4, 2, 2
// and 0 bits. R = N degenerates to an array multiplier (one-bit segments),
// R = 1 to a single array of 2^(2N) gates.
//
// Interface: a, b [N-1:0] in, p [2N-1:0] out. Timing: combinational; the
// product is ready within the clock cycle that presents the operands.
//
// The structure, pairing and shifts follow the design description; the
// default N = 4, R = 2 is the configuration it selects for its neural-network
// use. Nothing is registered here: the caller adds registers.
module bipsmul
  import bipsmul_pkg::*;
#(
  parameter int unsigned N = 4,   // operand width n
  parameter int unsigned R = 2    // segments per operand
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned K  = N / R;          // segment width
  localparam int unsigned L  = 1 << K;         // generator stream length
  localparam int unsigned W  = L * L;          // deterministic stream length
  localparam int unsigned CW = $clog2(W + 1);  // SUM output width

  logic [R-1:0][L-1:0] a_str, b_str;
  logic [R-1:0][W-1:0] a_det, b_det;
  logic [R*R-1:0][CW-1:0] sums;

  hbsg #(.N(N), .R(R)) u_hbsg_a (.bin(a), .streams(a_str));
  hbsg #(.N(N), .R(R)) u_hbsg_b (.bin(b), .streams(b_str));

  det_expand #(.L(L), .R(R), .MODE(DET_REPEAT))
    u_det_a (.in_streams(a_str), .out_streams(a_det));
  det_expand #(.L(L), .R(R), .MODE(DET_ROTATE))
    u_det_b (.in_streams(b_str), .out_streams(b_det));

  for (genvar i = 0; i < R; i++) begin : g_a
    for (genvar j = 0; j < R; j++) begin : g_b
      logic [W-1:0] anded;
      and_array   #(.W(W)) u_and (.x(a_det[i]), .y(b_det[j]), .z(anded));
      par_counter #(.W(W)) u_sum (.bits(anded), .count(sums[i*R + j]));
    end
  end

  shift_accumulator #(.N(N), .R(R), .CW(CW)) u_acc (.sums(sums), .product(p));

endmodule
