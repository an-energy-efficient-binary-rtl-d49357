// bipsmul_mac: M-input multiply-accumulate unit built from BipSMuls.
//
// Computes acc = sum over m of a[m] * b[m] for M operand pairs presented in
// the same cycle. Each lane is a signed BipSMul (sign bit plus N-bit
// magnitude); its sign-magnitude product is turned into two's complement and
// the M lane products are added by an adder tree. The sum is registered, so a
// MAC operation takes one clock cycle: operands presented with in_valid in
// cycle t give out_valid and acc after the clock edge that ends cycle t.
// Unsigned use: tie the sign inputs to 0.
//
// Interface: clk, rst_n (asynchronous, active low), in_valid, a_sign[M],
// a_mag[M][N], b_sign[M], b_mag[M][N]; out_valid, acc (signed, 2N+1+clog2(M)
// bits, wide enough for any sum of M products).
//
// The design gives the MAC by its function and its sizes only (M = 2, 4, 8,
// 16 with 8-bit multipliers); the lane structure, adder tree, output
// register, valid flag and reset are this implementation's choices, and
// M = 16 (the largest evaluated) is the default.
module bipsmul_mac #(
  parameter int unsigned N = 8,    // multiplier magnitude width
  parameter int unsigned R = 2,    // segments per operand
  parameter int unsigned M = 16,   // inputs (multipliers) of the MAC
  localparam int unsigned PW = 2 * N + 1,          // signed product width
  localparam int unsigned AW = PW + $clog2(M)      // accumulator width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [M-1:0]              a_sign,
  input  logic [M-1:0][N-1:0]       a_mag,
  input  logic [M-1:0]              b_sign,
  input  logic [M-1:0][N-1:0]       b_mag,
  output logic                      out_valid,
  output logic signed [AW-1:0]      acc
);

  logic signed [M-1:0][PW-1:0] prod;   // two's-complement lane products
  logic signed [AW-1:0]        sum;

  for (genvar m = 0; m < M; m++) begin : g_lane
    logic           p_sign;
    logic [2*N-1:0] p_mag;

    bipsmul_signed #(.N(N), .R(R)) u_mul (
      .a_sign(a_sign[m]), .a_mag(a_mag[m]),
      .b_sign(b_sign[m]), .b_mag(b_mag[m]),
      .p_sign(p_sign),    .p_mag(p_mag)
    );

    assign prod[m] = p_sign ? -$signed({1'b0, p_mag}) : $signed({1'b0, p_mag});
  end

  always_comb begin
    sum = '0;
    for (int unsigned m = 0; m < M; m++) begin
      sum = sum + AW'($signed(prod[m]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) acc <= sum;
    end
  end

endmodule
