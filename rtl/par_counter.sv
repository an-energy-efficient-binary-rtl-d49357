// par_counter: parallel counter (the SUM block of the multiplier).
//
// Converts a parallel bitstream back to binary by counting its ones in one
// combinational step. The design names the block and its function only; this
// implementation is the simplest one, a sum of all input bits, which a
// synthesis tool maps onto an adder tree.
//
// Interface: bits[W-1:0] in, count[CW-1:0] out, CW = clog2(W+1) so that the
// all-ones input is representable. Timing: combinational.
module par_counter #(
  parameter int unsigned W  = 16,               // input bits
  localparam int unsigned CW = $clog2(W + 1)    // count width
) (
  input  logic [W-1:0]  bits,
  output logic [CW-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < W; i++) begin
      count = count + CW'(bits[i]);
    end
  end

endmodule
