// hbsg: hybrid bit splitting generator.
//
// Converts an N-bit binary number into R parallel unipolar bitstreams in a
// single combinational step, with no random source and no logic gates: only
// wires. The number is split into R segments of K = N/R bits. Segment r
// (r = 0 is the most significant segment, bits N-1 .. N-K) becomes stream r
// of L = 2^K bits. Bit i of a segment (weight 2^i) is wired to the 2^i stream
// positions 2^i .. 2^(i+1)-1, and position 0 is a constant 0, so the number of
// ones in the stream equals the segment value and its probability of ones is
// value / 2^K.
//
// Interface: bin[N-1:0] in, streams[r][p] out (p = stream position 0..L-1).
// Timing: purely combinational.
//
// The splitting, the wiring by bit weight, the added zero and the stream
// numbering follow the design's generator description and its R = 2 example;
// the packed-array layout of the ports is this implementation's choice.
module hbsg #(
  parameter int unsigned N = 4,        // operand width n
  parameter int unsigned R = 2,        // number of segments
  localparam int unsigned K = N / R,   // segment width k
  localparam int unsigned L = 1 << K   // stream length 2^k
) (
  input  logic [N-1:0]          bin,
  output logic [R-1:0][L-1:0]   streams
);

  if (N % R != 0) begin : g_bad_split
    $fatal(1, "hbsg: N must be a multiple of R");
  end

  for (genvar r = 0; r < R; r++) begin : g_seg
    // segment r holds bits N-1-r*K down to N-K-r*K
    logic [K-1:0] seg;
    assign seg = bin[N-1-r*K -: K];
    assign streams[r][0] = 1'b0;
    for (genvar i = 0; i < K; i++) begin : g_bit
      for (genvar p = (1 << i); p < (2 << i); p++) begin : g_wire
        assign streams[r][p] = seg[i];
      end
    end
  end

endmodule
