// det_expand: the deterministic approach applied to R parallel bitstreams.
//
// Each L-bit stream is lengthened to L*L bits so that, when one operand is
// expanded with DET_REPEAT and the other with DET_ROTATE, position by position
// every bit of the first stream is paired with every bit of the second
// exactly once. An AND of the two expanded streams then holds exactly
// (ones of a) * (ones of b) ones: the stochastic product is exact.
//
//   DET_REPEAT: out[blk*L + c] = in[c]                 (a0 a1 .. a(L-1), L times)
//   DET_ROTATE: out[blk*L + c] = in[(c - blk) mod L]   (block blk rotated by blk)
//
// Interface: in_streams[r][p] (p = 0..L-1), out_streams[r][q] (q = 0..L*L-1).
// Timing: purely combinational; only wires.
//
// Repetition of one operand and rotation of the other follow the design
// description; the rotation direction (by one place per block, as in the
// 1100 -> 0110 -> 0011 -> 1001 example) is taken from its example, the port
// layout is this implementation's choice.
module det_expand
  import bipsmul_pkg::*;
#(
  parameter int unsigned L    = 4,           // input stream length 2^k
  parameter int unsigned R    = 2,           // number of streams
  parameter det_mode_e   MODE = DET_REPEAT
) (
  input  logic [R-1:0][L-1:0]   in_streams,
  output logic [R-1:0][L*L-1:0] out_streams
);

  for (genvar r = 0; r < R; r++) begin : g_stream
    for (genvar blk = 0; blk < L; blk++) begin : g_blk
      for (genvar c = 0; c < L; c++) begin : g_pos
        if (MODE == DET_REPEAT) begin : g_rep
          assign out_streams[r][blk*L + c] = in_streams[r][c];
        end else begin : g_rot
          assign out_streams[r][blk*L + c] = in_streams[r][(c + L - blk) % L];
        end
      end
    end
  end

endmodule
