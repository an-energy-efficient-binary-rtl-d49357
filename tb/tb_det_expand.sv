// tb_det_expand: self-checking testbench of the deterministic expansion.
//
// Part 1 checks the bit positions of both modes on random streams against
// the repeat and rotate formulas written out here. Part 2 checks the property
// the expansion exists for: with a one-hot a-stream (bit c1) expanded by
// repetition and a one-hot b-stream (bit c2) expanded by rotation, the AND of
// the two long streams has exactly one 1, for every pair (c1, c2). It also
// reproduces the 4-bit example 1110 x 1100 -> 6 ones out of 16.
module tb_det_expand;
  import bipsmul_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int L = 4, R = 2;
  logic [R-1:0][L-1:0]   a_in, b_in;
  logic [R-1:0][L*L-1:0] a_out, b_out;

  det_expand #(.L(L), .R(R), .MODE(DET_REPEAT)) dut_rep (.in_streams(a_in), .out_streams(a_out));
  det_expand #(.L(L), .R(R), .MODE(DET_ROTATE)) dut_rot (.in_streams(b_in), .out_streams(b_out));

  // a larger instance: L = 16, one stream
  logic [0:0][15:0]  a16, b16;
  logic [0:0][255:0] a16o, b16o;
  det_expand #(.L(16), .R(1), .MODE(DET_REPEAT)) dut_rep16 (.in_streams(a16), .out_streams(a16o));
  det_expand #(.L(16), .R(1), .MODE(DET_ROTATE)) dut_rot16 (.in_streams(b16), .out_streams(b16o));

  initial begin
    // part 1: positions
    for (int t = 0; t < 50; t++) begin
      a_in = (R*L)'($urandom); b_in = (R*L)'($urandom); #1;
      for (int r = 0; r < R; r++)
        for (int blk = 0; blk < L; blk++)
          for (int c = 0; c < L; c++) begin
            checks += 2;
            if (a_out[r][blk*L+c] !== a_in[r][c]) begin
              failures++; $display("FAIL repeat r%0d blk%0d c%0d", r, blk, c);
            end
            if (b_out[r][blk*L+c] !== b_in[r][(c - blk + L) % L]) begin
              failures++; $display("FAIL rotate r%0d blk%0d c%0d", r, blk, c);
            end
          end
    end
    // part 2: every pair meets exactly once
    for (int c1 = 0; c1 < 16; c1++)
      for (int c2 = 0; c2 < 16; c2++) begin
        a16 = 16'(1) << c1; b16 = 16'(1) << c2; #1;
        checks++;
        if ($countones(a16o[0] & b16o[0]) != 1) begin
          failures++; $display("FAIL pair a%0d b%0d meets %0d times", c1, c2,
                               $countones(a16o[0] & b16o[0]));
        end
      end
    // example: 1110 (3/4) x 1100 (1/2), bits listed in time order
    a_in = '0; b_in = '0;
    a_in[0] = 4'b0111; b_in[0] = 4'b0011; #1;
    checks++;
    if ($countones(a_out[0] & b_out[0]) != 6) begin
      failures++; $display("FAIL example: %0d ones", $countones(a_out[0] & b_out[0]));
    end
    checks++;
    // b expanded: 1100_0110_0011_1001 in time order
    if (b_out[0] !== 16'b1001_1100_0110_0011) begin
      failures++; $display("FAIL example rotation %b", b_out[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
