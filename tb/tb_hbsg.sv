// tb_hbsg: self-checking testbench of the hybrid bit splitting generator.
//
// Drives every input value of a 4-bit, R = 2 generator and a 6-bit, R = 3
// generator (and random values of an 8-bit, R = 2 one) and checks, per
// stream: position 0 is 0, position p >= 1 carries segment bit floor(log2 p),
// and the stream holds as many ones as the segment value. Segment 0 is the
// most significant segment. The expected values are computed here from the
// weight rule, not taken from the generator.
module tb_hbsg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] bin4;  logic [1:0][3:0] s4;
  logic [5:0] bin6;  logic [2:0][3:0] s6;
  logic [7:0] bin8;  logic [1:0][15:0] s8;

  hbsg #(.N(4), .R(2)) dut4 (.bin(bin4), .streams(s4));
  hbsg #(.N(6), .R(3)) dut6 (.bin(bin6), .streams(s6));
  hbsg #(.N(8), .R(2)) dut8 (.bin(bin8), .streams(s8));

  // expected bit of a stream position: 0 at p = 0, else bit floor(log2 p)
  function automatic logic exp_bit(int unsigned seg, int unsigned p);
    int unsigned msb = 0;
    if (p == 0) return 1'b0;
    while ((p >> (msb + 1)) != 0) msb++;
    return seg[msb];
  endfunction

  task automatic check_stream(string tag, int unsigned seg, int unsigned len,
                              logic [15:0] s);
    int unsigned ones = 0;
    for (int unsigned p = 0; p < len; p++) begin
      checks++;
      if (s[p] !== exp_bit(seg, p)) begin
        failures++;
        $display("FAIL %s seg=%0d pos %0d: got %b", tag, seg, p, s[p]);
      end
      ones += s[p];
    end
    checks++;
    if (ones != seg) begin
      failures++;
      $display("FAIL %s seg=%0d: %0d ones", tag, seg, ones);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      bin4 = 4'(v); #1;
      check_stream("n4 r0", v >> 2, 4, 16'(s4[0]));
      check_stream("n4 r1", v & 3,  4, 16'(s4[1]));
    end
    for (int v = 0; v < 64; v++) begin
      bin6 = 6'(v); #1;
      check_stream("n6 r0", (v >> 4) & 3, 4, 16'(s6[0]));
      check_stream("n6 r1", (v >> 2) & 3, 4, 16'(s6[1]));
      check_stream("n6 r2", v & 3,        4, 16'(s6[2]));
    end
    for (int t = 0; t < 256; t++) begin
      bin8 = 8'(t); #1;
      check_stream("n8 r0", t >> 4, 16, s8[0]);
      check_stream("n8 r1", t & 15, 16, s8[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
