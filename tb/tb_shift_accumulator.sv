// tb_shift_accumulator: self-checking testbench of the shift accumulator.
//
// For the 4-bit, R = 2 case the expected result is written out by hand:
// high x high << 4, the two cross terms << 2, low x low << 0. For 6 bits,
// R = 3, the inputs are the exact products of the 2-bit segments of random a
// and b (segment 0 most significant), and the output must equal a * b.
module tb_shift_accumulator;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0][4:0] s4;  logic [7:0]  p4;
  logic [8:0][4:0] s6;  logic [11:0] p6;
  shift_accumulator #(.N(4), .R(2), .CW(5)) dut4 (.sums(s4), .product(p4));
  shift_accumulator #(.N(6), .R(3), .CW(5)) dut6 (.sums(s6), .product(p6));

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [7:0] e4;
      for (int q = 0; q < 4; q++) s4[q] = 5'($urandom_range(0, 9));
      e4 = 8'((int'(s4[0]) << 4) + (int'(s4[1]) << 2) + (int'(s4[2]) << 2) + int'(s4[3]));
      #1;
      checks++;
      if (p4 !== e4) begin
        failures++; $display("FAIL n4: %h got %0d expected %0d", s4, p4, e4);
      end
    end
    for (int t = 0; t < 300; t++) begin
      int unsigned a, b;
      a = $urandom_range(0, 63); b = $urandom_range(0, 63);
      if (t == 0) begin a = 63; b = 63; end
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          s6[i*3 + j] = 5'(((a >> (4 - 2*i)) & 3) * ((b >> (4 - 2*j)) & 3));
      #1;
      checks++;
      if (int'(p6) != a * b) begin
        failures++; $display("FAIL n6: %0d*%0d got %0d", a, b, p6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
