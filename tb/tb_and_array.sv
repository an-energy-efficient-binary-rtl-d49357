// tb_and_array: self-checking testbench of the AND array.
//
// Random and corner operand pairs; each output bit is compared with the AND
// of the two input bits computed here, and the ones count with the product
// of deterministic streams of known value.
module tb_and_array;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] x, y, z;
  and_array #(.W(16)) dut (.x(x), .y(y), .z(z));

  initial begin
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: begin x = '0; y = '1; end
        1: begin x = '1; y = '1; end
        2: begin x = '1; y = '0; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (z[i] !== (x[i] && y[i])) begin
          failures++; $display("FAIL bit %0d x=%h y=%h z=%h", i, x, y, z);
        end
      end
    end
    // 3/4 repeated against 1/2 rotated -> 6 of 16 (= 3/8)
    x = 16'b0111_0111_0111_0111; y = 16'b1001_1100_0110_0011; #1;
    checks++;
    if ($countones(z) != 6) begin failures++; $display("FAIL 3/8 example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
