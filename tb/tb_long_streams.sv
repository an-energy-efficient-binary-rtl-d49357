// tb_long_streams: the unsplit 8-bit multiplier (R = 1), whose single
// segment is 8 bits wide, so that its deterministic streams are 2^16 bits
// long and its one AND array has 65536 gates. Random and corner operand pairs
// are compared with the integer product. (The 16-bit, R = 2 configuration has
// the same 8-bit segments, four times over; it is left out because building
// it for simulation takes far longer than its check is worth.)
module tb_long_streams;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a8,  b8;  logic [15:0] p81;

  bipsmul #(.N(8),  .R(1)) m81  (.a(a8),  .b(b8),  .p(p81));

  initial begin
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      case (t)
        0: begin a8 = '0; b8 = '1; end
        1: begin a8 = '1; b8 = '1; end
        default: begin
          a8 = 8'($urandom); b8 = 8'($urandom);
        end
      endcase
      @(posedge clk);
      checks++;
      if (int'(p81) != int'(a8) * int'(b8)) begin
        failures++; $display("FAIL M8,1 %0d*%0d=%0d", a8, b8, p81);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
