// tb_bipsmul: self-checking testbench of the unsigned BipSMul.
//
// The default configuration (4 bits, R = 2) is run over all 256 operand
// pairs, and further configurations (R = 1 and R = 4 at 4 bits, 6 bits with
// R = 2 and 3, 8 bits with R = 2, 4 and 8) over all or random pairs. Every
// product is compared with the integer product a * b. The multiplier is
// combinational: each product is checked within the clock cycle that
// presents its operands.
module tb_bipsmul;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] a4, b4; logic [7:0]  p42, p41, p44;
  logic [5:0] a6, b6; logic [11:0] p62, p63;
  logic [7:0] a8, b8; logic [15:0] p82, p84, p88;

  bipsmul dut42 (.a(a4), .b(b4), .p(p42));   // default N = 4, R = 2
  bipsmul #(.N(4), .R(1)) dut41 (.a(a4), .b(b4), .p(p41));
  bipsmul #(.N(4), .R(4)) dut44 (.a(a4), .b(b4), .p(p44));
  bipsmul #(.N(6), .R(2)) dut62 (.a(a6), .b(b6), .p(p62));
  bipsmul #(.N(6), .R(3)) dut63 (.a(a6), .b(b6), .p(p63));
  bipsmul #(.N(8), .R(2)) dut82 (.a(a8), .b(b8), .p(p82));
  bipsmul #(.N(8), .R(4)) dut84 (.a(a8), .b(b8), .p(p84));
  bipsmul #(.N(8), .R(8)) dut88 (.a(a8), .b(b8), .p(p88));

  task automatic chk(string tag, int unsigned got, int unsigned a, int unsigned b);
    checks++;
    if (got != a * b) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d * %0d gave %0d", tag, a, b, got);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk); a4 = 4'(a); b4 = 4'(b);
        @(posedge clk);
        chk("M4,2", p42, a, b); chk("M4,1", p41, a, b); chk("M4,4", p44, a, b);
      end
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        @(negedge clk); a6 = 6'(a); b6 = 6'(b);
        @(posedge clk);
        chk("M6,2", p62, a, b); chk("M6,3", p63, a, b);
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        @(negedge clk); a8 = 8'(a); b8 = 8'(b);
        @(posedge clk);
        chk("M8,2", p82, a, b); chk("M8,4", p84, a, b); chk("M8,8", p88, a, b);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
