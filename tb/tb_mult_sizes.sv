// tb_mult_sizes: the multiplier configurations of the comparison table
// (operand width n, R segments) that the unit testbench does not cover:
// 6 bits with R = 1 and 6, 16 bits with R = 4, 8 and 16, 32 bits with R = 8,
// 16 and 32. Each configuration multiplies corner and random operands and is
// compared with the integer product. All are combinational, one result per
// clock cycle.
module tb_mult_sizes;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0]  a6,  b6;  logic [11:0] p61, p66;
  logic [15:0] a16, b16; logic [31:0] p164, p168, p1616;
  logic [31:0] a32, b32; logic [63:0] p328, p3216, p3232;

  bipsmul #(.N(6),  .R(1))  m61   (.a(a6),  .b(b6),  .p(p61));
  bipsmul #(.N(6),  .R(6))  m66   (.a(a6),  .b(b6),  .p(p66));
  bipsmul #(.N(16), .R(4))  m164  (.a(a16), .b(b16), .p(p164));
  bipsmul #(.N(16), .R(8))  m168  (.a(a16), .b(b16), .p(p168));
  bipsmul #(.N(16), .R(16)) m1616 (.a(a16), .b(b16), .p(p1616));
  bipsmul #(.N(32), .R(8))  m328  (.a(a32), .b(b32), .p(p328));
  bipsmul #(.N(32), .R(16)) m3216 (.a(a32), .b(b32), .p(p3216));
  bipsmul #(.N(32), .R(32)) m3232 (.a(a32), .b(b32), .p(p3232));

  task automatic chk(string tag, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      case (t)
        0: begin a6 = '0; b6 = '1; a16 = '0; b16 = '1; a32 = '0; b32 = '1; end
        1: begin a6 = '1; b6 = '1; a16 = '1; b16 = '1; a32 = '1; b32 = '1; end
        default: begin
          a6 = 6'($urandom); b6 = 6'($urandom);
          a16 = 16'($urandom); b16 = 16'($urandom);
          a32 = $urandom; b32 = $urandom;
        end
      endcase
      @(posedge clk);
      chk("M6,1",  p61,   longint'(a6) * longint'(b6));
      chk("M6,6",  p66,   longint'(a6) * longint'(b6));
      chk("M16,4", p164,  longint'(a16) * longint'(b16));
      chk("M16,8", p168,  longint'(a16) * longint'(b16));
      chk("M16,16", p1616, longint'(a16) * longint'(b16));
      chk("M32,8", p328,  longint'(a32) * longint'(b32));
      chk("M32,16", p3216, longint'(a32) * longint'(b32));
      chk("M32,32", p3232, longint'(a32) * longint'(b32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
