// tb_bipsmul_signed: self-checking testbench of the sign-magnitude BipSMul.
//
// All sign and magnitude combinations of the 4-bit configuration: the
// product sign must be the XOR of the operand signs and the magnitude the
// product of the magnitudes; the signed value is also compared with the
// product of the two signed integers.
module tb_bipsmul_signed;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic as, bs, ps;
  logic [3:0] am, bm;
  logic [7:0] pm;
  bipsmul_signed dut (.a_sign(as), .a_mag(am), .b_sign(bs), .b_mag(bm),
                      .p_sign(ps), .p_mag(pm));

  initial begin
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++) begin
          int va, vb, vp;
          as = s[1]; bs = s[0]; am = 4'(a); bm = 4'(b); #1;
          va = s[1] ? -a : a;
          vb = s[0] ? -b : b;
          vp = ps ? -int'(pm) : int'(pm);
          checks += 3;
          if (ps !== (s[1] ^ s[0])) begin failures++; $display("FAIL sign s=%0d", s); end
          if (int'(pm) != a * b) begin failures++; $display("FAIL mag %0d*%0d=%0d", a, b, pm); end
          if (vp != va * vb) begin failures++; $display("FAIL value %0d*%0d=%0d", va, vb, vp); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
