// tb_par_counter: self-checking testbench of the parallel counter (SUM).
//
// Counts of 16-bit and 256-bit inputs (all zeros, all ones, one-hot and
// random) are compared with a bit-by-bit count made here.
module tb_par_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0]  b16;  logic [4:0] c16;
  logic [255:0] b256; logic [8:0] c256;
  par_counter #(.W(16))  dut16  (.bits(b16),  .count(c16));
  par_counter #(.W(256)) dut256 (.bits(b256), .count(c256));

  function automatic int ref_count(logic [255:0] v);
    int n = 0;
    for (int i = 0; i < 256; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      case (t)
        0: begin b16 = '0; b256 = '0; end
        1: begin b16 = '1; b256 = '1; end
        2: begin b16 = 16'h8000; b256 = 256'(1) << 255; end
        default: begin
          b16 = 16'($urandom);
          for (int w = 0; w < 8; w++) b256[w*32 +: 32] = $urandom & ((t % 3 == 0) ? 32'hffff_ffff : $urandom);
        end
      endcase
      #1;
      checks += 2;
      if (int'(c16) != ref_count(256'(b16))) begin
        failures++; $display("FAIL w16 %h -> %0d", b16, c16);
      end
      if (int'(c256) != ref_count(b256)) begin
        failures++; $display("FAIL w256 -> %0d expected %0d", c256, ref_count(b256));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
