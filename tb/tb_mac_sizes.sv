// tb_mac_sizes: the MAC sizes of the MAC comparison table, 2, 4 and 8 inputs
// with 8-bit multipliers (16 inputs is the default size, run by the MAC's own
// testbench). Each size gets the same random signed operands on its first
// lanes, back to back, and every registered result is compared one cycle
// later with the sum of the integer products.
module tb_mac_sizes;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, in_valid;
  logic [7:0] a_sign, b_sign;
  logic [7:0][N-1:0] a_mag, b_mag;
  logic v2, v4, v8;
  logic signed [17:0] acc2;
  logic signed [18:0] acc4;
  logic signed [19:0] acc8;

  bipsmul_mac #(.N(N), .R(2), .M(2)) mac2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_sign(a_sign[1:0]), .a_mag(a_mag[1:0]), .b_sign(b_sign[1:0]), .b_mag(b_mag[1:0]),
    .out_valid(v2), .acc(acc2));
  bipsmul_mac #(.N(N), .R(2), .M(4)) mac4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_sign(a_sign[3:0]), .a_mag(a_mag[3:0]), .b_sign(b_sign[3:0]), .b_mag(b_mag[3:0]),
    .out_valid(v4), .acc(acc4));
  bipsmul_mac #(.N(N), .R(2), .M(8)) mac8 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_sign(a_sign), .a_mag(a_mag), .b_sign(b_sign), .b_mag(b_mag),
    .out_valid(v8), .acc(acc8));

  function automatic int ref_sum(int lanes);
    int s = 0;
    for (int m = 0; m < lanes; m++) begin
      int p = int'(a_mag[m]) * int'(b_mag[m]);
      s += (a_sign[m] ^ b_sign[m]) ? -p : p;
    end
    return s;
  endfunction

  initial begin
    int e2, e4, e8;
    rst_n = 0; in_valid = 0; a_sign = '0; b_sign = '0; a_mag = '0; b_mag = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      in_valid = 1;
      for (int m = 0; m < 8; m++) begin
        a_sign[m] = 1'($urandom); b_sign[m] = 1'($urandom);
        a_mag[m] = (t == 0) ? '1 : N'($urandom); b_mag[m] = (t == 0) ? '1 : N'($urandom);
      end
      e2 = ref_sum(2); e4 = ref_sum(4); e8 = ref_sum(8);
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!v2 || int'(acc2) != e2) begin failures++; $display("FAIL m=2 %0d vs %0d", acc2, e2); end
      if (!v4 || int'(acc4) != e4) begin failures++; $display("FAIL m=4 %0d vs %0d", acc4, e4); end
      if (!v8 || int'(acc8) != e8) begin failures++; $display("FAIL m=8 %0d vs %0d", acc8, e8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
