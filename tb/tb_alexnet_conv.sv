// tb_alexnet_conv: 4-bit quantized AlexNet arithmetic on the BipSMul MAC.
//
// The MAC is built with the 4-bit, R = 2 multiplier used for the quantized
// network and 16 inputs. The testbench computes single outputs of three
// quantized layers from generated data: one output of the second
// convolution (5 x 5 kernel over 64 channels, 1600 products), one of the
// third (3 x 3 over 192 channels, 1728 products) and one of the last fully
// connected layer (4096 inputs). Activations are unsigned 4-bit values
// (outputs of a ReLU), weights signed with a 4-bit magnitude. Operands are
// streamed 16 per cycle, back to back; the testbench adds the registered MAC
// results, which arrive one per cycle after a one-cycle latency, and compares
// the dot product with its own integer computation. The layer sizes are
// AlexNet's; the data are pseudo-random.
module tb_alexnet_conv;
  localparam int N = 4, M = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, in_valid, out_valid;
  logic [M-1:0] a_sign, b_sign;
  logic [M-1:0][N-1:0] a_mag, b_mag;
  logic signed [2*N+1+$clog2(M)-1:0] acc;

  bipsmul_mac #(.N(N), .R(2), .M(M)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_sign(a_sign), .a_mag(a_mag), .b_sign(b_sign), .b_mag(b_mag),
    .out_valid(out_valid), .acc(acc));

  // collects the registered results
  longint hw_sum;
  int     n_results;
  always @(posedge clk) begin
    if (out_valid) begin
      hw_sum    <= hw_sum + longint'(acc);
      n_results <= n_results + 1;
    end
  end

  task automatic run_layer(string name, int products);
    longint ref_sum = 0;
    int cycles = (products + M - 1) / M;
    hw_sum = 0; n_results = 0;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      in_valid = 1;
      for (int m = 0; m < M; m++) begin
        int idx = c * M + m;
        int act = (idx < products) ? $urandom_range(0, 15) : 0;
        int w   = (idx < products) ? $urandom_range(0, 15) - 8 : 0;
        a_sign[m] = 1'b0;        a_mag[m] = N'(act);
        b_sign[m] = (w < 0);     b_mag[m] = N'((w < 0) ? -w : w);
        ref_sum += act * w;
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks += 2;
    if (hw_sum != ref_sum) begin
      failures++; $display("FAIL %s: MAC gave %0d, expected %0d", name, hw_sum, ref_sum);
    end
    if (n_results != cycles) begin
      failures++; $display("FAIL %s: %0d results for %0d cycles", name, n_results, cycles);
    end
    $display("%s: %0d products in %0d MAC cycles, dot product %0d", name, products, cycles, ref_sum);
  endtask

  initial begin
    rst_n = 0; in_valid = 0; a_sign = '0; b_sign = '0; a_mag = '0; b_mag = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    run_layer("conv2 5x5x64", 5 * 5 * 64);
    run_layer("conv3 3x3x192", 3 * 3 * 192);
    run_layer("fc3 4096", 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
