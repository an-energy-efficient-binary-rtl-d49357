// tb_bipsmul_mac: end-to-end testbench of the M-input BipSMul MAC at its
// default size (8-bit magnitudes, R = 2, 16 inputs).
//
// Sends a stream of MAC operations, with gaps in in_valid, and compares each
// registered result with the sum of the signed integer products computed
// here. It checks the one-cycle latency (out_valid exactly one cycle after
// in_valid, and acc holding its value while no operation arrives) and the
// reset values. It counts how often each mechanism of the design occurs and
// fails if one never did: a negative lane product (sign XOR), a negative zero,
// an unsigned operation (all signs 0), the largest positive and negative
// sums, and an idle cycle holding the result.
module tb_bipsmul_mac;
  localparam int N = 8, M = 16;
  localparam int AW = 2 * N + 1 + $clog2(M);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, in_valid, out_valid;
  logic [M-1:0] a_sign, b_sign;
  logic [M-1:0][N-1:0] a_mag, b_mag;
  logic signed [AW-1:0] acc;

  bipsmul_mac dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                   .a_sign(a_sign), .a_mag(a_mag), .b_sign(b_sign), .b_mag(b_mag),
                   .out_valid(out_valid), .acc(acc));

  // handshake rule: a result appears exactly one cycle after its operands
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid == $past(in_valid))
    else begin failures++; $display("FAIL out_valid does not follow in_valid"); end

  int n_neg_lane = 0, n_neg_zero = 0, n_unsigned = 0, n_max_pos = 0,
      n_max_neg = 0, n_hold = 0;

  longint expected, last_result;
  bit pending;

  function automatic longint ref_mac();
    longint s = 0;
    for (int m = 0; m < M; m++) begin
      longint p = longint'(a_mag[m]) * longint'(b_mag[m]);
      s += (a_sign[m] ^ b_sign[m]) ? -p : p;
    end
    return s;
  endfunction

  task automatic drive(int kind);
    for (int m = 0; m < M; m++) begin
      case (kind)
        0: begin a_sign[m] = 1'($urandom); b_sign[m] = 1'($urandom);
                 a_mag[m] = N'($urandom); b_mag[m] = N'($urandom); end
        1: begin a_sign[m] = 0; b_sign[m] = 0; a_mag[m] = '1; b_mag[m] = '1; end
        2: begin a_sign[m] = 1; b_sign[m] = 0; a_mag[m] = '1; b_mag[m] = '1; end
        3: begin a_sign[m] = 0; b_sign[m] = 0;
                 a_mag[m] = N'($urandom); b_mag[m] = N'($urandom); end
        default: begin a_sign[m] = 1; b_sign[m] = 0; a_mag[m] = '0; b_mag[m] = N'($urandom); end
      endcase
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a_sign = '0; b_sign = '0; a_mag = '0; b_mag = '0;
    pending = 0; last_result = 0;
    repeat (3) @(posedge clk);
    #1;
    checks += 2;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid in reset"); end
    if (acc !== '0) begin failures++; $display("FAIL acc in reset"); end
    @(negedge clk); rst_n = 1'b1;

    for (int t = 0; t < 3000; t++) begin
      int kind;
      @(negedge clk);
      // result of the previous cycle (registered on the edge just passed)
      checks++;
      if (out_valid !== pending) begin
        failures++; $display("FAIL cycle %0d: out_valid=%b expected %b", t, out_valid, pending);
      end
      if (pending) begin
        checks++;
        if (longint'(acc) != expected) begin
          failures++; $display("FAIL cycle %0d: acc=%0d expected %0d", t, acc, expected);
        end
        last_result = expected;
      end else if (t > 0) begin
        checks++;
        if (longint'(acc) != last_result) begin
          failures++; $display("FAIL cycle %0d: acc changed while idle", t);
        end else n_hold++;
      end
      // next operation
      in_valid = ($urandom_range(0, 9) != 0) || t < 5;
      kind = (t < 5) ? t : (($urandom_range(0, 19) == 0) ? $urandom_range(1, 4) : 0);
      drive(kind);
      if (!in_valid) begin
        // changing operands while idle must not disturb acc
        a_mag[0] = ~a_mag[0];
      end
      expected = ref_mac();
      pending  = in_valid;
      if (in_valid) begin
        for (int m = 0; m < M; m++)
          if ((a_sign[m] ^ b_sign[m]) && a_mag[m] != 0 && b_mag[m] != 0) n_neg_lane++;
          else if ((a_sign[m] ^ b_sign[m]) && (a_mag[m] == 0 || b_mag[m] == 0)) n_neg_zero++;
        if (a_sign == '0 && b_sign == '0) n_unsigned++;
        if (expected ==  longint'(M) * ((1 << N) - 1) * ((1 << N) - 1)) n_max_pos++;
        if (expected == -longint'(M) * ((1 << N) - 1) * ((1 << N) - 1)) n_max_neg++;
      end
    end

    $display("mechanisms: neg_lane=%0d neg_zero=%0d unsigned_op=%0d max_pos=%0d max_neg=%0d idle_hold=%0d",
             n_neg_lane, n_neg_zero, n_unsigned, n_max_pos, n_max_neg, n_hold);
    checks += 6;
    if (n_neg_lane == 0) failures++;
    if (n_neg_zero == 0) failures++;
    if (n_unsigned == 0) failures++;
    if (n_max_pos == 0) failures++;
    if (n_max_neg == 0) failures++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
