// tb_mont_mul: Montgomery products for random odd 151-bit moduli, checked as
// r * 2^153 == a * b (mod n) with r < n, plus the D+1 = 10 clock latency.
// The constant -n^(-1) mod 2^17 is found here bit by bit (Hensel lifting).
module tb_mont_mul;
  localparam int unsigned W = 151, D = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] a, b, n, r;
  logic [16:0]  np;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_mul dut (.clk, .rst_n, .start, .a, .b, .n, .nprime(np), .busy, .done, .r);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // smallest x with n*x == -1 mod 2^17, one bit at a time
  function automatic logic [16:0] negate_inverse(logic [16:0] n0);
    logic [16:0] x;
    x = '0;
    for (int i = 0; i < 17; i++)
      if (17'(17'(n0 * x) + 17'd1) & (17'd1 << i)) x = x | (17'd1 << i);
    return x;
  endfunction

  initial begin
    logic [2*W+D*17-1:0] lhs, rhs, big_n;
    int lat;
    a = '0; b = '0; n = '1; np = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 5; i++) n[32*i +: 32] = (i == 4) ? 32'($urandom) : $urandom;
      n[W-1] = 1'b1; n[0] = 1'b1;
      if (t == 1) n = '1;
      for (int i = 0; i < 5; i++) begin a[32*i +: 32] = $urandom; b[32*i +: 32] = $urandom; end
      a = a % n; b = b % n;
      if (t == 0) begin a = n - 1; b = n - 1; end
      np = negate_inverse(n[16:0]);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 0;   // clock edges after the one that sampled start
      while (!done) begin @(negedge clk); lat++; end
      big_n = {{(W+D*17){1'b0}}, n};
      lhs = ({{(W+D*17){1'b0}}, r} << (D*17)) % big_n;
      rhs = ({{(W+D*17){1'b0}}, a} * {{(W+D*17){1'b0}}, b}) % big_n;
      checks++;
      if (lhs != rhs || r >= n) begin
        failures++; $display("FAIL montgomery product %0d", t);
      end
      checks++;
      if (lat != D + 1) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
