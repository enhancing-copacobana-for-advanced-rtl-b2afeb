// tb_p256_reduce: reduction of 512-bit values modulo the P-256 prime against
// the '%' operator: products of reduced operands (the unit's use), arbitrary
// 512-bit values, and edge values (0, p, p-1, 2^512-1).
module tb_p256_reduce;
  import copa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [511:0] c;
  logic [255:0] r;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  p256_reduce dut (.clk, .rst_n, .start, .c, .busy, .done, .r);

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [511:0] e, x, y;
    int lat;
    c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      for (int i = 0; i < 16; i++) begin x[32*i +: 32] = $urandom; y[32*i +: 32] = $urandom; end
      if (t % 2 == 0) c = (x % {256'd0, P256}) * (y % {256'd0, P256});
      else            c = x;
      if (t == 0) c = '0;
      if (t == 1) c = {256'd0, P256};
      if (t == 2) c = {256'd0, P256 - 256'd1};
      if (t == 3) c = '1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 0;   // clock edges after the one that sampled start
      while (!done) begin @(negedge clk); lat++; end
      e = c % {256'd0, P256};
      checks++;
      if (r != e[255:0]) begin
        failures++; $display("FAIL reduce %0d", t);
      end
      checks++;
      if (lat < 10 || lat > 20) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
