// tb_p256_mul: random 256 x 256-bit products against the '*' operator,
// including all-ones and zero operands, and the 16-clock latency of the
// 16-bit digit-serial schedule.
module tb_p256_mul;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [255:0] a, b;
  logic [511:0] c;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  p256_mul dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 8; i++) begin a[32*i +: 32] = $urandom; b[32*i +: 32] = $urandom; end
      if (t == 0) begin a = '1; b = '1; end
      if (t == 1) begin a = '1; b = '0; end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 0;   // clock edges after the one that sampled start
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (c != {256'd0, a} * {256'd0, b}) begin
        failures++; $display("FAIL product %0d", t);
      end
      checks++;
      if (lat != 16) begin
        failures++; $display("FAIL latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
