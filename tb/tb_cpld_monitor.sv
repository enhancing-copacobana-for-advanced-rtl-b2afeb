// tb_cpld_monitor: over-temperature shutdown: power stays on below 80 C,
// drops on the clock after any FPGA reaches 80 C, stays off when the
// temperature falls, ignores 'clear' while still hot, and comes back on
// 'clear' once cool. Also checks the hottest-temperature and hot-bitmap outputs.
module tb_cpld_monitor;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [7:0] temp [8];
  logic power_en, shutdown;
  logic [7:0] hot, temp_max;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpld_monitor dut (.clk, .rst_n, .temp, .clear, .power_en, .shutdown, .hot, .temp_max);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0b expected %0b", what, got, exp); end
  endtask

  initial begin
    int hottest, idx;
    for (int i = 0; i < 8; i++) temp[i] = 8'd40 + 8'(i);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random cool temperatures: power stays on, max and bitmap track
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      hottest = 0;
      for (int i = 0; i < 8; i++) begin
        temp[i] = 8'($urandom_range(79, 20));
        if (temp[i] > hottest) hottest = temp[i];
      end
      #1;
      checks++;
      if (temp_max != 8'(hottest) || hot != 8'd0) begin failures++; $display("FAIL max/hot"); end
      @(negedge clk);
      expect_bit(power_en, 1'b1, "power while cool");
    end
    // one FPGA reaches the limit
    idx = $urandom_range(7, 0);
    @(negedge clk) temp[idx] = 8'd80;
    #1 checks++;
    if (hot != 8'(1 << idx)) begin failures++; $display("FAIL hot bitmap"); end
    @(negedge clk) expect_bit(power_en, 1'b0, "power off at 80 C");
    temp[idx] = 8'd60;
    repeat (5) @(negedge clk);
    expect_bit(power_en, 1'b0, "stays off when cool");
    // clear while hot is ignored
    temp[idx] = 8'd95; clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    @(negedge clk) expect_bit(power_en, 1'b0, "clear ignored while hot");
    temp[idx] = 8'd50;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    expect_bit(power_en, 1'b1, "clear re-enables");
    expect_bit(shutdown, 1'b0, "shutdown cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
