// tb_smbus_client: a bit-banged SMBus master (SCL period 40 clocks) against
// the client at address 0x23. Checks Read Byte of all eight temperatures and
// of the status registers, a two-byte read (ACK, then NACK), that another
// address is not acknowledged, and that Write Byte to command 16 pulses
// 'clear' exactly once.
module tb_smbus_client;
  localparam logic [6:0] ADDR = 7'h23;
  localparam int HALF = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scl = 1'b1, sda_m = 1'b1, sda_pull, sda_line, clear;
  logic [7:0] temp [8];
  logic [7:0] hot = 8'h41, temp_max = 8'd77;
  logic shutdown = 1'b1;
  int checks = 0, failures = 0, clears = 0;

  always #5 clk = ~clk;
  assign sda_line = sda_m && !sda_pull;
  always @(posedge clk) if (clear) clears++;

  smbus_client #(.SMB_ADDR(ADDR)) dut (.clk, .rst_n, .scl_i(scl), .sda_i(sda_line), .sda_pull,
                                       .temp, .hot, .shutdown, .temp_max, .clear);

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hp(); repeat (HALF) @(posedge clk); endtask
  task automatic i2c_start(); sda_m = 1; hp(); scl = 1; hp(); sda_m = 0; hp(); scl = 0; hp(); endtask
  task automatic i2c_stop();  sda_m = 0; hp(); scl = 1; hp(); sda_m = 1; hp(); endtask
  task automatic wr_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin sda_m = b[i]; hp(); scl = 1; hp(); scl = 0; end
    sda_m = 1; hp(); scl = 1; hp(); ack = !sda_line; scl = 0;
  endtask
  task automatic rd_byte(input bit ack, output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin hp(); scl = 1; hp(); b[i] = sda_line; scl = 0; end
    sda_m = !ack; hp(); scl = 1; hp(); scl = 0; hp(); sda_m = 1;
  endtask
  task automatic read_reg(input logic [7:0] cmd, output logic [7:0] v, output bit ok);
    bit a1, a2, a3;
    i2c_start(); wr_byte({ADDR, 1'b0}, a1); wr_byte(cmd, a2);
    i2c_start(); wr_byte({ADDR, 1'b1}, a3); rd_byte(1'b0, v); i2c_stop();
    ok = a1 && a2 && a3;
  endtask
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] v, v2;
    bit ok, a1, a2, a3;
    for (int i = 0; i < 8; i++) temp[i] = 8'($urandom_range(90, 10));
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    hp();
    for (int i = 0; i < 8; i++) begin
      read_reg(8'(i), v, ok);
      chk(ok && v == temp[i], $sformatf("temperature %0d", i));
    end
    read_reg(8'd8, v, ok);  chk(ok && v == hot, "hot bitmap");
    read_reg(8'd9, v, ok);  chk(ok && v == 8'd1, "shutdown flag");
    read_reg(8'd10, v, ok); chk(ok && v == temp_max, "hottest temperature");
    // two bytes in one read
    i2c_start(); wr_byte({ADDR, 1'b0}, a1); wr_byte(8'd3, a2);
    i2c_start(); wr_byte({ADDR, 1'b1}, a3); rd_byte(1'b1, v); rd_byte(1'b0, v2); i2c_stop();
    chk(a1 && a2 && a3 && v == temp[3] && v2 == temp[3], "two-byte read");
    // another address: no ACK
    i2c_start(); wr_byte({ADDR + 7'd1, 1'b0}, a1); i2c_stop();
    chk(!a1, "foreign address not acknowledged");
    chk(clears == 0, "no clear yet");
    // Write Byte: clear the shutdown
    i2c_start(); wr_byte({ADDR, 1'b0}, a1); wr_byte(8'd16, a2); wr_byte(8'd1, a3); i2c_stop();
    hp();
    chk(a1 && a2 && a3 && clears == 1, "write byte clears once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
