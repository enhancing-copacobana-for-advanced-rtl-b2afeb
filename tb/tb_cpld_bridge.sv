// tb_cpld_bridge: module 3's CPLD between a driven backplane and eight model
// FPGAs (register arrays answering one clock after a local-bus read).
// Checks: accesses to other modules are ignored; writes reach the addressed
// FPGA with their fields intact; reads come back 3 clocks after the bus cycle
// with the right data; the CPLD's own registers (done bitmap, monitor status,
// module number, first finished FPGA) answer after 1 clock and do not appear
// on the local bus.
module tb_cpld_bridge;
  import copa_pkg::*;
  localparam int unsigned MID = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  bp_req_t  bp;
  bus_rsp_t bp_rsp;
  lb_req_t  lb;
  bus_rsp_t lb_rsp [8];
  logic [7:0] fpga_done = '0, mon_hot = '0;
  logic mon_shutdown = 1'b0;
  logic [7:0] mon_temp_max = '0;
  int checks = 0, failures = 0;
  int lb_accesses = 0;

  always #5 clk = ~clk;

  cpld_bridge #(.MODULE_ID(MID)) dut (.clk, .rst_n, .bp, .bp_rsp, .lb, .lb_rsp, .fpga_done,
                                      .mon_shutdown, .mon_temp_max, .mon_hot);

  logic [63:0] fmem [8][512];
  for (genvar f = 0; f < 8; f++) begin : g_f
    always @(posedge clk) begin
      lb_rsp[f] <= '0;
      if (lb.fpga == 3'(f)) begin
        if (lb.wr) fmem[f][lb.addr] <= lb.wdata;
        if (lb.rd) begin lb_rsp[f].rvalid <= 1'b1; lb_rsp[f].rdata <= fmem[f][lb.addr]; end
      end
    end
  end
  always @(posedge clk) if (lb.rd || lb.wr) lb_accesses++;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one bus cycle; returns the read data and the clocks until rvalid (0: none in 8)
  task automatic cycle(input bit wr, input logic [15:0] addr, input logic [63:0] wd,
                       output logic [63:0] rd, output int lat);
    @(negedge clk);
    bp.rd = !wr; bp.wr = wr; bp.addr = addr; bp.wdata = wd;
    @(negedge clk);
    bp = '0;
    lat = 0;
    rd = '0;
    for (int i = 1; i <= 8; i++) begin
      if (bp_rsp.rvalid && lat == 0) begin lat = i; rd = bp_rsp.rdata; end
      @(negedge clk);
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [63:0] model [8][512];
    logic [63:0] rd, wd;
    logic [2:0]  f;
    logic [8:0]  r;
    int lat, n_prev;
    bp = '0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 512; j++) begin fmem[i][j] = '0; model[i][j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      f = 3'($urandom); r = {3'($urandom_range(6, 0)), 6'($urandom)};
      wd = {$urandom, $urandom};
      if (t % 3 == 0) begin
        cycle(1'b1, {4'(MID), f, r}, wd, rd, lat);
        model[f][r] = wd;
      end else if (t % 3 == 1) begin
        cycle(1'b0, {4'(MID), f, r}, '0, rd, lat);
        checks++;
        if (lat != 3 || rd != model[f][r]) begin
          failures++; $display("FAIL read fpga %0d reg %0h lat %0d", f, r, lat);
        end
      end else begin
        // another module's address: nothing happens here
        n_prev = lb_accesses;
        cycle($urandom_range(1, 0) == 1, {4'(MID + 1 + $urandom_range(11, 0)), f, r}, wd, rd, lat);
        checks++;
        if (lat != 0 || lb_accesses != n_prev) begin failures++; $display("FAIL foreign access seen"); end
      end
    end
    // CPLD registers
    fpga_done = 8'b0010_1000; mon_hot = 8'h04; mon_temp_max = 8'd81; mon_shutdown = 1'b1;
    n_prev = lb_accesses;
    cycle(1'b0, {4'(MID), 3'd0, CPLD_SLOT, CPLD_REG_DONE}, '0, rd, lat);
    chk(lat == 1 && rd == 64'h28, "done bitmap");
    cycle(1'b0, {4'(MID), 3'd5, CPLD_SLOT, CPLD_REG_MON}, '0, rd, lat);
    chk(lat == 1 && rd == 64'h045101, "monitor register");
    cycle(1'b0, {4'(MID), 3'd0, CPLD_SLOT, CPLD_REG_ID}, '0, rd, lat);
    chk(lat == 1 && rd == 64'd3, "module number");
    cycle(1'b0, {4'(MID), 3'd0, CPLD_SLOT, 6'd3}, '0, rd, lat);
    chk(lat == 1 && rd == 64'h103, "first finished FPGA");
    fpga_done = '0;
    cycle(1'b0, {4'(MID), 3'd0, CPLD_SLOT, 6'd3}, '0, rd, lat);
    chk(rd[8] == 1'b0, "no finished FPGA");
    chk(lb_accesses == n_prev, "CPLD registers stay off the local bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
