// tb_bus_master: the controller's bus cycles against a model of the modules:
// a register array that answers reads after a random latency of 1..6 clocks,
// except module 15, which never answers. Checks that writes reach the bus
// intact, reads return the stored data, an unanswered read ends with the
// timeout flag after 16 clocks, and only one access is on the bus at a time.
module tb_bus_master;
  import copa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, cmd_write = 1'b0;
  logic [15:0] cmd_addr = '0;
  logic [63:0] cmd_wdata = '0, rsp_rdata;
  logic rsp_valid, rsp_timeout;
  bp_req_t  bp;
  bus_rsp_t bp_rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_master dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_wdata,
                  .rsp_valid, .rsp_rdata, .rsp_timeout, .bp, .bp_rsp);

  // module model
  logic [63:0] mem [256];
  int          pending = -1;
  logic [63:0] pend_data;
  int          outstanding = 0;
  always @(posedge clk) begin
    bp_rsp <= '0;
    if (bp.wr) mem[bp.addr[7:0]] <= bp.wdata;
    if (bp.rd && bp.addr[15:12] != 4'hF) begin
      pending   <= $urandom_range(5, 0);
      pend_data <= mem[bp.addr[7:0]];
    end else if (pending > 0) pending <= pending - 1;
    else if (pending == 0) begin
      bp_rsp.rvalid <= 1'b1;
      bp_rsp.rdata  <= pend_data;
      pending       <= -1;
    end
    if (bp.rd || bp.wr) begin
      outstanding++;
    end
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit wr, input logic [15:0] addr, input logic [63:0] wd,
                        output logic [63:0] rd, output bit tmo, output int lat);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_write = wr; cmd_addr = addr; cmd_wdata = wd;
    @(negedge clk) cmd_valid = 1'b0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    rd = rsp_rdata; tmo = rsp_timeout;
  endtask

  initial begin
    logic [63:0] model [256];
    logic [63:0] rd, wd;
    logic [15:0] ad;
    bit tmo;
    int lat, n_before;
    for (int i = 0; i < 256; i++) begin mem[i] = '0; model[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      ad = {4'($urandom_range(14, 0)), 4'h0, 8'($urandom)};
      if ($urandom_range(1, 0) == 1) begin
        wd = {$urandom, $urandom};
        n_before = outstanding;
        access(1'b1, ad, wd, rd, tmo, lat);
        model[ad[7:0]] = wd;
        checks++;
        if (tmo || outstanding != n_before + 1) begin failures++; $display("FAIL write"); end
      end else begin
        access(1'b0, ad, '0, rd, tmo, lat);
        checks++;
        if (tmo || rd != model[ad[7:0]]) begin failures++; $display("FAIL read data"); end
      end
    end
    access(1'b0, 16'hF123, '0, rd, tmo, lat);
    checks++;
    if (!tmo || rd != '0 || lat < 16 || lat > 20) begin
      failures++; $display("FAIL timeout: tmo=%0b lat=%0d", tmo, lat);
    end
    // the next access after a timeout works again
    access(1'b0, 16'h0005, '0, rd, tmo, lat);
    checks++;
    if (tmo || rd != model[5]) begin failures++; $display("FAIL after timeout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
