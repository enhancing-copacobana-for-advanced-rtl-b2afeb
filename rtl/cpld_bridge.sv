// cpld_bridge: the plug-in module's CPLD as bus driver and bridge between the
// shared backplane bus and the module's local bus to its eight FPGAs, and as
// the first aggregation stage of the hierarchical communication model.
//
// Backplane addresses are { module[15:12], fpga[11:9], register[8:0] }. An
// access whose module field equals MODULE_ID is taken by this CPLD: register
// slot 7 (register[8:6] = 7) of any FPGA address is answered by the CPLD itself,
// everything else is forwarded one clock later on the local bus, where the
// addressed FPGA answers. FPGA read data is registered once more and returned
// to the backplane; modules that are not addressed return zeros, so the returns
// of all modules can be OR-ed onto the shared bus.
//
// Aggregation: instead of polling eight FPGAs, the controller reads from the
// CPLD
//   reg 0  bitmap of FPGAs with a finished result (their 'done' lines),
//   reg 1  monitor status { hot bitmap, hottest temperature, shutdown },
//   reg 2  module number,
//   reg 3  lowest-numbered FPGA with a finished result, bit 8 = any.
//
// Timing: a read through to an FPGA returns 3 clocks after it was on the
// backplane (CPLD register, FPGA register, CPLD return register); a read of a
// CPLD register returns after 1 clock.
module cpld_bridge
  import copa_pkg::*;
#(
  parameter int unsigned MODULE_ID = 0,
  parameter int unsigned N_FPGAS   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // backplane side
  input  bp_req_t            bp,
  output bus_rsp_t           bp_rsp,
  // local bus side
  output lb_req_t            lb,
  input  bus_rsp_t           lb_rsp [N_FPGAS],
  input  logic [N_FPGAS-1:0] fpga_done,
  // monitor
  input  logic               mon_shutdown,
  input  logic [7:0]         mon_temp_max,
  input  logic [N_FPGAS-1:0] mon_hot
);
  logic       sel, cpld_reg;
  logic [3:0] first_idx;
  logic       any_done;

  assign sel      = (bp.rd || bp.wr) && (bp.addr[15:ADDR_MOD_LSB] == 4'(MODULE_ID));
  assign cpld_reg = (bp.addr[8:6] == CPLD_SLOT);

  always_comb begin
    first_idx = '0;
    any_done  = 1'b0;
    for (int i = N_FPGAS - 1; i >= 0; i--)
      if (fpga_done[i]) begin
        first_idx = 4'(i);
        any_done  = 1'b1;
      end
  end

  bus_rsp_t lb_or;
  always_comb begin
    lb_or = '0;
    for (int i = 0; i < N_FPGAS; i++) lb_or = lb_or | lb_rsp[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb     <= '0;
      bp_rsp <= '0;
    end else begin
      // forward to the local bus
      lb.rd <= 1'b0;
      lb.wr <= 1'b0;
      if (sel && !cpld_reg) begin
        lb.rd    <= bp.rd;
        lb.wr    <= bp.wr;
        lb.fpga  <= bp.addr[ADDR_MOD_LSB-1:ADDR_FPGA_LSB];
        lb.addr  <= bp.addr[ADDR_FPGA_LSB-1:0];
        lb.wdata <= bp.wdata;
      end
      // return path
      bp_rsp <= '0;
      if (sel && cpld_reg && bp.rd) begin
        bp_rsp.rvalid <= 1'b1;
        unique case (bp.addr[5:0])
          CPLD_REG_DONE: bp_rsp.rdata <= 64'(fpga_done);
          CPLD_REG_MON:  bp_rsp.rdata <= 64'({mon_hot, mon_temp_max, 7'd0, mon_shutdown});
          CPLD_REG_ID:   bp_rsp.rdata <= 64'(MODULE_ID);
          6'd3:          bp_rsp.rdata <= 64'({any_done, 4'd0, first_idx});
          default:       bp_rsp.rdata <= '0;
        endcase
      end else if (lb_or.rvalid) begin
        bp_rsp <= lb_or;
      end
    end
  end
endmodule
