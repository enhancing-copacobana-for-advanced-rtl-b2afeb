// bus_master: the controller FPGA's driver of the shared backplane bus.
//
// The controller is the only master of the backplane (64-bit data, 16-bit
// address). Commands arrive from the controller's host side (in the machine,
// the embedded processor that runs the network stack towards the host PC)
// over a valid/ready handshake, one at a time. A write is placed on the bus
// for one clock and acknowledged at once. A read is placed on the bus for one
// clock, after which the master waits for the addressed module to return data
// (rvalid); if nothing answers within TIMEOUT clocks (an absent or powered-down
// module) the read completes with 'rsp_timeout' set and zero data.
//
// Interface: cmd_* is the command handshake; rsp_valid pulses once per command
// with rsp_rdata / rsp_timeout (writes return zero data). bp is the registered
// bus request, bp_rsp the OR of all modules' returns.
// Timing: a write takes 2 clocks, a read 2 clocks plus the module's latency.
module bus_master
  import copa_pkg::*;
#(
  parameter int unsigned TIMEOUT = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic                  cmd_write,
  input  logic [BUS_ADDR_W-1:0] cmd_addr,
  input  logic [BUS_DATA_W-1:0] cmd_wdata,
  output logic                  rsp_valid,
  output logic [BUS_DATA_W-1:0] rsp_rdata,
  output logic                  rsp_timeout,
  output bp_req_t               bp,
  input  bus_rsp_t              bp_rsp
);
  typedef enum logic [1:0] { M_IDLE, M_ISSUE, M_WAIT } mstate_e;
  mstate_e                      st_q;
  logic [$clog2(TIMEOUT+1)-1:0] tmo_q;
  logic                         is_rd_q;

  assign cmd_ready = (st_q == M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= M_IDLE;
      tmo_q       <= '0;
      is_rd_q     <= 1'b0;
      bp          <= '0;
      rsp_valid   <= 1'b0;
      rsp_rdata   <= '0;
      rsp_timeout <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      bp.rd     <= 1'b0;
      bp.wr     <= 1'b0;
      unique case (st_q)
        M_IDLE: if (cmd_valid) begin
          bp.addr  <= cmd_addr;
          bp.wdata <= cmd_write ? cmd_wdata : '0;
          bp.wr    <= cmd_write;
          bp.rd    <= !cmd_write;
          is_rd_q  <= !cmd_write;
          st_q     <= M_ISSUE;
        end
        M_ISSUE: begin
          if (is_rd_q) begin
            tmo_q <= '0;
            st_q  <= M_WAIT;
          end else begin
            rsp_valid   <= 1'b1;
            rsp_rdata   <= '0;
            rsp_timeout <= 1'b0;
            st_q        <= M_IDLE;
          end
        end
        M_WAIT: begin
          if (bp_rsp.rvalid || tmo_q == TIMEOUT[$clog2(TIMEOUT+1)-1:0]) begin
            rsp_valid   <= 1'b1;
            rsp_rdata   <= bp_rsp.rvalid ? bp_rsp.rdata : '0;
            rsp_timeout <= !bp_rsp.rvalid;
            st_q        <= M_IDLE;
          end
          tmo_q <= tmo_q + 1'b1;
        end
        default: st_q <= M_IDLE;
      endcase
    end
  end

  // one command at a time: a new bus access never starts while a read waits
  a_single_access: assert property (@(posedge clk) disable iff (!rst_n)
    (bp.rd || bp.wr) |-> !(bp.rd && bp.wr));
endmodule
