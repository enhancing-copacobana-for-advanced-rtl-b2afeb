// copacobana_top: the FPGA cluster: one controller, N_MODULES plug-in modules
// of N_FPGAS compute FPGAs each (16 x 8 = 128 by default), joined by a shared
// backplane bus and a system-management bus.
//
// Communication is hierarchical in three tiers. The host (outside this design)
// talks to the controller, whose bus_master drives the shared backplane bus
// (64-bit data, 16-bit address). On each module a CPLD (cpld_bridge) drives
// that module's local bus to its eight FPGAs and condenses their state into a
// few registers, so the controller need not poll every FPGA. The same CPLD
// watches the FPGAs' temperatures (cpld_monitor), switches the module's power
// off when one gets too hot, and answers on the two-wire management bus
// (smbus_client, address SMB_BASE + module number). A module that is switched
// off holds its FPGAs in reset.
//
// Every compute FPGA (v4_node) is loaded with one application: the first
// N_MODULES - N_ECM_MODULES modules run six ECDSA P-256 cores per FPGA, the
// last N_ECM_MODULES modules run ECM phase-1 cores.
//
// Ports: the controller's command/response handshake towards the host side
// (see bus_master), per-FPGA temperatures, per-module power enables and the
// management bus pins (open drain: smb_sda_pull = 1 pulls SDA low).
// Timing: the whole model runs on one clock; a read of an FPGA register takes
// 5 clocks from command to response, a write 2 clocks.
module copacobana_top
  import copa_pkg::*;
#(
  parameter int unsigned N_MODULES     = 16,
  parameter int unsigned N_FPGAS       = 8,
  parameter int unsigned N_ECM_MODULES = 1,
  parameter int unsigned N_ECDSA_CORES = 6,
  parameter int unsigned N_ECM_CORES   = 4,
  parameter int unsigned ECM_NBITS     = 151,
  parameter int unsigned ECM_KBITS     = 980,
  parameter logic [6:0]  SMB_BASE      = 7'h20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // controller, host side
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic                  cmd_write,
  input  logic [BUS_ADDR_W-1:0] cmd_addr,
  input  logic [BUS_DATA_W-1:0] cmd_wdata,
  output logic                  rsp_valid,
  output logic [BUS_DATA_W-1:0] rsp_rdata,
  output logic                  rsp_timeout,
  // plug-in modules
  input  logic [7:0]            temp     [N_MODULES][N_FPGAS],
  output logic [N_MODULES-1:0]  power_en,
  // system management bus
  input  logic                  smb_scl_i,
  input  logic                  smb_sda_i,
  output logic                  smb_sda_pull
);
  bp_req_t                bp;
  bus_rsp_t               mod_rsp [N_MODULES];
  bus_rsp_t               bp_rsp;
  logic [N_MODULES-1:0]   sda_pull;

  bus_master u_master (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_wdata,
    .rsp_valid, .rsp_rdata, .rsp_timeout, .bp, .bp_rsp);

  // modules that are not addressed return zeros: the shared bus is their OR
  always_comb begin
    bp_rsp = '0;
    for (int m = 0; m < N_MODULES; m++) bp_rsp = bp_rsp | mod_rsp[m];
  end
  assign smb_sda_pull = |sda_pull;

  for (genvar m = 0; m < N_MODULES; m++) begin : g_mod
    localparam app_e APP = (m >= N_MODULES - N_ECM_MODULES) ? APP_ECM : APP_ECDSA;

    lb_req_t              lb;
    bus_rsp_t             lb_rsp [N_FPGAS];
    logic [N_FPGAS-1:0]   fpga_done, hot;
    logic                 shutdown, clear, node_rst_n;
    logic [7:0]           temp_max;

    cpld_bridge #(.MODULE_ID(m), .N_FPGAS(N_FPGAS)) u_cpld (
      .clk, .rst_n, .bp, .bp_rsp(mod_rsp[m]), .lb, .lb_rsp, .fpga_done,
      .mon_shutdown(shutdown), .mon_temp_max(temp_max), .mon_hot(hot));

    cpld_monitor #(.N_FPGAS(N_FPGAS)) u_mon (
      .clk, .rst_n, .temp(temp[m]), .clear, .power_en(power_en[m]),
      .shutdown, .hot, .temp_max);

    smbus_client #(.SMB_ADDR(SMB_BASE + 7'(m)), .N_FPGAS(N_FPGAS)) u_smb (
      .clk, .rst_n, .scl_i(smb_scl_i), .sda_i(smb_sda_i), .sda_pull(sda_pull[m]),
      .temp(temp[m]), .hot, .shutdown, .temp_max, .clear);

    assign node_rst_n = rst_n && power_en[m];

    for (genvar f = 0; f < N_FPGAS; f++) begin : g_fpga
      v4_node #(.APP(APP), .FPGA_ID(f), .N_ECDSA_CORES(N_ECDSA_CORES),
                .N_ECM_CORES(N_ECM_CORES), .ECM_NBITS(ECM_NBITS), .ECM_KBITS(ECM_KBITS)) u_node (
        .clk, .rst_n(node_rst_n), .lb, .lb_rsp(lb_rsp[f]), .done(fpga_done[f]));
    end
  end
endmodule
