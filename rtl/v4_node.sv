// v4_node: one compute FPGA of a plug-in module, carrying several copies of an
// application core behind a register interface on the module's local bus.
//
// APP selects what the FPGA is loaded with: APP_ECDSA gives N_ECDSA_CORES
// P-256 point-multiplication cores (ecdsa_core), APP_ECM gives N_ECM_CORES
// ECM phase-1 cores (ecm_core). Each core owns one register slot,
// slot = register[8:6]; inside a slot, word = register[5:0] (64-bit words,
// least significant word first):
//   ECDSA  0-3 k, 4-7 l, 8-11 Px, 12-15 Py, 16-19 Qx, 20-23 Qy
//   ECM    0-3 n, 4-7 a24, 8-11 x0, 12-15 z0, 16-31 k (inputs in the
//          Montgomery domain, see ecm_core)
//   32     write: bit 0 starts the core, bit 1 selects kP + lQ (ECDSA);
//          read: { inf, done, busy } in bits 2..0
//   40-51  results: ECDSA X, Y, Z (4 words each); ECM X, Z
// Words 0-31 read back what was written. 'done' of a core is sticky until its
// next start; the node's 'done' output (to the CPLD) is the OR over its cores.
//
// Timing: writes take effect on the clock after they appear on the local bus;
// reads return one clock later with rvalid. Only the FPGA whose number matches
// FPGA_ID answers.
module v4_node
  import copa_pkg::*;
#(
  parameter app_e        APP           = APP_ECDSA,
  parameter int unsigned FPGA_ID       = 0,
  parameter int unsigned N_ECDSA_CORES = 6,
  parameter int unsigned N_ECM_CORES   = 4,
  parameter int unsigned ECM_NBITS     = 151,
  parameter int unsigned ECM_KBITS     = 980
) (
  input  logic     clk,
  input  logic     rst_n,
  input  lb_req_t  lb,
  output bus_rsp_t lb_rsp,
  output logic     done
);
  localparam int unsigned NC = (APP == APP_ECDSA) ? N_ECDSA_CORES : N_ECM_CORES;

  logic [63:0]   stage  [NC][32];
  logic [63:0]   result [NC][12];
  logic [NC-1:0] start, busy, core_done, fin_q, inf;

  logic       me;
  logic [2:0] slot;
  logic [5:0] word;
  assign me   = (lb.fpga == 3'(FPGA_ID));
  assign slot = lb.addr[8:6];
  assign word = lb.addr[5:0];

  always_comb begin
    start = '0;
    if (me && lb.wr && word == CORE_REG_CTRL && 32'(slot) < NC && lb.wdata[0])
      start[slot] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_rsp <= '0;
      fin_q  <= '0;
      for (int c = 0; c < NC; c++)
        for (int w = 0; w < 32; w++) stage[c][w] <= '0;
    end else begin
      for (int c = 0; c < NC; c++) begin
        if (start[c])          fin_q[c] <= 1'b0;
        else if (core_done[c]) fin_q[c] <= 1'b1;
      end
      if (me && lb.wr && 32'(slot) < NC) begin
        if (word < 6'd32) stage[slot][word[4:0]] <= lb.wdata;
      end
      lb_rsp <= '0;
      if (me && lb.rd) begin
        lb_rsp.rvalid <= 1'b1;
        if (32'(slot) < NC) begin
          if (word < 6'd32)
            lb_rsp.rdata <= stage[slot][word[4:0]];
          else if (word == CORE_REG_CTRL)
            lb_rsp.rdata <= 64'({inf[slot], fin_q[slot], busy[slot]});
          else if (word >= CORE_REG_OUT0 && word < CORE_REG_OUT0 + 6'd12)
            lb_rsp.rdata <= result[slot][4'(word - CORE_REG_OUT0)];
        end
      end
    end
  end

  assign done = |fin_q;

  for (genvar c = 0; c < NC; c++) begin : g_core
    if (APP == APP_ECDSA) begin : g_ecdsa
      logic [255:0] xo, yo, zo;
      ecdsa_core u_core (
        .clk, .rst_n, .start(start[c]), .mode(lb.wdata[1]),
        .k ({stage[c][3],  stage[c][2],  stage[c][1],  stage[c][0]}),
        .l ({stage[c][7],  stage[c][6],  stage[c][5],  stage[c][4]}),
        .px({stage[c][11], stage[c][10], stage[c][9],  stage[c][8]}),
        .py({stage[c][15], stage[c][14], stage[c][13], stage[c][12]}),
        .qx({stage[c][19], stage[c][18], stage[c][17], stage[c][16]}),
        .qy({stage[c][23], stage[c][22], stage[c][21], stage[c][20]}),
        .busy(busy[c]), .done(core_done[c]), .inf(inf[c]),
        .x_o(xo), .y_o(yo), .z_o(zo));
      for (genvar w = 0; w < 4; w++) begin : g_out
        assign result[c][w]     = xo[64*w +: 64];
        assign result[c][4 + w] = yo[64*w +: 64];
        assign result[c][8 + w] = zo[64*w +: 64];
      end
    end else begin : g_ecm
      logic [ECM_NBITS-1:0] xo, zo;
      logic [255:0]         nn, aa, xx, zz;
      logic [1023:0]        kk;
      assign nn = {stage[c][3],  stage[c][2],  stage[c][1],  stage[c][0]};
      assign aa = {stage[c][7],  stage[c][6],  stage[c][5],  stage[c][4]};
      assign xx = {stage[c][11], stage[c][10], stage[c][9],  stage[c][8]};
      assign zz = {stage[c][15], stage[c][14], stage[c][13], stage[c][12]};
      for (genvar w = 0; w < 16; w++) begin : g_k
        assign kk[64*w +: 64] = stage[c][16 + w];
      end
      ecm_core #(.NBITS(ECM_NBITS), .KBITS(ECM_KBITS)) u_core (
        .clk, .rst_n, .start(start[c]),
        .n(nn[ECM_NBITS-1:0]), .a24(aa[ECM_NBITS-1:0]),
        .x0(xx[ECM_NBITS-1:0]), .z0(zz[ECM_NBITS-1:0]), .k(kk[ECM_KBITS-1:0]),
        .busy(busy[c]), .done(core_done[c]), .x_o(xo), .z_o(zo));
      assign inf[c] = 1'b0;
      for (genvar w = 0; w < 4; w++) begin : g_out
        localparam int unsigned LO = 64 * w;
        assign result[c][w]     = (LO < ECM_NBITS) ? 64'(xo >> LO) : '0;
        assign result[c][4 + w] = (LO < ECM_NBITS) ? 64'(zo >> LO) : '0;
      end
      for (genvar w = 8; w < 12; w++) begin : g_zero
        assign result[c][w] = '0;
      end
    end
  end
endmodule
