// tb_copacobana_top: end-to-end run of a reduced cluster (2 modules of 2
// FPGAs; module 0 runs ECDSA with 2 cores per FPGA, module 1 runs ECM with one
// core per FPGA and 64-bit scalars). The testbench plays the host behind the
// controller and the system-management master.
// Mechanisms exercised and counted (each must happen at least once):
//   kP and kP + lQ on ECDSA cores, ECM phase 1, the CPLD's aggregated status
//   registers, a bus read that times out (absent module, powered-down
//   module), a thermal shutdown, SMBus reads and the SMBus write that powers a
//   module up again.
module tb_copacobana_top;
  import copa_pkg::*;
  import p256_ref_pkg::*;
  localparam int NM = 2, NF = 2, HALF = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, cmd_write = 1'b0;
  logic [15:0] cmd_addr = '0;
  logic [63:0] cmd_wdata = '0, rsp_rdata;
  logic rsp_valid, rsp_timeout;
  logic [7:0] temp [NM][NF];
  logic [NM-1:0] power_en;
  logic scl = 1'b1, sda_m = 1'b1, sda_pull, sda_line;
  int checks = 0, failures = 0;
  int n_kp = 0, n_kplq = 0, n_ecm = 0, n_aggr = 0, n_tmo = 0, n_shutdown = 0, n_smb_rd = 0, n_smb_clr = 0;

  always #5 clk = ~clk;
  assign sda_line = sda_m && !sda_pull;

  copacobana_top #(.N_MODULES(NM), .N_FPGAS(NF), .N_ECM_MODULES(1), .N_ECDSA_CORES(2),
                   .N_ECM_CORES(1), .ECM_KBITS(64)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_wdata,
    .rsp_valid, .rsp_rdata, .rsp_timeout, .temp, .power_en,
    .smb_scl_i(scl), .smb_sda_i(sda_line), .smb_sda_pull(sda_pull));

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- host
  function automatic logic [15:0] ad(int m, int f, int slot, int word);
    return {4'(m), 3'(f), 3'(slot), 6'(word)};
  endfunction
  task automatic host(input bit wr, input logic [15:0] a, input logic [63:0] d,
                      output logic [63:0] r, output bit tmo);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_write = wr; cmd_addr = a; cmd_wdata = d;
    @(negedge clk) cmd_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    r = rsp_rdata; tmo = rsp_timeout;
  endtask
  task automatic wr(input logic [15:0] a, input logic [63:0] d);
    logic [63:0] r; bit t;
    host(1'b1, a, d, r, t);
  endtask
  task automatic rd(input logic [15:0] a, output logic [63:0] r);
    bit t;
    host(1'b0, a, '0, r, t);
    chk(!t, "read answered");
  endtask
  task automatic wr_wide(input int m, input int f, input int s, input int w0, input logic [255:0] v);
    for (int w = 0; w < 4; w++) wr(ad(m, f, s, w0 + w), v[64*w +: 64]);
  endtask
  task automatic rd_wide(input int m, input int f, input int s, input int w0, output logic [255:0] v);
    logic [63:0] r;
    for (int w = 0; w < 4; w++) begin rd(ad(m, f, s, w0 + w), r); v[64*w +: 64] = r; end
  endtask
  task automatic wait_done(input int m, input int f, input int s);
    logic [63:0] r;
    do begin repeat (500) @(negedge clk); rd(ad(m, f, s, 32), r); end while (!r[1]);
  endtask

  // ---------------------------------------------------------------- SMBus
  task automatic hp(); repeat (HALF) @(posedge clk); endtask
  task automatic i2c_start(); sda_m = 1; hp(); scl = 1; hp(); sda_m = 0; hp(); scl = 0; hp(); endtask
  task automatic i2c_stop();  sda_m = 0; hp(); scl = 1; hp(); sda_m = 1; hp(); endtask
  task automatic wr_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin sda_m = b[i]; hp(); scl = 1; hp(); scl = 0; end
    sda_m = 1; hp(); scl = 1; hp(); ack = !sda_line; scl = 0;
  endtask
  task automatic rd_byte(output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin hp(); scl = 1; hp(); b[i] = sda_line; scl = 0; end
    sda_m = 1; hp(); scl = 1; hp(); scl = 0; hp();   // NACK
  endtask
  task automatic smb_read(input logic [6:0] a, input logic [7:0] cmd, output logic [7:0] v, output bit ok);
    bit a1, a2, a3;
    i2c_start(); wr_byte({a, 1'b0}, a1); wr_byte(cmd, a2);
    i2c_start(); wr_byte({a, 1'b1}, a3); rd_byte(v); i2c_stop();
    ok = a1 && a2 && a3;
  endtask

  // ---------------------------------------------------------------- ECM helpers
  function automatic logic [150:0] mulm(logic [150:0] a, logic [150:0] b, logic [150:0] m);
    logic [301:0] t;
    t = ({151'd0, a} * {151'd0, b}) % {151'd0, m};
    return t[150:0];
  endfunction
  function automatic logic [150:0] to_mont(logic [150:0] a, logic [150:0] m);
    logic [303:0] t;
    t = ({153'd0, a} << 153) % {153'd0, m};
    return t[150:0];
  endfunction
  task automatic ecm_run(input int f, input logic [63:0] k, input logic [150:0] xm, input logic [150:0] zm,
                         output logic [150:0] xo, output logic [150:0] zo);
    logic [255:0] v;
    wr_wide(1, f, 0, 8, 256'(xm)); wr_wide(1, f, 0, 12, 256'(zm));
    wr(ad(1, f, 0, 16), k);
    wr(ad(1, f, 0, 32), 64'd1);
    wait_done(1, f, 0);
    rd_wide(1, f, 0, 40, v); xo = v[150:0];
    rd_wide(1, f, 0, 44, v); zo = v[150:0];
    n_ecm++;
  endtask

  initial begin
    apt_t g, q, e;
    fe_t  k, l, xo, yo, zo, z2;
    logic [63:0] r, bm;
    logic [7:0] b;
    bit t, ok, a1, a2, a3;
    logic [150:0] n, a24, px, x1, z1, x2, zz2, x3, z3;

    for (int m = 0; m < NM; m++) for (int f = 0; f < NF; f++) temp[m][f] = 8'(45 + 10 * m + f);
    g.x = GX; g.y = GY; g.inf = 0;
    q = pmul(256'd12345, g);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- ECDSA kP on module 0, FPGA 1, core 1
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    k[255:192] = '0;
    wr_wide(0, 1, 1, 0, k); wr_wide(0, 1, 1, 8, g.x); wr_wide(0, 1, 1, 12, g.y);
    wr(ad(0, 1, 1, 32), 64'd1);
    // ---- ECDSA kP + lQ on module 0, FPGA 0, core 0, running at the same time
    for (int i = 0; i < 8; i++) l[32*i +: 32] = $urandom;
    l[255:192] = '0;
    wr_wide(0, 0, 0, 0, 256'd77); wr_wide(0, 0, 0, 4, l);
    wr_wide(0, 0, 0, 8, g.x); wr_wide(0, 0, 0, 12, g.y);
    wr_wide(0, 0, 0, 16, q.x); wr_wide(0, 0, 0, 20, q.y);
    wr(ad(0, 0, 0, 32), 64'd3);
    // aggregated status: nothing finished yet
    rd(ad(0, 0, 7, 0), r);
    chk(r == 64'd0, "no FPGA finished yet");
    wait_done(0, 1, 1);
    rd(ad(0, 0, 7, 0), r);
    chk(r[1] == 1'b1, "done bitmap shows FPGA 1");
    bm = r;
    rd(ad(0, 0, 7, 3), r);
    chk(r[8] && r[3:0] == (bm[0] ? 4'd0 : 4'd1), "first finished FPGA");
    n_aggr++;
    rd_wide(0, 1, 1, 40, xo); rd_wide(0, 1, 1, 44, yo); rd_wide(0, 1, 1, 48, zo);
    e = pmul(k, g);
    z2 = fmul(zo, zo);
    chk(xo == fmul(e.x, z2) && yo == fmul(e.y, fmul(z2, zo)), "kP end to end");
    n_kp++;
    wait_done(0, 0, 0);
    rd(ad(0, 0, 7, 0), r);
    chk(r[1:0] == 2'b11, "done bitmap shows both FPGAs");
    n_aggr++;
    rd_wide(0, 0, 0, 40, xo); rd_wide(0, 0, 0, 44, yo); rd_wide(0, 0, 0, 48, zo);
    e = padd(pmul(256'd77, g), pmul(l, q));
    z2 = fmul(zo, zo);
    chk(xo == fmul(e.x, z2) && yo == fmul(e.y, fmul(z2, zo)), "kP + lQ end to end");
    n_kplq++;

    // ---- ECM phase 1 on module 1, FPGA 1: [4]([7]P) = [28]P
    n = {$urandom, $urandom, $urandom, $urandom, $urandom}; n[150] = 1'b1; n[0] = 1'b1;
    a24 = {$urandom, $urandom, $urandom, $urandom, $urandom} % n;
    px  = {$urandom, $urandom, $urandom, $urandom, $urandom} % n;
    wr_wide(1, 1, 0, 0, 256'(n)); wr_wide(1, 1, 0, 4, 256'(to_mont(a24, n)));
    ecm_run(1, 64'd7, to_mont(px, n), to_mont(151'd1, n), x2, zz2);
    ecm_run(1, 64'd4, x2, zz2, x3, z3);
    ecm_run(1, 64'd28, to_mont(px, n), to_mont(151'd1, n), x1, z1);
    chk(z1 != 0 && mulm(x3, z1, n) == mulm(x1, z3, n), "ECM [4]([7]P) = [28]P end to end");

    // ---- absent module: the read times out
    host(1'b0, ad(5, 0, 0, 0), '0, r, t);
    chk(t, "absent module times out");
    if (t) n_tmo++;

    // ---- SMBus temperature read, module 1 FPGA 1
    smb_read(7'h21, 8'd1, b, ok);
    chk(ok && b == temp[1][1], "SMBus temperature read");
    if (ok) n_smb_rd++;

    // ---- thermal shutdown of module 0
    @(negedge clk) temp[0][1] = 8'd84;
    repeat (3) @(negedge clk);
    chk(power_en == 2'b10, "module 0 powered down");
    if (!power_en[0]) n_shutdown++;
    host(1'b0, ad(0, 1, 1, 8), '0, r, t);
    chk(t, "powered-down FPGA does not answer");
    if (t) n_tmo++;
    rd(ad(0, 0, 7, 1), r);
    chk(r[0] && r[15:8] == 8'd84, "CPLD reports the shutdown");
    n_aggr++;
    smb_read(7'h20, 8'd9, b, ok);
    chk(ok && b == 8'd1, "SMBus reads the shutdown flag");
    if (ok) n_smb_rd++;
    // cool down and power up again through the management bus
    temp[0][1] = 8'd50;
    i2c_start(); wr_byte({7'h20, 1'b0}, a1); wr_byte(8'd16, a2); wr_byte(8'd1, a3); i2c_stop();
    hp();
    chk(a1 && a2 && a3 && power_en == 2'b11, "SMBus clear powers module 0 up");
    if (power_en[0]) n_smb_clr++;
    rd(ad(0, 1, 1, 8), r);
    chk(r == '0, "FPGAs restart from reset");

    chk(n_kp > 0 && n_kplq > 0 && n_ecm > 0 && n_aggr > 0 && n_tmo > 0 && n_shutdown > 0 &&
        n_smb_rd > 0 && n_smb_clr > 0, "every mechanism exercised");
    $display("mechanisms: kP=%0d kP+lQ=%0d ECM=%0d aggregate=%0d timeout=%0d shutdown=%0d smb_read=%0d smb_clear=%0d",
             n_kp, n_kplq, n_ecm, n_aggr, n_tmo, n_shutdown, n_smb_rd, n_smb_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
