// tb_v4_node: two compute FPGAs on one local bus, FPGA 5 loaded with two
// ECDSA cores, FPGA 2 with one ECM core (64-bit scalars to keep it short).
// Everything goes through the register interface: operands are written
// word by word, cores started, status polled and results read back.
// Checks: read-back of written words; kP and kP + lQ results against the
// affine P-256 reference; sticky done and the node's done line; an ECM
// result for k = 1 and the identity [3]([5]P) = [15]P; that an FPGA answers
// only its own number; that two cores of one FPGA run side by side.
module tb_v4_node;
  import copa_pkg::*;
  import p256_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  lb_req_t  lb;
  bus_rsp_t rsp_a, rsp_m, rsp;
  logic done_a, done_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign rsp = rsp_a | rsp_m;

  v4_node #(.APP(APP_ECDSA), .FPGA_ID(5), .N_ECDSA_CORES(2)) u_a (
    .clk, .rst_n, .lb, .lb_rsp(rsp_a), .done(done_a));
  v4_node #(.APP(APP_ECM), .FPGA_ID(2), .N_ECM_CORES(1), .ECM_KBITS(64)) u_m (
    .clk, .rst_n, .lb, .lb_rsp(rsp_m), .done(done_m));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic lb_wr(input int f, input int slot, input int word, input logic [63:0] d);
    @(negedge clk);
    lb = '0; lb.wr = 1'b1; lb.fpga = 3'(f); lb.addr = {3'(slot), 6'(word)}; lb.wdata = d;
    @(negedge clk) lb = '0;
  endtask
  task automatic lb_rd(input int f, input int slot, input int word, output logic [63:0] d, output bit valid);
    @(negedge clk);
    lb = '0; lb.rd = 1'b1; lb.fpga = 3'(f); lb.addr = {3'(slot), 6'(word)};
    @(negedge clk) lb = '0;
    valid = rsp.rvalid; d = rsp.rdata;
  endtask
  task automatic wr_wide(input int f, input int slot, input int word0, input logic [255:0] v);
    for (int w = 0; w < 4; w++) lb_wr(f, slot, word0 + w, v[64*w +: 64]);
  endtask
  task automatic rd_wide(input int f, input int slot, input int word0, output logic [255:0] v);
    logic [63:0] d; bit ok;
    for (int w = 0; w < 4; w++) begin lb_rd(f, slot, word0 + w, d, ok); v[64*w +: 64] = d; end
  endtask
  task automatic wait_done(input int f, input int slot);
    logic [63:0] d; bit ok;
    do begin repeat (200) @(negedge clk); lb_rd(f, slot, 32, d, ok); end while (!d[1]);
  endtask

  task automatic ecdsa_check(input int slot, input fe_t x, input fe_t y, input string what);
    fe_t xo, yo, zo, z2;
    rd_wide(5, slot, 40, xo); rd_wide(5, slot, 44, yo); rd_wide(5, slot, 48, zo);
    z2 = fmul(zo, zo);
    chk(xo == fmul(x, z2) && yo == fmul(y, fmul(z2, zo)), what);
  endtask

  // ECM: Montgomery-domain helpers for a 151-bit modulus, R = 2^153
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
  task automatic ecm_run(input logic [63:0] k, input logic [150:0] xm, input logic [150:0] zm,
                         output logic [150:0] xo, output logic [150:0] zo);
    logic [255:0] v;
    wr_wide(2, 0, 8, 256'(xm)); wr_wide(2, 0, 12, 256'(zm));
    lb_wr(2, 0, 16, k);
    lb_wr(2, 0, 32, 64'd1);
    wait_done(2, 0);
    rd_wide(2, 0, 40, v); xo = v[150:0];
    rd_wide(2, 0, 44, v); zo = v[150:0];
  endtask

  initial begin
    apt_t g, q, e;
    fe_t  k, rb;
    logic [63:0] d;
    bit ok;
    logic [150:0] n, a24, px, x1, z1, x2, z2, x3, z3;
    lb = '0;
    g.x = GX; g.y = GY; g.inf = 0;
    q = pmul(256'd9, g);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- ECDSA, core 1: kP
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    k[255:240] = '0;                     // shorter scalar for a quicker run
    wr_wide(5, 1, 0, k); wr_wide(5, 1, 8, g.x); wr_wide(5, 1, 12, g.y);
    rd_wide(5, 1, 8, rb);
    chk(rb == g.x, "operand read-back");
    lb_rd(3, 1, 8, d, ok);
    chk(!ok, "other FPGA numbers get no answer");
    chk(!done_a, "node done low before start");
    lb_wr(5, 1, 32, 64'd1);
    lb_rd(5, 1, 32, d, ok);
    chk(ok && d[0] && !d[1], "busy while running");
    // ---- ECDSA, core 0: kP + lQ with small scalars, loaded and run while
    // core 1 is still busy
    wr_wide(5, 0, 0, 256'd11); wr_wide(5, 0, 4, 256'd6);
    wr_wide(5, 0, 8, g.x); wr_wide(5, 0, 12, g.y); wr_wide(5, 0, 16, q.x); wr_wide(5, 0, 20, q.y);
    lb_wr(5, 0, 32, 64'd3);
    wait_done(5, 0);
    e = padd(pmul(256'd11, g), pmul(256'd6, q));
    ecdsa_check(0, e.x, e.y, "kP + lQ through registers");
    lb_rd(5, 1, 32, d, ok);
    chk(d[0] && !d[1], "core 1 still busy while core 0 finished");
    wait_done(5, 1);
    chk(done_a, "node done line");
    e = pmul(k, g);
    ecdsa_check(1, e.x, e.y, "kP through registers, core 1 after core 0 ran alongside");
    // restarting core 1 clears its done flag
    lb_wr(5, 1, 32, 64'd1);
    lb_rd(5, 1, 32, d, ok);
    chk(!d[1], "done cleared by restart");

    // ---- ECM
    n = {$urandom, $urandom, $urandom, $urandom, $urandom}; n[150] = 1'b1; n[0] = 1'b1;
    a24 = {$urandom, $urandom, $urandom, $urandom, $urandom} % n;
    px  = {$urandom, $urandom, $urandom, $urandom, $urandom} % n;
    wr_wide(2, 0, 0, 256'(n)); wr_wide(2, 0, 4, 256'(to_mont(a24, n)));
    ecm_run(64'd1, to_mont(px, n), to_mont(151'd1, n), x1, z1);
    chk(z1 != 0 && x1 == mulm(px, z1, n), "ECM k = 1");
    ecm_run(64'd5, to_mont(px, n), to_mont(151'd1, n), x2, z2);
    ecm_run(64'd3, x2, z2, x3, z3);
    ecm_run(64'd15, to_mont(px, n), to_mont(151'd1, n), x1, z1);
    chk(mulm(x3, z1, n) == mulm(x1, z3, n) && z1 != 0, "ECM [3]([5]P) = [15]P");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
