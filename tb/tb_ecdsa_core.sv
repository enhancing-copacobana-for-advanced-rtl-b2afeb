// tb_ecdsa_core: checks kP and kP + lQ on P-256 against an affine reference.
// The projective result (X, Y, Z) is accepted when X = x*Z^2 and Y = y*Z^3
// for the reference point (x, y). Also checks that a full 256-bit kP and
// kP + lQ finish within the cycle budget implied by 4,840 kP/s and 4,000
// (kP + lQ)/s for six cores at 245 MHz.
module tb_ecdsa_core;
  import p256_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, mode = 1'b0;
  fe_t  k, l, px, py, qx, qy, xo, yo, zo;
  logic busy, done, inf;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ecdsa_core dut (.clk, .rst_n, .start, .mode, .k, .l, .px, .py, .qx, .qy,
                  .busy, .done, .inf, .x_o(xo), .y_o(yo), .z_o(zo));

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t rnd256();
    fe_t r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  task automatic run(input bit m, input fe_t kk, input fe_t ll, input apt_t p, input apt_t q,
                     input longint budget, input string name);
    apt_t exp_pt;
    fe_t  z2;
    longint t0;
    @(negedge clk);
    mode = m; k = kk; l = ll; px = p.x; py = p.y; qx = q.x; qy = q.y; start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    @(posedge done);
    exp_pt = pmul(kk, p);
    if (m) exp_pt = padd(exp_pt, pmul(ll, q));
    checks++;
    if (exp_pt.inf != inf) begin
      failures++;
      $display("FAIL %s: inf=%0b expected %0b", name, inf, exp_pt.inf);
    end else if (!inf) begin
      z2 = fmul(zo, zo);
      checks++;
      if (xo != fmul(exp_pt.x, z2) || yo != fmul(exp_pt.y, fmul(z2, zo))) begin
        failures++;
        $display("FAIL %s: projective result does not match", name);
      end
    end
    if (budget > 0) begin
      checks++;
      if (cyc - t0 > budget) begin
        failures++;
        $display("FAIL %s: %0d cycles, budget %0d", name, cyc - t0, budget);
      end
    end
    $display("%s: %0d cycles", name, cyc - t0);
  endtask

  initial begin
    apt_t g, q;
    fe_t  kk, ll;
    g.x = GX; g.y = GY; g.inf = 0;
    k = '0; l = '0; px = '0; py = '0; qx = '0; qy = '0;
    checks++;
    if (!on_curve(g)) begin failures++; $display("FAIL: G not on curve"); end
    q = pmul(256'd7, g);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, 256'd1, 256'd0, g, q, 0, "1G");
    run(1'b0, 256'd2, 256'd0, g, q, 0, "2G");
    run(1'b0, 256'd5, 256'd0, g, q, 0, "5G");
    run(1'b0, 256'd0, 256'd0, g, q, 0, "0G");
    run(1'b1, 256'd3, 256'd6, g, q, 0, "3G+6Q");
    kk = rnd256(); kk[255] = 1'b1;
    run(1'b0, kk, 256'd0, g, q, 303_719, "kG full");
    kk = rnd256(); ll = rnd256(); kk[255] = 1'b1;
    run(1'b1, kk, ll, g, q, 367_500, "kG+lQ full");
    // a second random point as base
    run(1'b0, rnd256(), 256'd0, q, g, 0, "kQ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
