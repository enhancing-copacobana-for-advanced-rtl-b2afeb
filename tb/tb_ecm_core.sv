// tb_ecm_core: checks ECM phase 1 (Montgomery-ladder kP) against a plain
// reference ladder that uses ordinary modular arithmetic (no Montgomery
// domain). Results are compared as ratios: X_hw * Z_ref == X_ref * Z_hw mod n.
// Also checks [a]([b]P) == [a*b]P with the core computing both sides, and
// that one ladder step (doubling plus addition) takes at most 377 clocks,
// that k = 0 gives the point at infinity, and three more random moduli.
module tb_ecm_core;
  localparam int unsigned NB = 151, KB = 980, D = (NB + 16) / 17;
  typedef logic [NB-1:0] fe_t;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fe_t  n, a24, x0, z0, xo, zo;
  logic [KB-1:0] k;
  logic busy, done;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ecm_core dut (.clk, .rst_n, .start, .n, .a24, .x0, .z0, .k, .busy, .done, .x_o(xo), .z_o(zo));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t mulm(fe_t a, fe_t b, fe_t m);
    logic [2*NB-1:0] t;
    t = ({{NB{1'b0}}, a} * {{NB{1'b0}}, b}) % {{NB{1'b0}}, m};
    return t[NB-1:0];
  endfunction
  function automatic fe_t addm(fe_t a, fe_t b, fe_t m);
    logic [NB:0] t;
    t = ({1'b0, a} + {1'b0, b}) % {1'b0, m};
    return t[NB-1:0];
  endfunction
  function automatic fe_t subm(fe_t a, fe_t b, fe_t m);
    logic [NB:0] t;
    t = ({1'b0, a} + {1'b0, m} - {1'b0, b}) % {1'b0, m};
    return t[NB-1:0];
  endfunction
  function automatic fe_t to_mont(fe_t a, fe_t m);
    logic [2*NB+D*17-1:0] t;
    t = ({{(NB+D*17){1'b0}}, a} << (D*17)) % {{(NB+D*17){1'b0}}, m};
    return t[NB-1:0];
  endfunction

  // reference ladder, textbook formulas, plain residues
  task automatic ref_ladder(input logic [KB-1:0] kk, input fe_t x, input fe_t z, input fe_t m,
                            input fe_t c24, output fe_t rx, output fe_t rz);
    fe_t ax, az, bx, bz, u, v, s, d, t;
    ax = 1; az = 0; bx = x; bz = z;
    for (int i = KB - 1; i >= 0; i--) begin
      // sum = A + B (difference P)
      u = mulm(subm(ax, az, m), addm(bx, bz, m), m);
      v = mulm(addm(ax, az, m), subm(bx, bz, m), m);
      s = mulm(z, mulm(addm(u, v, m), addm(u, v, m), m), m);
      d = mulm(x, mulm(subm(u, v, m), subm(u, v, m), m), m);
      if (kk[i]) begin
        // B = 2B, A = sum
        u = mulm(addm(bx, bz, m), addm(bx, bz, m), m);
        v = mulm(subm(bx, bz, m), subm(bx, bz, m), m);
        t = subm(u, v, m);
        bx = mulm(u, v, m); bz = mulm(t, addm(v, mulm(c24, t, m), m), m);
        ax = s; az = d;
      end else begin
        u = mulm(addm(ax, az, m), addm(ax, az, m), m);
        v = mulm(subm(ax, az, m), subm(ax, az, m), m);
        t = subm(u, v, m);
        ax = mulm(u, v, m); az = mulm(t, addm(v, mulm(c24, t, m), m), m);
        bx = s; bz = d;
      end
    end
    rx = ax; rz = az;
  endtask

  task automatic run(input logic [KB-1:0] kk, input fe_t xm, input fe_t zm, output longint cycles);
    longint t0;
    @(negedge clk);
    k = kk; x0 = xm; z0 = zm; start = 1'b1; t0 = cyc;
    @(negedge clk) start = 1'b0;
    @(posedge done);
    cycles = cyc - t0;
  endtask

  function automatic fe_t rnd();
    fe_t r;
    for (int i = 0; i < (NB + 31) / 32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    fe_t ca24, px, pz, rx, rz, hx, hz, h2x, h2z;
    logic [KB-1:0] kk, ka, kb;
    longint cycles;
    n = rnd(); n[NB-1] = 1'b1; n[0] = 1'b1;
    ca24 = rnd() % n; px = rnd() % n; pz = 1;
    a24 = to_mont(ca24, n);
    k = '0; x0 = '0; z0 = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // k = 1 returns P
    run(KB'(1), to_mont(px, n), to_mont(pz, n), cycles);
    checks++;
    if (mulm(xo, pz, n) != mulm(px, zo, n) || zo == 0) begin
      failures++; $display("FAIL 1P");
    end

    // random full-width scalar against the reference
    for (int i = 0; i < KB / 32 + 1; i++) kk[32*i +: 32] = $urandom;
    kk[KB-1] = 1'b1;
    run(kk, to_mont(px, n), to_mont(pz, n), cycles);
    ref_ladder(kk, px, pz, n, ca24, rx, rz);
    checks++;
    if (mulm(xo, rz, n) != mulm(rx, zo, n)) begin
      failures++; $display("FAIL kP: result does not match reference");
    end
    $display("kP, %0d-bit scalar: %0d cycles, %0d per ladder step", KB, cycles, cycles / KB);
    checks++;
    if (cycles > longint'(377) * KB + 10) begin
      failures++; $display("FAIL: ladder step slower than 377 clocks");
    end

    // [a]([b]P) == [a*b]P, all on the core
    ka = '0; kb = '0;
    for (int i = 0; i < 15; i++) begin ka[32*i +: 32] = $urandom; kb[32*i +: 32] = $urandom; end
    run(kb, to_mont(px, n), to_mont(pz, n), cycles);
    hx = xo; hz = zo;                       // still Montgomery domain
    run(ka, hx, hz, cycles);
    h2x = xo; h2z = zo;
    run(ka * kb, to_mont(px, n), to_mont(pz, n), cycles);
    checks++;
    if (mulm(h2x, zo, n) != mulm(xo, h2z, n)) begin
      failures++; $display("FAIL: [a]([b]P) != [ab]P");
    end

    // k = 0 leaves R0 at the point at infinity (Z = 0)
    run('0, to_mont(px, n), to_mont(pz, n), cycles);
    checks++;
    if (zo != 0) begin
      failures++; $display("FAIL 0P: Z = %h", zo);
    end

    // fresh modulus, curve and point each time: the core must take them at start
    for (int r = 0; r < 3; r++) begin
      n = rnd(); n[NB-1] = 1'b1; n[0] = 1'b1;
      ca24 = rnd() % n; px = rnd() % n; pz = (rnd() % n) | 1;
      a24 = to_mont(ca24, n);
      for (int i = 0; i < KB / 32 + 1; i++) kk[32*i +: 32] = $urandom;
      run(kk, to_mont(px, n), to_mont(pz, n), cycles);
      ref_ladder(kk, px, pz, n, ca24, rx, rz);
      checks++;
      if (mulm(xo, rz, n) != mulm(rx, zo, n)) begin
        failures++; $display("FAIL kP, modulus %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
