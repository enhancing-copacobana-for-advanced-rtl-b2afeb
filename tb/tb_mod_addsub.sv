// tb_mod_addsub: random modular additions and subtractions, checked against
// the '%' operator, for the P-256 prime (W = 256) and for small random moduli
// (W = 8, also covering the edge values 0 and m-1).
module tb_mod_addsub;
  import copa_pkg::*;
  int checks = 0, failures = 0;

  logic [255:0] a, b, r;
  logic         sub;
  logic [7:0]   a8, b8, m8, r8;
  logic         sub8;

  mod_addsub #(.W(256)) dut   (.a, .b, .m(P256), .sub, .r);
  mod_addsub #(.W(8))   dut8  (.a(a8), .b(b8), .m(m8), .sub(sub8), .r(r8));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd_fe();
    logic [511:0] t;
    for (int i = 0; i < 16; i++) t[32*i +: 32] = $urandom;
    t = t % {256'd0, P256};
    return t[255:0];
  endfunction

  initial begin
    logic [256:0] e;
    for (int i = 0; i < 400; i++) begin
      a = rnd_fe(); b = rnd_fe(); sub = i[0];
      if (i == 0) begin a = P256 - 1; b = P256 - 1; end
      if (i == 1) begin a = 0; b = P256 - 1; end
      #1;
      e = sub ? ({1'b0, a} + {1'b0, P256} - {1'b0, b}) % {1'b0, P256}
              : ({1'b0, a} + {1'b0, b}) % {1'b0, P256};
      checks++;
      if (r != e[255:0]) begin
        failures++;
        $display("FAIL 256: %0s", sub ? "sub" : "add");
      end
    end
    for (int i = 0; i < 4000; i++) begin
      int unsigned ea, eb, em, ee;
      m8 = 8'($urandom_range(255, 1));
      a8 = 8'($urandom_range(m8 - 1, 0));
      b8 = 8'($urandom_range(m8 - 1, 0));
      sub8 = $urandom_range(1, 0) == 1;
      #1;
      ea = a8; eb = b8; em = m8;
      ee = sub8 ? (ea + em - eb) % em : (ea + eb) % em;
      checks++;
      if (r8 != 8'(ee)) begin
        failures++;
        $display("FAIL 8: a=%0d b=%0d m=%0d sub=%0b got %0d exp %0d", a8, b8, m8, sub8, r8, ee);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
