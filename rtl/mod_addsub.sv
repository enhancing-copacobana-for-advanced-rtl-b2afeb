// mod_addsub: modular addition or subtraction, r = (a +/- b) mod m.
//
// Both operands must already be reduced (a, b < m). The sum or difference is
// formed one bit wider than the operands and corrected with a single add or
// subtract of m, which is enough for reduced inputs. The modulus is an input so
// that the same unit serves the fixed P-256 prime of the signature cores and the
// arbitrary modulus of the factoring cores. Purely combinational: the calling
// sequencer registers the result, one operation per clock.
module mod_addsub #(
  parameter int unsigned W = 256   // operand width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] m,
  input  logic         sub,   // 1: a - b, 0: a + b
  output logic [W-1:0] r
);
  logic [W:0] s, t;

  always_comb begin
    if (sub) begin
      s = {1'b0, a} - {1'b0, b};          // borrow in s[W]
      t = s + {1'b0, m};
      r = s[W] ? t[W-1:0] : s[W-1:0];
    end else begin
      s = {1'b0, a} + {1'b0, b};
      t = s - {1'b0, m};
      r = t[W] ? s[W-1:0] : t[W-1:0];     // no borrow: s >= m
    end
  end
endmodule
