// p256_mul: serial-to-parallel full-product multiplier, c = a * b (no reduction).
//
// Operand a is held in parallel; operand b is consumed one DIGIT-bit digit per
// clock, least significant first. Each clock the partial product a * b_i is added
// to a running accumulator; the accumulator's low DIGIT bits are final and are
// shifted into the low half of the product, the rest is shifted down. This is the
// arrangement of a cascade of multiply-accumulate blocks fed with a serial
// operand. After W/DIGIT clocks the 2W-bit product is complete.
//
// Timing: 'start' for one clock loads a and b; 'done' pulses W/DIGIT clocks later
// with the product on 'c' (held until the next start). 'busy' is high in between.
module p256_mul #(
  parameter int unsigned W     = 256,
  parameter int unsigned DIGIT = 16     // must divide W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] c
);
  localparam int unsigned ND = W / DIGIT;

  logic [W-1:0]             a_q, b_q, lo_q;
  logic [W-1:0]             acc_q;           // high part, always < 2^W
  logic [$clog2(ND+1)-1:0]  cnt_q;
  logic [W+DIGIT-1:0]       sum;   // acc + a*d < 2^(W+DIGIT)

  assign sum = {{DIGIT{1'b0}}, acc_q} + ({{DIGIT{1'b0}}, a_q} * {{W{1'b0}}, b_q[DIGIT-1:0]});
  assign c   = {acc_q, lo_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      lo_q  <= '0;
      acc_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q   <= a;
        b_q   <= b;
        acc_q <= '0;
        lo_q  <= '0;
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        lo_q  <= {sum[DIGIT-1:0], lo_q[W-1:DIGIT]};
        acc_q <= sum[W+DIGIT-1:DIGIT];
        b_q   <= b_q >> DIGIT;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == ND[$clog2(ND+1)-1:0] - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
