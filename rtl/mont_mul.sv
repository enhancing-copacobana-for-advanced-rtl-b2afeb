// mont_mul: high-radix Montgomery modular multiplication,
//     r = a * b * 2^(-RADIX*D) mod n,   D = ceil(W / RADIX),
// for an arbitrary odd modulus n < 2^W (the modulus is an input, not a constant).
//
// The radix is 2^17, the widest unsigned operand of a Virtex-4 DSP multiplier.
// One RADIX-bit digit a_i of a is consumed per clock, least significant first:
//     q = ((T + a_i*b) * nprime) mod 2^RADIX
//     T = (T + a_i*b + q*n) / 2^RADIX
// where nprime = -n^(-1) mod 2^RADIX is supplied by the caller. With a, b < n
// the result stays below 2n and one conditional subtraction of n completes it.
//
// Timing: 'start' for one clock loads the operands; 'done' pulses D+1 clocks
// later with r (< n) valid; r holds until the next start.
module mont_mul #(
  parameter int unsigned W     = 151,   // modulus width in bits
  parameter int unsigned RADIX = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  input  logic [W-1:0]     n,
  input  logic [RADIX-1:0] nprime,
  output logic             busy,
  output logic             done,
  output logic [W-1:0]     r
);
  localparam int unsigned D  = (W + RADIX - 1) / RADIX;
  localparam int unsigned DW = D * RADIX;
  localparam int unsigned TW = W + 1;              // T < 2n
  localparam int unsigned SW = W + RADIX + 2;      // T + a_i*b + q*n

  logic [DW-1:0]            a_q;
  logic [W-1:0]             b_q, n_q;
  logic [RADIX-1:0]         np_q;
  logic [TW-1:0]            t_q;
  logic [$clog2(D+1)-1:0]   cnt_q;
  logic                     fin_q;

  logic [RADIX-1:0]         ai, qd;
  logic [2*RADIX-1:0]       p0, p1;   // full 17x17 products, low digit used
  logic [SW-1:0]            s;
  logic [TW:0]              tsub;

  assign ai   = a_q[RADIX-1:0];
  assign p0   = {{RADIX{1'b0}}, ai} * {{RADIX{1'b0}}, b_q[RADIX-1:0]};
  assign p1   = {{RADIX{1'b0}}, t_q[RADIX-1:0] + p0[RADIX-1:0]} * {{RADIX{1'b0}}, np_q};
  assign qd   = p1[RADIX-1:0];
  assign s    = SW'(t_q) + SW'(ai) * SW'(b_q) + SW'(qd) * SW'(n_q);
  assign tsub = {1'b0, t_q} - {2'b0, n_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; n_q <= '0; np_q <= '0; t_q <= '0;
      cnt_q <= '0; fin_q <= 1'b0; busy <= 1'b0; done <= 1'b0; r <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q   <= DW'(a);
        b_q   <= b;
        n_q   <= n;
        np_q  <= nprime;
        t_q   <= '0;
        cnt_q <= '0;
        fin_q <= 1'b0;
        busy  <= 1'b1;
      end else if (busy && !fin_q) begin
        t_q   <= TW'(s >> RADIX);
        a_q   <= a_q >> RADIX;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == D[$clog2(D+1)-1:0] - 1'b1) fin_q <= 1'b1;
      end else if (busy) begin
        r     <= tsub[TW] ? t_q[W-1:0] : tsub[W-1:0];
        busy  <= 1'b0;
        fin_q <= 1'b0;
        done  <= 1'b1;
      end
    end
  end
endmodule
