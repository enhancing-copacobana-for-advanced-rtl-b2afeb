// p256_reduce: fast reduction of a 512-bit product modulo the NIST prime
// p256 = 2^256 - 2^224 + 2^192 + 2^96 - 1.
//
// The product is split into sixteen 32-bit words c15..c0. The standard NIST
// method rearranges these words into nine 256-bit terms s1..s9 with
//     r = s1 + 2*s2 + 2*s3 + s4 + s5 - s6 - s7 - s8 - s9   (mod p256).
// The unit adds or subtracts one term per clock into a signed accumulator,
// the way a single wide add/subtract unit (in the target, a chain of DSP
// blocks) would be reused, and then brings the result into [0, p256) by
// adding or subtracting p256 once per clock (at most a handful of clocks).
//
// Timing: 'start' for one clock loads c; 'done' pulses when 'r' is valid
// (9 term clocks plus 1..6 correction clocks). 'r' holds until the next start.
module p256_reduce
  import copa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [511:0] c,
  output logic         busy,
  output logic         done,
  output logic [255:0] r
);
  typedef logic [31:0] word_t;
  localparam int unsigned AW = 260;  // signed accumulator: |sum| < 8 * 2^256

  logic [511:0]          c_q;
  logic signed [AW-1:0]  acc_q;
  logic [3:0]            step_q;
  logic                  fix_q;       // correction phase
  logic [255:0]          term;
  logic                  term_sub, term_dbl;
  word_t                 w [16];

  always_comb begin
    for (int i = 0; i < 16; i++) w[i] = c_q[32*i +: 32];
  end

  // term selection; words listed most significant first
  always_comb begin
    term     = '0;
    term_sub = 1'b0;
    term_dbl = 1'b0;
    unique case (step_q)
      4'd0: term = {w[7],  w[6],  w[5],  w[4],  w[3],  w[2],  w[1],  w[0]};
      4'd1: begin term = {w[15], w[14], w[13], w[12], w[11], 32'd0, 32'd0, 32'd0}; term_dbl = 1'b1; end
      4'd2: begin term = {32'd0, w[15], w[14], w[13], w[12], 32'd0, 32'd0, 32'd0}; term_dbl = 1'b1; end
      4'd3: term = {w[15], w[14], 32'd0, 32'd0, 32'd0, w[10], w[9],  w[8]};
      4'd4: term = {w[8],  w[13], w[15], w[14], w[13], w[11], w[10], w[9]};
      4'd5: begin term = {w[10], w[8],  32'd0, 32'd0, 32'd0, w[13], w[12], w[11]}; term_sub = 1'b1; end
      4'd6: begin term = {w[11], w[9],  32'd0, 32'd0, w[15], w[14], w[13], w[12]}; term_sub = 1'b1; end
      4'd7: begin term = {w[12], 32'd0, w[10], w[9],  w[8],  w[15], w[14], w[13]}; term_sub = 1'b1; end
      4'd8: begin term = {w[13], 32'd0, w[11], w[10], w[9],  32'd0, w[15], w[14]}; term_sub = 1'b1; end
      default: ;
    endcase
  end

  logic signed [AW-1:0] term_ext, p_ext;
  assign term_ext = term_dbl ? signed'({3'b0, term, 1'b0}) : signed'({4'b0, term});
  assign p_ext    = signed'({4'b0, P256});
  assign r        = acc_q[255:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q    <= '0;
      acc_q  <= '0;
      step_q <= '0;
      fix_q  <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        c_q    <= c;
        acc_q  <= '0;
        step_q <= '0;
        fix_q  <= 1'b0;
        busy   <= 1'b1;
      end else if (busy && !fix_q) begin
        acc_q  <= term_sub ? acc_q - term_ext : acc_q + term_ext;
        step_q <= step_q + 1'b1;
        if (step_q == 4'd8) fix_q <= 1'b1;
      end else if (busy) begin
        if (acc_q < 0)           acc_q <= acc_q + p_ext;
        else if (acc_q >= p_ext) acc_q <= acc_q - p_ext;
        else begin
          busy  <= 1'b0;
          done  <= 1'b1;
          fix_q <= 1'b0;
        end
      end
    end
  end
endmodule
