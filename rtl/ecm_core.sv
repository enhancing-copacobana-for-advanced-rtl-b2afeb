// ecm_core: phase 1 of the Elliptic Curve Method of factoring: the point
// multiplication kP on a Montgomery curve B*y^2 = x^3 + A*x^2 + x over Z/nZ
// for an arbitrary odd modulus n.
//
// Only X and Z are carried (projective x-coordinate). The scalar is processed
// with the Montgomery ladder, most significant bit first, for all KBITS bits:
// every step does one differential addition and one doubling (11 modular
// multiplications, 8 additions/subtractions) on the pair (R0, R1) whose
// difference is always P. A set scalar bit is handled by exchanging the roles
// of R0 and R1 through register renaming, so every step takes the same time.
// R0 starts as the point at infinity, written (x0, 0), and R1 as P, so leading
// zero bits of k cost time but need no special case.
//
// All field values are in the Montgomery domain (value * 2^(17*D) mod n, D =
// ceil(NBITS/17)): the host converts a24 = (A+2)/4, x0 and z0 before loading
// and reads X, Z back the same way; since only X/Z matters, the factor cancels
// out in the final gcd(Z, n) done on the host. The constant -n^(-1) mod 2^17
// needed by the multiplier is computed here at start (Newton iteration).
//
// Interface: inputs sampled on 'start'; 'done' pulses when x_o/z_o hold kP.
// Timing: 2 clocks of set-up, then per ladder step 11 multiplications of D+2
// clocks plus 8 single-clock additions: 151 clocks per step for NBITS = 151.
module ecm_core
  import copa_pkg::*;
#(
  parameter int unsigned NBITS = 151,  // modulus width
  parameter int unsigned KBITS = 980   // scalar width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NBITS-1:0] n,
  input  logic [NBITS-1:0] a24,    // (A+2)/4, Montgomery domain
  input  logic [NBITS-1:0] x0,     // base point, Montgomery domain
  input  logic [NBITS-1:0] z0,
  input  logic [KBITS-1:0] k,
  output logic             busy,
  output logic             done,
  output logic [NBITS-1:0] x_o,
  output logic [NBITS-1:0] z_o
);
  localparam int unsigned RADIX = 17;
  // logical register indices (0..3 are renamed on a set scalar bit)
  localparam logic [3:0] X0 = 4'd0, Z0 = 4'd1, X1 = 4'd2, Z1 = 4'd3;
  localparam logic [3:0] XD = 4'd4, ZD = 4'd5, A24 = 4'd6;
  localparam logic [3:0] T0 = 4'd7, T1 = 4'd8, T2 = 4'd9, T3 = 4'd10, T4 = 4'd11, T5 = 4'd12;

  typedef struct packed {
    fop_e       op;
    logic [3:0] d, a, b;
    logic       last;
  } uinstr_t;

  function automatic uinstr_t ui(fop_e op, logic [3:0] d, logic [3:0] a, logic [3:0] b, logic last = 1'b0);
    return '{op: op, d: d, a: a, b: b, last: last};
  endfunction

  // one ladder step: R1 = R0 + R1 (difference P), R0 = 2 R0
  function automatic uinstr_t urom(logic [4:0] pc);
    unique case (pc)
      5'd0:  return ui(FOP_ADD, T0, X0, Z0);
      5'd1:  return ui(FOP_SUB, T1, X0, Z0);
      5'd2:  return ui(FOP_ADD, T2, X1, Z1);
      5'd3:  return ui(FOP_SUB, T3, X1, Z1);
      5'd4:  return ui(FOP_MUL, T2, T1, T2);     // U = (X0-Z0)(X1+Z1)
      5'd5:  return ui(FOP_MUL, T3, T0, T3);     // V = (X0+Z0)(X1-Z1)
      5'd6:  return ui(FOP_ADD, T4, T2, T3);
      5'd7:  return ui(FOP_SUB, T5, T2, T3);
      5'd8:  return ui(FOP_MUL, T4, T4, T4);
      5'd9:  return ui(FOP_MUL, T5, T5, T5);
      5'd10: return ui(FOP_MUL, X1, ZD, T4);     // X+ = ZD (U+V)^2
      5'd11: return ui(FOP_MUL, Z1, XD, T5);     // Z+ = XD (U-V)^2
      5'd12: return ui(FOP_MUL, T0, T0, T0);     // (X0+Z0)^2
      5'd13: return ui(FOP_MUL, T1, T1, T1);     // (X0-Z0)^2
      5'd14: return ui(FOP_MUL, X0, T0, T1);     // X2 = (X0+Z0)^2 (X0-Z0)^2
      5'd15: return ui(FOP_SUB, T2, T0, T1);     // 4 X0 Z0
      5'd16: return ui(FOP_MUL, T3, A24, T2);
      5'd17: return ui(FOP_ADD, T3, T3, T1);
      5'd18: return ui(FOP_MUL, Z0, T2, T3, 1'b1); // Z2 = 4XZ((X-Z)^2 + a24 4XZ)
      default: return ui(FOP_ADD, T0, T0, T0, 1'b1);
    endcase
  endfunction

  // -n^(-1) mod 2^17 by Newton iteration x <- x(2 - n x), exact after 4 rounds
  function automatic logic [RADIX-1:0] neg_inv(logic [RADIX-1:0] n0);
    logic [RADIX-1:0] x;
    x = n0;                                   // correct to 3 bits for odd n0
    for (int i = 0; i < 4; i++) x = RADIX'(x * RADIX'(RADIX'(2) - RADIX'(n0 * x)));
    return RADIX'(0) - x;
  endfunction

  typedef enum logic [2:0] { S_IDLE, S_INIT, S_STEP, S_RUN, S_MULW, S_NEXT } state_e;

  state_e             state_q;
  logic [NBITS-1:0]   rf [13];
  logic [NBITS-1:0]   n_q;
  logic [RADIX-1:0]   np_q;
  logic [KBITS-1:0]   k_q;
  logic [$clog2(KBITS+1)-1:0] left_q;        // ladder steps still to do
  logic               swap_q;
  logic [4:0]         pc_q;
  uinstr_t            ins;
  logic [3:0]         pa, pb, pd;
  logic [NBITS-1:0]   opa, opb, as_r, mm_r;
  logic               mm_start, mm_done;

  // register renaming: on a set bit R0 and R1 trade places
  function automatic logic [3:0] ren(logic [3:0] i, logic sw);
    return (sw && i < 4'd4) ? (i ^ 4'd2) : i;
  endfunction

  assign ins = urom(pc_q);
  assign pa  = ren(ins.a, swap_q);
  assign pb  = ren(ins.b, swap_q);
  assign pd  = ren(ins.d, swap_q);
  assign opa = rf[pa];
  assign opb = rf[pb];
  assign mm_start = (state_q == S_RUN) && (ins.op == FOP_MUL);

  mod_addsub #(.W(NBITS)) u_addsub (.a(opa), .b(opb), .m(n_q), .sub(ins.op == FOP_SUB), .r(as_r));

  mont_mul #(.W(NBITS), .RADIX(RADIX)) u_mm (
    .clk, .rst_n, .start(mm_start), .a(opa), .b(opb), .n(n_q), .nprime(np_q),
    .busy(), .done(mm_done), .r(mm_r));

  assign busy = (state_q != S_IDLE);
  assign x_o  = rf[X0];
  assign z_o  = rf[Z0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      n_q     <= '0;
      np_q    <= '0;
      k_q     <= '0;
      left_q  <= '0;
      swap_q  <= 1'b0;
      pc_q    <= '0;
      done    <= 1'b0;
      for (int i = 0; i < 13; i++) rf[i] <= '0;
    end else begin
      logic retire;
      retire = 1'b0;
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          n_q    <= n;
          k_q    <= k;
          left_q <= ($clog2(KBITS+1))'(KBITS);
          rf[X0] <= x0;  rf[Z0] <= '0;     // infinity
          rf[X1] <= x0;  rf[Z1] <= z0;     // P
          rf[XD] <= x0;  rf[ZD] <= z0;     // difference, always P
          rf[A24] <= a24;
          state_q <= S_INIT;
        end
        S_INIT: begin
          np_q    <= neg_inv(n_q[RADIX-1:0]);
          state_q <= S_STEP;
        end
        S_STEP: begin
          swap_q  <= k_q[KBITS-1];
          k_q     <= k_q << 1;
          pc_q    <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          if (ins.op == FOP_MUL) state_q <= S_MULW;
          else begin
            rf[pd] <= as_r;
            retire = 1'b1;
          end
        end
        S_MULW: if (mm_done) begin
          rf[pd] <= mm_r;
          retire = 1'b1;
        end
        S_NEXT: begin
          if (left_q == 1) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else state_q <= S_STEP;
          left_q <= left_q - 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase

      if (retire) begin
        if (ins.last) state_q <= S_NEXT;
        else begin
          pc_q    <= pc_q + 1'b1;
          state_q <= S_RUN;
        end
      end
    end
  end
endmodule
