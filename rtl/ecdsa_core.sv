// ecdsa_core: elliptic-curve point multiplication over the NIST prime field
// P-256, the computation at the heart of ECDSA signing (kP) and verification
// (kP + lQ).
//
// Points are kept in Chudnovsky projective coordinates (X, Y, Z, Z^2, Z^3), so
// no field inversion is needed anywhere; the result is returned projectively and
// the affine x = X/Z^2, y = Y/Z^3 is left to the consumer. The scalar is scanned
// from the most significant bit with the binary double-and-add method. For
// kP + lQ the bits of k and l are scanned together (Shamir's trick): P + Q is
// computed once at the start and, after each doubling, one of P, Q or P + Q is
// added according to the bit pair.
//
// Field arithmetic: one modular adder/subtractor (mod_addsub) and one modular
// multiplier made of a serial-to-parallel full-product multiplier (p256_mul)
// followed by the NIST fast reduction (p256_reduce). A small sequencer steps
// through two fixed micro-programs, point doubling (9 multiplications, a = -3)
// and general point addition (14 multiplications), over a 16-entry register file
// of field elements.
//
// Not handled (as in a plain double-and-add): adding a point to itself or to
// its negative inside the loop, and P + Q = infinity. For random 256-bit
// scalars and independent P, Q these cases do not occur in practice. A zero
// scalar gives 'inf' = 1.
//
// Interface: inputs are sampled on 'start'; 'mode' = 0 computes kP, 1 computes
// kP + lQ. P and Q are affine (Z = 1). 'done' pulses once the result is on
// x_o/y_o/z_o; the outputs hold until the next start.
// Timing: about 300 clocks per doubling and 460 per addition, roughly 135k
// clocks for a 256-bit kP and 180k for kP + lQ.
module ecdsa_core
  import copa_pkg::*;
#(
  parameter int unsigned W     = 256,
  parameter int unsigned DIGIT = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         mode,      // 0: kP, 1: kP + lQ
  input  logic [W-1:0] k,
  input  logic [W-1:0] l,
  input  logic [W-1:0] px, py,
  input  logic [W-1:0] qx, qy,
  output logic         busy,
  output logic         done,
  output logic         inf,       // result is the point at infinity
  output logic [W-1:0] x_o, y_o, z_o
);
  // register file indices
  localparam logic [3:0] RX = 4'd0, RY = 4'd1, RZ = 4'd2, RZZ = 4'd3, RZZZ = 4'd4;
  localparam logic [3:0] AX = 4'd5, AY = 4'd6, AZ = 4'd7, AZZ = 4'd8, AZZZ = 4'd9;
  localparam logic [3:0] T0 = 4'd10, T1 = 4'd11, T2 = 4'd12, T3 = 4'd13, T4 = 4'd14, T5 = 4'd15;
  localparam logic [5:0] PC_DBL = 6'd0, PC_ADD = 6'd23;

  typedef struct packed {
    fop_e       op;
    logic [3:0] d, a, b;
    logic       last;
  } uinstr_t;

  function automatic uinstr_t ui(fop_e op, logic [3:0] d, logic [3:0] a, logic [3:0] b, logic last = 1'b0);
    return '{op: op, d: d, a: a, b: b, last: last};
  endfunction

  // micro-programs: doubling (0..22), addition R = R + A (23..43)
  function automatic uinstr_t urom(logic [5:0] pc);
    unique case (pc)
      // ---- doubling, a = -3: M = 3(X - Z^2)(X + Z^2), S = 4XY^2
      6'd0:  return ui(FOP_SUB, T0, RX, RZZ);
      6'd1:  return ui(FOP_ADD, T1, RX, RZZ);
      6'd2:  return ui(FOP_MUL, T0, T0, T1);
      6'd3:  return ui(FOP_ADD, T1, T0, T0);
      6'd4:  return ui(FOP_ADD, T0, T0, T1);     // M
      6'd5:  return ui(FOP_MUL, T1, RY, RY);     // Y^2
      6'd6:  return ui(FOP_MUL, T2, RX, T1);
      6'd7:  return ui(FOP_ADD, T2, T2, T2);
      6'd8:  return ui(FOP_ADD, T2, T2, T2);     // S
      6'd9:  return ui(FOP_MUL, T3, T1, T1);     // Y^4
      6'd10: return ui(FOP_ADD, T3, T3, T3);
      6'd11: return ui(FOP_ADD, T3, T3, T3);
      6'd12: return ui(FOP_ADD, T3, T3, T3);     // 8Y^4
      6'd13: return ui(FOP_MUL, RZ, RY, RZ);
      6'd14: return ui(FOP_ADD, RZ, RZ, RZ);     // Z' = 2YZ
      6'd15: return ui(FOP_MUL, RX, T0, T0);
      6'd16: return ui(FOP_SUB, RX, RX, T2);
      6'd17: return ui(FOP_SUB, RX, RX, T2);     // X' = M^2 - 2S
      6'd18: return ui(FOP_SUB, T2, T2, RX);
      6'd19: return ui(FOP_MUL, T2, T0, T2);
      6'd20: return ui(FOP_SUB, RY, T2, T3);     // Y' = M(S - X') - 8Y^4
      6'd21: return ui(FOP_MUL, RZZ, RZ, RZ);
      6'd22: return ui(FOP_MUL, RZZZ, RZZ, RZ, 1'b1);
      // ---- addition
      6'd23: return ui(FOP_MUL, T0, RX, AZZ);    // U1
      6'd24: return ui(FOP_MUL, T1, AX, RZZ);    // U2
      6'd25: return ui(FOP_MUL, T2, RY, AZZZ);   // S1
      6'd26: return ui(FOP_MUL, T3, AY, RZZZ);   // S2
      6'd27: return ui(FOP_SUB, T1, T1, T0);     // H
      6'd28: return ui(FOP_SUB, T3, T3, T2);     // r
      6'd29: return ui(FOP_MUL, T4, T1, T1);     // H^2
      6'd30: return ui(FOP_MUL, T5, T4, T1);     // H^3
      6'd31: return ui(FOP_MUL, T4, T0, T4);     // V = U1 H^2
      6'd32: return ui(FOP_MUL, RZ, RZ, AZ);
      6'd33: return ui(FOP_MUL, RZ, RZ, T1);     // Z3 = Z1 Z2 H
      6'd34: return ui(FOP_MUL, RX, T3, T3);
      6'd35: return ui(FOP_SUB, RX, RX, T5);
      6'd36: return ui(FOP_SUB, RX, RX, T4);
      6'd37: return ui(FOP_SUB, RX, RX, T4);     // X3 = r^2 - H^3 - 2V
      6'd38: return ui(FOP_SUB, T4, T4, RX);
      6'd39: return ui(FOP_MUL, T4, T3, T4);
      6'd40: return ui(FOP_MUL, T5, T2, T5);
      6'd41: return ui(FOP_SUB, RY, T4, T5);     // Y3 = r(V - X3) - S1 H^3
      6'd42: return ui(FOP_MUL, RZZ, RZ, RZ);
      6'd43: return ui(FOP_MUL, RZZZ, RZZ, RZ, 1'b1);
      default: return ui(FOP_ADD, T0, T0, T0, 1'b1);
    endcase
  endfunction

  typedef enum logic [2:0] { S_IDLE, S_STEP, S_ADDSEL, S_NEXT, S_RUN, S_MULW, S_REDW } state_e;
  typedef enum logic [1:0] { PH_PRE, PH_DBL, PH_ADD } phase_e;

  state_e          state_q;
  phase_e          phase_q;
  logic [W-1:0]    rf [16];
  logic [W-1:0]    k_q, l_q, px_q, py_q, qx_q, qy_q;
  logic [W-1:0]    s_q [5];                    // P + Q in Chudnovsky form
  logic            mode_q, inf_q;
  logic [$clog2(W)-1:0] bit_q;
  logic [5:0]      pc_q;
  uinstr_t         ins;
  logic [W-1:0]    opa, opb, as_r;
  logic [1:0]      sel;

  // arithmetic units
  logic            mul_start, mul_done, red_done;
  logic [2*W-1:0]  prod;
  logic [255:0]    red_r;

  assign ins = urom(pc_q);
  assign opa = rf[ins.a];
  assign opb = rf[ins.b];
  assign sel = {k_q[bit_q], l_q[bit_q] & mode_q};
  assign mul_start = (state_q == S_RUN) && (ins.op == FOP_MUL);

  mod_addsub #(.W(W)) u_addsub (.a(opa), .b(opb), .m(P256), .sub(ins.op == FOP_SUB), .r(as_r));

  p256_mul #(.W(W), .DIGIT(DIGIT)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(opa), .b(opb),
    .busy(), .done(mul_done), .c(prod));

  p256_reduce u_red (
    .clk, .rst_n, .start(mul_done), .c(prod),
    .busy(), .done(red_done), .r(red_r));

  assign busy = (state_q != S_IDLE);
  assign inf  = inf_q;
  assign x_o  = rf[RX];
  assign y_o  = rf[RY];
  assign z_o  = rf[RZ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      phase_q <= PH_DBL;
      pc_q    <= '0;
      bit_q   <= '0;
      mode_q  <= 1'b0;
      inf_q   <= 1'b1;
      done    <= 1'b0;
      k_q <= '0; l_q <= '0; px_q <= '0; py_q <= '0; qx_q <= '0; qy_q <= '0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
      for (int i = 0; i < 5; i++)  s_q[i] <= '0;
    end else begin
      logic retire;
      retire = 1'b0;
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q <= k; l_q <= l; px_q <= px; py_q <= py; qx_q <= qx; qy_q <= qy;
          mode_q <= mode;
          bit_q  <= $clog2(W)'(W - 1);
          inf_q  <= 1'b1;
          if (mode) begin
            // precompute P + Q: R = P, A = Q
            rf[RX] <= px; rf[RY] <= py; rf[RZ] <= W'(1); rf[RZZ] <= W'(1); rf[RZZZ] <= W'(1);
            rf[AX] <= qx; rf[AY] <= qy; rf[AZ] <= W'(1); rf[AZZ] <= W'(1); rf[AZZZ] <= W'(1);
            phase_q <= PH_PRE;
            pc_q    <= PC_ADD;
            state_q <= S_RUN;
          end else begin
            state_q <= S_STEP;
          end
        end

        S_STEP: begin
          if (inf_q) state_q <= S_ADDSEL;
          else begin
            phase_q <= PH_DBL;
            pc_q    <= PC_DBL;
            state_q <= S_RUN;
          end
        end

        S_ADDSEL: begin
          logic [W-1:0] ax, ay, az, azz, azzz;
          unique case (sel)
            2'b10:   begin ax = px_q;   ay = py_q;   az = W'(1); azz = W'(1); azzz = W'(1); end
            2'b01:   begin ax = qx_q;   ay = qy_q;   az = W'(1); azz = W'(1); azzz = W'(1); end
            default: begin ax = s_q[0]; ay = s_q[1]; az = s_q[2]; azz = s_q[3]; azzz = s_q[4]; end
          endcase
          if (sel == 2'b00) state_q <= S_NEXT;
          else if (inf_q) begin
            // infinity + A = A
            rf[RX] <= ax; rf[RY] <= ay; rf[RZ] <= az; rf[RZZ] <= azz; rf[RZZZ] <= azzz;
            inf_q   <= 1'b0;
            state_q <= S_NEXT;
          end else begin
            rf[AX] <= ax; rf[AY] <= ay; rf[AZ] <= az; rf[AZZ] <= azz; rf[AZZZ] <= azzz;
            phase_q <= PH_ADD;
            pc_q    <= PC_ADD;
            state_q <= S_RUN;
          end
        end

        S_NEXT: begin
          if (bit_q == '0) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            bit_q   <= bit_q - 1'b1;
            state_q <= S_STEP;
          end
        end

        S_RUN: begin
          if (ins.op == FOP_MUL) state_q <= S_MULW;
          else begin
            rf[ins.d] <= as_r;
            retire = 1'b1;
          end
        end

        S_MULW: if (mul_done) state_q <= S_REDW;

        S_REDW: if (red_done) begin
          rf[ins.d] <= red_r;
          retire = 1'b1;
        end

        default: state_q <= S_IDLE;
      endcase

      // end of one micro-instruction: advance or leave the program
      if (retire) begin
        if (ins.last) begin
          unique case (phase_q)
            PH_PRE: begin
              for (int i = 0; i < 4; i++) s_q[i] <= rf[i];
              s_q[4]  <= red_r;           // Z^3 is being written this clock
              inf_q   <= 1'b1;
              state_q <= S_STEP;
            end
            PH_DBL:  state_q <= S_ADDSEL;
            default: state_q <= S_NEXT;
          endcase
        end else begin
          pc_q    <= pc_q + 1'b1;
          state_q <= S_RUN;
        end
      end
    end
  end
endmodule
