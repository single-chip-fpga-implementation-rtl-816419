// sensorless_estimator: flux-linkage based incremental rotor position
// estimator with its position integrator.
//
// Per sampling period k it evaluates
//   dpsi_x = (C*Dx - ix)*A - (ix(k) - ix(k-1))          x = a, b, c
//   dtheta = alpha*w^ - B*(dpsi_a*eb + dpsi_b*ec + dpsi_c*ea)
//   theta(k) = theta(k-1) + dtheta      (mod 8000 counts per electrical turn)
// with A in Q11, B in Q10, C in Q3 and alpha in Q14. B is programmed as the
// magnitude of the document's B, whose sign is negative (its denominator
// carries -0.75); the subtraction above applies that sign. The phase voltages
// are taken from the duties Dx applied in the period that just ended.
// One multiplier (32 x 16 bits, with a per-step right shift) and one 32-bit
// adder are shared over fifteen steps S0..S14 in the order of the documented
// computation schedule. Intermediate values keep extra fraction bits
// (C*D in Q3, dpsi and dtheta in Q14) to limit truncation error; the position
// register holds 14 fraction bits and theta is its integer part.
// done pulses one cycle after S14, sixteen cycles after start.
// init loads theta from theta_init and the previous-sample currents from the
// present inputs (used at the start-up hand-over).
module sensorless_estimator
  import pmsm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                init,
  input  logic [THETA_W-1:0]  theta_init,
  input  s16_t                da, db, dc,
  input  s16_t                ia, ib, ic,
  input  s16_t                ea, eb, ec,
  input  s16_t                w_hat,
  input  s16_t                coef_a, coef_b, coef_c, alpha,
  output logic [THETA_W-1:0]  theta,
  output logic signed [31:0]  dtheta_q,
  output logic                done,
  output logic                busy
);
  localparam logic signed [31:0] MODQ = 32'(THETA_COUNTS) <<< THETA_FRAC;

  typedef enum logic [3:0] {IDLE, S0, S1, S2, S3, S4, S5, S6, S7, S8, S9,
                            S10, S11, S12, S13, S14} state_e;
  state_e state;

  logic signed [31:0] theta_q;
  s16_t               ia_p, ib_p, ic_p;
  logic signed [31:0] pa, pb, pc, xa, xb, xc, ya, yb, yc;
  logic signed [31:0] dia, dib, dic, fa, fb, fc, ga, gb, wt, s;
  logic signed [31:0] mul_p_hold;  // product held for the next step's adder

  logic signed [31:0] mul_x, mul_p, add_x, add_y, add_s;
  logic signed [15:0] mul_y;
  logic [3:0]         mul_sh;
  logic signed [47:0] mul_full;
  assign mul_full = mul_x * mul_y;
  assign mul_p    = 32'(mul_full >>> mul_sh);
  assign add_s    = add_x + add_y;

  always_comb begin
    mul_x = 32'(da); mul_y = coef_c; mul_sh = 4'd0;
    add_x = '0;      add_y = '0;
    case (state)
      S0:  begin mul_x = 32'(da); mul_y = coef_c; end
      S1:  begin add_x = pa; add_y = -(32'(ia) <<< 3);
                 mul_x = 32'(db); mul_y = coef_c; end
      S2:  begin add_x = pb; add_y = -(32'(ib) <<< 3);
                 mul_x = 32'(dc); mul_y = coef_c; end
      S3:  begin add_x = pc; add_y = -(32'(ic) <<< 3); end
      S4:  begin mul_x = xa; mul_y = coef_a;
                 add_x = 32'(ia); add_y = -32'(ia_p); end
      S5:  begin add_x = ya; add_y = -(dia <<< THETA_FRAC);
                 mul_x = xb; mul_y = coef_a; end
      S6:  begin add_x = 32'(ib); add_y = -32'(ib_p);
                 mul_x = xc; mul_y = coef_a; end
      S7:  begin mul_x = fa; mul_y = eb; mul_sh = 4'd9;
                 add_x = yb; add_y = -(dib <<< THETA_FRAC); end
      S8:  begin mul_x = fb; mul_y = ec; mul_sh = 4'd9;
                 add_x = 32'(ic); add_y = -32'(ic_p); end
      S9:  begin add_x = yc; add_y = -(dic <<< THETA_FRAC);
                 mul_x = 32'(w_hat); mul_y = alpha; end
      S10: begin add_x = ga; add_y = gb;
                 mul_x = fc; mul_y = ea; mul_sh = 4'd9; end
      S11: begin add_x = s; add_y = mul_p_hold; end
      S12: begin mul_x = s; mul_y = coef_b; mul_sh = 4'd10; end
      S13: begin add_x = wt; add_y = -mul_p_hold; end
      S14: begin add_x = theta_q; add_y = s; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      theta_q <= '0;
      {ia_p, ib_p, ic_p} <= '0;
      {pa, pb, pc, xa, xb, xc, ya, yb, yc} <= '0;
      {dia, dib, dic, fa, fb, fc, ga, gb, wt, s} <= '0;
      mul_p_hold <= '0;
      dtheta_q <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) state <= S0;
        S0:  begin pa <= mul_p; state <= S1; end
        S1:  begin xa <= add_s; pb <= mul_p; state <= S2; end
        S2:  begin xb <= add_s; pc <= mul_p; state <= S3; end
        S3:  begin xc <= add_s; state <= S4; end
        S4:  begin ya <= mul_p; dia <= add_s; state <= S5; end
        S5:  begin fa <= add_s; yb <= mul_p; state <= S6; end
        S6:  begin dib <= add_s; yc <= mul_p; state <= S7; end
        S7:  begin ga <= mul_p; fb <= add_s; state <= S8; end
        S8:  begin gb <= mul_p; dic <= add_s; state <= S9; end
        S9:  begin fc <= add_s; wt <= mul_p; state <= S10; end
        S10: begin s <= add_s; mul_p_hold <= mul_p; state <= S11; end
        S11: begin s <= add_s; state <= S12; end
        S12: begin mul_p_hold <= mul_p; state <= S13; end
        S13: begin s <= add_s; dtheta_q <= add_s; state <= S14; end
        S14: begin
          if (add_s >= MODQ)   theta_q <= add_s - MODQ;
          else if (add_s < 0)  theta_q <= add_s + MODQ;
          else                 theta_q <= add_s;
          ia_p <= ia; ib_p <= ib; ic_p <= ic;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (init) begin
        theta_q <= 32'(theta_init) <<< THETA_FRAC;
        ia_p <= ia; ib_p <= ib; ic_p <= ic;
      end
    end
  end

  assign theta = THETA_W'(theta_q >>> THETA_FRAC);
  assign busy  = (state != IDLE);
endmodule
