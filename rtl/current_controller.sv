// current_controller: phase current command modulators and the two PI
// current regulators of the field-oriented torque loop.
//   ia* = I* x ea,  ib* = I* x eb                 (e in Q9)
//   a(k) = Lim(Ki*(ia*-ia) + a(k-1)),  Da = Lim(Kp*(ia*-ia) + a(k))
//   b(k) = Lim(Ki*(ib*-ib) + b(k-1)),  Db = Lim(Kp*(ib*-ib) + b(k))
//   Dc = Lim(-Da - Db)
// Kp and Ki are Q10 (the same format as the speed loop; the document gives
// no format here). One multiplier and one adder are shared over eleven steps
// S0..S10, in the order of the documented computation schedule:
//   S0 I*ea | S1 -ia, I*eb | S2 Ki*ea_err, -ib | S3 +a(k-1), Ki*eb_err |
//   S4 Lim->a(k), Kp*ea_err | S5 +a(k), Kp*eb_err | S6 +b(k-1), Lim->b(k) |
//   S7 Lim->Da, 0-Da | S8 b(k)+Kp*eb_err | S9 Lim->Db, -Da-Db | S10 Lim->Dc
// done pulses one cycle after S10 with Da, Db, Dc updated together, twelve
// cycles after start. init clears both integrators.
module current_controller
  import pmsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic init,
  input  s16_t istar,
  input  s16_t ea,
  input  s16_t eb,
  input  s16_t ia,
  input  s16_t ib,
  input  s16_t kp,
  input  s16_t ki,
  input  s16_t lim,
  output s16_t da,
  output s16_t db,
  output s16_t dc,
  output logic done,
  output logic busy
);
  typedef enum logic [3:0] {IDLE, S0, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10} state_e;
  state_e state;

  logic signed [31:0] m, err_a, err_b, pia, pib, ppa, ppb, tsum;
  logic signed [31:0] a_int, b_int, da_r, db_r, nda;

  // shared arithmetic units
  logic signed [31:0] mul_x, mul_p, add_x, add_y, add_s;
  logic signed [15:0] mul_y;
  logic [3:0]         mul_sh;
  logic signed [47:0] mul_full;
  assign mul_full = mul_x * mul_y;
  assign mul_p    = 32'(mul_full >>> mul_sh);
  assign add_s    = add_x + add_y;

  always_comb begin
    mul_x = 32'(istar); mul_y = ea; mul_sh = 4'd9;
    add_x = '0;         add_y = '0;
    case (state)
      S0:  begin mul_x = 32'(istar); mul_y = ea; mul_sh = 4'd9; end
      S1:  begin add_x = m; add_y = -32'(ia);
                 mul_x = 32'(istar); mul_y = eb; mul_sh = 4'd9; end
      S2:  begin mul_x = err_a; mul_y = ki; mul_sh = 4'd10;
                 add_x = m; add_y = -32'(ib); end
      S3:  begin add_x = pia; add_y = a_int;
                 mul_x = err_b; mul_y = ki; mul_sh = 4'd10; end
      S4:  begin mul_x = err_a; mul_y = kp; mul_sh = 4'd10; end
      S5:  begin add_x = ppa; add_y = a_int;
                 mul_x = err_b; mul_y = kp; mul_sh = 4'd10; end
      S6:  begin add_x = pib; add_y = b_int; end
      S7:  begin add_x = '0; add_y = -limit32(tsum, lim); end
      S8:  begin add_x = b_int; add_y = ppb; end
      S9:  begin add_x = nda; add_y = -limit32(tsum, lim); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      {m, err_a, err_b, pia, pib, ppa, ppb, tsum} <= '0;
      {a_int, b_int, da_r, db_r, nda} <= '0;
      da <= '0; db <= '0; dc <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) state <= S0;
        S0:  begin m <= mul_p; state <= S1; end
        S1:  begin err_a <= add_s; m <= mul_p; state <= S2; end
        S2:  begin pia <= mul_p; err_b <= add_s; state <= S3; end
        S3:  begin tsum <= add_s; pib <= mul_p; state <= S4; end
        S4:  begin a_int <= limit32(tsum, lim); ppa <= mul_p; state <= S5; end
        S5:  begin tsum <= add_s; ppb <= mul_p; state <= S6; end
        S6:  begin b_int <= limit32(add_s, lim); state <= S7; end
        S7:  begin da_r <= limit32(tsum, lim); nda <= add_s; state <= S8; end
        S8:  begin tsum <= add_s; state <= S9; end
        S9:  begin db_r <= limit32(tsum, lim); tsum <= add_s; state <= S10; end
        S10: begin
          da    <= 16'(da_r);
          db    <= 16'(db_r);
          dc    <= 16'(limit32(tsum, lim));
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (init) begin
        a_int <= '0;
        b_int <= '0;
      end
    end
  end

  assign busy = (state != IDLE);
endmodule
