// kdc_arith - fixed-point arithmetic unit of the KDC-I.
//
// Works on the 23-digit double-length accumulator AC (sign + overflow
// digit v + 11 UA digits + 11 LA digits) in sign-magnitude decimal.  Every
// addition is a serial pass: the 23 digit positions go through one
// kdc_serial_adder, one digit per clock, least significant first.  A pass
// therefore takes 23 clocks; an operation is a sequence of passes:
//
//   AR_ADD  AC + opnd, opnd already aligned to the AC digits with its own
//           sign.  Unlike signs subtract in tens complement; when no carry
//           comes out of the top the result changed sign and a second,
//           recomplementing pass is made.                1 or 2 passes
//   AR_MUL  AC +/- MD * mplr.  The product is built in a hidden register
//           (the multiplier-quotient register MQ holds the multiplier):
//           for multiplier digit j (units first) MD shifted j places is
//           added as many times as the digit says.  The signed product is
//           then added to the AC.      (digit sum of multiplier) + 1 or 2
//   AR_DIV  |v,UA| must be below |MD| (MD overflow digit ignored), else
//           div_fail and the AC stays as it was.  Non-restoring division:
//           for each of the 11 quotient digits the shifted divisor is
//           subtracted until the partial remainder goes negative, and at
//           the next digit added until it is positive again; the number of
//           passes gives the digit.  A final add restores a negative
//           remainder.  UA <- quotient, LA <- remainder; rem_sign is the
//           dividend sign.
//   AR_DIVR as AR_DIV, then 2*remainder >= divisor adds one unit to the
//           quotient; LA <- 0.                        (two more passes)
//   AR_RND  adds 5 in the top LA digit, then clears LA.         1 pass
//
// Handshake: pulse start with op and operands while busy is low.  busy
// stays high until done, a one-clock pulse during which ac_out (and
// div_fail, rem_sign) are valid; ac_out holds its value until the next
// start.  From start to done: 23 clocks per pass plus one clock per
// multiplier digit looked at (AR_MUL), one per quotient position (AR_DIV)
// and one clock at the end.
//
// Serial addition, the MQ register and non-restoring division are the
// document's; the pass-per-unit multiplication, the division-impossible
// test and the rounding rules are this design's choices.
module kdc_arith
  import kdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  arith_op_t op,
  input  acc_t      ac_in,
  input  acc_t      opnd,
  input  word_t     md,
  input  word_t     mplr,
  input  logic      sub,
  output logic      busy,
  output logic      done,
  output acc_t      ac_out,
  output logic      div_fail,
  output logic      rem_sign
);
  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_MUL_STEP, S_DIV_STEP, S_DONE
  } state_t;

  // what the pass currently running is for
  typedef enum logic [3:0] {
    PH_ADD, PH_RECOMP, PH_MUL_PART, PH_MUL_FIN, PH_DIV, PH_DIV_RESTORE,
    PH_RND_DBL, PH_RND_CMP, PH_ROUND
  } phase_t;

  // source of the b operand of a pass
  typedef enum logic [2:0] {
    SRC_OPND, SRC_MDSH, SRC_P, SRC_X, SRC_FIVE
  } src_t;

  state_t    state;
  phase_t    phase;
  src_t      src;
  arith_op_t op_q;
  logic      tgt_p;     // pass writes p (else x)
  logic      a_zero;    // a input forced to zero (recomplement)
  logic      comp;
  logic      eff_sub;
  logic      neg;
  logic      fail_q;
  logic      rsign_q;
  logic [4:0] pos;
  logic [3:0] j;        // multiplier digit / quotient position
  logic [3:0] cnt;
  logic      sgn;

  digit_t [22:0] x;     // AC magnitude being formed
  digit_t [22:0] p;     // product / partial remainder
  digit_t [22:0] b_reg; // aligned operand
  digit_t [10:0] mq;    // multiplier, then quotient
  digit_t [10:0] mdm;   // divisor / multiplicand magnitude
  logic          psign; // sign of the operand added in the final pass

  digit_t a_d, b_d, s_d;
  logic   cout;

  kdc_serial_adder u_add (
    .clk, .rst_n, .en(state == S_PASS), .first(pos == 5'd0), .cin(comp),
    .a(a_d), .b(b_d), .comp_b(comp), .s(s_d), .cout
  );

  // digit of MD shifted j places, at position pos
  function automatic digit_t md_at(input digit_t [10:0] m, input logic [4:0] ps, input logic [3:0] sh);
    int k;
    k = int'(ps) - int'(sh);
    if (k >= 0 && k <= 10) return m[k];
    return 4'd0;
  endfunction

  always_comb begin
    a_d = a_zero ? 4'd0 : (tgt_p ? p[pos] : x[pos]);
    unique case (src)
      SRC_OPND: b_d = b_reg[pos];
      SRC_MDSH: b_d = md_at(mdm, pos, j);
      SRC_P:    b_d = p[pos];
      SRC_X:    b_d = x[pos];
      SRC_FIVE: b_d = (pos == 5'd10) ? 4'd5 : 4'd0;
      default:  b_d = 4'd0;
    endcase
  end

  assign busy     = (state != S_IDLE);
  assign ac_out   = '{sign: sgn, d: x};
  assign div_fail = fail_q;
  assign rem_sign = rsign_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; phase <= PH_ADD; src <= SRC_OPND; op_q <= AR_ADD;
      tgt_p <= 1'b0; a_zero <= 1'b0; comp <= 1'b0; eff_sub <= 1'b0; neg <= 1'b0;
      fail_q <= 1'b0; rsign_q <= 1'b0; pos <= '0; j <= '0; cnt <= '0; sgn <= 1'b0;
      x <= '0; p <= '0; b_reg <= '0; mq <= '0; mdm <= '0; psign <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q   <= op;
          x      <= ac_in.d;
          sgn    <= ac_in.sign;
          fail_q <= 1'b0;
          mdm    <= md.d[10:0];
          unique case (op)
            AR_ADD: begin
              b_reg   <= opnd.d;
              eff_sub <= ac_in.sign ^ opnd.sign;
              begin phase <= PH_ADD; src <= SRC_OPND; tgt_p <= 1'b0; comp <= ac_in.sign ^ opnd.sign; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
            end
            AR_MUL: begin
              p     <= '0;
              mq    <= mplr.d[10:0];
              psign <= md.sign ^ mplr.sign ^ sub;
              j     <= 4'd0;
              state <= S_MUL_STEP;
            end
            AR_DIV, AR_DIVR: begin
              rsign_q <= ac_in.sign;
              if ({ac_in.d[22:11]} >= {4'd0, md.d[10:0]}) begin
                fail_q <= 1'b1;
                state  <= S_DONE;
              end else begin
                p     <= ac_in.d;
                mq    <= '0;
                neg   <= 1'b0;
                j     <= 4'd10;
                cnt   <= 4'd0;
                state <= S_DIV_STEP;
              end
            end
            default: begin // AR_RND
              begin phase <= PH_ROUND; src <= SRC_FIVE; tgt_p <= 1'b0; comp <= 1'b0; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
            end
          endcase
        end

        S_PASS: begin
          if (tgt_p) p[pos] <= s_d;
          else       x[pos] <= s_d;
          if (pos != 5'd22) begin
            pos <= pos + 5'd1;
          end else begin
            unique case (phase)
              PH_ADD, PH_MUL_FIN: begin
                if (eff_sub && !cout) begin phase <= PH_RECOMP; src <= SRC_X; tgt_p <= 1'b0; comp <= 1'b1; a_zero <= 1'b1; pos <= 5'd0; state <= S_PASS; end
                else                  state <= S_DONE;
              end
              PH_RECOMP: begin
                sgn   <= ~sgn;
                state <= S_DONE;
              end
              PH_MUL_PART: begin
                mq[j] <= mq[j] - 4'd1;
                state <= S_MUL_STEP;
              end
              PH_DIV: begin
                if (!neg && !cout) begin
                  // went negative: digit = subtractions - 1
                  mq[j] <= cnt;
                  neg   <= 1'b1;
                  cnt   <= 4'd0;
                  if (j == 4'd0) begin phase <= PH_DIV_RESTORE; src <= SRC_MDSH; tgt_p <= 1'b1; comp <= 1'b0; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
                  else begin j <= j - 4'd1; state <= S_DIV_STEP; end
                end else if (neg && cout) begin
                  // back to positive: digit = 10 - additions
                  mq[j] <= 4'(4'd9 - cnt);
                  neg   <= 1'b0;
                  cnt   <= 4'd0;
                  if (j == 4'd0) begin
                    sgn <= sgn ^ md.sign;
                    if (op_q == AR_DIVR) begin
                      j <= 4'd0;
                      begin phase <= PH_RND_DBL; src <= SRC_P; tgt_p <= 1'b1; comp <= 1'b0; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
                    end else begin
                      x[22]    <= 4'd0;
                      x[21:11] <= mq;
                      x[10:0]  <= p[10:0];
                      state    <= S_DONE;
                    end
                  end
                  else begin j <= j - 4'd1; state <= S_DIV_STEP; end
                end else begin
                  cnt   <= cnt + 4'd1;
                  state <= S_DIV_STEP;
                end
              end
              PH_DIV_RESTORE: begin
                neg <= 1'b0;
                begin
                    sgn <= sgn ^ md.sign;
                    if (op_q == AR_DIVR) begin
                      j <= 4'd0;
                      begin phase <= PH_RND_DBL; src <= SRC_P; tgt_p <= 1'b1; comp <= 1'b0; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
                    end else begin
                      x[22]    <= 4'd0;
                      x[21:11] <= mq;
                      x[10:0]  <= p[10:0];
                      state    <= S_DONE;
                    end
                  end
              end
              PH_RND_DBL: begin phase <= PH_RND_CMP; src <= SRC_MDSH; tgt_p <= 1'b1; comp <= 1'b1; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
              PH_RND_CMP: begin
                x[21:11] <= word_inc('{sign: 1'b0, d: {4'd0, mq}}).d[10:0];
                x[22]    <= word_inc('{sign: 1'b0, d: {4'd0, mq}}).d[11];
                if (!cout) x[22:11] <= {4'd0, mq};
                x[10:0] <= '0;
                state   <= S_DONE;
              end
              default: begin // PH_ROUND
                x[10:0] <= '0;
                state   <= S_DONE;
              end
            endcase
          end
        end

        S_MUL_STEP: begin
          if (j == 4'd11) begin
            // add the signed product to the AC
            eff_sub <= sgn ^ psign;
            begin phase <= PH_MUL_FIN; src <= SRC_P; tgt_p <= 1'b0; comp <= sgn ^ psign; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
          end else if (mq[j] == 4'd0) begin
            j <= j + 4'd1;
          end else begin
            begin phase <= PH_MUL_PART; src <= SRC_MDSH; tgt_p <= 1'b1; comp <= 1'b0; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end
          end
        end

        S_DIV_STEP: begin phase <= PH_DIV; src <= SRC_MDSH; tgt_p <= 1'b1; comp <= !neg; a_zero <= 1'b0; pos <= 5'd0; state <= S_PASS; end

        default: begin // S_DONE
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
