// kdc_fpu - floating-point operations of the KDC-I.
//
// Number format (this design's choice; the machine puts the characteristic
// at the head of the word and the mantissa after it, so that normalised
// numbers compare like fixed-point ones):
//   storage word : d[11] = 0, d[10:9] characteristic c (two BCD digits,
//                  exponent c - 50), d[8:0] nine-digit mantissa 0.d8..d0,
//                  normalised (d[8] != 0) unless the number is zero.
//   accumulator  : v = d[22] exponent-overflow digit, d[21:20] c, d[19:0]
//                  a double-length mantissa (nine digits in the UA, eleven
//                  in the LA), so the UA holds an ordinary floating word.
// Value = sign * 0.mantissa * 10^(c-50).
//
// Operations (op):
//   FP_ADD  AC + opnd (opnd is the operand word with the sign already
//           chosen by the processor for FAD/FAA/FSB/FSA/FAM/FSM).  The
//           operand with the smaller exponent is shifted right to align;
//           unlike signs subtract the smaller magnitude from the larger.
//           The sum is normalised.                            one clock
//   FP_MUL  AC <- MD * opnd (sign inverted when neg is set, FMC).  Built
//           like the fixed-point multiply: for each multiplier digit the
//           multiplicand, shifted by the digit's place, is added once per
//           unit, one addition per clock.    (digit sum of multiplier) + 2
//   FP_RND  rounds the double-length mantissa to the nine UA digits and
//           clears the LA mantissa.                           one clock
//   FP_FFL  fixed (AC as a 23-digit fraction with units digit v) to
//           floating.                                         one clock
//   FP_FFX  floating to fixed; jump is set (AC unchanged) when the value
//           does not fit below 10.                            one clock
//   FP_DIV  AC / MD.  Restoring division, one subtraction per clock: for
//           each of nine quotient digits the divisor, aligned to that digit,
//           is subtracted while it fits.  When the dividend mantissa is not
//           below the divisor's the quotient starts at the units place and the
//           characteristic goes up by one, so the quotient is normalised.
//           UA <- quotient; LA <- the first eleven digits of the remainder,
//           aligned so that, read as a fraction, it is below the divisor's
//           mantissa.  A divisor whose first mantissa digit is zero (zero or
//           unnormalised) cannot divide: jump is set and the AC stays.
//                                     (sum of the quotient digits) + 9 + 2
//   FP_DIVR as FP_DIV with a tenth quotient digit that rounds the ninth;
//           LA <- 0.                  (sum of the quotient digits) + 10 + 2
//   FP_ADIV AC + opnd (as FP_ADD), then FP_DIVR of the sum; when the divisor
//           cannot divide, ac_out is the sum and jump is set.
// fsl_w is the LA mantissa as a floating word with the compensating
// characteristic c - 9 (FSL), formed combinationally from ac_in.
//
// Exponent overflow (c above 99) sets v = 2, which JEO tests; exponent
// underflow gives zero.  Zero is all digits zero with a plus sign.
//
// Handshake as kdc_arith: pulse start while busy is low; done pulses with
// ac_out and jump valid.  The digit adders here work on whole mantissas in
// parallel, not digit-serially through the serial adder.
module kdc_fpu
  import kdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fp_op_t      op,
  input  acc_t        ac_in,
  input  word_t       opnd,
  input  word_t       md,
  input  logic        neg,
  output logic        busy,
  output logic        done,
  output acc_t        ac_out,
  output logic        jump,
  output word_t       fsl_w
);
  typedef digit_t [20:0] man_t;   // d[20] carry digit, d[19:0] mantissa

  function automatic man_t man_add(input man_t a, input man_t b);
    man_t r;
    logic [4:0] t;
    logic c;
    c = 1'b0;
    for (int i = 0; i < 21; i++) begin
      t = bcd_digit_add(a[i], b[i], c);
      r[i] = t[3:0];
      c = t[4];
    end
    return r;
  endfunction

  // a - b for a >= b
  function automatic man_t man_sub(input man_t a, input man_t b);
    man_t r;
    logic [4:0] t;
    logic c;
    c = 1'b1;
    for (int i = 0; i < 21; i++) begin
      t = bcd_digit_add(a[i], 4'(4'd9 - b[i]), c);
      r[i] = t[3:0];
      c = t[4];
    end
    return r;
  endfunction

  function automatic man_t man_shr(input man_t a, input int n);
    if (n >= 21) return '0;
    return a >> (4 * n);
  endfunction

  function automatic man_t man_shl(input man_t a, input int n);
    if (n >= 21) return '0;
    return a << (4 * n);
  endfunction

  function automatic int char_of(input digit_t hi, input digit_t lo);
    return int'(hi) * 10 + int'(lo);
  endfunction

  // normalise a mantissa (carry digit allowed) and pack into the AC
  function automatic acc_t pack(input logic s, input int c, input man_t m);
    acc_t r;
    int   lz;
    int   cc;
    man_t mm;
    r  = '0;
    mm = m;
    cc = c;
    if (mm[20] != 4'd0) begin
      mm = man_shr(mm, 1);
      cc = cc + 1;
    end else begin
      lz = 20;
      for (int i = 0; i < 20; i++) if (mm[i] != 4'd0) lz = 19 - i;
      if (lz == 20) return '0;
      mm = man_shl(mm, lz);
      cc = cc - lz;
    end
    if (cc < 0) return '0;
    r.sign = s;
    if (cc > 99) begin
      r.d[22] = 4'd2;
      cc = cc - 100;
    end
    r.d[21]    = 4'(cc / 10);
    r.d[20]    = 4'(cc % 10);
    r.d[19:0]  = mm[19:0];
    return r;
  endfunction

  function automatic acc_t f_add(input acc_t a, input word_t b);
    int   ca, cb, df;
    man_t ma, mb, big, sml, sum;
    logic sa, sb, sbig, ssml;
    int   cbig;
    ca = char_of(a.d[21], a.d[20]);
    cb = char_of(b.d[10], b.d[9]);
    ma = {4'd0, a.d[19:0]};
    mb = {4'd0, b.d[8:0], 44'd0};
    sa = a.sign;
    sb = b.sign;
    if (mb == '0) return pack(sa, ca, ma);
    if (ma == '0) return pack(sb, cb, mb);
    if (ca >= cb) begin
      df = ca - cb; big = ma; sbig = sa; sml = man_shr(mb, df); ssml = sb; cbig = ca;
    end else begin
      df = cb - ca; big = mb; sbig = sb; sml = man_shr(ma, df); ssml = sa; cbig = cb;
    end
    if (sbig == ssml)   return pack(sbig, cbig, man_add(big, sml));
    if (big >= sml)     return pack(sbig, cbig, man_sub(big, sml));
    return pack(ssml, cbig, man_sub(sml, big));
  endfunction

  function automatic acc_t f_rnd(input acc_t a);
    man_t m;
    m = {4'd0, a.d[19:0]};
    if (m == '0) return '0;
    m = man_add(m, man_t'({4'd5, 40'd0}));
    m[10:0] = '0;
    return pack(a.sign, char_of(a.d[21], a.d[20]), m);
  endfunction

  function automatic acc_t f_ffl(input acc_t a);
    int   k;
    man_t m;
    digit_t [22:0] v;
    k = -1;
    for (int i = 0; i < 23; i++) if (a.d[i] != 4'd0) k = i;
    if (k < 0) return '0;
    v = a.d << (4 * (22 - k));
    m = {4'd0, v[22:3]};
    return pack(a.sign, k - 21 + 50, m);
  endfunction

  // floating to fixed; bit 93 set when the value does not fit
  function automatic logic [93:0] f_ffx(input acc_t a);
    int e;
    digit_t [22:0] v;
    acc_t r;
    e = char_of(a.d[21], a.d[20]) - 50;
    if (a.d[19:0] == '0) return '0;
    if (e > 1) return {1'b1, a};
    v = {4'd0, a.d[19:0], 8'd0};
    if (e >= 0) v = v << (4 * e);
    else if (-e > 22) v = '0;
    else v = v >> (4 * (-e));
    r.sign = a.sign;
    r.d    = v;
    return {1'b0, r};
  endfunction

  always_comb begin
    int c;
    c = char_of(ac_in.d[21], ac_in.d[20]) - 9;
    if (c < 0) c = 0;
    fsl_w      = '0;
    fsl_w.sign = ac_in.sign;
    fsl_w.d[10] = 4'(c / 10);
    fsl_w.d[9]  = 4'(c % 10);
    fsl_w.d[8:0] = ac_in.d[10:2];
  end

  // ------------------------------------------------------ sequencing
  typedef enum logic [1:0] {F_IDLE, F_MUL, F_DIV, F_DONE} fstate_t;
  fstate_t       st;
  digit_t [8:0]  mq;      // multiplier digits
  man_t          prod;
  man_t          mcand;
  logic [3:0]    j;
  logic          psign;
  int            pchar;
  acc_t          res;
  logic          jmp_q;
  man_t          rem;     // partial remainder
  man_t          dvs;     // divisor aligned to the current quotient digit
  digit_t [9:0]  quo;     // quotient digits, shifted in at the bottom
  digit_t        qdig;    // digit being counted
  logic [3:0]    ndig;    // quotient digits still to form
  logic          dround;  // round (FP_DIVR, FP_ADIV)
  logic          dhigh;   // divisor started one place higher
  acc_t          dvd;     // dividend: AC, or the sum for FP_ADIV

  assign dvd = (op == FP_ADIV) ? f_add(ac_in, opnd) : ac_in;

  // finished division: normalised quotient, remainder or rounding
  function automatic acc_t div_result(input logic s, input int c, input digit_t [9:0] q,
                                      input man_t r, input logic rnd, input logic hi);
    man_t m;
    m = '0;
    if (rnd) begin
      m[19:11] = q[9:1];
      if (q[0] >= 4'd5) m = man_add(m, man_t'({4'd1, 44'd0}));
    end else begin
      m[19:11] = q[8:0];
      m[10:0]  = hi ? r[11:1] : r[10:0];
    end
    return pack(s, c, m);
  endfunction

  assign busy   = (st != F_IDLE);
  assign ac_out = res;
  assign jump   = jmp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; mq <= '0; prod <= '0; mcand <= '0; j <= '0; psign <= 1'b0; pchar <= 0;
      res <= '0; jmp_q <= 1'b0; done <= 1'b0;
      rem <= '0; dvs <= '0; quo <= '0; qdig <= '0; ndig <= '0; dround <= 1'b0; dhigh <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        F_IDLE: if (start) begin
          jmp_q <= 1'b0;
          res   <= ac_in;
          st    <= F_DONE;
          unique case (op)
            FP_ADD: res <= f_add(ac_in, opnd);
            FP_RND: res <= f_rnd(ac_in);
            FP_FFL: res <= f_ffl(ac_in);
            FP_FFX: begin
              if (f_ffx(ac_in)[93]) jmp_q <= 1'b1;
              else                  res   <= f_ffx(ac_in)[92:0];
            end
            FP_DIV, FP_DIVR, FP_ADIV: begin
              dround <= (op != FP_DIV);
              psign  <= dvd.sign ^ md.sign;
              rem    <= {4'd0, dvd.d[19:0]};
              quo    <= '0;
              qdig   <= '0;
              ndig   <= (op == FP_DIV) ? 4'd9 : 4'd10;
              res    <= dvd;
              if (md.d[8] == 4'd0) jmp_q <= 1'b1;
              else if (dvd.d[19:0] == '0) res <= '0;
              else begin
                st <= F_DIV;
                if ({4'd0, dvd.d[19:0]} >= man_t'({md.d[8:0], 44'd0})) begin
                  dhigh <= 1'b1;
                  dvs   <= {4'd0, md.d[8:0], 44'd0};
                  pchar <= char_of(dvd.d[21], dvd.d[20]) - char_of(md.d[10], md.d[9]) + 51;
                end else begin
                  dhigh <= 1'b0;
                  dvs   <= {8'd0, md.d[8:0], 40'd0};
                  pchar <= char_of(dvd.d[21], dvd.d[20]) - char_of(md.d[10], md.d[9]) + 50;
                end
              end
            end
            default: begin // FP_MUL
              mq    <= opnd.d[8:0];
              mcand <= {4'd0, md.d[8:0], 44'd0};
              prod  <= '0;
              j     <= 4'd0;
              psign <= md.sign ^ opnd.sign ^ neg;
              pchar <= char_of(md.d[10], md.d[9]) + char_of(opnd.d[10], opnd.d[9]) - 50;
              if (md.d[8:0] == '0 || opnd.d[8:0] == '0) res <= '0;
              else st <= F_MUL;
            end
          endcase
        end
        F_MUL: begin
          // multiplier digit j (units first) weighs 10^(j-9): the
          // multiplicand shifted right by 9-j places
          if (j == 4'd9) begin
            res <= pack(psign, pchar, prod);
            st  <= F_DONE;
          end else if (mq[j] == 4'd0) begin
            j <= j + 4'd1;
          end else begin
            prod  <= man_add(prod, man_shr(mcand, 9 - int'(j)));
            mq[j] <= mq[j] - 4'd1;
          end
        end
        F_DIV: begin
          if (ndig == 4'd0) begin
            res <= div_result(psign, pchar, quo, rem, dround, dhigh);
            st  <= F_DONE;
          end else if (rem >= dvs) begin
            rem  <= man_sub(rem, dvs);
            qdig <= qdig + 4'd1;
          end else begin
            quo  <= {quo[8:0], qdig};
            qdig <= 4'd0;
            dvs  <= man_shr(dvs, 1);
            ndig <= ndig - 4'd1;
          end
        end
        default: begin
          done <= 1'b1;
          st   <= F_IDLE;
        end
      endcase
    end
  end
endmodule
