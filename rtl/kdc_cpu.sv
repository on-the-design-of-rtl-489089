// kdc_cpu - central processing unit of the KDC-I (control and registers).
//
// Holds the programmer's registers - the accumulator AC (UA + LA, 23
// digits), the multiplicand-divisor register MD, the order register OR and
// the location counter LC - together with the P-indicator and the remainder
// indicator, and sequences every instruction:
//
//   fetch     the word at c(LC) is read into OR
//   decode    an odd operation code clears the AC first; the effective
//             address E = #IJA is formed by kdc_index_unit (with c(OR)ad
//             when the P-indicator is on, which is then turned off)
//   operand   instructions that use c(E) read it
//   execute   fixed-point arithmetic in kdc_arith, logical operations in
//             kdc_logic_unit, shifts in kdc_shifter, floating point in
//             kdc_fpu, index operations in
//             kdc_index_unit; stores, jumps, CMP, TLU, PSX, SCT, block
//             transfers (LDQ/STQ/DMB/BDM) and the tape and I/O commands
//             are sequenced here
//   next      LC <- LC+1, or the jump target, or LC+2 / LC+3 for skips
//
// Interfaces: a request/acknowledge port to kdc_memory (hold m_req until
// m_ack); start/busy/done handshakes to the tape control unit and the I/O
// control, which then run concurrently with the processor; console start
// input, ten jump switches for JSW, and halted / alarm outputs.  A memory
// read error or an operation code the machine does not have stops the
// processor with alarm set.  retire pulses once per finished instruction
// with its operation code in retire_op.
//
// The instruction set and its effects are the document's (Table 1 and the
// descriptions of the logical and special operations).  The layout of the
// instruction word, the handling of index digits 5-9, the reading of the
// damaged JXU entry, the block-transfer word counts and the timing (the
// sum of the memory waits and the unit times, not the table's figures) are
// this design's.  The floating-point operations run in kdc_fpu (in this
// design's number format); FDJ/FDR jump to E and FAV halts after the
// addition when the divisor cannot divide.  FWR is sent to the I/O control
// as a write of eleven digits: the mantissa, then the characteristic (this
// design's printed form).  The alphanumeric I/O modes are not executed.
module kdc_cpu
  import kdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [9:0]  switches,
  // memory
  output logic        m_req,
  output logic        m_we,
  output logic [15:0] m_addr,
  output word_t       m_wdata,
  input  logic        m_ack,
  input  word_t       m_rdata,
  input  logic        m_err,
  // magnetic tape control
  output logic        mt_start,
  output mt_cmd_t     mt_cmd,
  output logic [1:0]  mt_unit,
  output logic [15:0] mt_blkno,
  input  logic        mt_busy,
  input  logic        mt_done,
  input  logic        mt_tc_ind,
  input  logic [3:0]  mt_te_ind,
  input  logic        mt_blk_match,
  // input-output control
  output logic        io_start,
  output io_cmd_t     io_cmd,
  output logic [15:0] io_n,
  output word_t       io_ua,
  input  logic        io_busy,
  input  logic        io_done,
  input  word_t       io_ua_in,
  // status
  output logic        halted,
  output logic        alarm,
  output logic        p_ind,
  output logic [15:0] lc,
  output acc_t        ac,
  output word_t       md,
  output logic        retire,
  output logic [11:0] retire_op
);
  typedef enum logic [4:0] {
    S_HALT, S_FETCH, S_DECODE, S_OPREAD, S_EXEC, S_ARITH, S_ADR2, S_STORE,
    S_TLU_RD, S_BLK_RD, S_BLK_WR, S_MT_WAIT, S_IO_WAIT, S_FPU, S_NEXT
  } state_t;

  state_t      state;
  word_t       or_q;          // order register
  logic [15:0] or_ad_q;       // address part placed in OR by PSX / SCT / TLU
  logic [15:0] e_q;           // effective address
  logic [15:0] next_lc;
  word_t       opw;           // c(E)
  word_t       mbr;           // word to store
  logic [15:0] mar;
  logic        r_ind, rem_sign_q;
  logic        halt_req;
  logic        adr_second;
  logic [13:0] blk_src, blk_dst;
  logic [6:0]  blk_cnt;
  logic [13:0] tlu_end;

  logic [11:0] op12, ope;
  logic        clr;
  digit_t      i_dig, j_dig;
  logic        i_is_index;
  logic [15:0] ea;
  logic [15:0] ir [1:3];

  assign op12  = {or_q.d[10], or_q.d[9], or_q.d[8]};
  assign clr   = op12[0];
  assign ope   = {op12[11:1], 1'b0};
  assign i_dig = or_q.d[7];
  assign j_dig = or_q.d[6];

  function automatic logic legal(input logic [11:0] o);
    case (o)
      OP_ADD, OP_ADA, OP_SUB, OP_SBA, OP_ADM, OP_SBM, OP_MPA, OP_MPS, OP_RAA, OP_LWA,
      OP_RND, OP_ADR, OP_DVJ, OP_DRJ, OP_ADL, OP_AAL, OP_SBL, OP_SAL,
      OP_FAD, OP_FAA, OP_FSB, OP_FSA, OP_FAM, OP_FSM, OP_FMP, OP_FMC, OP_FRD, OP_FSL,
      OP_FFL, OP_FFX, OP_FAV, OP_FDJ, OP_FDR,
      OP_STO, OP_SLA, OP_STM, OP_STA, OP_STL, OP_PAM, OP_LDM, OP_LDA, OP_CMP, OP_TLU,
      OP_LDQ, OP_STQ, OP_EAD, OP_ERE, OP_SSP, OP_CHS, OP_NOP, OP_NOT, OP_SCT, OP_AND,
      OP_IOR, OP_SLS, OP_LLS, OP_LCS, OP_SRS, OP_LRS, OP_WAN, OP_WOR,
      OP_SEL, OP_RIN, OP_WRT, OP_WSP, OP_FWR,
      OP_HJM, OP_JSW, OP_JMP, OP_JMI, OP_JUN, OP_JNZ, OP_JOV, OP_JEO,
      OP_LXA, OP_STX, OP_SEX, OP_RAX, OP_LWX, OP_JXL, OP_JXR, OP_JXU, OP_JSX, OP_PSX,
      OP_BTP, OP_TPB, OP_BLS, OP_DMB, OP_BDM, OP_RWD, OP_BST, OP_TTP, OP_ETP,
      OP_JTG, OP_JTE: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // instructions that read c(E) before executing
  function automatic logic reads_e(input logic [11:0] o);
    case (o)
      OP_ADD, OP_ADA, OP_SUB, OP_SBA, OP_MPA, OP_MPS, OP_ADR, OP_ADL, OP_AAL, OP_SBL,
      OP_SAL, OP_STA, OP_STL, OP_LDM, OP_LDA, OP_CMP, OP_EAD, OP_ERE, OP_AND, OP_IOR,
      OP_LXA, OP_STX, OP_PSX, OP_FAD, OP_FAA, OP_FSB, OP_FSA, OP_FMP, OP_FMC,
      OP_FAV: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // the first index digit names a register or device, not an index
  always_comb begin
    case (ope)
      OP_TLU, OP_LDQ, OP_STQ, OP_JSW, OP_LXA, OP_STX, OP_SEX, OP_RAX, OP_LWX, OP_JXL,
      OP_JXR, OP_JXU, OP_JSX, OP_BTP, OP_TPB, OP_BLS, OP_DMB, OP_BDM, OP_RWD, OP_BST,
      OP_TTP, OP_ETP, OP_JTG, OP_JTE: i_is_index = 1'b0;
      default: i_is_index = 1'b1;
    endcase
  end

  // ---------------------------------------------------------------- units
  ix_op_t      ix_op;
  digit_t      ix_sel;
  logic [15:0] ix_val;

  kdc_index_unit u_index (
    .clk, .rst_n, .i_digit(i_dig), .j_digit(j_dig), .i_is_index,
    .addr({or_q.d[3], or_q.d[2], or_q.d[1], or_q.d[0]}), .lc, .p_ind, .or_ad(or_ad_q),
    .ea, .wr_op(ix_op), .wr_sel(ix_sel), .wr_val(ix_val), .ir
  );

  word_t     ua_w, la_w;
  assign ua_w = '{sign: ac.sign, d: ac.d[22:11]};
  assign la_w = '{sign: (r_ind ? rem_sign_q : ac.sign), d: {4'd0, ac.d[10:0]}};

  logic_op_t lg_op;
  word_t     lg_ua, lg_ead;
  always_comb begin
    case (ope)
      OP_ERE:  lg_op = LG_ERE;
      OP_AND:  lg_op = LG_AND;
      OP_IOR:  lg_op = LG_IOR;
      OP_NOT:  lg_op = LG_NOT;
      OP_WAN:  lg_op = LG_WAN;
      default: lg_op = LG_WOR;
    endcase
  end
  kdc_logic_unit u_logic (.op(lg_op), .ua(ua_w), .md, .e(opw), .n(e_q), .ua_out(lg_ua), .ead_opnd(lg_ead));

  shift_op_t   sh_op;
  acc_t        sh_ac;
  logic [15:0] sh_cnt;
  always_comb begin
    case (ope)
      OP_SLS:  sh_op = SH_SLS;
      OP_LLS:  sh_op = SH_LLS;
      OP_LCS:  sh_op = SH_LCS;
      OP_SRS:  sh_op = SH_SRS;
      OP_LRS:  sh_op = SH_LRS;
      default: sh_op = SH_SCT;
    endcase
  end
  kdc_shifter u_shift (.op(sh_op), .ac, .n(e_q), .ac_out(sh_ac), .count(sh_cnt));

  logic      ar_start, ar_busy, ar_done, ar_fail, ar_rsign, ar_sub;
  arith_op_t ar_op;
  acc_t      ar_opnd, ar_out;
  word_t     ar_mplr;

  function automatic acc_t align_ua(input word_t w, input logic neg, input logic absv);
    acc_t a;
    a = '0;
    a.d[22:11] = w.d;
    a.sign = (absv ? 1'b0 : w.sign) ^ neg;
    return a;
  endfunction
  function automatic acc_t align_la(input word_t w, input logic neg, input logic absv);
    acc_t a;
    a = '0;
    a.d[11:0] = w.d;
    a.sign = (absv ? 1'b0 : w.sign) ^ neg;
    return a;
  endfunction

  always_comb begin
    ar_start = 1'b0;
    ar_op    = AR_ADD;
    ar_opnd  = align_ua(opw, 1'b0, 1'b0);
    ar_mplr  = opw;
    ar_sub   = (ope == OP_MPS);
    if (state == S_ADR2) begin
      ar_start = 1'b1;
      ar_op    = AR_DIVR;
    end else if (state == S_EXEC) begin
      ar_start = 1'b1;
      case (ope)
        OP_ADD:  ar_opnd = align_ua(opw, 1'b0, 1'b0);
        OP_ADA:  ar_opnd = align_ua(opw, 1'b0, 1'b1);
        OP_SUB:  ar_opnd = align_ua(opw, 1'b1, 1'b0);
        OP_SBA:  ar_opnd = align_ua(opw, 1'b1, 1'b1);
        OP_ADM:  ar_opnd = align_ua(md, 1'b0, 1'b0);
        OP_SBM:  ar_opnd = align_ua(md, 1'b1, 1'b0);
        OP_ADL:  ar_opnd = align_la(opw, 1'b0, 1'b0);
        OP_AAL:  ar_opnd = align_la(opw, 1'b0, 1'b1);
        OP_SBL:  ar_opnd = align_la(opw, 1'b1, 1'b0);
        OP_SAL:  ar_opnd = align_la(opw, 1'b1, 1'b1);
        OP_EAD:  ar_opnd = align_ua(lg_ead, 1'b0, 1'b0);
        OP_ADR:  ar_opnd = align_ua(opw, 1'b0, 1'b0);
        OP_RAA, OP_LWA: begin
          ar_opnd = '0;
          ar_opnd.d[14:11] = {e_q[15:12], e_q[11:8], e_q[7:4], e_q[3:0]};
          ar_opnd.sign = (ope == OP_LWA);
        end
        OP_MPA, OP_MPS: ar_op = AR_MUL;
        OP_DVJ:  ar_op = AR_DIV;
        OP_DRJ:  ar_op = AR_DIVR;
        OP_RND:  ar_op = AR_RND;
        default: ar_start = 1'b0;
      endcase
    end
  end

  kdc_arith u_arith (
    .clk, .rst_n, .start(ar_start), .op(ar_op), .ac_in(ac), .opnd(ar_opnd), .md,
    .mplr(ar_mplr), .sub(ar_sub), .busy(ar_busy), .done(ar_done), .ac_out(ar_out),
    .div_fail(ar_fail), .rem_sign(ar_rsign)
  );

  // floating-point unit
  logic   fp_start, fp_busy, fp_done, fp_jump;
  fp_op_t fp_op;
  word_t  fp_opnd, fp_fsl;
  acc_t   fp_out;

  function automatic word_t sgn_word(input word_t w, input logic negate, input logic absv);
    word_t r;
    r = w;
    r.sign = (absv ? 1'b0 : w.sign) ^ negate;
    return r;
  endfunction

  always_comb begin
    fp_start = (state == S_EXEC) &&
               (ope inside {OP_FAD, OP_FAA, OP_FSB, OP_FSA, OP_FAM, OP_FSM, OP_FMP, OP_FMC,
                            OP_FRD, OP_FFL, OP_FFX, OP_FAV, OP_FDJ, OP_FDR});
    fp_op    = FP_ADD;
    fp_opnd  = opw;
    case (ope)
      OP_FAA:  fp_opnd = sgn_word(opw, 1'b0, 1'b1);
      OP_FSB:  fp_opnd = sgn_word(opw, 1'b1, 1'b0);
      OP_FSA:  fp_opnd = sgn_word(opw, 1'b1, 1'b1);
      OP_FAM:  fp_opnd = md;
      OP_FSM:  fp_opnd = sgn_word(md, 1'b1, 1'b0);
      OP_FMP, OP_FMC: fp_op = FP_MUL;
      OP_FRD:  fp_op = FP_RND;
      OP_FFL:  fp_op = FP_FFL;
      OP_FFX:  fp_op = FP_FFX;
      OP_FDJ:  fp_op = FP_DIV;
      OP_FDR:  fp_op = FP_DIVR;
      OP_FAV:  fp_op = FP_ADIV;
      default: ;
    endcase
  end

  kdc_fpu u_fpu (
    .clk, .rst_n, .start(fp_start), .op(fp_op), .ac_in(ac), .opnd(fp_opnd), .md,
    .neg(ope == OP_FMC), .busy(fp_busy), .done(fp_done), .ac_out(fp_out), .jump(fp_jump),
    .fsl_w(fp_fsl)
  );

  // ------------------------------------------------------------ helpers
  function automatic logic [1:0] cmp_words(input word_t a, input word_t b);
    // 0: a > b, 1: equal, 2: a < b
    logic az, bz;
    az = (a.d == '0);
    bz = (b.d == '0);
    if (az && bz) return 2'd1;
    if (!a.sign && b.sign) return 2'd0;
    if (a.sign && !b.sign) return 2'd2;
    if (a.d == b.d) return 2'd1;
    if ((a.d > b.d) ^ a.sign) return 2'd0;
    return 2'd2;
  endfunction

  function automatic word_t set_ad(input word_t w, input logic [15:0] a);
    word_t r;
    r = w;
    r.d[3] = a[15:12]; r.d[2] = a[11:8]; r.d[1] = a[7:4]; r.d[0] = a[3:0];
    return r;
  endfunction

  function automatic logic [15:0] ad_of(input word_t w);
    return {w.d[3], w.d[2], w.d[1], w.d[0]};
  endfunction

  function automatic logic [15:0] sel_ir(input digit_t h, input logic [15:0] r1,
                                         input logic [15:0] r2, input logic [15:0] r3);
    case (h)
      4'd1:    return r1;
      4'd2:    return r2;
      4'd3:    return r3;
      default: return 16'h0000;
    endcase
  endfunction

  logic [15:0] h_val;
  assign h_val = sel_ir(i_dig, ir[1], ir[2], ir[3]);

  // index register updates happen at the clock edge that leaves S_EXEC
  always_comb begin
    ix_op  = IX_NONE;
    ix_sel = i_dig;
    ix_val = e_q;
    if (state == S_EXEC) begin
      case (ope)
        OP_LXA: begin ix_op = IX_SET; ix_val = ad_of(opw); end
        OP_SEX: ix_op = IX_SET;
        OP_RAX: ix_op = IX_ADD;
        OP_LWX: ix_op = IX_SUB;
        OP_JXL: begin
          if (h_val != 16'h0000) begin ix_op = IX_SUB; ix_val = 16'h0001; end
          else                   begin ix_op = IX_SET; ix_val = 16'h9999; end
        end
        OP_JXR: begin
          if (h_val != 16'h0000) begin ix_op = IX_ADD; ix_val = 16'h0001; end
          else                   begin ix_op = IX_SET; ix_val = 16'h0001; end
        end
        OP_JXU: begin ix_op = IX_ADD; ix_val = 16'h0001; end
        OP_JSX: begin ix_op = IX_SET; ix_val = lc; end
        default: ix_op = IX_NONE;
      endcase
    end
  end

  // ------------------------------------------------------- memory port
  always_comb begin
    m_req   = (state == S_FETCH) || (state == S_OPREAD) || (state == S_STORE) ||
              (state == S_TLU_RD) || (state == S_BLK_RD) || (state == S_BLK_WR);
    m_we    = (state == S_STORE) || (state == S_BLK_WR);
    m_addr  = mar;
    m_wdata = mbr;
  end

  // ------------------------------------------------ tape and I/O issue
  logic mt_op, io_op, mt_wait_op;
  always_comb begin
    mt_op = 1'b1;
    mt_cmd = MT_NONE;
    case (ope)
      OP_BTP:  mt_cmd = MT_WRITE;
      OP_TPB:  mt_cmd = MT_READ;
      OP_BLS:  mt_cmd = MT_SEARCH;
      OP_RWD:  mt_cmd = MT_REWIND;
      OP_BST:  mt_cmd = MT_BACK;
      OP_TTP:  mt_cmd = MT_TEST;
      OP_ETP:  mt_cmd = MT_ERASE;
      default: mt_op = 1'b0;
    endcase
    mt_wait_op = (ope == OP_TPB) || (ope == OP_BLS) || (ope == OP_BST) || (ope == OP_TTP);
    mt_start = (state == S_EXEC) && mt_op && !mt_busy;
    mt_unit  = i_dig[1:0];
    mt_blkno = e_q;

    io_op  = 1'b1;
    io_cmd = IO_NONE;
    case (ope)
      OP_SEL:  io_cmd = IO_SEL;
      OP_RIN:  io_cmd = IO_RIN;
      OP_WRT:  io_cmd = IO_WRT;
      OP_FWR:  io_cmd = IO_WRT;
      OP_WSP:  io_cmd = IO_WSP;
      default: io_op = 1'b0;
    endcase
    io_start = (state == S_EXEC) && io_op && !io_busy;
    io_n     = e_q;
    io_ua    = ua_w;
    // FWR: the nine mantissa digits, then the two characteristic digits
    if (ope == OP_FWR) begin
      io_n  = 16'h0011;
      io_ua = '{sign: ua_w.sign, d: {4'd0, ua_w.d[8:0], ua_w.d[10:9]}};
    end
  end

  // ------------------------------------------------------------- control
  logic [13:0] e_bin;
  logic [5:0]  e_off;
  assign e_bin = bcd4_to_bin(e_q);
  assign e_off = 6'(e_bin % 14'd50);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HALT; or_q <= '0; or_ad_q <= '0; e_q <= '0; next_lc <= '0; opw <= '0;
      mbr <= '0; mar <= '0; r_ind <= 1'b0; rem_sign_q <= 1'b0; halt_req <= 1'b0;
      adr_second <= 1'b0; blk_src <= '0; blk_dst <= '0; blk_cnt <= '0; tlu_end <= '0;
      halted <= 1'b1; alarm <= 1'b0; p_ind <= 1'b0; lc <= 16'h0000; ac <= '0; md <= '0;
      retire <= 1'b0; retire_op <= '0;
    end else begin
      retire <= 1'b0;
      unique case (state)
        S_HALT: begin
          halted <= 1'b1;
          if (start) begin
            halted <= 1'b0;
            alarm  <= 1'b0;
            mar    <= lc;
            state  <= S_FETCH;
          end
        end

        S_FETCH: if (m_ack) begin
          or_q <= m_rdata;
          if (m_err) begin alarm <= 1'b1; state <= S_HALT; end
          else state <= S_DECODE;
        end

        S_DECODE: begin
          e_q      <= ea;
          p_ind    <= 1'b0;
          next_lc  <= bcd4_add(lc, 16'h0001);
          halt_req <= 1'b0;
          adr_second <= 1'b0;
          if (clr) ac <= '0;
          if (!legal(ope)) begin
            alarm <= 1'b1;
            state <= S_HALT;
          end else if (reads_e(ope)) begin
            mar   <= ea;
            state <= S_OPREAD;
          end else begin
            state <= S_EXEC;
          end
        end

        S_OPREAD: if (m_ack) begin
          opw <= m_rdata;
          if (m_err) begin alarm <= 1'b1; state <= S_HALT; end
          else state <= S_EXEC;
        end

        S_EXEC: begin
          state <= S_NEXT;
          case (ope)
            OP_ADD, OP_ADA, OP_SUB, OP_SBA, OP_ADM, OP_SBM, OP_ADL, OP_AAL, OP_SBL, OP_SAL,
            OP_EAD, OP_RAA, OP_LWA, OP_MPA, OP_MPS, OP_RND, OP_ADR, OP_DVJ, OP_DRJ:
              state <= S_ARITH;
            OP_FAD, OP_FAA, OP_FSB, OP_FSA, OP_FAM, OP_FSM, OP_FMP, OP_FMC, OP_FRD,
            OP_FFL, OP_FFX, OP_FAV, OP_FDJ, OP_FDR:
              state <= S_FPU;
            OP_FSL: begin mbr <= fp_fsl; mar <= e_q; state <= S_STORE; end
            OP_STO: begin mbr <= ua_w; mar <= e_q; state <= S_STORE; end
            OP_SLA: begin mbr <= la_w; mar <= e_q; state <= S_STORE; end
            OP_STM: begin mbr <= md;   mar <= e_q; state <= S_STORE; end
            OP_STA: begin mbr <= set_ad(opw, {ac.d[14], ac.d[13], ac.d[12], ac.d[11]}); mar <= e_q; state <= S_STORE; end
            OP_STL: begin mbr <= set_ad(opw, lc); mar <= e_q; state <= S_STORE; end
            OP_STX: begin mbr <= set_ad(opw, h_val); mar <= e_q; state <= S_STORE; end
            OP_PAM: md <= ua_w;
            OP_LDM: md <= opw;
            OP_LDA: ac.d[14:11] <= {opw.d[3], opw.d[2], opw.d[1], opw.d[0]};
            OP_CMP: case (cmp_words(md, opw))
                      2'd0:    next_lc <= bcd4_add(lc, 16'h0001);
                      2'd1:    next_lc <= bcd4_add(lc, 16'h0002);
                      default: next_lc <= bcd4_add(lc, 16'h0003);
                    endcase
            OP_TLU: begin
              if (i_dig >= 4'd1 && i_dig <= 4'd3) begin
                mar     <= e_q;
                tlu_end <= e_bin - (e_bin % 14'd200) + 14'd199;
                state   <= S_TLU_RD;
              end
            end
            OP_PSX: begin or_ad_q <= ad_of(opw); p_ind <= 1'b1; end
            OP_SCT: begin ac <= sh_ac; or_ad_q <= sh_cnt; p_ind <= 1'b1; end
            OP_SLS, OP_LLS, OP_LCS, OP_SRS, OP_LRS: ac <= sh_ac;
            OP_ERE, OP_AND, OP_IOR, OP_NOT, OP_WAN, OP_WOR: ac.d[22:11] <= lg_ua.d;
            OP_SSP: ac.sign <= 1'b0;
            OP_CHS: ac.sign <= ~ac.sign;
            OP_NOP: ;
            OP_LDQ, OP_STQ, OP_DMB, OP_BDM: begin
              blk_cnt <= 7'd50 - 7'(e_off);
              case (ope)
                OP_LDQ: begin blk_src <= e_bin; blk_dst <= 14'd4000 + 14'(i_dig[1:0]) * 14'd50 + 14'(e_off); end
                OP_STQ: begin blk_dst <= e_bin; blk_src <= 14'd4000 + 14'(i_dig[1:0]) * 14'd50 + 14'(e_off); end
                OP_DMB: begin blk_src <= e_bin; blk_dst <= 14'd4200 + 14'(e_off); end
                default: begin blk_dst <= e_bin; blk_src <= 14'd4200 + 14'(e_off); end
              endcase
              state <= S_BLK_RD;
            end
            OP_HJM: begin next_lc <= e_q; halt_req <= 1'b1; end
            OP_JSW: if (i_dig <= 4'd9 && switches[i_dig]) next_lc <= e_q;
            OP_JMP: next_lc <= e_q;
            OP_JMI: if (ac.sign) next_lc <= e_q;
            OP_JUN: if (ac.d[22:11] != '0) next_lc <= e_q;
            OP_JNZ: if (ac.d != '0) next_lc <= e_q;
            OP_JOV: if (ac.d[22] != 4'd0) next_lc <= e_q;
            OP_JEO: if (ac.d[22] >= 4'd2) next_lc <= e_q;
            OP_JXL, OP_JXR: if (h_val != 16'h0000) next_lc <= e_q;
            OP_JXU: if (h_val != ir[1]) next_lc <= e_q;
            OP_JSX: next_lc <= e_q;
            OP_LXA, OP_SEX, OP_RAX, OP_LWX: ;
            OP_BTP, OP_TPB, OP_BLS, OP_RWD, OP_BST, OP_TTP, OP_ETP: begin
              if (mt_busy)         state <= S_EXEC;      // wait for the tape unit
              else if (mt_wait_op) state <= S_MT_WAIT;
            end
            OP_JTG: if (!mt_tc_ind) next_lc <= e_q;
            OP_JTE: if (mt_te_ind[i_dig[1:0]]) next_lc <= e_q;
            OP_SEL, OP_WRT, OP_WSP, OP_FWR: if (io_busy) state <= S_EXEC;
            OP_RIN: begin
              if (io_busy) state <= S_EXEC;
              else         state <= S_IO_WAIT;
            end
            default: ;
          endcase
        end

        S_ARITH: if (ar_done) begin
          ac <= ar_out;
          if (ope == OP_DVJ || ope == OP_DRJ) begin
            if (ar_fail) next_lc <= e_q;
            r_ind      <= !ar_fail && (ope == OP_DVJ);
            rem_sign_q <= ar_rsign;
          end else begin
            r_ind <= 1'b0;
          end
          if (ope == OP_ADR && !adr_second) begin
            adr_second <= 1'b1;
            state      <= S_ADR2;
          end else if (ope == OP_ADR) begin
            if (ar_fail) halt_req <= 1'b1;
            state <= S_NEXT;
          end else begin
            state <= S_NEXT;
          end
        end

        S_ADR2: state <= S_ARITH;

        S_FPU: if (fp_done) begin
          ac         <= fp_out;
          r_ind      <= !fp_jump && (ope == OP_FDJ);
          rem_sign_q <= ac.sign;
          if (fp_jump && ope == OP_FAV) halt_req <= 1'b1;
          else if (fp_jump)             next_lc  <= e_q;
          state <= S_NEXT;
        end

        S_STORE: if (m_ack) state <= S_NEXT;

        S_TLU_RD: if (m_ack) begin
          if (m_err) begin
            alarm <= 1'b1; state <= S_HALT;
          end else if (m_rdata.d >= md.d) begin
            or_ad_q <= mar;
            p_ind   <= 1'b1;
            state   <= S_NEXT;
          end else if (bcd4_to_bin(mar) >= tlu_end) begin
            next_lc <= h_val;
            state   <= S_NEXT;
          end else begin
            mar <= bcd4_add(mar, 16'h0001);
          end
        end

        S_BLK_RD: begin
          mar <= bin_to_bcd4(blk_src);
          if (m_ack && mar == bin_to_bcd4(blk_src)) begin
            mbr   <= m_rdata;
            mar   <= bin_to_bcd4(blk_dst);
            state <= m_err ? S_HALT : S_BLK_WR;
            if (m_err) alarm <= 1'b1;
          end
        end

        S_BLK_WR: if (m_ack) begin
          blk_src <= blk_src + 14'd1;
          blk_dst <= blk_dst + 14'd1;
          blk_cnt <= blk_cnt - 7'd1;
          mar     <= bin_to_bcd4(blk_src + 14'd1);
          state   <= (blk_cnt == 7'd1) ? S_NEXT : S_BLK_RD;
        end

        S_MT_WAIT: if (mt_done) begin
          if (ope == OP_TPB && mt_blk_match) next_lc <= bcd4_add(lc, 16'h0002);
          state <= S_NEXT;
        end

        S_IO_WAIT: if (io_done) begin
          ac.d[22:11] <= io_ua_in.d;
          state <= S_NEXT;
        end

        default: begin // S_NEXT
          lc        <= next_lc;
          mar       <= next_lc;
          retire    <= 1'b1;
          retire_op <= op12;
          state     <= halt_req ? S_HALT : S_FETCH;
        end
      endcase
    end
  end
endmodule
