// kdc_pkg - types, operation codes and small decimal helpers shared by the
// KDC-I modules.
//
// The KDC-I is a decimal machine: every register and storage word holds
// binary-coded decimal digits, four bits per digit, handled in parallel,
// with the digits of a number processed one after another (serial-parallel).
//
//   word_t : sign (1 = minus) and 12 BCD digits.  d[11] is the overflow
//            digit, d[10] the most significant digit "m", d[0] the least
//            significant.  A fixed-point number is a fraction with d[11]
//            as its units digit, so |value| < 10 (normally < 2).
//   acc_t  : the 23-digit double-length accumulator AC.  d[22] is the UA
//            overflow digit v, d[21:11] the 11 digits of the upper half UA
//            and d[10:0] the lower half LA; one sign for both.
//
// Instruction word (this design's reading of the word layout): d[10:8]
// operation code, d[7] the I index digit, d[6] the J index digit, d[3:0]
// the address part A; d[5:4] and d[11] are unused.  Operation codes are
// kept as 12-bit BCD (three digits); the codes are those of the machine.
package kdc_pkg;

  typedef logic [3:0] digit_t;

  typedef struct packed {
    logic            sign;
    digit_t [11:0]   d;
  } word_t;

  typedef struct packed {
    logic            sign;
    digit_t [22:0]   d;
  } acc_t;

  // word plus its stored parity bit
  typedef struct packed {
    logic  par;
    word_t w;
  } mword_t;

  localparam int AC_DIGITS = 23;

  // ------------------------------------------------------------------
  // Operation codes (BCD).  Odd codes are the even code plus "clear AC".
  // ------------------------------------------------------------------
  typedef enum logic [11:0] {
    OP_ADD = 12'h100, OP_ADA = 12'h102, OP_SUB = 12'h104, OP_SBA = 12'h106,
    OP_ADM = 12'h110, OP_SBM = 12'h114, OP_MPA = 12'h120, OP_MPS = 12'h122,
    OP_RAA = 12'h130, OP_LWA = 12'h134, OP_RND = 12'h138, OP_ADR = 12'h140,
    OP_DVJ = 12'h150, OP_DRJ = 12'h152, OP_ADL = 12'h160, OP_AAL = 12'h162,
    OP_SBL = 12'h164, OP_SAL = 12'h166,
    OP_FAD = 12'h200, OP_FAA = 12'h202, OP_FSB = 12'h204, OP_FSA = 12'h206,
    OP_FAM = 12'h210, OP_FSM = 12'h214, OP_FMP = 12'h220, OP_FMC = 12'h222,
    OP_FRD = 12'h238, OP_FAV = 12'h240, OP_FDJ = 12'h250, OP_FDR = 12'h252,
    OP_STO = 12'h300, OP_SLA = 12'h302, OP_STM = 12'h304, OP_STA = 12'h306,
    OP_STL = 12'h308, OP_PAM = 12'h310, OP_LDM = 12'h320, OP_LDA = 12'h322,
    OP_CMP = 12'h324, OP_FSL = 12'h340, OP_TLU = 12'h360, OP_LDQ = 12'h364,
    OP_STQ = 12'h366, OP_FFL = 12'h410, OP_FFX = 12'h450,
    OP_EAD = 12'h500, OP_ERE = 12'h502, OP_SSP = 12'h510, OP_CHS = 12'h512,
    OP_NOP = 12'h514, OP_NOT = 12'h516, OP_SCT = 12'h518, OP_AND = 12'h520,
    OP_IOR = 12'h522, OP_SLS = 12'h530, OP_LLS = 12'h532, OP_LCS = 12'h534,
    OP_SRS = 12'h536, OP_LRS = 12'h538, OP_WAN = 12'h550, OP_WOR = 12'h552,
    OP_SEL = 12'h630, OP_RIN = 12'h632, OP_WRT = 12'h634, OP_WSP = 12'h636,
    OP_FWR = 12'h638,
    OP_HJM = 12'h710, OP_JSW = 12'h712, OP_JMP = 12'h714, OP_JMI = 12'h750,
    OP_JUN = 12'h752, OP_JNZ = 12'h754, OP_JOV = 12'h756, OP_JEO = 12'h758,
    OP_LXA = 12'h820, OP_STX = 12'h822, OP_SEX = 12'h830, OP_RAX = 12'h832,
    OP_LWX = 12'h834, OP_JXL = 12'h850, OP_JXR = 12'h852, OP_JXU = 12'h854,
    OP_JSX = 12'h856, OP_PSX = 12'h860,
    OP_BTP = 12'h910, OP_TPB = 12'h912, OP_BLS = 12'h914, OP_DMB = 12'h920,
    OP_BDM = 12'h922, OP_RWD = 12'h930, OP_BST = 12'h932, OP_TTP = 12'h934,
    OP_ETP = 12'h936, OP_JTG = 12'h950, OP_JTE = 12'h952
  } opcode_t;

  // Arithmetic unit operations
  typedef enum logic [2:0] {
    AR_ADD,    // AC <- AC + opnd (signed, 23 digits)
    AR_MUL,    // AC <- AC +/- MD * mplr
    AR_DIV,    // UA <- AC / MD, LA <- remainder
    AR_DIVR,   // UA <- rounded AC / MD, LA <- 0
    AR_RND     // round AC into UA, LA <- 0
  } arith_op_t;

  // Floating-point unit operations
  typedef enum logic [2:0] {
    FP_ADD,    // AC + opnd (floating)
    FP_MUL,    // AC <- MD * opnd
    FP_RND,    // round the double-length mantissa
    FP_FFL,    // fixed to floating
    FP_FFX,    // floating to fixed, or jump
    FP_DIV,    // AC / MD: quotient to UA, remainder to LA, or jump
    FP_DIVR,   // AC / MD rounded to UA, LA <- 0, or jump
    FP_ADIV    // (AC + opnd) / MD rounded, or the sum alone and jump
  } fp_op_t;

  // Logic unit operations
  typedef enum logic [2:0] {
    LG_ERE, LG_AND, LG_IOR, LG_NOT, LG_WAN, LG_WOR
  } logic_op_t;

  // Shifter operations
  typedef enum logic [2:0] {
    SH_SLS, SH_LLS, SH_LCS, SH_SRS, SH_LRS, SH_SCT
  } shift_op_t;

  // Index register updates
  typedef enum logic [1:0] {
    IX_NONE, IX_SET, IX_ADD, IX_SUB
  } ix_op_t;

  // Magnetic tape commands (CPU to tape control, and tape control to handler)
  typedef enum logic [2:0] {
    MT_NONE, MT_WRITE, MT_READ, MT_SEARCH, MT_REWIND, MT_BACK, MT_TEST, MT_ERASE
  } mt_cmd_t;

  // I/O commands
  typedef enum logic [2:0] {
    IO_NONE, IO_SEL, IO_RIN, IO_WRT, IO_WSP
  } io_cmd_t;

  // ------------------------------------------------------------------
  // Decimal helpers
  // ------------------------------------------------------------------

  // one BCD digit add with carry
  function automatic logic [4:0] bcd_digit_add(input digit_t a, input digit_t b, input logic cin);
    logic [4:0] s;
    s = {1'b0, a} + {1'b0, b} + {4'b0, cin};
    if (s > 5'd9) return {1'b1, 4'(s - 5'd10)};
    return {1'b0, s[3:0]};
  endfunction

  // four-digit BCD add / subtract modulo 10,000
  function automatic logic [15:0] bcd4_add(input logic [15:0] a, input logic [15:0] b);
    logic [15:0] r;
    logic [4:0]  t;
    logic        c;
    c = 1'b0;
    for (int i = 0; i < 4; i++) begin
      t = bcd_digit_add(a[4*i +: 4], b[4*i +: 4], c);
      r[4*i +: 4] = t[3:0];
      c = t[4];
    end
    return r;
  endfunction

  function automatic logic [15:0] bcd4_sub(input logic [15:0] a, input logic [15:0] b);
    logic [15:0] r;
    logic [4:0]  t;
    logic        c;
    c = 1'b1;
    for (int i = 0; i < 4; i++) begin
      t = bcd_digit_add(a[4*i +: 4], 4'(4'd9 - b[4*i +: 4]), c);
      r[4*i +: 4] = t[3:0];
      c = t[4];
    end
    return r;
  endfunction

  // BCD address to binary
  function automatic logic [13:0] bcd4_to_bin(input logic [15:0] a);
    return 14'(a[15:12]) * 14'd1000 + 14'(a[11:8]) * 14'd100 + 14'(a[7:4]) * 14'd10 + 14'(a[3:0]);
  endfunction

  // binary (0-9999) to BCD
  function automatic logic [15:0] bin_to_bcd4(input logic [13:0] b);
    logic [13:0] v;
    logic [15:0] r;
    v = b;
    for (int i = 0; i < 4; i++) begin
      r[4*i +: 4] = 4'(v % 14'd10);
      v = v / 14'd10;
    end
    return r;
  endfunction

  // even parity bit over sign and digits: stored bit makes the count of ones even
  function automatic logic word_parity(input word_t w);
    return ^w;
  endfunction

  function automatic logic word_valid(input word_t w);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < 12; i++) if (w.d[i] > 4'd9) ok = 1'b0;
    return ok;
  endfunction

  // 11-digit magnitude increment (digits 0..10) with carry into digit 11
  function automatic word_t word_inc(input word_t w);
    word_t   r;
    logic    c;
    logic [4:0] t;
    r = w;
    c = 1'b1;
    for (int i = 0; i < 12; i++) begin
      t = bcd_digit_add(w.d[i], 4'd0, c);
      r.d[i] = t[3:0];
      c = t[4];
    end
    return r;
  endfunction

  function automatic word_t make_instr(input logic [11:0] op, input digit_t i, input digit_t j,
                                       input logic [15:0] a);
    word_t r;
    r = '0;
    r.d[10] = op[11:8];
    r.d[9]  = op[7:4];
    r.d[8]  = op[3:0];
    r.d[7]  = i;
    r.d[6]  = j;
    r.d[3]  = a[15:12];
    r.d[2]  = a[11:8];
    r.d[1]  = a[7:4];
    r.d[0]  = a[3:0];
    return r;
  endfunction

endpackage
