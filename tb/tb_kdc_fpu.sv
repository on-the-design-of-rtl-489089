// tb_kdc_fpu - checks the floating-point unit against a reference that
// works on whole integers: a floating number is sign * M * 10^(c-50-20)
// with M the 20-digit mantissa as an integer.
//   FP_ADD  random operands with exponents up to 12 apart, both signs:
//           the reference aligns by integer division (the digits shifted
//           out are dropped, as in the unit), adds or subtracts, and
//           normalises by counting digits
//   FP_MUL  random nine-digit mantissas: the product of the integers,
//           and the cycle count (sum of the multiplier digits + 2)
//   FP_DIV, FP_DIVR  random mantissas and characteristics: the quotient
//           and remainder by integer division, the rounded quotient, and
//           the cycle count (sum of the quotient digits + digits + 3)
//   FP_ADIV a hand-worked sum and quotient; a zero divisor makes each
//           division jump, FP_ADIV then leaving the sum
//   FP_RND, FP_FFL, FP_FFX against hand-worked and integer results,
//   exponent overflow (v = 2) and FSL's compensating characteristic.
module tb_kdc_fpu;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, neg = 0, busy, done, jump;
  fp_op_t op = FP_ADD;
  acc_t ac_in = '0, ac_out;
  word_t opnd = '0, md = '0, fsl_w;
  int checks = 0, failures = 0;

  kdc_fpu dut (.*);
  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  typedef logic [127:0] u128;
  localparam u128 E20 = 128'd100000000000000000000;
  localparam u128 E19 = 128'd10000000000000000000;

  function automatic u128 pow10(input int n);
    u128 r = 1;
    for (int i = 0; i < n; i++) r = r * 10;
    return r;
  endfunction
  function automatic u128 digits_to_int(input digit_t [19:0] d);
    u128 r = 0;
    for (int i = 19; i >= 0; i--) r = r * 10 + u128'(d[i]);
    return r;
  endfunction
  function automatic digit_t [19:0] int_to_digits(input u128 v);
    digit_t [19:0] d;
    for (int i = 0; i < 20; i++) begin d[i] = 4'(v % 10); v = v / 10; end
    return d;
  endfunction
  // normalise integer mantissa m (may have 21 digits) with characteristic c
  function automatic acc_t ref_pack(input bit s, input int c, input u128 m);
    acc_t r = '0;
    if (m == 0) return '0;
    while (m >= E20) begin m = m / 10; c++; end
    while (m < E19) begin m = m * 10; c--; end
    if (c < 0) return '0;
    if (c > 99) begin r.d[22] = 4'd2; c -= 100; end
    r.sign = s;
    r.d[21] = 4'(c / 10); r.d[20] = 4'(c % 10);
    r.d[19:0] = int_to_digits(m);
    return r;
  endfunction
  function automatic acc_t mk_acc(input bit s, input int c, input u128 m);
    acc_t r = '0;
    r.sign = s; r.d[21] = 4'(c / 10); r.d[20] = 4'(c % 10); r.d[19:0] = int_to_digits(m);
    return r;
  endfunction
  function automatic word_t mk_word(input bit s, input int c, input longint m9);
    word_t w = '0;
    w.sign = s; w.d[10] = 4'(c / 10); w.d[9] = 4'(c % 10);
    for (int i = 0; i < 9; i++) begin w.d[i] = 4'(m9 % 10); m9 = m9 / 10; end
    return w;
  endfunction
  function automatic u128 rnd_man(input int ndig);
    u128 m = u128'($urandom_range(1, 9));
    for (int i = 1; i < ndig; i++) m = m * 10 + u128'($urandom_range(0, 9));
    return m;
  endfunction

  int cycles;
  task automatic run(input fp_op_t o);
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // ------------------------------------------------ addition
    for (int t = 0; t < 300; t++) begin
      automatic bit sa = 1'($urandom), sb = 1'($urandom);
      automatic int ca = int'($urandom_range(40, 60));
      automatic int cb = ca + int'($urandom_range(0, 24)) - 12;
      automatic u128 ma = rnd_man(20);
      automatic longint mb9 = longint'(rnd_man(9));
      automatic u128 mb = u128'(mb9) * pow10(11);
      automatic u128 big, sml, r;
      automatic bit sbig, ssml, rs;
      automatic int cbig;
      if (t % 10 == 0) begin mb = ma / pow10(11) * pow10(11); mb9 = longint'(ma / pow10(11)); cb = ca; end
      ac_in = mk_acc(sa, ca, ma);
      opnd = mk_word(sb, cb, mb9);
      run(FP_ADD);
      if (ca >= cb) begin big = ma; sbig = sa; sml = mb / pow10(ca - cb); ssml = sb; cbig = ca; end
      else          begin big = mb; sbig = sb; sml = ma / pow10(cb - ca); ssml = sa; cbig = cb; end
      if (sbig == ssml)  begin r = big + sml; rs = sbig; end
      else if (big >= sml) begin r = big - sml; rs = sbig; end
      else begin r = sml - big; rs = ssml; end
      chk($sformatf("FADD %0d", t), ac_out == ref_pack(rs, cbig, r));
      chk("FADD one clock", cycles <= 3);
    end
    // zero operands
    ac_in = '0; opnd = mk_word(1, 52, 123456789); run(FP_ADD);
    chk("0 + x", ac_out == mk_acc(1, 52, u128'(123456789) * pow10(11)));
    // exponent overflow
    ac_in = mk_acc(0, 99, 9 * E19); opnd = mk_word(0, 99, 900000000); run(FP_ADD);
    chk("exponent overflow", ac_out.d[22] == 4'd2 && ac_out.d[21:20] == 8'h00 && ac_out.d[19:18] == 8'h18);
    // ------------------------------------------------ multiplication
    for (int t = 0; t < 100; t++) begin
      automatic longint a9 = longint'(rnd_man(9)), b9 = longint'(rnd_man(9));
      automatic int ca = int'($urandom_range(30, 70)), cb = int'($urandom_range(30, 70));
      automatic int dsum = 0;
      automatic longint x = b9;
      automatic bit n = 1'($urandom);
      for (int i = 0; i < 9; i++) begin dsum += int'(x % 10); x /= 10; end
      md = mk_word(1'($urandom), ca, a9);
      opnd = mk_word(1'($urandom), cb, b9);
      neg = n;
      run(FP_MUL);
      chk($sformatf("FMUL %0d", t), ac_out == ref_pack(md.sign ^ opnd.sign ^ n, ca + cb - 50, u128'(a9) * u128'(b9) * 100));
      chk("FMUL cycles", cycles == dsum + 12);
    end
    neg = 0;
    // ------------------------------------------------ division
    for (int t = 0; t < 200; t++) begin
      automatic u128 ma = rnd_man(20);
      automatic longint m9 = longint'(rnd_man(9));
      automatic int ca = int'($urandom_range(0, 99)), cm = int'($urandom_range(0, 99));
      automatic bit hi, s;
      automatic u128 dv, q, r, q10, q9;
      automatic int dsum, c;
      if (t % 8 == 0) ma = u128'(m9) * pow10(11) + u128'($urandom_range(0, 1)); // equal / just above
      hi = (ma >= u128'(m9) * pow10(11));
      c  = ca - cm + 50 + (hi ? 1 : 0);
      s  = 1'($urandom);
      ac_in = mk_acc(s, ca, ma);
      md = mk_word(1'($urandom), cm, m9);
      // plain: nine digits, remainder in LA
      dv = u128'(m9) * pow10(hi ? 3 : 2);
      q  = ma / dv; r = ma - q * dv;
      dsum = 0; for (u128 x = q; x != 0; x = x / 10) dsum += int'(x % 10);
      run(FP_DIV);
      chk($sformatf("FDJ %0d", t), ac_out == ref_pack(s ^ md.sign, c, q * pow10(11) + r / (hi ? 10 : 1)) && !jump);
      chk($sformatf("FDJ cycles %0d", t), cycles == dsum + 12);
      // rounded
      q10 = ma / (dv / 10);
      q9  = q10 / 10 + ((q10 % 10 >= 5) ? 1 : 0);
      dsum = 0; for (u128 x = q10; x != 0; x = x / 10) dsum += int'(x % 10);
      run(FP_DIVR);
      chk($sformatf("FDR %0d", t), ac_out == ref_pack(s ^ md.sign, c, q9 * pow10(11)) && !jump);
      chk($sformatf("FDR cycles %0d", t), cycles == dsum + 13);
    end
    // (0.5 + 0.25) / 0.5 = 1.5
    ac_in = mk_acc(0, 50, 5 * E19); opnd = mk_word(0, 50, 250000000); md = mk_word(0, 50, 500000000);
    run(FP_ADIV);
    chk("FAV", ac_out == mk_acc(0, 51, 15 * E19 / 10) && !jump);
    // divisor zero: jump, AC unchanged; FAV keeps the sum
    md = '0; run(FP_DIV);
    chk("FDJ zero divisor jumps", jump && ac_out == ac_in);
    run(FP_DIVR);
    chk("FDR zero divisor jumps", jump && ac_out == ac_in);
    run(FP_ADIV);
    chk("FAV zero divisor keeps the sum", jump && ac_out == mk_acc(0, 50, 75 * E19 / 10));
    // ------------------------------------------------ rounding
    ac_in = mk_acc(0, 50, 128'd12345678949999999999); run(FP_RND);
    chk("FRD down", ac_out == mk_acc(0, 50, 128'd12345678900000000000));
    ac_in = mk_acc(1, 50, 128'd99999999950000000000); run(FP_RND);
    chk("FRD carry", ac_out == mk_acc(1, 51, 128'd10000000000000000000));
    // ------------------------------------------------ conversions
    for (int t = 0; t < 100; t++) begin
      automatic acc_t f = '0;
      automatic int k = int'($urandom_range(0, 22));
      automatic acc_t back;
      f.sign = 1'($urandom);
      for (int i = 0; i <= k; i++) f.d[i] = 4'($urandom_range(0, 9));
      f.d[k] = 4'($urandom_range(1, 9));
      ac_in = f; run(FP_FFL);
      chk("FFL characteristic", int'(ac_out.d[21]) * 10 + int'(ac_out.d[20]) == k - 21 + 50 && ac_out.d[19] != 0);
      ac_in = ac_out; run(FP_FFX);
      back = f;
      if (k > 19) for (int i = 0; i < k - 19; i++) back.d[i] = 4'd0;   // beyond 20 digits
      chk($sformatf("FFL/FFX round trip k=%0d", k), ac_out == back && !jump);
    end
    ac_in = mk_acc(0, 52, 5 * E19); run(FP_FFX);
    chk("FFX too large jumps", jump && ac_out == ac_in);
    // FSL
    ac_in = mk_acc(0, 55, 128'd12345678912345678900);
    #1 chk("FSL", fsl_w == mk_word(0, 46, 123456789));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
