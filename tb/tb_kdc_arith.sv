// tb_kdc_arith - self-checking test of the fixed-point arithmetic unit.
//
// Random signed additions, multiply-and-add / -subtract, divisions (with
// remainder and rounded, including impossible divisions) and roundings are
// compared with a reference computed on 128-bit binary integers.  The
// clock count of every addition is checked against 23 clocks per serial
// pass plus one, and of every multiplication against the pass count given
// by the multiplier's digit sum.
module tb_kdc_arith;
  import kdc_pkg::*;
  typedef logic [127:0] u128;

  logic clk = 0, rst_n = 0, start = 0, sub = 0;
  arith_op_t op;
  acc_t ac_in, opnd, ac_out;
  word_t md, mplr;
  logic busy, done, div_fail, rem_sign;
  int checks = 0, failures = 0;

  kdc_arith dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic u128 dig2int(input digit_t [22:0] d, input int n);
    u128 v = 0;
    for (int i = n - 1; i >= 0; i--) v = v * 10 + u128'(d[i]);
    return v;
  endfunction
  function automatic u128 pow10(input int n);
    u128 v = 1;
    repeat (n) v = v * 10;
    return v;
  endfunction
  function automatic digit_t [22:0] int2dig(input u128 v);
    digit_t [22:0] d;
    for (int i = 0; i < 23; i++) begin d[i] = 4'(v % 10); v = v / 10; end
    return d;
  endfunction
  function automatic digit_t rd();
    return 4'($urandom_range(0, 9));
  endfunction
  function automatic acc_t rand_acc(input int ndig);
    acc_t a = '0;
    a.sign = 1'($urandom);
    for (int i = 0; i < ndig; i++) a.d[i] = rd();
    return a;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(output int cyc);
    @(negedge clk); start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); #1 cyc++; end
  endtask

  int cyc, ds, passes;
  u128 a, b, r, m, q, rem, lim;
  logic es;
  initial begin
    op = AR_ADD; ac_in = '0; opnd = '0; md = '0; mplr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- additions
    for (int t = 0; t < 200; t++) begin
      ac_in = rand_acc(22); opnd = rand_acc(22);
      if (t % 5 == 0) opnd.d = ac_in.d;          // equal magnitudes
      if (t % 7 == 0) opnd.d[10:0] = '0;         // UA-aligned operand
      op = AR_ADD;
      run(cyc);
      a = dig2int(ac_in.d, 23); b = dig2int(opnd.d, 23);
      if (ac_in.sign == opnd.sign) begin r = a + b; es = ac_in.sign; passes = 1; end
      else if (a >= b) begin r = a - b; es = ac_in.sign; passes = 1; end
      else begin r = b - a; es = opnd.sign; passes = 2; end
      check($sformatf("add %0d value", t), dig2int(ac_out.d, 23) == r && ac_out.sign == es);
      check($sformatf("add %0d cycles %0d", t, cyc), cyc == 23 * passes + 1);
    end
    // ---------------- multiply and add / subtract
    for (int t = 0; t < 60; t++) begin
      ac_in = rand_acc(22); ac_in.d[22] = 0;
      md = '0; mplr = '0;
      md.sign = 1'($urandom); mplr.sign = 1'($urandom); sub = 1'($urandom);
      for (int i = 0; i < 11; i++) begin md.d[i] = rd(); mplr.d[i] = rd(); end
      if (t == 0) mplr.d[10:0] = '0;
      op = AR_MUL;
      run(cyc);
      a = dig2int(ac_in.d, 23);
      b = dig2int(23'(0) | {48'd0, md.d[10:0]}, 11) * dig2int({48'd0, mplr.d[10:0]}, 11);
      es = md.sign ^ mplr.sign ^ sub;
      ds = 0; for (int i = 0; i < 11; i++) ds += int'(mplr.d[i]);
      if (ac_in.sign == es) begin r = a + b; passes = 1; es = ac_in.sign; end
      else if (a >= b) begin r = a - b; passes = 1; es = ac_in.sign; end
      else begin r = b - a; passes = 2; end
      check($sformatf("mul %0d value", t), dig2int(ac_out.d, 23) == r && ac_out.sign == es);
      check($sformatf("mul %0d cycles %0d", t, cyc), cyc == 24 * ds + 12 + 23 * passes + 1);
    end
    sub = 0;
    // ---------------- division
    for (int t = 0; t < 80; t++) begin
      md = '0;
      md.sign = 1'($urandom);
      for (int i = 0; i < 11; i++) md.d[i] = rd();
      if (md.d[10] == 0) md.d[10] = 4'd3;
      ac_in = rand_acc(22);
      if (t % 4 == 0) ac_in.d[21:11] = md.d[10:0];            // impossible
      else if (ac_in.d[21:11] >= md.d[10:0]) ac_in.d[21] = 0;
      if (t % 9 == 1) ac_in.d[21] = 4'(md.d[10] - 1);
      op = (t % 2) ? AR_DIVR : AR_DIV;
      run(cyc);
      a = dig2int(ac_in.d, 23); m = dig2int({48'd0, md.d[10:0]}, 11);
      lim = m * pow10(11);
      if (a >= lim) begin
        check($sformatf("div %0d fail flag", t), div_fail == 1'b1);
        check($sformatf("div %0d unchanged", t), ac_out == ac_in);
      end else begin
        q = a / m; rem = a % m;
        if (op == AR_DIVR) begin
          if (2 * rem >= m) q = q + 1;
          rem = 0;
        end
        check($sformatf("div %0d flag", t), div_fail == 1'b0);
        check($sformatf("div %0d value q=%0d", t, q),
              dig2int(ac_out.d, 23) == q * pow10(11) + rem && ac_out.sign == (ac_in.sign ^ md.sign));
        check($sformatf("div %0d rem sign", t), rem_sign == ac_in.sign);
      end
    end
    // ---------------- rounding
    for (int t = 0; t < 40; t++) begin
      ac_in = rand_acc(22);
      if (t % 3 == 0) ac_in.d[10] = 4'd5;
      op = AR_RND;
      run(cyc);
      a = dig2int(ac_in.d, 23);
      r = ((a + 5 * pow10(10)) / pow10(11)) * pow10(11);
      check($sformatf("rnd %0d", t), dig2int(ac_out.d, 23) == r && ac_out.sign == ac_in.sign);
      check("rnd cycles", cyc == 24);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
