// tb_kdc_logic_unit - checks ERE, AND, IOR, NOT, WAN, WOR and the EAD
// extract against bit-level reference formulas: directed cases from the
// operation definitions and random words.
module tb_kdc_logic_unit;
  import kdc_pkg::*;
  logic_op_t op;
  word_t ua, md, e, ua_out, ead_opnd, exp_w;
  logic [15:0] n;
  int checks = 0, failures = 0;
  kdc_logic_unit dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic word_t rw();
    word_t w;
    w.sign = 1'($urandom);
    for (int i = 0; i < 12; i++) w.d[i] = 4'($urandom_range(0, 9));
    return w;
  endfunction
  function automatic word_t model(input logic_op_t o, input word_t u, input word_t m, input word_t x, input int wt);
    word_t r; logic b;
    r = u;
    for (int k = 0; k < 11; k++) begin
      case (o)
        LG_ERE: r.d[k] = m.d[k][0] ? x.d[k] : u.d[k];
        LG_AND: for (int bb = 0; bb < 4; bb++) r.d[k][bb] = (bb == 3) ? 1'b0 : (m.d[k][bb] ? (u.d[k][bb] & x.d[k][bb]) : u.d[k][bb]);
        LG_IOR: for (int bb = 0; bb < 4; bb++) r.d[k][bb] = (bb == 3) ? 1'b0 : (m.d[k][bb] ? (u.d[k][bb] | x.d[k][bb]) : u.d[k][bb]);
        LG_NOT: for (int bb = 0; bb < 4; bb++) r.d[k][bb] = (bb == 3) ? 1'b0 : (m.d[k][bb] ? ~u.d[k][bb] : u.d[k][bb]);
        default: begin
          // weighted: the weight bit chosen by wt
          case (wt)
            2, 3: b = u.d[k][1];
            4, 5: b = u.d[k][2];
            8, 9: b = u.d[k][3];
            6, 7: b = (o == LG_WAN) ? (u.d[k][1] | u.d[k][2]) : (u.d[k][1] | u.d[k][2]);
            default: b = 1'bx;
          endcase
          if (wt <= 1) r.d[k] = 4'd0;
          else r.d[k] = {3'b000, (o == LG_WAN) ? (u.d[k][0] & b) : (u.d[k][0] | b)};
        end
      endcase
    end
    return r;
  endfunction
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    // directed ERE: odd MD digits take c(E)
    ua = '0; md = '0; e = '0;
    ua.d[10:0] = {4'd1,4'd2,4'd3,4'd4,4'd5,4'd6,4'd7,4'd8,4'd9,4'd0,4'd1};
    e.d[10:0]  = {4'd9,4'd9,4'd9,4'd9,4'd9,4'd9,4'd9,4'd9,4'd9,4'd9,4'd9};
    md.d[10:0] = {4'd1,4'd0,4'd3,4'd0,4'd5,4'd0,4'd7,4'd0,4'd9,4'd0,4'd2};
    ua.d[11] = 4'd1; ua.sign = 1;
    op = LG_ERE; n = 0; #1;
    chk("ERE directed", ua_out.d[10:0] == {4'd9,4'd2,4'd9,4'd4,4'd9,4'd6,4'd9,4'd8,4'd9,4'd0,4'd1} && ua_out.d[11] == 4'd1 && ua_out.sign);
    for (int t = 0; t < 600; t++) begin
      ua = rw(); md = rw(); e = rw();
      op = logic_op_t'($urandom_range(0, 5));
      n = 16'($urandom_range(0, 9));
      #1;
      exp_w = model(op, ua, md, e, int'(n));
      chk($sformatf("op %s n=%0d", op.name(), n), ua_out == exp_w);
      chk("ead", ead_opnd.sign == e.sign && ead_opnd.d[11] == 0);
      for (int k = 0; k < 11; k++) chk("ead digit", ead_opnd.d[k] == (md.d[k][0] ? e.d[k] : 4'd0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
