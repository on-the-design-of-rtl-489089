// tb_kdc_index_unit - checks the index registers and address modification.
//
// Loads the registers through set / raise / lower (with wrap-around
// modulo 10,000) and then checks #IJA for every pair of index digits,
// with and without the LC, the P-indicator and a non-index first digit,
// against decimal arithmetic done on integers.
module tb_kdc_index_unit;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0, i_is_index, p_ind;
  digit_t i_digit, j_digit, wr_sel;
  logic [15:0] addr, lc, or_ad, ea, wr_val;
  logic [15:0] ir [1:3];
  ix_op_t wr_op;
  int checks = 0, failures = 0;
  int r[4];
  kdc_index_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [15:0] b(input int v); return bin_to_bcd4(14'(v)); endfunction
  function automatic int v(input logic [15:0] x); return int'(bcd4_to_bin(x)); endfunction
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic upd(input ix_op_t o, input int sel, input int val);
    @(negedge clk); wr_op = o; wr_sel = 4'(sel); wr_val = b(val);
    @(negedge clk); wr_op = IX_NONE;
  endtask
  int e, a_, l_, oa;
  initial begin
    wr_op = IX_NONE; wr_sel = 0; wr_val = 0; i_digit = 0; j_digit = 0; addr = 0; lc = 0;
    p_ind = 0; or_ad = 0; i_is_index = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      r[1] = $urandom_range(0, 9999); r[2] = $urandom_range(0, 9999); r[3] = $urandom_range(0, 9999);
      upd(IX_SET, 1, r[1]); upd(IX_SET, 2, 5); upd(IX_ADD, 2, r[2]); r[2] = (r[2] + 5) % 10000;
      upd(IX_SET, 3, 7); upd(IX_SUB, 3, r[3]); r[3] = (7 - r[3] + 10000) % 10000;
      upd(IX_SET, 0, 1234);  // no register 0: nothing changes
      for (int k = 1; k <= 3; k++) chk("register value", v(ir[k]) == r[k]);
      for (int ii = 0; ii < 10; ii++)
        for (int jj = 0; jj < 10; jj++) begin
          a_ = $urandom_range(0, 9999); l_ = $urandom_range(0, 9999); oa = $urandom_range(0, 9999);
          i_digit = 4'(ii); j_digit = 4'(jj); addr = b(a_); lc = b(l_); or_ad = b(oa);
          p_ind = 1'($urandom); i_is_index = 1'($urandom);
          #1;
          e = a_;
          if (i_is_index) e += (ii >= 1 && ii <= 3) ? r[ii] : (ii == 4) ? l_ : 0;
          e += (jj >= 1 && jj <= 3) ? r[jj] : (jj == 4) ? l_ : 0;
          if (p_ind) e += oa;
          chk($sformatf("ea I=%0d J=%0d", ii, jj), v(ea) == e % 10000);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
