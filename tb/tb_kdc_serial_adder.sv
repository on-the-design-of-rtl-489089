// tb_kdc_serial_adder - checks the digit-serial decimal adder.
//
// Random 11-digit numbers are added and subtracted (nines complement plus
// carry-in) one digit per clock, the sum digits collected and compared
// with integer arithmetic, together with the final carry.
module tb_kdc_serial_adder;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, cin = 0, comp_b = 0, cout;
  digit_t a, b, s;
  int checks = 0, failures = 0;
  kdc_serial_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint av, bv, ev, rv, p;
  logic c_last;
  localparam longint E11 = 64'd100000000000;
  digit_t [10:0] ad, bd;
  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      av = 0; bv = 0;
      for (int i = 10; i >= 0; i--) begin
        ad[i] = 4'($urandom_range(0, 9)); bd[i] = 4'($urandom_range(0, 9));
        av = av * 10 + longint'(ad[i]); bv = bv * 10 + longint'(bd[i]);
      end
      if (t % 10 == 0) bd = ad;
      if (t % 10 == 0) bv = av;
      comp_b = t[0];
      cin    = t[0];
      rv = 0; p = 1;
      for (int i = 0; i < 11; i++) begin
        @(negedge clk);
        en = 1; first = (i == 0); a = ad[i]; b = bd[i];
        #1;
        rv = rv + longint'(s) * p; p = p * 10;
        c_last = cout;
        @(posedge clk);
      end
      @(negedge clk); en = 0;
      if (comp_b) ev = av - bv; else ev = av + bv;
      checks++;
      if (!comp_b && !(rv == ev % E11 && c_last == (ev >= E11))) begin
        failures++; $display("FAIL add %0d+%0d got %0d", av, bv, rv);
      end
      if (comp_b && !(rv == ((ev + E11) % E11) && c_last == (ev >= 0))) begin
        failures++; $display("FAIL sub %0d-%0d got %0d c=%0d", av, bv, rv, c_last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
