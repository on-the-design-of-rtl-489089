// tb_kdc_check - checks parity generation and parity / validity checking.
//
// For random words the generated bit must make the count of ones even;
// flipping any single bit of the stored word must raise par_err; a digit
// of 10-15 must raise inv_err.
module tb_kdc_check;
  import kdc_pkg::*;
  word_t w;
  logic par_in, par_gen, par_err, inv_err;
  int checks = 0, failures = 0;
  kdc_check dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    for (int t = 0; t < 300; t++) begin
      w.sign = 1'($urandom);
      for (int i = 0; i < 12; i++) w.d[i] = 4'($urandom_range(0, 9));
      par_in = 0; #1;
      par_in = par_gen; #1;
      chk("even count", ($countones({par_in, w}) % 2) == 0);
      chk("no error", !par_err && !inv_err);
      w[$urandom_range(0, 48)] ^= 1'b1; #1;
      chk("single bit flip detected", par_err);
      w.d[$urandom_range(0, 11)] = 4'($urandom_range(10, 15)); #1;
      chk("invalid digit detected", inv_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
