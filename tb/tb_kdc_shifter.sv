// tb_kdc_shifter - checks SLS, LLS, LCS, SRS, LRS and SCT against a
// digit-array reference model on random accumulators and counts,
// including counts beyond the register length and an all-zero SCT.
module tb_kdc_shifter;
  import kdc_pkg::*;
  shift_op_t op;
  acc_t ac, ac_out, ex;
  logic [15:0] n, count;
  int checks = 0, failures = 0;
  kdc_shifter dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  int c, lz;
  initial begin
    for (int t = 0; t < 800; t++) begin
      ac.sign = 1'($urandom);
      for (int i = 0; i < 23; i++) ac.d[i] = 4'($urandom_range(0, 9));
      if (t % 5 == 0) for (int i = 8 + t % 14; i < 23; i++) ac.d[i] = 0;
      if (t == 7) ac.d = '0;
      c = $urandom_range(0, 30);
      n = {8'h00, 4'(c / 10), 4'(c % 10)};
      op = shift_op_t'($urandom_range(0, 5));
      #1;
      ex = ac;
      case (op)
        SH_SLS: for (int i = 22; i >= 11; i--) ex.d[i] = (i - c >= 11) ? ac.d[i - c] : 4'd0;
        SH_SRS: for (int i = 11; i <= 22; i++) ex.d[i] = (i + c <= 22) ? ac.d[i + c] : 4'd0;
        SH_LLS: for (int i = 0; i < 23; i++) ex.d[i] = (i - c >= 0) ? ac.d[i - c] : 4'd0;
        SH_LRS: for (int i = 0; i < 23; i++) ex.d[i] = (i + c <= 22) ? ac.d[i + c] : 4'd0;
        SH_LCS: for (int i = 0; i < 23; i++) ex.d[i] = ac.d[((i - c) % 23 + 23) % 23];
        default: begin
          lz = 22;
          for (int i = 21; i >= 0; i--) if (ac.d[i] != 0) begin lz = 21 - i; break; end
          for (int i = 0; i < 23; i++) ex.d[i] = 0;
          for (int i = 0; i < 22; i++) if (i - lz >= 0) ex.d[i] = ac.d[i - lz];
          chk("sct count", count == {8'h00, 4'(lz / 10), 4'(lz % 10)});
          if (lz < 22) chk("sct normalised", ac_out.d[21] != 0);
        end
      endcase
      chk($sformatf("%s by %0d", op.name(), c), ac_out == ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
