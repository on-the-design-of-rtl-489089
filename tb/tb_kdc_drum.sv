// tb_kdc_drum - checks the drum store: data written at random normal and
// quick access addresses reads back, every access completes exactly when
// its word passes the heads (angle matches), waits never exceed one
// revolution (normal) or a quarter revolution (quick access), and the mean
// waits come out near half and an eighth of a revolution.
module tb_kdc_drum;
  import kdc_pkg::*;
  localparam int WT = 12, REV = 200 * WT;
  logic clk = 0, rst_n = 0, req = 0, we = 0, imm = 0, ack;
  logic [12:0] addr;
  mword_t wdata, rdata;
  logic [7:0] angle;
  int checks = 0, failures = 0;
  kdc_drum #(.WORD_TIME(WT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  mword_t shadow [int];
  int cyc, a, sum_n, cnt_n, sum_q, cnt_q, max_n, max_q;
  logic [7:0] ang_prev;
  task automatic access(input int ad, input logic w, input mword_t d, input logic im, output int c);
    @(negedge clk); req = 1; we = w; addr = 13'(ad); wdata = d; imm = im;
    c = 0;
    do begin ang_prev = angle; @(posedge clk); #1 c++; end while (!ack);
    @(negedge clk); req = 0;
  endtask
  initial begin
    addr = 0; wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    sum_n = 0; cnt_n = 0; sum_q = 0; cnt_q = 0; max_n = 0; max_q = 0;
    for (int t = 0; t < 400; t++) begin
      a = (t % 3 == 0) ? $urandom_range(4000, 4199) : $urandom_range(0, 3999);
      wdata = {1'($urandom), 1'($urandom), 48'({$urandom, $urandom})};
      access(a, 1'b1, wdata, 1'b0, cyc);
      shadow[a] = wdata;
      // the word was under the heads during the clock before ack
      if (a < 4000) begin
        chk("normal position", int'(ang_prev) == a % 200);
        sum_n += cyc; cnt_n++; if (cyc > max_n) max_n = cyc;
      end else begin
        chk("quick position", int'(ang_prev) % 50 == (a - 4000) % 50);
        sum_q += cyc; cnt_q++; if (cyc > max_q) max_q = cyc;
      end
      access(a, 1'b0, '0, (t % 5 == 0), cyc);
      chk($sformatf("readback %0d", a), rdata == shadow[a]);
      if (t % 5 == 0) chk("immediate access", cyc == 1);
    end
    chk($sformatf("max normal wait %0d", max_n), max_n <= REV + 1);
    chk($sformatf("max quick wait %0d", max_q), max_q <= REV / 4 + 1);
    chk($sformatf("mean normal wait %0d", sum_n / cnt_n), sum_n / cnt_n > REV * 4 / 10 && sum_n / cnt_n < REV * 6 / 10);
    chk($sformatf("mean quick wait %0d", sum_q / cnt_q), sum_q / cnt_q > REV / 8 * 7 / 10 && sum_q / cnt_q < REV / 8 * 13 / 10);
    $display("mean wait: normal %0d clocks, quick %0d clocks", sum_n / cnt_n, sum_q / cnt_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
