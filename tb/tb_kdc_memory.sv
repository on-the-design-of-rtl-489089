// tb_kdc_memory - checks the store as the processor sees it: address
// decoding to drum normal, drum quick and core memory, parity generated on
// write, an error for nonexistent addresses, and detection of a corrupted
// stored parity bit and of an invalid digit.
module tb_kdc_memory;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, we = 0, imm = 0, ack, err;
  logic [15:0] addr;
  word_t wdata, rdata;
  logic [7:0] drum_angle;
  logic cb_req = 0, cb_we = 0, cb_ack;
  logic [5:0] cb_addr = 0;
  mword_t cb_wdata = '0, cb_rdata;
  int checks = 0, failures = 0;
  kdc_memory #(.WORD_TIME(4), .CORE_ACCESS(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic acc(input int a, input logic w, input word_t d, input logic im);
    @(negedge clk); req = 1; we = w; addr = bin_to_bcd4(14'(a)); wdata = d; imm = im;
    do begin @(posedge clk); #1; end while (!ack);
    @(negedge clk); req = 0;
  endtask
  word_t shadow [int];
  int a;
  word_t x;
  logic [15:0] bad_addr[4] = '{16'h4250, 16'h4299, 16'h4300, 16'h9999};
  initial begin
    addr = 0; wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      case (t % 3)
        0: a = $urandom_range(0, 3999);
        1: a = $urandom_range(4000, 4199);
        default: a = $urandom_range(4200, 4249);
      endcase
      x.sign = 1'($urandom);
      for (int i = 0; i < 12; i++) x.d[i] = 4'($urandom_range(0, 9));
      acc(a, 1, x, t[0]);
      shadow[a] = x;
    end
    foreach (shadow[k]) begin
      acc(k, 0, '0, 1'b0);
      chk($sformatf("read %0d %h %h err=%0d", k, rdata, shadow[k], err), rdata == shadow[k] && !err);
    end
    // core words seen by the tape port carry correct parity
    @(negedge clk); a = 4200 + 5; cb_req = 1; cb_addr = 6'd5;
    do begin @(posedge clk); #1; end while (!cb_ack);
    if (shadow.exists(a)) chk("tape port word", cb_rdata.w == shadow[a] && cb_rdata.par == ^shadow[a]);
    @(negedge clk); cb_req = 0;
    // nonexistent addresses, from the first one past the core up
    foreach (bad_addr[i]) begin
      @(negedge clk); req = 1; we = 0; addr = bad_addr[i];
      do begin @(posedge clk); #1; end while (!ack);
      chk($sformatf("nonexistent address %h error", bad_addr[i]), err && rdata == '0);
      @(negedge clk); req = 0;
    end
    // the last core register exists
    acc(4249, 0, '0, 1'b1);
    chk("register 4249 exists", !err);
    // corrupt a stored parity bit and an invalid digit
    x = '0; x.d[0] = 4'd3;
    acc(17, 1, x, 1'b1);
    dut.u_drum.mem[17].par = ~dut.u_drum.mem[17].par;
    @(negedge clk); req = 1; we = 0; addr = 16'h0017; imm = 1;
    do begin @(posedge clk); #1; end while (!ack);
    chk("parity error detected", err);
    @(negedge clk); req = 0; imm = 0;
    x.d[1] = 4'hC;
    acc(18, 1, x, 1'b1);
    @(negedge clk); req = 1; we = 0; addr = 16'h0018; imm = 1;
    do begin @(posedge clk); #1; end while (!ack);
    chk("invalid digit detected", err);
    @(negedge clk); req = 0; imm = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
