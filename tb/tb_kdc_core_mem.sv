// tb_kdc_core_mem - checks the two-port core memory: data integrity from
// both ports, the fixed access time, one access at a time, and priority of
// the tape port when both ports ask in the same clock.
module tb_kdc_core_mem;
  import kdc_pkg::*;
  localparam int AT = 12;
  logic clk = 0, rst_n = 0;
  logic a_req = 0, a_we = 0, a_imm = 0, a_ack, b_req = 0, b_we = 0, b_ack;
  logic [5:0] a_addr, b_addr;
  mword_t a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;
  kdc_core_mem #(.ACCESS_TIME(AT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  mword_t shadow [50];
  int c, ca, cb;
  initial begin
    a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // fill through both ports
    for (int i = 0; i < 50; i++) begin
      shadow[i] = {1'($urandom), 1'($urandom), 48'({$urandom, $urandom})};
      @(negedge clk);
      if (i % 2) begin b_req = 1; b_we = 1; b_addr = 6'(i); b_wdata = shadow[i]; end
      else       begin a_req = 1; a_we = 1; a_addr = 6'(i); a_wdata = shadow[i]; end
      c = 0;
      do begin @(posedge clk); #1 c++; end while (!(a_ack || b_ack));
      chk("access time", c == AT + 1);
      @(negedge clk); a_req = 0; b_req = 0;
    end
    // both ports at once: b first, then a
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      a_req = 1; a_we = 0; a_addr = 6'($urandom_range(0, 49));
      b_req = 1; b_we = 0; b_addr = 6'($urandom_range(0, 49));
      ca = 0; cb = 0; c = 0;
      while (ca == 0 || cb == 0) begin
        @(posedge clk); #1 c++;
        if (b_ack) begin cb = c; chk("b data", b_rdata == shadow[b_addr]); b_req = 0; end
        if (a_ack) begin ca = c; chk("a data", a_rdata == shadow[a_addr]); a_req = 0; end
      end
      chk($sformatf("tape port first (a %0d b %0d)", ca, cb), cb == AT + 1 && ca > cb + AT);
    end
    // immediate processor access
    @(posedge clk);
    @(negedge clk); a_req = 1; a_we = 0; a_imm = 1; a_addr = 6'd7;
    @(posedge clk); #1 chk("imm", a_ack && a_rdata == shadow[7]);
    @(negedge clk); a_req = 0; a_imm = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
