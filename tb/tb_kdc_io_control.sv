// tb_kdc_io_control - checks the paper tape / typewriter control: component
// selection, reading digits from either tape reader into the UA (other
// characters skipped), writing digits from the UA most significant first
// to the selected devices, the repeated special character, and that output
// runs in the background (busy while the slow typewriter takes characters).
module tb_kdc_io_control;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  io_cmd_t cmd = IO_NONE;
  logic [15:0] n = '0;
  word_t ua = '0, ua_out;
  logic [3:0] sel;
  logic rd_ready, rd_unit, rd_valid = 0, wr_valid, wr_ready = 0;
  logic [7:0] rd_char = 0, wr_char;
  logic [1:0] wr_dev;
  int checks = 0, failures = 0;

  kdc_io_control dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // two tape readers, each a list of characters; a character every 3 clocks
  byte unsigned tape0[$], tape1[$];
  int rd_from[2] = '{0, 0};
  always @(posedge clk) begin
    if (rd_valid && rd_ready) rd_valid <= 0;
    else if (rd_ready && !rd_valid && ($time / 10) % 3 == 0) begin
      if (!rd_unit) begin rd_char <= tape0.pop_front(); rd_from[0]++; end
      else          begin rd_char <= tape1.pop_front(); rd_from[1]++; end
      rd_valid <= 1;
    end
  end
  // typewriter: one character every WR_GAP clocks
  localparam int WR_GAP = 20;
  byte unsigned out_chars[$];
  logic [1:0] out_dev[$];
  int gap = 0;
  always @(posedge clk) begin
    if (wr_ready && wr_valid) begin
      out_chars.push_back(wr_char); out_dev.push_back(wr_dev);
      wr_ready <= 0; gap <= WR_GAP;
    end else if (gap > 0) gap <= gap - 1;
    else wr_ready <= 1;
  end

  task automatic issue(input io_cmd_t c, input logic [15:0] nn, input word_t u);
    @(negedge clk); while (busy) @(negedge clk);
    cmd = c; n = nn; ua = u; start = 1;
    @(negedge clk); start = 0;
  endtask
  task automatic wait_done();
    while (!done) begin @(posedge clk); #1; end
  endtask

  word_t w;
  int t0, t1;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    chk("reset selection", sel == 4'b0101);
    // read 5 characters (3 digits, 2 others) from reader 1 into UA = 0...07
    tape0 = '{8'd19, 8'd40, 8'd16, 8'd2, 8'd25};
    w = '0; w.d[0] = 4'd7;
    issue(IO_RIN, 16'h0005, w); wait_done();
    chk("RIN digits", ua_out.d == {4'd0, 28'h0, 4'd7, 4'd3, 4'd0, 4'd9} && rd_from[0] == 5);
    // select reader 2 and the punch
    issue(IO_SEL, 16'h0002, '0); wait_done();
    chk("SEL reader 2", sel == 4'b0010 && rd_unit);
    tape1 = '{8'd21, 8'd22};
    issue(IO_RIN, 16'h0002, '0); wait_done();
    chk("RIN from reader 2", ua_out.d[1:0] == {4'd5, 4'd6} && rd_from[1] == 2);
    // typewriter + punch, write 4 digits of 0.4821...
    issue(IO_SEL, 16'h000C, '0); wait_done();
    w = '0; w.d[10] = 4; w.d[9] = 8; w.d[8] = 2; w.d[7] = 1; w.d[6] = 6;
    t0 = int'($time / 10);
    issue(IO_WRT, 16'h0004, w);
    t1 = int'($time / 10);
    chk("processor free at once", busy && (t1 - t0) < 3);
    wait_done();
    chk("four characters", out_chars.size() == 4);
    if (out_chars.size() == 4)
      chk("WRT digits", out_chars[0] == 20 && out_chars[1] == 24 && out_chars[2] == 18 && out_chars[3] == 17);
    chk("both devices", out_dev[0] == 2'b11);
    chk("output paced by typewriter", int'($time / 10) - t0 >= 3 * WR_GAP);
    // special character 45 three times
    out_chars.delete(); out_dev.delete();
    issue(IO_WSP, 16'h4503, '0); wait_done();
    chk("WSP count", out_chars.size() == 3);
    foreach (out_chars[i]) chk("WSP char", out_chars[i] == 45);
    // a zero count does nothing
    out_chars.delete();
    issue(IO_WRT, 16'h0000, w); wait_done();
    chk("zero count", out_chars.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
