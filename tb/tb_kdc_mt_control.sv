// tb_kdc_mt_control - checks the magnetic tape control unit with the core
// buffer and a behavioural tape handler: writing blocks, reading them back
// into the core buffer with the block-number match, searching for a block,
// testing forward and backward, detection of a corrupted word (TC
// indicator), reading past the end of the recording (tape end), erase and
// rewind, and that the unit stays busy while the handler works.
module tb_kdc_mt_control;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, busy, done, tc_ind, blk_match;
  mt_cmd_t cmd;
  logic [1:0] unit;
  logic [15:0] blkno;
  logic [3:0] te_ind;
  logic cb_req, cb_we, cb_ack;
  logic [5:0] cb_addr;
  mword_t cb_wdata, cb_rdata;
  logic h_cmd_valid, h_wvalid, h_wready, h_rvalid, h_rready, h_end;
  mt_cmd_t h_cmd;
  logic [1:0] h_unit;
  mword_t h_wdata, h_rdata;
  logic [3:0] h_tape_end;
  int blocks_written, blocks_read;
  logic a_req = 0, a_we = 0, a_ack;
  logic [5:0] a_addr = 0;
  mword_t a_wdata = '0, a_rdata;
  int checks = 0, failures = 0;

  kdc_mt_control dut (.*);
  kdc_core_mem #(.ACCESS_TIME(4)) u_core (
    .clk, .rst_n, .a_req, .a_we, .a_imm(1'b1), .a_addr, .a_wdata, .a_ack, .a_rdata,
    .b_req(cb_req), .b_we(cb_we), .b_addr(cb_addr), .b_wdata(cb_wdata), .b_ack(cb_ack), .b_rdata(cb_rdata)
  );
  kdc_tape_model u_tape (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic core_wr(input int i, input word_t w);
    @(negedge clk); a_req = 1; a_we = 1; a_addr = 6'(i); a_wdata = '{par: ^w, w: w};
    do begin @(posedge clk); #1; end while (!a_ack);
    @(negedge clk); a_req = 0;
  endtask
  task automatic core_rd(input int i, output word_t w);
    @(negedge clk); a_req = 1; a_we = 0; a_addr = 6'(i);
    do begin @(posedge clk); #1; end while (!a_ack);
    w = a_rdata.w;
    @(negedge clk); a_req = 0;
  endtask
  int busy_cycles;
  task automatic run(input mt_cmd_t c, input int u, input int b);
    @(negedge clk); cmd_valid = 1; cmd = c; unit = 2'(u); blkno = bin_to_bcd4(14'(b));
    @(negedge clk); cmd_valid = 0;
    busy_cycles = 0;
    while (!done) begin @(posedge clk); #1 busy_cycles++; end
  endtask
  function automatic word_t pat(input int blk, input int i);
    word_t w = '0;
    w.sign = 1'(i % 2);
    w.d[0] = 4'(i % 10); w.d[1] = 4'(i / 10); w.d[5] = 4'(blk % 10); w.d[9] = 4'((blk + i) % 10);
    return w;
  endfunction
  word_t w;
  logic ok;
  initial begin
    cmd = MT_NONE; unit = 0; blkno = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // write blocks 11, 12, 13 to unit 1
    for (int b = 11; b <= 13; b++) begin
      for (int i = 0; i < 50; i++) core_wr(i, pat(b, i));
      run(MT_WRITE, 1, b);
      chk("write took the tape time", busy_cycles > 52 * 3);
    end
    chk("three blocks written", blocks_written == 3);
    run(MT_REWIND, 1, 0);
    // read the first block: number matches 11
    for (int i = 0; i < 50; i++) core_wr(i, '0);
    run(MT_READ, 1, 11);
    chk("read match", blk_match && !tc_ind);
    ok = 1; for (int i = 0; i < 50; i++) begin core_rd(i, w); if (w != pat(11, i)) ok = 0; end
    chk("block 11 in core", ok);
    // next block, asking for a different number
    run(MT_READ, 1, 99);
    chk("read no match", !blk_match && !tc_ind);
    ok = 1; for (int i = 0; i < 50; i++) begin core_rd(i, w); if (w != pat(12, i)) ok = 0; end
    chk("block 12 in core", ok);
    // search for 13 from the load point
    run(MT_REWIND, 1, 0);
    run(MT_SEARCH, 1, 13);
    chk("search found", blk_match && !tc_ind);
    ok = 1; for (int i = 0; i < 50; i++) begin core_rd(i, w); if (w != pat(13, i)) ok = 0; end
    chk("block 13 in core after search", ok);
    // past the end: no block
    run(MT_READ, 1, 0);
    chk("end of recording sets TC", tc_ind);
    chk("tape end indicator", te_ind[1]);
    // backspace and test the last block
    run(MT_BACK, 1, 0);
    chk("backspace test good", !tc_ind);
    // corrupted word while testing forward
    run(MT_BACK, 1, 0);
    u_tape.corrupt_pend = 1;
    run(MT_TEST, 1, 0);
    chk("corruption detected", tc_ind);
    // search for a missing block runs to the end of the tape
    run(MT_REWIND, 1, 0);
    chk("rewind clears tape end", !te_ind[1]);
    run(MT_SEARCH, 1, 77);
    chk("missing block: TC", tc_ind && !blk_match);
    // erase at the load point, then nothing is readable
    run(MT_REWIND, 1, 0);
    run(MT_ERASE, 1, 0);
    run(MT_READ, 1, 11);
    chk("erased", tc_ind);
    // other unit untouched
    run(MT_READ, 2, 0);
    chk("unit 2 blank", tc_ind && te_ind[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
