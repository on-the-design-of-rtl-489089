// tb_kdc_top - end-to-end test of the whole computer at its real timing
// (12 clocks per drum word, 200 words per revolution, 12-clock core
// access; no parameter is overridden).
//
// Programs are loaded through the console store port while the machine is
// halted, then started from the console.  A behavioural tape handler, a
// paper tape reader and a typewriter are attached.  Three programs run
// one after the other (each ends with HJM to the next), then a fourth
// check provokes a read check:
//   A  arithmetic: clear-and-add, a subtraction that recomplements,
//      multiply, divide, division impossible, CMP skip, overflow jump
//   B  index loop (SEX/JXL), PSX, TLU, SCT, subroutine link (JSX),
//      floating multiply, FAV (add, divide and round), FDJ jump on a zero
//      divisor, floating add with exponent overflow (JEO)
//   C  typewriter output and a tape write running while the processor
//      goes on with drum-to-core and drum-to-quick-band transfers, paper
//      tape input, rewind, read with block-number match, search for a
//      missing block (tape check and tape end), jump switch, a floating
//      write (FWR), and an access
//      to a storage register that does not exist (alarm)
//   D  a word whose parity was damaged on the drum stops the machine
// Each mechanism is counted; one that never happened is a failure.  The
// waits for drum words are measured: normal tracks must wait about half a
// revolution on average, quick bands far less, the core least.
module tb_kdc_top;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] switches = 10'b0000001000;
  logic halted, alarm, p_lamp, retire;
  logic [15:0] lc;
  acc_t ac;
  word_t md;
  logic [11:0] retire_op;
  logic con_req = 0, con_we = 0, con_ack, con_err;
  logic [15:0] con_addr = '0;
  word_t con_wdata = '0, con_rdata;
  logic h_cmd_valid, h_wvalid, h_wready, h_rvalid, h_rready, h_end;
  mt_cmd_t h_cmd;
  logic [1:0] h_unit;
  mword_t h_wdata, h_rdata;
  logic [3:0] h_tape_end;
  logic rd_ready, rd_unit, rd_valid = 0, wr_valid, wr_ready = 0;
  logic [7:0] rd_char = '0, wr_char;
  logic [1:0] wr_dev;
  logic mt_busy, io_busy;
  logic [3:0] io_sel;
  logic [7:0] drum_angle;
  int blocks_written, blocks_read;
  int checks = 0, failures = 0;

  kdc_top dut (.*);
  kdc_tape_model #(.GAP(24)) u_tape (.*);
  always #5 clk = ~clk;
  initial begin
    #40000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // paper tape reader 1: characters 5, (blank), 6, 7
  byte unsigned rd_tape[$] = '{8'd21, 8'd0, 8'd22, 8'd23};
  always @(posedge clk) begin
    if (rd_valid && rd_ready) rd_valid <= 0;
    else if (rd_ready && !rd_valid && rd_tape.size() > 0) begin
      rd_char <= rd_tape.pop_front(); rd_valid <= 1;
    end
  end
  // typewriter: one character per 500 clocks
  byte unsigned typed[$];
  int tw_gap = 0;
  always @(posedge clk) begin
    if (wr_ready && wr_valid) begin typed.push_back(wr_char); wr_ready <= 0; tw_gap <= 500; end
    else if (tw_gap > 0) tw_gap <= tw_gap - 1;
    else wr_ready <= 1;
  end

  // ------------------------------------------------------ mechanism counts
  int n_clear, n_recomp, n_mul, n_div, n_div_fail, n_cmp_skip, n_ovf, n_p, n_ix_loop;
  int n_blk, n_mt_overlap, n_io_overlap, n_tpb_match, n_jtg, n_jte, n_jsw, n_alarm;
  int n_fmul, n_eo, n_fdiv, n_fdiv_fail, n_fwr;
  int n_normal, n_quick, n_core;
  longint w_normal, w_quick, w_core;
  logic [15:0] prev_lc;
  logic p_q;
  int req_t;
  always @(posedge clk) begin
    p_q <= p_lamp;
    if (p_lamp && !p_q) n_p++;
    if (dut.u_cpu.u_arith.state.name() == "S_PASS" && dut.u_cpu.u_arith.phase.name() == "PH_RECOMP"
        && dut.u_cpu.u_arith.pos == 5'd0) n_recomp++;
    if (retire) begin
      automatic logic [11:0] o = {retire_op[11:1], 1'b0};
      automatic logic jumped = (lc != bcd4_add(prev_lc, 16'h0001));
      if (retire_op[0]) n_clear++;
      if (o == OP_MPA) n_mul++;
      if (o == OP_FMP) n_fmul++;
      if (o == OP_FAV) n_fdiv++;
      if (o == OP_FDJ && jumped) n_fdiv_fail++;
      if (o == OP_JEO && jumped) n_eo++;
      if (o == OP_DVJ) begin n_div++; if (jumped) n_div_fail++; end
      if (o == OP_CMP && jumped) n_cmp_skip++;
      if (o == OP_JOV && jumped) n_ovf++;
      if (o == OP_JXL && jumped) n_ix_loop++;
      if (o inside {OP_LDQ, OP_DMB, OP_BDM}) n_blk++;
      if (o == OP_TPB && jumped) n_tpb_match++;
      if (o == OP_JTG && jumped) n_jtg++;
      if (o == OP_JTE && jumped) n_jte++;
      if (o == OP_JSW && jumped) n_jsw++;
    end
    // the processor's store accesses made while a tape or output command runs
    if (dut.m_ack && !dut.use_con && mt_busy) n_mt_overlap++;
    if (dut.m_ack && !dut.use_con && io_busy && dut.u_io.st.name() == "I_WRITE") n_io_overlap++;
    if (!halted) prev_lc <= retire ? lc : prev_lc;
    // store waits seen by the processor
    if (dut.c_req && !dut.use_con) begin
      if (req_t < 0) req_t <= 0; else req_t <= req_t + 1;
      if (dut.m_ack) begin
        automatic int a = int'(bcd4_to_bin(dut.c_addr));
        if (a < 4000)      begin n_normal++; w_normal += req_t; end
        else if (a < 4200) begin n_quick++;  w_quick  += req_t; end
        else if (a < 4250) begin n_core++;   w_core   += req_t; end
        req_t <= -1;
      end
    end else req_t <= -1;
  end
  always @(posedge alarm) n_alarm++;

  // ----------------------------------------------------------- helpers
  function automatic word_t nw(input bit s, input longint v);
    word_t w = '0;
    w.sign = s;
    for (int i = 0; i < 12; i++) begin w.d[i] = 4'(v % 10); v = v / 10; end
    return w;
  endfunction
  function automatic logic [15:0] bcd(input int v);
    return bin_to_bcd4(14'(v));
  endfunction
  task automatic con_write(input int at, input word_t w);
    @(negedge clk); con_req = 1; con_we = 1; con_addr = bcd(at); con_wdata = w;
    do begin @(posedge clk); #1; end while (!con_ack);
    @(negedge clk); con_req = 0; con_we = 0;
  endtask
  task automatic con_read(input int at, output word_t w);
    @(negedge clk); con_req = 1; con_we = 0; con_addr = bcd(at);
    do begin @(posedge clk); #1; end while (!con_ack);
    w = con_rdata;
    @(negedge clk); con_req = 0;
  endtask
  task automatic put(input int at, input logic [11:0] op, input int i, input int j, input int a);
    con_write(at, make_instr(op, 4'(i), 4'(j), bcd(a)));
  endtask
  task automatic expect_word(input string s, input int at, input word_t w);
    word_t r;
    con_read(at, r);
    chk(s, r == w);
    if (r != w) $display("  c(%0d) = %h, expected %h", at, r, w);
  endtask
  task automatic run_until_halt();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
  endtask
  localparam logic [11:0] CLR = 12'h001;

  initial begin
    n_clear = 0; n_recomp = 0; n_mul = 0; n_div = 0; n_div_fail = 0; n_cmp_skip = 0; n_ovf = 0;
    n_p = 0; n_ix_loop = 0; n_blk = 0; n_mt_overlap = 0; n_io_overlap = 0; n_tpb_match = 0;
    n_fmul = 0; n_eo = 0; n_fdiv = 0; n_fdiv_fail = 0; n_fwr = 0; n_jtg = 0; n_jte = 0; n_jsw = 0; n_alarm = 0; n_normal = 0; n_quick = 0; n_core = 0;
    w_normal = 0; w_quick = 0; w_core = 0; prev_lc = '0; p_q = 0; req_t = -1;
    repeat (3) @(posedge clk); rst_n = 1;
    // ---------------- program A
    put(0,  OP_ADD | CLR, 0, 0, 150);   // 0.25
    put(1,  OP_ADD, 0, 0, 151);         // + 0.5
    put(2,  OP_SUB, 0, 0, 152);         // - 1.0 = -0.25
    put(3,  OP_STO, 0, 0, 200);
    put(4,  OP_LDM, 0, 0, 153);         // MD = 0.5
    put(5,  OP_MPA | CLR, 0, 0, 154);   // 0.5 * 0.3
    put(6,  OP_STO, 0, 0, 201);
    put(7,  OP_DVJ, 0, 0, 12);          // 0.15 / 0.5
    put(8,  OP_STO, 0, 0, 202);
    put(9,  OP_ADD | CLR, 0, 0, 153);
    put(10, OP_DVJ, 0, 0, 13);          // 0.5 / 0.5: impossible
    put(11, OP_HJM, 0, 0, 11);
    put(12, OP_HJM, 0, 0, 12);
    put(13, OP_STO, 0, 0, 203);
    put(14, OP_CMP, 0, 0, 153);         // equal: skip one
    put(15, OP_HJM, 0, 0, 15);
    put(16, OP_ADD | CLR, 0, 0, 152);   // 1.0
    put(17, OP_ADD, 0, 0, 152);         // 2.0: overflow digit set
    put(18, OP_JOV, 0, 0, 20);
    put(19, OP_HJM, 0, 0, 19);
    put(20, OP_HJM, 0, 0, 50);
    con_write(150, nw(0, 64'd25000000000));
    con_write(151, nw(0, 64'd50000000000));
    con_write(152, nw(0, 64'd100000000000));
    con_write(153, nw(0, 64'd50000000000));
    con_write(154, nw(0, 64'd30000000000));
    // ---------------- program B
    put(50, OP_SEX, 1, 0, 3);
    put(51, OP_ADD | CLR, 0, 0, 300);
    put(52, OP_ADD, 1, 0, 300);
    put(53, OP_JXL, 1, 0, 52);
    put(54, OP_STO, 0, 0, 210);
    put(55, OP_PSX, 0, 0, 310);
    put(56, OP_ADD | CLR, 0, 0, 300);   // becomes 311
    put(57, OP_STO, 0, 0, 211);
    put(58, OP_LDM, 0, 0, 320);
    put(59, OP_TLU, 2, 0, 330);
    put(60, OP_ADD | CLR, 0, 0, 10);    // 10 + found address
    put(61, OP_STO, 0, 0, 212);
    put(62, OP_ADD | CLR, 0, 0, 305);
    put(63, OP_SCT, 0, 0, 0);
    put(64, OP_STO, 0, 0, 213);         // 213 + 2
    put(65, OP_JSX, 2, 0, 80);
    put(66, OP_JMP, 0, 0, 84);
    put(84, OP_LDM, 0, 0, 170);         // floating 0.5
    put(85, OP_FMP | CLR, 0, 0, 171);   // * floating 0.4
    put(86, OP_STO, 0, 0, 216);
    put(87, OP_LDM, 0, 0, 171);         // MD = 0.4
    put(88, OP_FAV | CLR, 0, 0, 170);   // (0 + 0.5) / 0.4
    put(89, OP_STO, 0, 0, 217);
    put(90, OP_LDM, 0, 0, 173);         // MD = 0
    put(91, OP_FDJ, 0, 0, 93);          // cannot divide: jump
    put(92, OP_HJM, 0, 0, 92);
    put(93, OP_ADD | CLR, 0, 0, 172);   // 0.9e49
    put(94, OP_FAD, 0, 0, 172);         // exponent overflow
    put(95, OP_JEO, 0, 0, 97);
    put(96, OP_HJM, 0, 0, 96);
    put(97, OP_HJM, 0, 0, 100);
    con_write(170, nw(0, 64'd050500000000));
    con_write(171, nw(0, 64'd050400000000));
    con_write(172, nw(0, 64'd099900000000));
    con_write(173, '0);
    put(80, OP_CHS, 0, 0, 0);
    put(81, OP_STO, 0, 0, 214);
    put(82, OP_JMP, 2, 0, 1);
    con_write(300, nw(0, 64'd1000000000));
    con_write(301, nw(0, 64'd2000000000));
    con_write(302, nw(0, 64'd3000000000));
    con_write(303, nw(0, 64'd4000000000));
    con_write(305, nw(0, 64'd123000000));
    con_write(310, nw(0, 64'd11));
    con_write(311, nw(0, 64'd77000000000));
    con_write(320, nw(0, 64'd35000000000));
    for (int k = 0; k < 5; k++) con_write(330 + k, nw(0, longint'(k + 1) * 64'd10000000000));
    con_write(343, nw(0, 64'd66000000000));
    // ---------------- program C
    put(100, OP_SEL, 0, 0, 5);          // reader 1 and typewriter
    put(101, OP_WRT, 0, 0, 3);          // type three digits of the UA
    put(102, OP_DMB, 0, 0, 400);        // drum 400-449 -> core
    put(103, OP_BTP, 1, 0, 7);          // core -> tape 1 as block 7
    put(104, OP_LDQ, 1, 0, 460);        // drum 460-499 -> quick band 1
    put(105, OP_ADD | CLR, 0, 0, 4065);
    put(106, OP_STO, 0, 0, 220);
    put(107, OP_RIN, 0, 0, 4);
    put(108, OP_STO, 0, 0, 221);
    put(109, OP_RWD, 1, 0, 0);
    put(110, OP_TPB, 1, 0, 7);          // match: skip one
    put(111, OP_HJM, 0, 0, 111);
    put(112, OP_JTG, 0, 0, 114);
    put(113, OP_HJM, 0, 0, 113);
    put(114, OP_BDM, 0, 0, 600);        // core -> drum 600-649
    put(115, OP_ADD | CLR, 0, 0, 605);
    put(116, OP_STO, 0, 0, 222);
    put(117, OP_BLS, 1, 0, 9);          // not on the tape
    put(118, OP_JTG, 0, 0, 120);
    put(119, OP_JTE, 1, 0, 121);
    put(120, OP_HJM, 0, 0, 120);
    put(121, OP_JSW, 3, 0, 123);
    put(122, OP_HJM, 0, 0, 122);
    put(123, OP_ADD | CLR, 0, 0, 217);  // floating 1.25
    put(124, OP_FWR, 0, 0, 0);          // type it: mantissa, characteristic
    put(125, OP_ADD, 0, 0, 5000);       // no such register
    for (int k = 400; k < 500; k++) con_write(k, nw(k % 2, longint'(k) * 1000));

    // ---------------- run A
    run_until_halt();
    chk("A: halt at 50", lc == 16'h0050 && !alarm);
    expect_word("A: recomplement", 200, nw(1, 64'd25000000000));
    expect_word("A: multiply", 201, nw(0, 64'd15000000000));
    expect_word("A: divide", 202, nw(0, 64'd30000000000));
    expect_word("A: division impossible", 203, nw(0, 64'd50000000000));
    // ---------------- run B
    run_until_halt();
    chk("B: halt at 100", lc == 16'h0100 && !alarm);
    expect_word("B: index loop", 210, nw(0, 64'd11000000000));
    expect_word("B: PSX", 211, nw(0, 64'd77000000000));
    expect_word("B: TLU", 212, nw(0, 64'd66000000000));
    expect_word("B: SCT", 215, nw(0, 64'd12300000000));
    expect_word("B: JSX subroutine", 214, nw(1, 64'd12300000000));
    expect_word("B: floating multiply", 216, nw(0, 64'd050200000000));
    expect_word("B: floating add, divide and round", 217, nw(0, 64'd051125000000));
    // ---------------- run C
    run_until_halt();
    chk("C: stopped with alarm at 125", alarm && lc == 16'h0125);
    expect_word("C: quick band", 220, nw(1, 64'd465000));
    expect_word("C: paper tape input", 221, nw(1, 64'd465000567));
    expect_word("C: tape round trip", 222, nw(1, 64'd405000));
    // the UA holds 0.18e50 after the exponent overflow: characteristic 00, mantissa 18...
    chk("C: typed 0 0 1", typed.size() >= 3 && typed[0] == 16 && typed[1] == 16 && typed[2] == 17);
    for (int k = 0; k < 20000 && typed.size() < 14; k++) @(posedge clk);
    begin
      automatic byte unsigned want[11] = '{17, 18, 21, 16, 16, 16, 16, 16, 16, 21, 17};
      automatic bit ok = (typed.size() == 14);
      if (ok) for (int k = 0; k < 11; k++) ok &= (typed[3 + k] == want[k]);
      chk("C: FWR typed 125000000 51", ok);
      if (ok) n_fwr++;
    end
    chk("C: tape blocks", blocks_written == 1 && blocks_read == 1);
    // ---------------- D: parity check
    put(125, OP_ADD | CLR, 0, 0, 700);
    con_write(700, nw(0, 64'd1));
    dut.u_mem.u_drum.mem[700].par = ~dut.u_mem.u_drum.mem[700].par;
    run_until_halt();
    chk("D: read check alarm", alarm && lc == 16'h0125);

    // ---------------- mechanisms
    $display("clear=%0d recomp=%0d mul=%0d div=%0d divfail=%0d cmpskip=%0d ovf=%0d p=%0d ixloop=%0d",
             n_clear, n_recomp, n_mul, n_div, n_div_fail, n_cmp_skip, n_ovf, n_p, n_ix_loop);
    $display("blk=%0d mt_overlap=%0d io_overlap=%0d tpb_match=%0d jtg=%0d jte=%0d jsw=%0d alarms=%0d",
             n_blk, n_mt_overlap, n_io_overlap, n_tpb_match, n_jtg, n_jte, n_jsw, n_alarm);
    chk("clear AC", n_clear > 0);
    chk("recomplement", n_recomp > 0);
    chk("multiply", n_mul > 0);
    chk("division", n_div > 0);
    chk("division impossible", n_div_fail > 0);
    chk("CMP skip", n_cmp_skip > 0);
    chk("overflow", n_ovf > 0);
    chk("P-indicator", n_p >= 3);
    chk("index loop", n_ix_loop >= 3);
    chk("block transfers", n_blk == 3);
    chk("processing during tape", n_mt_overlap > 0);
    chk("processing during output", n_io_overlap > 0);
    chk("block number match", n_tpb_match > 0);
    chk("tape check good / bad", n_jtg == 1);
    chk("tape end", n_jte > 0);
    chk("jump switch", n_jsw > 0);
    chk("alarms", n_alarm == 2);
    chk("floating multiply", n_fmul > 0);
    chk("exponent overflow", n_eo > 0);
    chk("floating division", n_fdiv > 0);
    chk("floating division impossible", n_fdiv_fail > 0);
    chk("floating write", n_fwr > 0);
    if (n_normal > 0 && n_quick > 0 && n_core > 0) begin
      $display("mean wait: normal %0d quick %0d core %0d clocks (%0d/%0d/%0d accesses)",
               w_normal / n_normal, w_quick / n_quick, w_core / n_core, n_normal, n_quick, n_core);
      chk("normal track wait near half a revolution", w_normal / n_normal > 600 && w_normal / n_normal < 2400);
      chk("quick band faster", w_quick / n_quick < w_normal / n_normal / 2);
      chk("core fastest", w_core / n_core <= 14);
    end else chk("all three kinds of storage used", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
