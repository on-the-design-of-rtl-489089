// tb_kdc_cpu - runs small programs on the processor with a simple store
// model and stand-ins for the tape and I/O control units, and checks the
// stored results, registers and control flow by hand-worked values:
//   program A (0000): clear-and-add, add, subtract with a sign change,
//     store, load MD, multiply, divide, division impossible (jump), CMP skip
//   program B (0050): index loop with SEX / JXL, PSX address modification,
//     TLU table look-up, SCT normalisation count used as an address, JSX
//     subroutine link, CHS
//   program C (0100): SEL / WRT / RIN to the I/O unit, BTP / TPB (block
//     match skip) and JTG to the tape unit, JSW, LDQ and DMB block
//     transfers, floating add, conversion to fixed, rounded floating
//     division, a division jump on a zero divisor, FWR, and an operation
//     code the machine does not have (alarm)
// Numbers are written as 12-digit integers: d[11] is the units digit, so
// 0.25 is 025000000000.
module tb_kdc_cpu;
  import kdc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] switches = 10'b0000001000;
  logic m_req, m_we, m_ack = 0, m_err = 0;
  logic [15:0] m_addr;
  word_t m_wdata, m_rdata = '0;
  logic mt_start, mt_busy = 0, mt_done = 0, mt_tc_ind = 0, mt_blk_match = 0;
  mt_cmd_t mt_cmd;
  logic [1:0] mt_unit;
  logic [15:0] mt_blkno;
  logic [3:0] mt_te_ind = '0;
  logic io_start, io_busy = 0, io_done = 0;
  io_cmd_t io_cmd;
  logic [15:0] io_n;
  word_t io_ua, io_ua_in = '0;
  logic halted, alarm, p_ind, retire;
  logic [15:0] lc;
  acc_t ac;
  word_t md;
  logic [11:0] retire_op;
  int checks = 0, failures = 0;

  kdc_cpu dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // ---------------------------------------------------------- store model
  word_t mem [4250];
  int    lat;
  always @(posedge clk) begin
    m_ack <= 0;
    if (m_req && !m_ack) begin
      if (lat == 0) begin
        automatic int a = int'(bcd4_to_bin(m_addr));
        m_ack <= 1;
        m_err <= (a >= 4250);
        if (a < 4250) begin
          if (m_we) mem[a] <= m_wdata;
          m_rdata <= mem[a];
        end
        lat <= int'($urandom_range(0, 4));
      end else lat <= lat - 1;
    end
  end

  // ------------------------------------------------- tape and I/O stand-ins
  mt_cmd_t mt_log[$];
  logic [15:0] mt_blk_log[$];
  io_cmd_t io_log[$];
  logic [15:0] io_n_log[$];
  word_t io_ua_log[$];
  int mt_t = 0, io_t = 0;
  always @(posedge clk) begin
    mt_done <= 0;
    if (mt_start) begin
      mt_log.push_back(mt_cmd); mt_blk_log.push_back(mt_blkno);
      mt_busy <= 1; mt_t <= 40;
      mt_blk_match <= 0;
      if (mt_cmd == MT_READ && mt_blkno == 16'h0007 && mt_unit == 2'd1) mt_blk_match <= 1;
    end else if (mt_busy) begin
      if (mt_t == 0) begin mt_busy <= 0; mt_done <= 1; end
      else mt_t <= mt_t - 1;
    end
    io_done <= 0;
    if (io_start) begin
      io_log.push_back(io_cmd); io_n_log.push_back(io_n); io_ua_log.push_back(io_ua);
      io_busy <= 1; io_t <= 30;
    end else if (io_busy) begin
      if (io_t == 0) begin io_busy <= 0; io_done <= 1; end
      else io_t <= io_t - 1;
    end
  end

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
  task automatic put(input int at, input logic [11:0] op, input int i, input int j, input int a);
    mem[at] = make_instr(op, 4'(i), 4'(j), bcd(a));
  endtask
  int n_retired = 0;
  always @(posedge clk) if (retire) n_retired++;
  task automatic run_until_halt();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
  endtask

  word_t t;
  initial begin
    for (int i = 0; i < 4250; i++) mem[i] = '0;
    lat = 0;
    // ---------------- program A
    put(0,  OP_ADD | 12'h001, 0, 0, 150);  // clear, add 0.25
    put(1,  OP_ADD, 0, 0, 151);            // + 0.5
    put(2,  OP_SUB, 0, 0, 152);            // - 1.0 -> -0.25
    put(3,  OP_STO, 0, 0, 200);
    put(4,  OP_LDM, 0, 0, 153);            // MD = 0.5
    put(5,  OP_MPA | 12'h001, 0, 0, 154);  // clear, + 0.5 * 0.3
    put(6,  OP_STO, 0, 0, 201);
    put(7,  OP_DVJ, 0, 0, 12);             // 0.15 / 0.5
    put(8,  OP_STO, 0, 0, 202);
    put(9,  OP_ADD | 12'h001, 0, 0, 153);  // 0.5
    put(10, OP_DVJ, 0, 0, 13);             // 0.5 / 0.5 impossible -> 13
    put(11, OP_HJM, 0, 0, 11);
    put(12, OP_HJM, 0, 0, 12);
    put(13, OP_STO, 0, 0, 203);
    put(14, OP_CMP, 0, 0, 153);            // MD = c(103): skip one
    put(15, OP_HJM, 0, 0, 15);
    put(16, OP_HJM, 0, 0, 50);
    mem[150] = nw(0, 64'd25000000000);
    mem[151] = nw(0, 64'd50000000000);
    mem[152] = nw(0, 64'd100000000000);
    mem[153] = nw(0, 64'd50000000000);
    mem[154] = nw(0, 64'd30000000000);
    // ---------------- program B
    put(50, OP_SEX, 1, 0, 3);
    put(51, OP_ADD | 12'h001, 0, 0, 300);
    put(52, OP_ADD, 1, 0, 300);
    put(53, OP_JXL, 1, 0, 52);
    put(54, OP_STO, 0, 0, 210);
    put(55, OP_PSX, 0, 0, 310);
    put(56, OP_ADD | 12'h001, 0, 0, 300);  // modified to 311
    put(57, OP_STO, 0, 0, 211);
    put(58, OP_LDM, 0, 0, 320);
    put(59, OP_TLU, 2, 0, 330);
    put(60, OP_ADD | 12'h001, 0, 0, 10);   // 10 + found address
    put(61, OP_STO, 0, 0, 212);
    put(62, OP_ADD | 12'h001, 0, 0, 305);
    put(63, OP_SCT, 0, 0, 0);
    put(64, OP_STO, 0, 0, 213);            // 213 + count = 215
    put(65, OP_JSX, 2, 0, 80);
    put(66, OP_HJM, 0, 0, 100);
    put(80, OP_CHS, 0, 0, 0);
    put(81, OP_STO, 0, 0, 214);
    put(82, OP_JMP, 2, 0, 1);
    mem[300] = nw(0, 64'd1000000000);
    mem[301] = nw(0, 64'd2000000000);
    mem[302] = nw(0, 64'd3000000000);
    mem[303] = nw(0, 64'd4000000000);
    mem[305] = nw(0, 64'd123000000);   // 0.00123: SCT shifts 2 places
    mem[310] = nw(0, 64'd11);
    mem[311] = nw(0, 64'd77000000000);
    mem[320] = nw(0, 64'd35000000000);
    for (int k = 0; k < 5; k++) mem[330 + k] = nw(0, longint'(k + 1) * 64'd10000000000);
    mem[343] = nw(0, 64'd66000000000);
    // ---------------- program C
    put(100, OP_SEL, 0, 0, 4);
    put(101, OP_WRT, 0, 0, 3);
    put(102, OP_RIN, 0, 0, 2);
    put(103, OP_STO, 0, 0, 220);
    put(104, OP_BTP, 1, 0, 7);
    put(105, OP_TPB, 1, 0, 7);
    put(106, OP_HJM, 0, 0, 106);
    put(107, OP_JTG, 0, 0, 109);
    put(108, OP_HJM, 0, 0, 108);
    put(109, OP_JSW, 3, 0, 111);
    put(110, OP_HJM, 0, 0, 110);
    put(111, OP_LDQ, 1, 0, 400);
    put(112, OP_ADD | 12'h001, 0, 0, 4052);
    put(113, OP_STO, 0, 0, 221);
    put(114, OP_DMB, 0, 0, 460);
    put(115, OP_ADD | 12'h001, 0, 0, 4215);
    put(116, OP_STO, 0, 0, 222);
    put(117, OP_ADD | 12'h001, 0, 0, 160); // floating 0.5
    put(118, OP_FAD, 0, 0, 161);           // + floating 0.25
    put(119, OP_STO, 0, 0, 223);
    put(120, OP_FFX, 0, 0, 125);           // to fixed
    put(121, OP_STO, 0, 0, 224);
    put(122, OP_LDM, 0, 0, 160);           // MD = 0.5
    put(123, OP_ADD | 12'h001, 0, 0, 223);
    put(124, OP_FDR, 0, 0, 140);           // 0.75 / 0.5
    put(125, OP_STO, 0, 0, 225);
    put(126, OP_LDM, 0, 0, 162);           // MD = 0
    put(127, OP_FDJ, 0, 0, 130);           // cannot divide: jump
    put(128, OP_HJM, 0, 0, 128);
    put(130, OP_ADD | 12'h001, 0, 0, 225); // 1.5 floating
    put(131, OP_FWR, 0, 0, 0);             // floating write
    put(132, 12'h000, 0, 0, 0);            // no such operation: alarm
    mem[160] = nw(0, 64'd050500000000);    // characteristic 50, mantissa .5
    mem[161] = nw(0, 64'd050250000000);
    mem[162] = '0;
    for (int k = 400; k < 500; k++) mem[k] = nw(k % 2, longint'(k) * 1000);
    io_ua_in = nw(0, 64'd98700000000);

    repeat (3) @(posedge clk); rst_n = 1;
    chk("halted after reset", halted && lc == 16'h0000);
    run_until_halt();
    chk("A: add/sub recomplement", mem[200] == nw(1, 64'd25000000000));
    chk("A: multiply", mem[201] == nw(0, 64'd15000000000));
    chk("A: divide", mem[202] == nw(0, 64'd30000000000));
    chk("A: division impossible jump", mem[203] == nw(0, 64'd50000000000));
    chk("A: CMP skip and halt", lc == 16'h0050 && !alarm);
    chk("A: instruction count", n_retired == 14);
    run_until_halt();
    chk("B: index loop", mem[210] == nw(0, 64'd11000000000));
    chk("B: JXL leaves 9999", dut.ir[1] == 16'h9999);
    chk("B: PSX", mem[211] == nw(0, 64'd77000000000));
    chk("B: TLU", mem[212] == nw(0, 64'd66000000000));
    chk("B: SCT", mem[215] == nw(0, 64'd12300000000));
    chk("B: JSX link", dut.ir[2] == 16'h0065);
    chk("B: CHS in subroutine", mem[214] == nw(1, 64'd12300000000));
    chk("B: halt", lc == 16'h0100 && !alarm);
    run_until_halt();
    chk("C: I/O commands", io_log.size() == 4 && io_log[0] == IO_SEL && io_log[1] == IO_WRT && io_log[2] == IO_RIN
                           && io_log[3] == IO_WRT);
    if (io_log.size() == 4) begin
      chk("C: I/O operands", io_n_log[0] == 16'h0004 && io_n_log[1] == 16'h0003 && io_ua_log[1].d == 48'h012300000000);
      chk("C: FWR mantissa then characteristic", io_n_log[3] == 16'h0011 && io_ua_log[3].d == 48'h015000000051);
    end
    chk("C: RIN result", mem[220] == nw(1, 64'd98700000000));
    chk("C: tape commands", mt_log.size() == 2 && mt_log[0] == MT_WRITE && mt_log[1] == MT_READ && mt_blk_log[1] == 16'h0007);
    chk("C: LDQ", mem[221] == nw(0, 64'd402000));
    chk("C: DMB", mem[222] == nw(1, 64'd465000));
    chk("C: DMB word count", mem[4249] == nw(1, 64'd499000) && mem[4209] == '0);
    chk("C: floating add", mem[223] == nw(0, 64'd050750000000));
    chk("C: floating to fixed", mem[224] == nw(0, 64'd75000000000));
    chk("C: floating divide", mem[225] == nw(0, 64'd051150000000));
    chk("C: alarm on unexecuted operation", alarm && halted && lc == 16'h0132);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
