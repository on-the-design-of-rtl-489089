// kdc_top - the KDC-I computer.
//
// Connects the central processing unit (kdc_cpu, with its arithmetic,
// logic, shift and index units) to the store (kdc_memory: magnetic drum
// with quick access bands, and the 50-word core memory), to the magnetic
// tape control unit (kdc_mt_control), which shares the core memory as its
// buffer, and to the input-output control (kdc_io_control).
//
// Brought out as ports are the parts that are machinery rather than logic:
// the tape handler bus, the paper tape readers, the typewriter / punch
// character port and the operator's console (start, jump switches, halt
// and alarm lamps, P-indicator lamp, the selected I/O components and the
// drum's angular position).  The console also has a store
// access port (con_*): while the processor is halted it reads or writes
// any storage register at once, for loading programs and inspecting
// results.  Hold con_req until con_ack; con_rdata and con_err are valid
// with con_ack.
//
// Timing parameters: WORD_TIME clocks per drum word position, CORE_ACCESS
// clocks per core memory access.
module kdc_top
  import kdc_pkg::*;
#(
  parameter int WORD_TIME   = 12,
  parameter int CORE_ACCESS = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // operator's console
  input  logic        start,
  input  logic [9:0]  switches,
  output logic        halted,
  output logic        alarm,
  output logic        p_lamp,
  output logic [15:0] lc,
  output acc_t        ac,
  output word_t       md,
  output logic        retire,
  output logic [11:0] retire_op,
  input  logic        con_req,
  input  logic        con_we,
  input  logic [15:0] con_addr,
  input  word_t       con_wdata,
  output logic        con_ack,
  output word_t       con_rdata,
  output logic        con_err,
  // magnetic tape handlers
  output logic        h_cmd_valid,
  output mt_cmd_t     h_cmd,
  output logic [1:0]  h_unit,
  output logic        h_wvalid,
  output mword_t      h_wdata,
  input  logic        h_wready,
  input  logic        h_rvalid,
  input  mword_t      h_rdata,
  output logic        h_rready,
  input  logic        h_end,
  input  logic [3:0]  h_tape_end,
  // paper tape readers
  output logic        rd_ready,
  output logic        rd_unit,
  input  logic        rd_valid,
  input  logic [7:0]  rd_char,
  // typewriter / punch
  output logic        wr_valid,
  output logic [7:0]  wr_char,
  output logic [1:0]  wr_dev,
  input  logic        wr_ready,
  output logic        mt_busy,
  output logic        io_busy,
  output logic [3:0]  io_sel,
  output logic [7:0]  drum_angle
);
  // processor <-> store
  logic        c_req, c_we, m_ack, m_err;
  logic [15:0] c_addr;
  word_t       c_wdata, m_rdata;
  logic        use_con;
  logic        cb_req, cb_we, cb_ack;
  logic [5:0]  cb_addr;
  mword_t      cb_wdata, cb_rdata;

  // tape control
  logic        mt_start, mt_done, mt_tc, mt_match;
  mt_cmd_t     mt_cmd;
  logic [1:0]  mt_unit;
  logic [15:0] mt_blkno;
  logic [3:0]  mt_te;

  // I/O control
  logic        io_start, io_done;
  io_cmd_t     io_cmd;
  logic [15:0] io_n;
  word_t       io_ua, io_ua_in;

  assign use_con = halted && !c_req;

  kdc_cpu u_cpu (
    .clk, .rst_n, .start, .switches,
    .m_req(c_req), .m_we(c_we), .m_addr(c_addr), .m_wdata(c_wdata),
    .m_ack(m_ack && !use_con), .m_rdata, .m_err,
    .mt_start, .mt_cmd, .mt_unit, .mt_blkno, .mt_busy, .mt_done, .mt_tc_ind(mt_tc),
    .mt_te_ind(mt_te), .mt_blk_match(mt_match),
    .io_start, .io_cmd, .io_n, .io_ua, .io_busy, .io_done, .io_ua_in,
    .halted, .alarm, .p_ind(p_lamp), .lc, .ac, .md, .retire, .retire_op
  );

  kdc_memory #(.WORD_TIME(WORD_TIME), .CORE_ACCESS(CORE_ACCESS)) u_mem (
    .clk, .rst_n,
    .req(use_con ? con_req : c_req), .we(use_con ? con_we : c_we), .imm(use_con),
    .addr(use_con ? con_addr : c_addr), .wdata(use_con ? con_wdata : c_wdata),
    .ack(m_ack), .rdata(m_rdata), .err(m_err), .drum_angle,
    .cb_req, .cb_we, .cb_addr, .cb_wdata, .cb_ack, .cb_rdata
  );

  assign con_ack   = m_ack && use_con;
  assign con_rdata = m_rdata;
  assign con_err   = m_err;

  kdc_mt_control u_mt (
    .clk, .rst_n, .cmd_valid(mt_start), .cmd(mt_cmd), .unit(mt_unit), .blkno(mt_blkno),
    .busy(mt_busy), .done(mt_done), .tc_ind(mt_tc), .te_ind(mt_te), .blk_match(mt_match),
    .cb_req, .cb_we, .cb_addr, .cb_wdata, .cb_ack, .cb_rdata,
    .h_cmd_valid, .h_cmd, .h_unit, .h_wvalid, .h_wdata, .h_wready, .h_rvalid, .h_rdata,
    .h_rready, .h_end, .h_tape_end
  );

  kdc_io_control u_io (
    .clk, .rst_n, .start(io_start), .cmd(io_cmd), .n(io_n), .ua(io_ua), .busy(io_busy),
    .done(io_done), .ua_out(io_ua_in), .sel(io_sel),
    .rd_ready, .rd_unit, .rd_valid, .rd_char, .wr_valid, .wr_char, .wr_dev, .wr_ready
  );
endmodule
