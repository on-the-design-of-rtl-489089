// kdc_memory - the addressable store of the KDC-I as the processor sees it.
//
// 4,250 storage registers with four-digit decimal addresses:
//     0000-3999  drum, normal access tracks
//     4000-4199  drum, quick access bands
//     4200-4249  core memory (also the magnetic tape buffer)
// This block decodes the BCD address, adds the even parity bit to every
// word written and checks parity and digit validity of every word read.
// Addresses 4250-9999 do not exist: such an access ends at once with err
// set and reads zero (this design's choice).
//
// Processor port: hold req (with we, addr, wdata, imm) until the ack pulse;
// rdata and err are valid with ack.  imm serves the request at once
// without waiting for the drum position (used for loading the store from
// the console).  The tape control unit reaches the core memory through the
// cb_* port, which passes straight to the core memory's second port.
module kdc_memory
  import kdc_pkg::*;
#(
  parameter int WORD_TIME   = 12,
  parameter int CORE_ACCESS = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic        imm,
  input  logic [15:0] addr,
  input  word_t       wdata,
  output logic        ack,
  output word_t       rdata,
  output logic        err,
  output logic [7:0]  drum_angle,
  // tape control access to the core buffer
  input  logic        cb_req,
  input  logic        cb_we,
  input  logic [5:0]  cb_addr,
  input  mword_t      cb_wdata,
  output logic        cb_ack,
  output mword_t      cb_rdata
);
  logic [13:0] bin;
  logic        to_drum, to_core, bad;
  logic        d_ack, c_ack;
  mword_t      d_rdata, c_rdata, wword, rword;
  logic        par_gen, par_err, inv_err, unused_gen;
  logic        bad_ack;

  always_comb begin
    bin     = bcd4_to_bin(addr);
    to_drum = (bin < 14'd4200);
    to_core = (bin >= 14'd4200) && (bin < 14'd4250);
    bad     = !to_drum && !to_core;
  end

  kdc_check u_wchk (.w(wdata), .par_in(1'b0), .par_gen(par_gen), .par_err(), .inv_err());
  assign wword = '{par: par_gen, w: wdata};

  kdc_drum #(.WORD_TIME(WORD_TIME)) u_drum (
    .clk, .rst_n, .req(req && to_drum), .we, .imm, .addr(bin[12:0]), .wdata(wword),
    .ack(d_ack), .rdata(d_rdata), .angle(drum_angle)
  );

  kdc_core_mem #(.ACCESS_TIME(CORE_ACCESS)) u_core (
    .clk, .rst_n,
    .a_req(req && to_core), .a_we(we), .a_imm(imm), .a_addr(6'(bin - 14'd4200)), .a_wdata(wword),
    .a_ack(c_ack), .a_rdata(c_rdata),
    .b_req(cb_req), .b_we(cb_we), .b_addr(cb_addr), .b_wdata(cb_wdata), .b_ack(cb_ack), .b_rdata(cb_rdata)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bad_ack <= 1'b0;
    else        bad_ack <= req && bad && !bad_ack;

  // the read word is checked as it arrives
  always_comb begin
    rword = d_ack ? d_rdata : c_ack ? c_rdata : '0;
  end
  kdc_check u_rchk (.w(rword.w), .par_in(rword.par), .par_gen(unused_gen), .par_err(par_err), .inv_err(inv_err));

  always_comb begin
    ack   = d_ack || c_ack || bad_ack;
    rdata = rword.w;
    err   = bad_ack || (!we && (d_ack || c_ack) && (par_err || inv_err));
  end
endmodule
