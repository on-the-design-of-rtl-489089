// kdc_serial_adder - digit-serial decimal adder with complementer.
//
// All KDC-I arithmetic is done by serial addition: the two operands pass
// through one decimal adder a digit at a time, least significant digit
// first, the four bits of each BCD digit in parallel, with a carry
// flip-flop holding the carry between digit times.  Subtraction uses the
// nines complementer on the b input together with a carry-in of one on the
// first digit (tens complement).
//
// Interface: a, b, comp_b and first are sampled every digit time (en high).
// s and cout are combinational for the current digit; the carry flip-flop
// is updated at the clock edge when en is high.  On the first digit of a
// pass (first = 1) cin replaces the stored carry.
//
// The adder circuit itself (binary add and +6 decimal correction) is this
// design's choice; the document gives only that a serial decimal adder and
// a complementer exist.
module kdc_serial_adder
  import kdc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   first,
  input  logic   cin,
  input  digit_t a,
  input  digit_t b,
  input  logic   comp_b,
  output digit_t s,
  output logic   cout
);
  logic   carry_q;
  digit_t bx;
  logic [4:0] raw;
  logic   c_in;

  always_comb begin
    bx   = comp_b ? 4'(4'd9 - b) : b;
    c_in = first ? cin : carry_q;
    raw  = {1'b0, a} + {1'b0, bx} + {4'b0, c_in};
    if (raw > 5'd9) begin
      s    = 4'(raw + 5'd6);
      cout = 1'b1;
    end else begin
      s    = raw[3:0];
      cout = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= cout;
endmodule
