// kdc_check - parity and validity checking of a word.
//
// Every storage register of the KDC-I carries an even-parity bit, and every
// register is checked for validity of its BCD code (a digit above 9 is an
// error).  This block generates the parity bit stored with a word and
// checks a word read back: par_err when the stored bit does not make the
// number of ones even, inv_err when a digit is not 0-9.
//
// Purely combinational.  The document gives the kinds of check; one parity
// bit covering the sign and all 48 digit bits is this design's choice.
module kdc_check
  import kdc_pkg::*;
(
  input  word_t w,
  input  logic  par_in,
  output logic  par_gen,
  output logic  par_err,
  output logic  inv_err
);
  always_comb begin
    par_gen = word_parity(w);
    par_err = (par_gen != par_in);
    inv_err = 1'b0;
    for (int i = 0; i < 12; i++)
      if (w.d[i] > 4'd9) inv_err = 1'b1;
  end
endmodule
