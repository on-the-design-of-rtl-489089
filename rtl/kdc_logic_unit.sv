// kdc_logic_unit - logical operations on the upper accumulator.
//
// The KDC-I treats each bit of a BCD digit as a logical variable.  The MD
// register acts as an extractor: digit by digit for ERE (an odd MD digit
// selects the digit of c(E)), bit by bit for AND, IOR and NOT (a one in MD
// selects the bit that is operated on).  AND, IOR and NOT clear the
// weight-8 bits of the UA afterwards.  WAN / WOR combine the weight-1 bits
// of the 11 UA digits with the bits of the weight named by #IJn and clear
// weights 2, 4 and 8.  Only the 11 digits m..1 take part: the sign and the
// overflow digit of the UA are left as they are.
//
// ead_opnd is c(E) with every digit whose MD digit is even set to zero,
// the operand EAD adds to the AC.
//
// Combinational.  The operations follow the document; taking the units
// digit of #IJn as the weight for WAN / WOR is this design's choice.
module kdc_logic_unit
  import kdc_pkg::*;
(
  input  logic_op_t   op,
  input  word_t       ua,
  input  word_t       md,
  input  word_t       e,
  input  logic [15:0] n,
  output word_t       ua_out,
  output word_t       ead_opnd
);
  digit_t w;
  logic   sel_b1, sel_b2, sel_b3, or_mode;

  always_comb begin
    w = n[3:0];
    // weight selection for WAN / WOR
    sel_b1 = (w == 4'd2) || (w == 4'd3) || (w == 4'd6) || (w == 4'd7);
    sel_b2 = (w == 4'd4) || (w == 4'd5) || (w == 4'd6) || (w == 4'd7);
    sel_b3 = (w == 4'd8) || (w == 4'd9);
    or_mode = (op == LG_WOR);

    ua_out   = ua;
    ead_opnd = e;
    ead_opnd.d[11] = 4'd0;
    for (int k = 0; k < 11; k++) begin
      if (!md.d[k][0]) ead_opnd.d[k] = 4'd0;
      unique case (op)
        LG_ERE: ua_out.d[k] = md.d[k][0] ? e.d[k] : ua.d[k];
        LG_AND: ua_out.d[k] = ((ua.d[k] & e.d[k] & md.d[k]) | (ua.d[k] & ~md.d[k])) & 4'b0111;
        LG_IOR: ua_out.d[k] = (((ua.d[k] | e.d[k]) & md.d[k]) | (ua.d[k] & ~md.d[k])) & 4'b0111;
        LG_NOT: ua_out.d[k] = (ua.d[k] ^ md.d[k]) & 4'b0111;
        LG_WAN, LG_WOR: begin
          if (!(sel_b1 || sel_b2 || sel_b3))
            ua_out.d[k] = 4'd0;
          else if (or_mode)
            ua_out.d[k] = {3'b000, ua.d[k][0] | (sel_b1 & ua.d[k][1]) | (sel_b2 & ua.d[k][2]) | (sel_b3 & ua.d[k][3])};
          else
            ua_out.d[k] = {3'b000, ua.d[k][0] & ((sel_b1 & ua.d[k][1]) | (sel_b2 & ua.d[k][2]) | (sel_b3 & ua.d[k][3]))};
        end
        default: ua_out.d[k] = ua.d[k];
      endcase
    end
  end
endmodule
