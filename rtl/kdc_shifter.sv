// kdc_shifter - decimal shifts of the accumulator.
//
// Shifts move whole decimal digits.  The count is the low two digits of
// #IJn, (#IJn)2,1, so 0-99 places.
//   SLS / SRS  shift the UA (its 12 digits, overflow digit included) left /
//              right; LA is not touched.
//   LLS / LRS  shift the whole 23-digit AC left / right.
//   LCS        rotates the 23-digit AC left (count taken modulo 23).
//   SCT        clears the UA overflow digit, then shifts the AC left until
//              a non-zero digit stands in the most significant UA position
//              (UAm); count returns the number of places (BCD), 22 for an
//              all-zero AC.
// Zeros enter at the vacated end; the sign never changes.
//
// Combinational: the document calls for a fast shifting circuit and this
// design uses a one-cycle barrel shifter for it (so SCT does not take the
// step-by-step time of the original).
module kdc_shifter
  import kdc_pkg::*;
(
  input  shift_op_t   op,
  input  acc_t        ac,
  input  logic [15:0] n,
  output acc_t        ac_out,
  output logic [15:0] count
);
  logic [6:0]  cnt;
  logic [4:0]  lz;
  logic [91:0] acv, shv;
  logic [47:0] uav;
  logic [183:0] dbl;
  logic        found;

  always_comb begin
    cnt    = 7'(n[7:4]) * 7'd10 + 7'(n[3:0]);
    acv    = ac.d;
    uav    = acv[91:44];
    ac_out = ac;
    count  = 16'h0000;
    shv    = acv;
    dbl    = '0;
    lz     = 5'd22;
    found  = 1'b0;
    unique case (op)
      SH_SLS: begin
        shv[91:44] = (cnt >= 7'd12) ? 48'd0 : (uav << (4 * cnt));
      end
      SH_SRS: begin
        shv[91:44] = (cnt >= 7'd12) ? 48'd0 : (uav >> (4 * cnt));
      end
      SH_LLS: shv = (cnt >= 7'd23) ? 92'd0 : (acv << (4 * cnt));
      SH_LRS: shv = (cnt >= 7'd23) ? 92'd0 : (acv >> (4 * cnt));
      SH_LCS: begin
        dbl = {acv, acv} << (4 * (cnt % 7'd23));
        shv = dbl[183:92];
      end
      SH_SCT: begin
        acv[91:88] = 4'd0;
        for (int i = 21; i >= 0; i--)
          if (!found && acv[4*i +: 4] != 4'd0) begin
            found = 1'b1;
            lz    = 5'(21 - i);
          end
        shv   = acv << (4 * lz);
        count = {8'h00, 4'(lz / 5'd10), 4'(lz % 5'd10)};
      end
      default: shv = acv;
    endcase
    ac_out.d = shv;
  end
endmodule
