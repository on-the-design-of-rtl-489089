// kdc_index_unit - index registers IR1-IR3 and address modification.
//
// Every KDC-I instruction carries a two-digit index part IJ.  Each digit
// names a register whose contents are added to the address part A:
// 1-3 the index registers IR1-IR3, 4 the location counter LC, any other
// digit nothing.  Both digits may name the same register, which then
// counts twice.  When the P-indicator is on (after PSX, SCT or TLU) the
// address part of the Order Register, c(OR)ad, is added as well.  All
// additions are four-digit decimal, modulo 10,000:
//     ea = c(I) + c(J) + A (+ c(OR)ad)
// For instructions whose first digit names a register or device rather
// than an index (H, M, N, Q or S), i_is_index is low and only J modifies.
//
// The registers are updated at the clock edge by wr_op: set to wr_val,
// raised by wr_val, or lowered by wr_val (modulo 10,000), in register
// wr_sel (1-3; other values do nothing).  The address path is
// combinational.  Reset clears the registers (this design's choice).
module kdc_index_unit
  import kdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  digit_t      i_digit,
  input  digit_t      j_digit,
  input  logic        i_is_index,
  input  logic [15:0] addr,
  input  logic [15:0] lc,
  input  logic        p_ind,
  input  logic [15:0] or_ad,
  output logic [15:0] ea,
  input  ix_op_t      wr_op,
  input  digit_t      wr_sel,
  input  logic [15:0] wr_val,
  output logic [15:0] ir [1:3]
);
  logic [15:0] ir_q [1:3];

  function automatic logic [15:0] sel_reg(input digit_t s, input logic [15:0] lcv,
                                          input logic [15:0] r1, input logic [15:0] r2,
                                          input logic [15:0] r3);
    unique case (s)
      4'd1:    return r1;
      4'd2:    return r2;
      4'd3:    return r3;
      4'd4:    return lcv;
      default: return 16'h0000;
    endcase
  endfunction

  always_comb begin
    logic [15:0] t;
    t  = addr;
    if (i_is_index) t = bcd4_add(t, sel_reg(i_digit, lc, ir_q[1], ir_q[2], ir_q[3]));
    t  = bcd4_add(t, sel_reg(j_digit, lc, ir_q[1], ir_q[2], ir_q[3]));
    if (p_ind) t = bcd4_add(t, or_ad);
    ea = t;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= 3; k++) ir_q[k] <= 16'h0000;
    end else if (wr_sel >= 4'd1 && wr_sel <= 4'd3) begin
      unique case (wr_op)
        IX_SET:  ir_q[wr_sel] <= wr_val;
        IX_ADD:  ir_q[wr_sel] <= bcd4_add(ir_q[wr_sel], wr_val);
        IX_SUB:  ir_q[wr_sel] <= bcd4_sub(ir_q[wr_sel], wr_val);
        default: ;
      endcase
    end
  end

  assign ir = ir_q;
endmodule
