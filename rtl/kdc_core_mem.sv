// kdc_core_mem - 50-word magnetic core memory of the tape control unit.
//
// The core memory serves two masters: the central processor, for which it
// is the fast store at addresses 4200-4249, and the magnetic tape control
// unit, for which it is the buffer of one tape block.  Each access takes
// ACCESS_TIME clocks (50 us in the original).
//
// Two request ports, a_* (processor) and b_* (tape control).  A request is
// held high until its ack pulse; one access runs at a time and the tape
// port wins when both ask at once, since tape data cannot wait.  rdata of
// a port is valid with its ack and until that port's next access.  a_imm makes
// a processor-port access finish in one clock (maintenance loading).
//
// Size follows the document; the access time in clocks and the port
// priority are this design's choices.
module kdc_core_mem
  import kdc_pkg::*;
#(
  parameter int WORDS       = 50,
  parameter int ACCESS_TIME = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_req,
  input  logic       a_we,
  input  logic       a_imm,
  input  logic [5:0] a_addr,
  input  mword_t     a_wdata,
  output logic       a_ack,
  output mword_t     a_rdata,
  input  logic       b_req,
  input  logic       b_we,
  input  logic [5:0] b_addr,
  input  mword_t     b_wdata,
  output logic       b_ack,
  output mword_t     b_rdata
);
  mword_t mem [WORDS];
  logic        active, owner_b;
  logic [7:0]  timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; owner_b <= 1'b0; timer <= '0;
      a_ack <= 1'b0; b_ack <= 1'b0; a_rdata <= '0; b_rdata <= '0;
    end else begin
      a_ack <= 1'b0;
      b_ack <= 1'b0;
      if (!active) begin
        if (b_req && !b_ack) begin
          active <= 1'b1; owner_b <= 1'b1; timer <= 8'(ACCESS_TIME - 1);
        end else if (a_req && !a_ack) begin
          if (a_imm) begin
            a_ack <= 1'b1;
            if (a_we) mem[a_addr] <= a_wdata;
            else      a_rdata     <= mem[a_addr];
          end else begin
            active <= 1'b1; owner_b <= 1'b0; timer <= 8'(ACCESS_TIME - 1);
          end
        end
      end else if (timer != 0) begin
        timer <= timer - 8'd1;
      end else begin
        active <= 1'b0;
        if (owner_b) begin
          b_ack <= 1'b1;
          if (b_we) mem[b_addr] <= b_wdata;
          else      b_rdata     <= mem[b_addr];
        end else begin
          a_ack <= 1'b1;
          if (a_we) mem[a_addr] <= a_wdata;
          else      a_rdata     <= mem[a_addr];
        end
      end
    end
  end
endmodule
