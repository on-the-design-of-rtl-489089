// kdc_drum - magnetic drum store of the KDC-I.
//
// The drum holds 4,000 words on its normal tracks, in bands of 200 words
// around the circumference, and 200 words of quick access memory: four
// bands of 50 words recirculated (delay-line fashion) so that each of them
// passes the heads four times per revolution.  A word can only be read or
// written while it passes under the heads, so access time depends on the
// angular position: on average half a revolution for a normal word and an
// eighth of a revolution for a quick access word.
//
// Model: 'angle' counts word positions 0..WORDS_PER_REV-1, advancing every
// WORD_TIME clocks.  Address a < NORMAL_WORDS is found at angle
// a mod WORDS_PER_REV; a quick access address q = a - NORMAL_WORDS at every
// angle with angle mod QUICK_BAND = q mod QUICK_BAND.  A request (req held
// high with we, addr, wdata stable) is served in the last clock of that
// word time: ack pulses for one clock and rdata is valid with it and until
// the next access.  imm (maintenance loading) serves the request
// in the next clock regardless of position.
//
// Sizes follow the document; WORD_TIME (clocks per word) is this design's
// choice: 12 clocks per word and 200 words per revolution give 2,400 clocks
// per revolution, close to 6,000 rpm at a 230 kc clock.
module kdc_drum
  import kdc_pkg::*;
#(
  parameter int NORMAL_WORDS  = 4000,
  parameter int QUICK_WORDS   = 200,
  parameter int WORDS_PER_REV = 200,
  parameter int QUICK_BAND    = 50,
  parameter int WORD_TIME     = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic        imm,
  input  logic [12:0] addr,
  input  mword_t      wdata,
  output logic        ack,
  output mword_t      rdata,
  output logic [7:0]  angle
);
  localparam int TOTAL = NORMAL_WORDS + QUICK_WORDS;

  mword_t mem [TOTAL];
  logic [$clog2(WORD_TIME)-1:0] tick;
  logic [7:0] ang;
  logic       here;
  logic       quick;
  logic [12:0] qoff;

  always_comb begin
    quick = (int'(addr) >= NORMAL_WORDS);
    qoff  = addr - 13'(NORMAL_WORDS);
    if (quick) here = (int'(ang) % QUICK_BAND) == (int'(qoff) % QUICK_BAND);
    else       here = int'(ang) == (int'(addr) % WORDS_PER_REV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0;
      ang  <= '0;
    end else if (int'(tick) == WORD_TIME - 1) begin
      tick <= '0;
      ang  <= (int'(ang) == WORDS_PER_REV - 1) ? 8'd0 : ang + 8'd1;
    end else begin
      tick <= tick + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack <= 1'b0;
      if (req && !ack && int'(addr) < TOTAL &&
          (imm || (here && int'(tick) == WORD_TIME - 1))) begin
        ack <= 1'b1;
        if (we) mem[addr] <= wdata;
        else    rdata     <= mem[addr];
      end
    end
  end

  assign angle = ang;
endmodule
