// kdc_mt_control - magnetic tape control unit.
//
// Sits between the processor, the 50-word core memory (the tape buffer)
// and up to four tape handlers, and runs a tape command by itself once the
// processor has started it, so tape transfers overlap computing.
//
// Recorded block: a block-number word (number in the address part), the 50
// words of the core buffer, and a check word.  Every word carries its even
// parity bit ("character parity"); the check word is the bit-wise XOR of
// all words before it, so that every bit column of a good block has even
// parity ("channel parity").
//
//   MT_WRITE  (BTP) block number + core buffer + check word to tape
//   MT_READ   (TPB) next block into the core buffer; blk_match if its
//             number equals blkno
//   MT_SEARCH (BLS) read blocks forward until the number equals blkno and
//             leave that block in the core buffer
//   MT_BACK   (BST) / MT_TEST (TTP) read one block backward / forward and
//             only check it
//   MT_ERASE  (ETP), MT_REWIND (RWD) passed to the handler
// tc_ind (the tape check indicator) is cleared when a reading command
// starts and set by a parity or check-word error, or when a search or read
// finds no block before the tape end.  te_ind shows the handlers' tape-end
// signals.
//
// Processor side: cmd_valid starts a command when busy is low; done pulses
// when it has ended.  Handler side: h_cmd_valid pulses with h_cmd/h_unit;
// words to tape go by h_wvalid/h_wready, words from tape by
// h_rvalid/h_rready; h_end pulses when the handler has finished the
// command (for a read with no block left, h_end comes without words).
//
// The commands and checks are the document's; the word-level handler bus
// and the check-word form of the channel parity are this design's.
module kdc_mt_control
  import kdc_pkg::*;
#(
  parameter int UNITS       = 4,
  parameter int BLOCK_WORDS = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor
  input  logic             cmd_valid,
  input  mt_cmd_t          cmd,
  input  logic [1:0]       unit,
  input  logic [15:0]      blkno,
  output logic             busy,
  output logic             done,
  output logic             tc_ind,
  output logic [3:0]       te_ind,
  output logic             blk_match,
  // core buffer
  output logic             cb_req,
  output logic             cb_we,
  output logic [5:0]       cb_addr,
  output mword_t           cb_wdata,
  input  logic             cb_ack,
  input  mword_t           cb_rdata,
  // tape handlers
  output logic             h_cmd_valid,
  output mt_cmd_t          h_cmd,
  output logic [1:0]       h_unit,
  output logic             h_wvalid,
  output mword_t           h_wdata,
  input  logic             h_wready,
  input  logic             h_rvalid,
  input  mword_t           h_rdata,
  output logic             h_rready,
  input  logic             h_end,
  input  logic [UNITS-1:0] h_tape_end
);
  typedef enum logic [3:0] {
    T_IDLE, T_CMD, T_W_HDR, T_W_CORE, T_W_SEND, T_W_CHK, T_WAIT_END,
    T_R_WORD, T_R_CORE, T_R_END, T_DONE
  } tstate_t;

  tstate_t     st;
  mt_cmd_t     cmd_q;
  logic [15:0] blk_q;
  logic [6:0]  k;
  mword_t      xacc, wbuf;
  logic        found;

  function automatic mword_t with_par(input word_t w);
    return '{par: word_parity(w), w: w};
  endfunction

  always_comb begin
    busy        = (st != T_IDLE);
    h_cmd_valid = (st == T_CMD);
    h_cmd       = (cmd_q == MT_SEARCH) ? MT_READ : cmd_q;
    h_wvalid    = (st == T_W_HDR) || (st == T_W_SEND) || (st == T_W_CHK);
    h_wdata     = wbuf;
    h_rready    = (st == T_R_WORD);
    cb_req      = (st == T_W_CORE) || (st == T_R_CORE);
    cb_we       = (st == T_R_CORE);
    cb_addr     = 6'(k - 7'd1);
    cb_wdata    = wbuf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; cmd_q <= MT_NONE; blk_q <= '0; k <= '0; xacc <= '0; wbuf <= '0;
      found <= 1'b0; done <= 1'b0; tc_ind <= 1'b0; blk_match <= 1'b0; h_unit <= '0; te_ind <= '0;
    end else begin
      done   <= 1'b0;
      te_ind <= 4'(h_tape_end);
      unique case (st)
        T_IDLE: if (cmd_valid) begin
          cmd_q  <= cmd;
          blk_q  <= blkno;
          h_unit <= unit;
          found  <= 1'b0;
          if (cmd inside {MT_READ, MT_SEARCH, MT_BACK, MT_TEST}) begin
            tc_ind    <= 1'b0;
            blk_match <= 1'b0;
          end
          st <= T_CMD;
        end

        T_CMD: begin
          xacc <= '0;
          k    <= 7'd0;
          if (cmd_q == MT_WRITE) begin
            wbuf <= with_par('{sign: 1'b0, d: {32'h0, blk_q}});
            st   <= T_W_HDR;
          end else if (cmd_q inside {MT_READ, MT_SEARCH, MT_BACK, MT_TEST}) begin
            st <= T_R_WORD;
          end else begin
            st <= T_WAIT_END;
          end
        end

        // ---------------- writing a block
        T_W_HDR, T_W_SEND: if (h_wready) begin
          xacc <= xacc ^ wbuf;
          k    <= k + 7'd1;
          st   <= (int'(k) == BLOCK_WORDS) ? T_W_CHK : T_W_CORE;
          if (int'(k) == BLOCK_WORDS) wbuf <= xacc ^ wbuf;
        end
        T_W_CORE: if (cb_ack) begin
          wbuf <= cb_rdata;
          st   <= T_W_SEND;
        end
        T_W_CHK: if (h_wready) st <= T_WAIT_END;

        T_WAIT_END: if (h_end) st <= T_DONE;

        // ---------------- reading a block
        T_R_WORD: begin
          if (h_rvalid) begin
            wbuf <= h_rdata;
            xacc <= xacc ^ h_rdata;
            if (word_parity(h_rdata.w) != h_rdata.par) tc_ind <= 1'b1;
            if (k == 7'd0) begin
              // block number word
              if ({h_rdata.w.d[3], h_rdata.w.d[2], h_rdata.w.d[1], h_rdata.w.d[0]} == blk_q) begin
                blk_match <= 1'b1;
                found     <= 1'b1;
              end
              k <= 7'd1;
            end else if (int'(k) <= BLOCK_WORDS) begin
              if ((cmd_q == MT_READ) ||
                  (cmd_q == MT_SEARCH && found)) st <= T_R_CORE;
              else k <= k + 7'd1;
            end else begin
              // check word: all columns must now be even
              if ((xacc ^ h_rdata) != '0) tc_ind <= 1'b1;
              st <= T_R_END;
            end
          end else if (h_end) begin
            // no block before the tape end
            tc_ind <= 1'b1;
            st     <= T_DONE;
          end
        end
        T_R_CORE: if (cb_ack) begin
          k  <= k + 7'd1;
          st <= T_R_WORD;
        end
        T_R_END: if (h_end) begin
          if (cmd_q == MT_SEARCH && !found) st <= T_CMD;
          else                              st <= T_DONE;
        end

        default: begin // T_DONE
          done <= 1'b1;
          st   <= T_IDLE;
        end
      endcase
    end
  end
endmodule
