// kdc_tape_model - behavioural model of up to four magnetic tape handlers
// (testbench use only; the transports are machinery, not logic).
//
// Each unit stores up to MAX_BLOCKS recorded blocks of WPB words and has a
// position.  Commands arrive on h_cmd_valid:
//   MT_WRITE   takes WPB words (h_wvalid/h_wready), records them at the
//              position, which becomes the last block on the tape
//   MT_READ /  MT_TEST   sends the block at the position and moves past it;
//              with no recorded block there it sets tape_end and only
//              pulses h_end
//   MT_BACK    moves back one block and sends it
//   MT_ERASE   makes the position the end of the recording
//   MT_REWIND  returns to the load point, clears tape_end
// h_end pulses when a command has ended.  GAP clocks pass between words
// (the tape is much slower than the core memory).  A testbench that sets
// corrupt_pend gets one bit flipped in word 5 of the next block sent.
module kdc_tape_model
  import kdc_pkg::*;
#(
  parameter int MAX_BLOCKS = 16,
  parameter int WPB        = 52,
  parameter int GAP        = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_cmd_valid,
  input  mt_cmd_t     h_cmd,
  input  logic [1:0]  h_unit,
  input  logic        h_wvalid,
  input  mword_t      h_wdata,
  output logic        h_wready,
  output logic        h_rvalid,
  output mword_t      h_rdata,
  input  logic        h_rready,
  output logic        h_end,
  output logic [3:0]  h_tape_end,
  output int          blocks_written,
  output int          blocks_read
);
  mword_t tape [4][MAX_BLOCKS][WPB];
  int     pos [4];
  int     rec [4];

  initial begin
    h_wready = 0; h_rvalid = 0; h_rdata = '0; h_end = 0; h_tape_end = '0;
    blocks_written = 0; blocks_read = 0;
    for (int u = 0; u < 4; u++) begin pos[u] = 0; rec[u] = 0; end
  end

  // set by a testbench to damage the next block sent
  bit corrupt_pend = 0;

  task automatic send_block(input int u, input int b);
    for (int w = 0; w < WPB; w++) begin
      repeat (GAP) @(posedge clk);
      h_rdata <= tape[u][b][w];
      if (corrupt_pend && w == 5) begin
        h_rdata <= tape[u][b][w] ^ 50'd1 << 9;
        corrupt_pend = 0;
      end
      h_rvalid <= 1;
      do @(posedge clk); while (!h_rready);
      h_rvalid <= 0;
    end
    blocks_read++;
  endtask

  always begin
    @(posedge clk);
    if (rst_n && h_cmd_valid) begin
      automatic int u = int'(h_unit);
      case (h_cmd)
        MT_WRITE: begin
          for (int w = 0; w < WPB; w++) begin
            repeat (GAP) @(posedge clk);
            h_wready <= 1;
            do @(posedge clk); while (!h_wvalid);
            if (pos[u] < MAX_BLOCKS) tape[u][pos[u]][w] = h_wdata;
            h_wready <= 0;
          end
          if (pos[u] < MAX_BLOCKS) pos[u]++;
          rec[u] = pos[u];
          blocks_written++;
        end
        MT_READ, MT_TEST: begin
          if (pos[u] < rec[u]) begin
            send_block(u, pos[u]);
            pos[u]++;
          end else h_tape_end[u] <= 1;
        end
        MT_BACK: if (pos[u] > 0) begin
          pos[u]--;
          send_block(u, pos[u]);
        end
        MT_ERASE: rec[u] = pos[u];
        MT_REWIND: begin
          repeat (20) @(posedge clk);
          pos[u] = 0;
          h_tape_end[u] <= 0;
        end
        default: ;
      endcase
      repeat (GAP) @(posedge clk);
      h_end <= 1;
      @(posedge clk);
      h_end <= 0;
    end
  end
endmodule
