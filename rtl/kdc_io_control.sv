// kdc_io_control - input-output control for paper tape and typewriter.
//
// Characters are 8-bit codes; a decimal digit d is the code 16 + d (the
// "excess-16" code of the machine).  Commands from the processor:
//   IO_SEL  select the components: units digit of n is a mask, 1 = tape
//           reader 1, 2 = tape reader 2, 4 = typewriter, 8 = punch
//   IO_RIN  read (n)2,1 characters from the selected reader into the UA:
//           every digit character shifts the UA one place left and enters
//           at the bottom; other characters are passed over
//   IO_WRT  copy the UA into the output buffer register BR and send
//           (n)2,1 digit characters from BR, most significant digit (UAm)
//           first, to the selected typewriter and/or punch
//   IO_WSP  send the character whose code is the two-digit number (n)4,3,
//           (n)2,1 times
// Output runs from BR in the background: the processor continues and only
// waits when it issues the next I/O command while busy is high.
//
// Timing: start is taken when busy is low; done pulses when the command
// has ended (for IO_RIN together with ua_out).  Characters move on
// valid/ready handshakes with the devices.
//
// Only the numeric modes are built: the mode digit (n)4 of RIN and WRT
// and the tape control codes are not decoded.  Floating output (FWR)
// arrives as an IO_WRT of a word the processor has reordered.
// The component mask is this design's choice.
module kdc_io_control
  import kdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  io_cmd_t     cmd,
  input  logic [15:0] n,
  input  word_t       ua,
  output logic        busy,
  output logic        done,
  output word_t       ua_out,
  output logic [3:0]  sel,
  // tape readers
  output logic        rd_ready,
  output logic        rd_unit,
  input  logic        rd_valid,
  input  logic [7:0]  rd_char,
  // typewriter / punch
  output logic        wr_valid,
  output logic [7:0]  wr_char,
  output logic [1:0]  wr_dev,
  input  logic        wr_ready
);
  typedef enum logic [1:0] {I_IDLE, I_READ, I_WRITE, I_DONE} istate_t;

  istate_t    st;
  logic [6:0] cnt;
  word_t      br;
  logic [7:0] sp_char;
  logic       special;

  always_comb begin
    busy     = (st != I_IDLE);
    rd_ready = (st == I_READ) && (cnt != 0);
    rd_unit  = !sel[0] && sel[1];
    wr_valid = (st == I_WRITE) && (cnt != 0);
    wr_char  = special ? sp_char : 8'(8'd16 + {4'd0, br.d[10]});
    wr_dev   = sel[3:2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; cnt <= '0; br <= '0; sp_char <= '0; special <= 1'b0;
      sel <= 4'b0101; ua_out <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        I_IDLE: if (start) begin
          cnt <= 7'(n[7:4]) * 7'd10 + 7'(n[3:0]);
          unique case (cmd)
            IO_SEL: begin sel <= n[3:0]; st <= I_DONE; end
            IO_RIN: begin ua_out <= ua; st <= I_READ; end
            IO_WRT: begin br <= ua; special <= 1'b0; st <= I_WRITE; end
            IO_WSP: begin
              special <= 1'b1;
              sp_char <= 8'(n[15:12]) * 8'd10 + 8'(n[11:8]);
              st      <= I_WRITE;
            end
            default: st <= I_DONE;
          endcase
        end
        I_READ: begin
          if (cnt == 0) st <= I_DONE;
          else if (rd_valid) begin
            cnt <= cnt - 7'd1;
            if (rd_char >= 8'd16 && rd_char <= 8'd25)
              ua_out.d <= {ua_out.d[10:0], 4'(rd_char - 8'd16)};
          end
        end
        I_WRITE: begin
          if (cnt == 0) st <= I_DONE;
          else if (wr_ready) begin
            cnt <= cnt - 7'd1;
            if (!special) br.d <= {br.d[10:0], 4'd0};
          end
        end
        default: begin
          done <= 1'b1;
          st   <= I_IDLE;
        end
      endcase
    end
  end
endmodule
