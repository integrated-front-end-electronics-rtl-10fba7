// eoc_framer: first EoC layer framing for one column.
//
// Event words of the column wait in the 16 x 32 column FIFO (outside this
// module). The framer sends them in frames, one frame per time window:
//   HEADER   {8'hA5, 5'b0, column, 16'h0000}
//   FRAMENO  32-bit frame number, counting from 0 after reset
//   data     every event word that entered the FIFO during the window
//   STATUS   {16-bit data word count, 8-bit FIFO level at close, 5'b0, column}
//   CRC      CRC-32 of all frame words from HEADER to STATUS
// Data words stream out while the window is open. On frame_tick (end of a
// window) the framer notes how many words are in the FIFO; those close the
// frame, followed by STATUS and CRC, and the next frame's HEADER and FRAMENO
// follow at once. Words written on or after the tick belong to the next
// frame. Output words are 33 bits: bit 32 marks the four control words.
// out_hold is high on every control word except FRAMENO, so the second EoC
// layer keeps a STATUS-CRC-HEADER-FRAMENO burst together. Handshake:
// valid/ready, one word per cycle. The design description names the header,
// frame number, EoC status and 32-bit CRC; their layout and order are this
// implementation's choices. frame_tick must be at least
// 16 + 5 cycles apart.
module eoc_framer
  import alcor_pkg::*;
#(
  parameter logic [COL_W-1:0] COL_ID = '0,
  parameter int unsigned      FIFO_DEPTH = 16,
  localparam int unsigned     LW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_tick,
  // column FIFO read side
  input  logic              fifo_empty,
  input  logic [WORD_W-1:0] fifo_data,
  input  logic [LW-1:0]     fifo_level,
  output logic              fifo_rd,
  // to the second layer
  output logic              out_valid,
  input  logic              out_ready,
  output logic [WORD_W:0]   out_data,
  output logic              out_hold
);

  frame_state_e      state;
  logic              closing;
  logic [LW-1:0]     remain;
  logic [15:0]       n_words;
  logic [31:0]       frame_no, crc, crc_next;
  logic [WORD_W-1:0] word;
  logic              ctrl, xfer;

  crc32 u_crc (.crc_i(crc), .data_i(word), .crc_o(crc_next));

  always_comb begin
    ctrl      = 1'b1;
    out_valid = 1'b1;
    word      = '0;
    unique case (state)
      FR_HEADER:  word = {HEADER_MARK, 5'b0, COL_ID, 16'h0000};
      FR_FRAMENO: word = frame_no;
      FR_DATA: begin
        ctrl      = 1'b0;
        word      = fifo_data;
        out_valid = !fifo_empty && !(closing && remain == '0);
      end
      FR_STATUS:  word = {n_words, 8'(fifo_level), 5'b0, COL_ID};
      FR_CRC:     word = crc;
      default:    out_valid = 1'b0;
    endcase
  end

  assign out_data = {ctrl, word};
  assign out_hold = ctrl && (state != FR_FRAMENO);
  assign xfer     = out_valid && out_ready;
  assign fifo_rd  = xfer && (state == FR_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= FR_HEADER;
      closing  <= 1'b0;
      remain   <= '0;
      n_words  <= '0;
      frame_no <= '0;
      crc      <= '1;
    end else begin
      if (xfer) crc <= (state == FR_CRC) ? '1 : crc_next;
      if (frame_tick) begin
        closing <= 1'b1;
        remain  <= fifo_level - LW'(fifo_rd);
      end else if (fifo_rd && closing) begin
        remain  <= remain - 1'b1;
      end
      unique case (state)
        FR_HEADER:  if (xfer) state <= FR_FRAMENO;
        FR_FRAMENO: if (xfer) state <= FR_DATA;
        FR_DATA: begin
          if (fifo_rd) n_words <= n_words + 1'b1;
          if (closing && !frame_tick && remain == '0) state <= FR_STATUS;
        end
        FR_STATUS:  if (xfer) state <= FR_CRC;
        FR_CRC: if (xfer) begin
          state    <= FR_HEADER;
          closing  <= 1'b0;
          n_words  <= '0;
          frame_no <= frame_no + 1'b1;
        end
        default: state <= FR_HEADER;
      endcase
    end
  end

  // a new window must not end while the previous frame is still closing
  assert property (@(posedge clk) disable iff (!rst_n)
                   frame_tick |-> state inside {FR_HEADER, FR_FRAMENO, FR_DATA} && !closing);

endmodule
