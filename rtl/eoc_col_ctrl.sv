// eoc_col_ctrl: End-of-Column side of the column read-out handshake.
//
// The column's write request is brought into the EoC clock domain by a
// sync_cell (1.5 to 2.5 cycles). When it is seen the controller raises
// freeze, waits FREEZE_LEAD cycles, and then gives write-enable slots: wen
// high for WORD_CYCLES (4) cycles, then low for IDLE_CYCLES (3), so one
// event word is read per 7 cycles. The word is sampled on the last cycle of
// the slot if the pixel write enable (tok) has reached the bottom of the
// column, and written into the column FIFO: wr_data is the column data bus
// itself, wired straight through, and wr_en picks the cycle the FIFO takes
// it. At the end of each idle gap the
// controller starts another slot if the request is still high, or drops
// freeze and returns to idle. While the column FIFO is full no new slot is
// started. The 4-cycle word, the 3-cycle idle time and the freeze / write
// enable sequence follow the design description; FREEZE_LEAD and the
// back-pressure from the FIFO are this implementation's choices.
module eoc_col_ctrl
  import alcor_pkg::*;
#(
  parameter int unsigned WORD_CYCLES = 4,
  parameter int unsigned IDLE_CYCLES = 3,
  parameter int unsigned FREEZE_LEAD = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  output logic              freeze,
  output logic              wen,
  input  logic              tok,
  input  logic [WORD_W-1:0] data,
  input  logic              fifo_full,
  output logic              wr_en,
  output logic [WORD_W-1:0] wr_data
);

  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_SLOT, S_GAP} state_e;

  state_e     state;
  logic [3:0] cnt;
  logic       req_s;

  sync_cell u_sync (.clk, .rst_n, .async_i(req), .sync_o(req_s));

  assign freeze  = (state != S_IDLE);
  assign wen     = (state == S_SLOT);
  assign wr_en   = (state == S_SLOT) && (cnt == 4'(WORD_CYCLES - 1)) && tok;
  assign wr_data = data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (req_s) state <= S_LEAD;
        end
        S_LEAD: if (cnt == 4'(FREEZE_LEAD - 1) && !fifo_full) begin
          state <= S_SLOT;
          cnt   <= '0;
        end else if (cnt == 4'(FREEZE_LEAD - 1)) begin
          cnt   <= cnt;
        end
        S_SLOT: if (cnt == 4'(WORD_CYCLES - 1)) begin
          state <= S_GAP;
          cnt   <= '0;
        end
        S_GAP: if (cnt >= 4'(IDLE_CYCLES - 1)) begin
          cnt <= cnt;
          if (!req_s) begin
            state <= S_IDLE;
            cnt   <= '0;
          end else if (!fifo_full) begin
            state <= S_SLOT;
            cnt   <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a word on the bus is only expected inside a slot
  assert property (@(posedge clk) disable iff (!rst_n) tok |-> wen);

endmodule
