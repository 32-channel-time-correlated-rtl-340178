// Transmission FSM of a TCSPC board.
//
// Moves words from the transmission FIFO to the lane towards the control
// unit. The lane is represented by its user-side stream: tx_tdata with
// tx_tvalid/tx_tready (a word moves when both are high) and tx_tlast,
// which marks the last word of each pixel frame of FRAME_WORDS words.
// The FIFO head is presented directly (no extra latency).
// The document gives the block's role only; framing and handshake are this
// design's choices.
module board_tx_fsm
  import tcspc_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = BOARD_PIXEL_WORDS,
  localparam int unsigned FW         = $clog2(FRAME_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINK_W-1:0] fifo_rdata,
  input  logic              fifo_empty,
  output logic              fifo_pop,
  output logic [LINK_W-1:0] tx_tdata,
  output logic              tx_tvalid,
  output logic              tx_tlast,
  input  logic              tx_tready,
  output logic [31:0]       frames_sent
);

  logic [FW-1:0] word_idx;

  assign tx_tdata  = fifo_rdata;
  assign tx_tvalid = !fifo_empty;
  assign tx_tlast  = (word_idx == FW'(FRAME_WORDS - 1));
  assign fifo_pop  = tx_tvalid && tx_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_idx    <= '0;
      frames_sent <= '0;
    end else if (fifo_pop) begin
      if (tx_tlast) begin
        word_idx    <= '0;
        frames_sent <= frames_sent + 1'b1;
      end else begin
        word_idx <= word_idx + 1'b1;
      end
    end
  end

  // Stream rule: a word offered and not taken stays offered, unchanged.
  // The check is disabled in reset, so rst_n is also sampled on the clock
  // here; lint tools report that as mixed synchronous/asynchronous use of
  // rst_n, which concerns only this check, not the circuit.
  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_tvalid && !tx_tready |=> tx_tvalid && $stable(tx_tdata) && $stable(tx_tlast));

endmodule
