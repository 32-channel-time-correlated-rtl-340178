// Command receiver of a TCSPC board.
//
// Commands from the control unit arrive on the lane's return direction as
// two 16-bit words, high half first; the second word carries rx_tlast.
// A word with rx_tlast completes a command, so a lost word cannot shift
// later commands. Decoded: OP_START sets run, OP_STOP clears it, OP_BIN
// sets the bin size. Other opcodes are ignored. Outputs change one cycle
// after the completing word. After reset the board is stopped with 1x bins.
// The document states that commands are forwarded to the boards; the word
// format and this receiver are this design's own.
module board_cmd_rx
  import tcspc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINK_W-1:0] rx_tdata,
  input  logic              rx_tvalid,
  input  logic              rx_tlast,
  output logic              run,
  output bin_sel_e          bin_sel,
  output logic [31:0]       cmds_seen
);

  logic [LINK_W-1:0] hi;
  logic [31:0]       cmd;
  assign cmd = {hi, rx_tdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi        <= '0;
      run       <= 1'b0;
      bin_sel   <= BIN_X1;
      cmds_seen <= '0;
    end else if (rx_tvalid) begin
      if (!rx_tlast) begin
        hi <= rx_tdata;
      end else begin
        cmds_seen <= cmds_seen + 1'b1;
        unique case (cmd[31:24])
          OP_START: run <= 1'b1;
          OP_STOP:  run <= 1'b0;
          OP_BIN:   bin_sel <= (cmd[1:0] == 2'd3) ? BIN_X4 : bin_sel_e'(cmd[1:0]);
          default: ;
        endcase
      end
    end
  end

endmodule
