// Transmission FSM of the control unit.
//
// Sends each 32-bit command to all N_BOARDS boards at once over the return
// direction of their lanes: the high 16 bits first, then the low 16 bits
// with tx_tlast. A word is sent when every lane is ready, so the boards
// receive it in the same cycle. cmd_ready pulses when the second word
// leaves. Broadcasting and the two-word format are this design's choices.
module cu_cmd_tx
  import tcspc_pkg::*;
#(
  parameter int unsigned NB = N_BOARDS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  logic [31:0]       cmd_data,
  output logic              cmd_ready,
  output logic [LINK_W-1:0] tx_tdata,
  output logic              tx_tvalid,
  output logic              tx_tlast,
  input  logic [NB-1:0]     tx_tready
);

  logic second;   // sending the low half
  logic go;

  assign tx_tvalid = cmd_valid;
  assign tx_tlast  = second;
  assign tx_tdata  = second ? cmd_data[15:0] : cmd_data[31:16];
  assign go        = cmd_valid && (&tx_tready);
  assign cmd_ready = go && second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  second <= 1'b0;
    else if (go) second <= !second;
  end

endmodule
