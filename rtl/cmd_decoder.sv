// Decoding FSM of the control unit.
//
// Takes one 32-bit command from the FX3 handling FSM (opcode in bits
// 31:24, argument in 23:0, see tcspc_pkg) and:
//   * updates the local scan configuration: pixel period and delay Td in
//     clock cycles, master/slave scan mode, carriage-return gap;
//   * OP_START arms the acquisition and pulses clear_pixnum, OP_STOP
//     disarms it;
//   * forwards OP_START, OP_STOP and OP_BIN to the boards through the
//     transmission FSM (fwd_valid/fwd_ready) before taking the next
//     command.
// Unknown opcodes set the sticky bad_cmd flag. Reset values: pixel period
// 400 cycles (4 us at 100 MHz), Td 0, slave mode, gap 400 cycles, disarmed.
// Decoding and forwarding follow the document; the command set and its
// encoding are this design's own.
module cmd_decoder
  import tcspc_pkg::*;
#(
  parameter logic [15:0] PIX_PERIOD_RST = 16'd400,
  parameter logic [15:0] LINE_GAP_RST   = 16'd400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [31:0] cmd_data,
  output logic        cmd_ready,
  output logic        fwd_valid,
  output logic [31:0] fwd_data,
  input  logic        fwd_ready,
  output logic [15:0] pix_period,
  output logic [15:0] td,
  output logic [15:0] line_gap,
  output logic        master_mode,
  output logic        armed,
  output logic        clear_pixnum,
  output logic        bad_cmd
);

  typedef enum logic {S_IDLE, S_FWD} state_e;
  state_e state;

  opcode_e op;
  assign op        = opcode_e'(cmd_data[31:24]);
  assign cmd_ready = (state == S_IDLE);
  assign fwd_valid = (state == S_FWD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      fwd_data     <= '0;
      pix_period   <= PIX_PERIOD_RST;
      td           <= '0;
      line_gap     <= LINE_GAP_RST;
      master_mode  <= 1'b0;
      armed        <= 1'b0;
      clear_pixnum <= 1'b0;
      bad_cmd      <= 1'b0;
    end else begin
      clear_pixnum <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          fwd_data <= cmd_data;
          unique case (op)
            OP_NOP: ;
            OP_START: begin
              armed        <= 1'b1;
              clear_pixnum <= 1'b1;
              state        <= S_FWD;
            end
            OP_STOP: begin
              armed <= 1'b0;
              state <= S_FWD;
            end
            OP_BIN:        state       <= S_FWD;
            OP_PIX_PERIOD: pix_period  <= cmd_data[15:0];
            OP_TD:         td          <= cmd_data[15:0];
            OP_SYNC_MODE:  master_mode <= cmd_data[0];
            OP_LINE_GAP:   line_gap    <= cmd_data[15:0];
            default:       bad_cmd     <= 1'b1;
          endcase
        end
        S_FWD: if (fwd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
