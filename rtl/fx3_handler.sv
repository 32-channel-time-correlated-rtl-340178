// FX3 handling FSM: master of the FX3 32-bit synchronous slave FIFO bus.
//
// Two directions share the bus:
//   * PC -> FPGA (commands): when flag_rd_rdy shows data in the FX3's
//     read thread and no command is waiting, the FSM selects RD_ADDR,
//     drives sloe_n and slrd_n low for one cycle and captures fx3_dq_i
//     READ_LAT cycles later. The command is then offered on
//     cmd_valid/cmd_data until cmd_ready takes it.
//   * FPGA -> PC (photons): otherwise, while the FX3 FIFO is not empty and
//     flag_wr_rdy is high, the FSM selects WR_ADDR, drives the FIFO head on
//     fx3_dq_o with fx3_dq_oe high and slwr_n low, and pops the word: one
//     word per cycle.
// flag_wr_rdy is taken to allow a write in the same cycle (a watermark
// flag set by the FX3 firmware hides the FX3's flag latency). The document
// names the 32-bit slave FIFO; the protocol details (addresses, latency,
// priority of commands) are this design's assumptions. Outputs are
// combinational from the state.
module fx3_handler
  import tcspc_pkg::*;
#(
  parameter int unsigned READ_LAT = 2,
  parameter logic [1:0]  WR_ADDR  = 2'd0,
  parameter logic [1:0]  RD_ADDR  = 2'd3
) (
  input  logic             clk,
  input  logic             rst_n,
  // FX3 FIFO (photon data)
  input  logic [USB_W-1:0] f_rdata,
  input  logic             f_empty,
  output logic             f_pop,
  // slave FIFO pins
  output logic [USB_W-1:0] fx3_dq_o,
  input  logic [USB_W-1:0] fx3_dq_i,
  output logic             fx3_dq_oe,
  output logic [1:0]       fx3_addr,
  output logic             fx3_slwr_n,
  output logic             fx3_slrd_n,
  output logic             fx3_sloe_n,
  input  logic             fx3_flag_wr_rdy,
  input  logic             fx3_flag_rd_rdy,
  // commands
  output logic             cmd_valid,
  output logic [31:0]      cmd_data,
  input  logic             cmd_ready,
  output logic [31:0]      words_written
);

  typedef enum logic [1:0] {S_IDLE, S_RD_STROBE, S_RD_WAIT, S_CMD} state_e;
  state_e state;

  logic [$clog2(READ_LAT+1)-1:0] wait_cnt;
  logic do_write;

  assign do_write   = (state == S_IDLE) && !fx3_flag_rd_rdy && !f_empty && fx3_flag_wr_rdy;
  assign f_pop      = do_write;
  assign fx3_dq_o   = f_rdata;
  assign fx3_dq_oe  = do_write;
  assign fx3_slwr_n = !do_write;
  assign fx3_slrd_n = !(state == S_RD_STROBE);
  assign fx3_sloe_n = !(state == S_RD_STROBE || state == S_RD_WAIT);
  assign fx3_addr   = (state == S_IDLE && !fx3_flag_rd_rdy) ? WR_ADDR : RD_ADDR;
  assign cmd_valid  = (state == S_CMD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      wait_cnt      <= '0;
      cmd_data      <= '0;
      words_written <= '0;
    end else begin
      if (do_write) words_written <= words_written + 1'b1;
      unique case (state)
        S_IDLE: if (fx3_flag_rd_rdy) state <= S_RD_STROBE;
        S_RD_STROBE: begin
          wait_cnt <= ($clog2(READ_LAT+1))'(READ_LAT - 1);
          state    <= S_RD_WAIT;
        end
        S_RD_WAIT: begin
          if (wait_cnt == '0) begin
            cmd_data <= fx3_dq_i;
            state    <= S_CMD;
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        S_CMD: if (cmd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Bus rules: never read and write at once; drive dq only when writing.
  // Both follow from the state decoding, so they hold in reset as well.
  a_bus_exclusive: assert property (@(posedge clk)
    !(!fx3_slwr_n && !fx3_slrd_n) && (fx3_dq_oe == !fx3_slwr_n));

endmodule
