// 32-channel TCSPC module: four eight-channel TCSPC boards and the control
// unit, wired as in the system: each board has its own lane to the CU,
// the CU broadcasts the scanning signals (pixel_clock, enable_scan) and the
// commands to all boards, and talks to the PC through the FX3 slave FIFO.
//
// Board b serves channels 8*b .. 8*b+7 of the tac_strobe / adc_data /
// tac_reset / dither_code arrays. The lanes (Aurora 8b/10b on GTP
// transceivers in the real system) are represented by their user-side word
// streams, connected directly; the TACs, ADCs, dither DACs and the FX3 are
// outside this module and reached through its ports. All logic runs on one
// clock, clk (100 MHz assumed: a 4 us pixel is 400 cycles).
//
// Data path and latency: a photon's STROBE reaches its channel FIFO in
// about 5 cycles; a closed pixel leaves each board as 128 lane words, is
// sorted in the CU once complete (128 cycles) and written to the FX3 FIFO as
// 193 words (1 + 256 cycles), so a pixel reaches the FX3 roughly 550 cycles
// after it closes; every stage needs at most 257 cycles per pixel, within
// the 400-cycle pixel.
// Parameters: MAX_PHOTONS events per detector per pixel, pixels per line and
// lines per frame, and the channel/board routing maps (identity by default).
module tcspc_system
  import tcspc_pkg::*;
#(
  parameter int unsigned MAX_PHOTONS    = MAX_PH,
  parameter int unsigned PIX_PER_LINE_P = PIX_PER_LINE,
  parameter int unsigned LINES_P        = LINES,
  parameter chmap_t      CH_TO_DET [N_BOARDS] = '{default: CH_IDENTITY},
  parameter boardmap_t   BOARD_OF_BLOCK = BOARD_IDENTITY
) (
  input  logic                clk,
  input  logic                rst_n,
  // TAC / ADC / dither DAC of the 32 channels
  input  logic [N_DET-1:0]    tac_strobe,
  input  logic [ADC_W-1:0]    adc_data    [N_DET],
  output logic [N_DET-1:0]    tac_reset,
  output logic [DITHER_W-1:0] dither_code [N_DET],
  // FX3 slave FIFO
  output logic [USB_W-1:0]    fx3_dq_o,
  input  logic [USB_W-1:0]    fx3_dq_i,
  output logic                fx3_dq_oe,
  output logic [1:0]          fx3_addr,
  output logic                fx3_slwr_n,
  output logic                fx3_slrd_n,
  output logic                fx3_sloe_n,
  input  logic                fx3_flag_wr_rdy,
  input  logic                fx3_flag_rd_rdy,
  // microscope
  input  logic                frame_active_in,
  input  logic                line_active_in,
  output logic                frame_active_out,
  output logic                line_active_out,
  // scanning signals (also brought out for observation)
  output logic                pixel_clock,
  output logic                enable_scan,
  // status
  output logic                armed,
  output logic [N_BOARDS-1:0] board_run,
  output logic [N_BOARDS-1:0] board_overrun,
  output logic                frame_error,
  output logic                line_error,
  output logic                bad_cmd,
  output logic [31:0]         pixels_written,
  output logic [31:0]         pixels_dropped
);

  logic [LINK_W-1:0]   up_tdata [N_BOARDS];
  logic [N_BOARDS-1:0] up_tvalid, up_tlast, up_tready;
  logic [LINK_W-1:0]   cmd_tdata;
  logic                cmd_tvalid, cmd_tlast;

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    logic [ADC_W-1:0]    adc_b    [NCH];
    logic [DITHER_W-1:0] dither_b [NCH];
    logic [31:0]         pixels_sent;

    for (genvar c = 0; c < NCH; c++) begin : g_ch
      assign adc_b[c]                = adc_data[b*NCH + c];
      assign dither_code[b*NCH + c]  = dither_b[c];
    end

    tcspc_board_fw #(.MAX_PHOTONS(MAX_PHOTONS)) u_board (
      .clk         (clk),
      .rst_n       (rst_n),
      .tac_strobe  (tac_strobe[b*NCH +: NCH]),
      .adc_data    (adc_b),
      .tac_reset   (tac_reset[b*NCH +: NCH]),
      .dither_code (dither_b),
      .pixel_clock (pixel_clock),
      .enable_scan (enable_scan),
      .tx_tdata    (up_tdata[b]),
      .tx_tvalid   (up_tvalid[b]),
      .tx_tlast    (up_tlast[b]),
      .tx_tready   (up_tready[b]),
      .rx_tdata    (cmd_tdata),
      .rx_tvalid   (cmd_tvalid),
      .rx_tlast    (cmd_tlast),
      .run         (board_run[b]),
      .overrun     (board_overrun[b]),
      .pixels_sent (pixels_sent)
    );
  end

  cu_fw #(
    .MAX_PHOTONS    (MAX_PHOTONS),
    .PIX_PER_LINE_P (PIX_PER_LINE_P),
    .LINES_P        (LINES_P),
    .CH_TO_DET      (CH_TO_DET),
    .BOARD_OF_BLOCK (BOARD_OF_BLOCK)
  ) u_cu (
    .clk              (clk),
    .rst_n            (rst_n),
    .rx_tdata         (up_tdata),
    .rx_tvalid        (up_tvalid),
    .rx_tlast         (up_tlast),
    .rx_tready        (up_tready),
    .cmd_tdata        (cmd_tdata),
    .cmd_tvalid       (cmd_tvalid),
    .cmd_tlast        (cmd_tlast),
    .cmd_tready       ({N_BOARDS{1'b1}}),
    .fx3_dq_o         (fx3_dq_o),
    .fx3_dq_i         (fx3_dq_i),
    .fx3_dq_oe        (fx3_dq_oe),
    .fx3_addr         (fx3_addr),
    .fx3_slwr_n       (fx3_slwr_n),
    .fx3_slrd_n       (fx3_slrd_n),
    .fx3_sloe_n       (fx3_sloe_n),
    .fx3_flag_wr_rdy  (fx3_flag_wr_rdy),
    .fx3_flag_rd_rdy  (fx3_flag_rd_rdy),
    .frame_active_in  (frame_active_in),
    .line_active_in   (line_active_in),
    .frame_active_out (frame_active_out),
    .line_active_out  (line_active_out),
    .pixel_clock      (pixel_clock),
    .enable_scan      (enable_scan),
    .armed            (armed),
    .frame_error      (frame_error),
    .line_error       (line_error),
    .bad_cmd          (bad_cmd),
    .pixels_written   (pixels_written),
    .pixels_dropped   (pixels_dropped)
  );

endmodule
