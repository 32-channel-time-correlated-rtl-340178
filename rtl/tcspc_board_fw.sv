// Firmware of one eight-channel TCSPC board.
//
// Three tasks, as in the board block diagram:
//   acquisition   - NCHAN acq_channel pipelines (sample ADC, reset TAC,
//                   compensate dithering, choose bin size, channel FIFO)
//   pixel handling - board_pixel_wrap copies each closed pixel, padded to
//                   MAX_PH events per channel, into the transmission FIFO
//   transmission  - board_tx_fsm sends the FIFO over the lane to the CU.
// The scanning signals pixel_clock and enable_scan come from the control
// unit and are synchronised here. Recording is allowed while enable_scan is
// high and the board has been started. A pixel is closed by a rising edge of
// pixel_clock that arrives while enable_scan was already high, and the last
// pixel of a line by the fall of enable_scan; with 256 pulses per line this
// gives 256 pixels per line. Commands (start/stop, bin size) arrive on the
// lane's return direction and are handled by board_cmd_rx.
// Latency: a pixel leaves the board about 4 cycles after it is closed, at
// one word per cycle when the lane is ready (128 words per pixel).
// The three-task structure follows the document; synchronisers, pixel-close
// rule, FIFO depths and link framing are this design's choices.
module tcspc_board_fw
  import tcspc_pkg::*;
#(
  parameter int unsigned NCHAN         = NCH,
  parameter int unsigned MAX_PHOTONS   = MAX_PH,
  parameter int unsigned CH_FIFO_DEPTH = 32,
  parameter int unsigned TX_FIFO_DEPTH = 256,
  localparam int unsigned CW           = $clog2(MAX_PHOTONS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // TAC / ADC / dither DAC
  input  logic [NCHAN-1:0]    tac_strobe,
  input  logic [ADC_W-1:0]    adc_data    [NCHAN],
  output logic [NCHAN-1:0]    tac_reset,
  output logic [DITHER_W-1:0] dither_code [NCHAN],
  // scanning signals from the control unit
  input  logic                pixel_clock,
  input  logic                enable_scan,
  // lane to the control unit
  output logic [LINK_W-1:0]   tx_tdata,
  output logic                tx_tvalid,
  output logic                tx_tlast,
  input  logic                tx_tready,
  // lane from the control unit (commands)
  input  logic [LINK_W-1:0]   rx_tdata,
  input  logic                rx_tvalid,
  input  logic                rx_tlast,
  // status
  output logic                run,
  output logic                overrun,
  output logic [31:0]         pixels_sent
);

  // ------------------------------------------------------- synchronisers
  logic [1:0]       pclk_sync, en_sync;
  logic [NCHAN-1:0] strobe_s1, strobe_s2;
  logic             pclk_d, en_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pclk_sync <= '0;
      en_sync   <= '0;
      strobe_s1 <= '0;
      strobe_s2 <= '0;
      pclk_d    <= 1'b0;
      en_d      <= 1'b0;
    end else begin
      pclk_sync <= {pclk_sync[0], pixel_clock};
      en_sync   <= {en_sync[0], enable_scan};
      strobe_s1 <= tac_strobe;
      strobe_s2 <= strobe_s1;
      pclk_d    <= pclk_sync[1];
      en_d      <= en_sync[1];
    end
  end

  logic pclk_s, en_s, pix_close;
  assign pclk_s    = pclk_sync[1];
  assign en_s      = en_sync[1];
  assign pix_close = en_d && ((pclk_s && !pclk_d && en_s) || !en_s);

  // ------------------------------------------------------- commands
  bin_sel_e    bin_sel;
  logic [31:0] cmds_seen;

  board_cmd_rx u_cmd_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx_tdata  (rx_tdata),
    .rx_tvalid (rx_tvalid),
    .rx_tlast  (rx_tlast),
    .run       (run),
    .bin_sel   (bin_sel),
    .cmds_seen (cmds_seen)
  );

  // ------------------------------------------------------- acquisition
  logic [CW-1:0]      cnt_reg  [NCHAN];
  logic [PH_W-1:0]    ch_rdata [NCHAN];
  logic [NCHAN-1:0]   ch_empty, ch_pop, ch_ovf;

  for (genvar c = 0; c < NCHAN; c++) begin : g_ch
    acq_channel #(
      .MAX_PHOTONS (MAX_PHOTONS),
      .FIFO_DEPTH  (CH_FIFO_DEPTH)
    ) u_acq (
      .clk         (clk),
      .rst_n       (rst_n),
      .tac_strobe  (strobe_s2[c]),
      .adc_data    (adc_data[c]),
      .tac_reset   (tac_reset[c]),
      .dither_code (dither_code[c]),
      .run         (run && en_s),
      .pix_close   (pix_close),
      .bin_sel     (bin_sel),
      .cnt_reg     (cnt_reg[c]),
      .ph_rdata    (ch_rdata[c]),
      .ph_empty    (ch_empty[c]),
      .ph_pop      (ch_pop[c]),
      .ph_overflow (ch_ovf[c])
    );
  end

  // ------------------------------------------------------- pixel handling
  logic              txf_push, txf_full, txf_empty, txf_pop, wrap_busy, wrap_overrun;
  logic [LINK_W-1:0] txf_wdata, txf_rdata;
  logic [$clog2(TX_FIFO_DEPTH):0] txf_count;

  board_pixel_wrap #(
    .NCHAN       (NCHAN),
    .MAX_PHOTONS (MAX_PHOTONS)
  ) u_wrap (
    .clk      (clk),
    .rst_n    (rst_n),
    .trigger  (pix_close),
    .cnt      (cnt_reg),
    .ch_rdata (ch_rdata),
    .ch_pop   (ch_pop),
    .tx_push  (txf_push),
    .tx_wdata (txf_wdata),
    .tx_full  (txf_full),
    .busy     (wrap_busy),
    .overrun  (wrap_overrun)
  );

  assign overrun = wrap_overrun || (|ch_ovf);

  sync_fifo #(.W(LINK_W), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (txf_push),
    .wdata (txf_wdata),
    .pop   (txf_pop),
    .rdata (txf_rdata),
    .full  (txf_full),
    .empty (txf_empty),
    .count (txf_count)
  );

  // ------------------------------------------------------- transmission
  board_tx_fsm #(.FRAME_WORDS(NCHAN * MAX_PHOTONS)) u_tx (
    .clk         (clk),
    .rst_n       (rst_n),
    .fifo_rdata  (txf_rdata),
    .fifo_empty  (txf_empty),
    .fifo_pop    (txf_pop),
    .tx_tdata    (tx_tdata),
    .tx_tvalid   (tx_tvalid),
    .tx_tlast    (tx_tlast),
    .tx_tready   (tx_tready),
    .frames_sent (pixels_sent)
  );

endmodule
