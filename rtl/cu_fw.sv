// Firmware of the control unit (CU).
//
// Pixel handling: for each board, photon words from its lane go into a
// buffer 1 FIFO; the channel sorting FSM moves every complete pixel into
// that board's buffer 2 FIFO in detector order. The pixel wrapping FSM
// takes one pixel from all four buffer 2 FIFOs, sorts the boards, packs the
// 12-bit codes (two per cycle) and writes control word + 192 data words
// into the FX3 FIFO, or drops the pixel if that FIFO lacks room. The FX3
// handling FSM empties the FX3 FIFO over the 32-bit slave FIFO bus and
// reads commands.
// Commands: the decoding FSM keeps the scan configuration and forwards
// start/stop/bin-size commands to the boards through the transmission FSM.
// Scanning: the synchronization FSM produces pixel_clock and enable_scan
// for the boards from the microscope's frame/line signals, or drives the
// scan itself in master mode.
// Lane streams use valid/ready; a word with rx_tlast must be the last of a
// 128-word pixel, otherwise the sticky framing error is set and reported in
// every following control word.
// Structure follows the document's control-unit block diagram; depths,
// formats and handshakes are this design's choices.
module cu_fw
  import tcspc_pkg::*;
#(
  parameter int unsigned MAX_PHOTONS    = MAX_PH,
  parameter int unsigned PIX_PER_LINE_P = PIX_PER_LINE,
  parameter int unsigned LINES_P        = LINES,
  parameter int unsigned BUF1_DEPTH     = 256,
  parameter int unsigned FX3_FIFO_DEPTH = 1024,
  parameter chmap_t      CH_TO_DET [N_BOARDS] = '{default: CH_IDENTITY},
  parameter boardmap_t   BOARD_OF_BLOCK = BOARD_IDENTITY,
  localparam int unsigned NB            = N_BOARDS,
  localparam int unsigned PIXW          = NCH * MAX_PHOTONS,
  localparam int unsigned B1AW          = $clog2(BUF1_DEPTH),
  localparam int unsigned FAW           = $clog2(FX3_FIFO_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lanes from the boards
  input  logic [LINK_W-1:0] rx_tdata  [NB],
  input  logic [NB-1:0]     rx_tvalid,
  input  logic [NB-1:0]     rx_tlast,
  output logic [NB-1:0]     rx_tready,
  // lanes to the boards (broadcast)
  output logic [LINK_W-1:0] cmd_tdata,
  output logic              cmd_tvalid,
  output logic              cmd_tlast,
  input  logic [NB-1:0]     cmd_tready,
  // FX3 slave FIFO
  output logic [USB_W-1:0]  fx3_dq_o,
  input  logic [USB_W-1:0]  fx3_dq_i,
  output logic              fx3_dq_oe,
  output logic [1:0]        fx3_addr,
  output logic              fx3_slwr_n,
  output logic              fx3_slrd_n,
  output logic              fx3_sloe_n,
  input  logic              fx3_flag_wr_rdy,
  input  logic              fx3_flag_rd_rdy,
  // microscope
  input  logic              frame_active_in,
  input  logic              line_active_in,
  output logic              frame_active_out,
  output logic              line_active_out,
  // scanning signals to the boards
  output logic              pixel_clock,
  output logic              enable_scan,
  // status
  output logic              armed,
  output logic              frame_error,
  output logic              line_error,
  output logic              bad_cmd,
  output logic [31:0]       pixels_written,
  output logic [31:0]       pixels_dropped
);

  // ------------------------------------------------------ buffer boards
  logic [LINK_W-1:0] b2_rdata [NB][2];
  logic [NB-1:0]     b2_avail, b2_pop, b2_drop;
  logic [NB-1:0]     ferr;

  for (genvar b = 0; b < NB; b++) begin : g_board
    logic              b1_full, b1_empty, b1_pop;
    logic [LINK_W-1:0] b1_rdata;
    logic [B1AW:0]     b1_count;
    logic              we, commit, free;
    logic [$clog2(PIXW)-1:0] off;
    logic [LINK_W-1:0] wdata;
    logic [31:0]       sorted;
    logic [$clog2(PIXW)-1:0] rx_pos;

    assign rx_tready[b] = !b1_full;

    // lane framing check
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rx_pos  <= '0;
        ferr[b] <= 1'b0;
      end else if (rx_tvalid[b] && rx_tready[b]) begin
        rx_pos <= rx_pos + 1'b1;
        if (rx_tlast[b] != (rx_pos == ($clog2(PIXW))'(PIXW - 1))) ferr[b] <= 1'b1;
      end
    end

    sync_fifo #(.W(LINK_W), .DEPTH(BUF1_DEPTH)) u_buf1 (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (rx_tvalid[b]),
      .wdata (rx_tdata[b]),
      .pop   (b1_pop),
      .rdata (b1_rdata),
      .full  (b1_full),
      .empty (b1_empty),
      .count (b1_count)
    );

    cu_channel_sort #(
      .MAX_PHOTONS (MAX_PHOTONS),
      .B1_AW       (B1AW),
      .CH_TO_DET   (CH_TO_DET[b])
    ) u_sort (
      .clk           (clk),
      .rst_n         (rst_n),
      .b1_rdata      (b1_rdata),
      .b1_count      (b1_count),
      .b1_pop        (b1_pop),
      .b2_we         (we),
      .b2_off        (off),
      .b2_wdata      (wdata),
      .b2_commit     (commit),
      .b2_free       (free),
      .pixels_sorted (sorted)
    );

    pixel_slot_buffer #(.W(LINK_W), .SLOT(PIXW), .NSLOTS(2)) u_buf2 (
      .clk     (clk),
      .rst_n   (rst_n),
      .we      (we),
      .off     (off),
      .wdata   (wdata),
      .commit  (commit),
      .free    (free),
      .rd_data (b2_rdata[b]),
      .avail   (b2_avail[b]),
      .pop     (b2_pop[b]),
      .drop    (b2_drop[b])
    );
  end

  assign frame_error = |ferr;

  // ------------------------------------------------------ pixel wrapping
  logic              f_push, f_pop, f_full, f_empty, clear_pixnum;
  logic [USB_W-1:0]  f_wdata, f_rdata;
  logic [FAW:0]      f_count, f_free;
  assign f_free = (FAW+1)'(FX3_FIFO_DEPTH) - f_count;

  cu_pixel_wrap #(
    .MAX_PHOTONS    (MAX_PHOTONS),
    .BOARD_OF_BLOCK (BOARD_OF_BLOCK),
    .FIFO_AW        (FAW)
  ) u_wrap (
    .clk            (clk),
    .rst_n          (rst_n),
    .b2_rdata       (b2_rdata),
    .b2_avail       (b2_avail),
    .b2_pop         (b2_pop),
    .b2_drop        (b2_drop),
    .f_push         (f_push),
    .f_wdata        (f_wdata),
    .f_free         (f_free),
    .clear_pixnum   (clear_pixnum),
    .frame_error    (frame_error),
    .pixels_written (pixels_written),
    .pixels_dropped (pixels_dropped)
  );

  sync_fifo #(.W(USB_W), .DEPTH(FX3_FIFO_DEPTH)) u_fx3_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (f_push),
    .wdata (f_wdata),
    .pop   (f_pop),
    .rdata (f_rdata),
    .full  (f_full),
    .empty (f_empty),
    .count (f_count)
  );

  // ------------------------------------------------------ FX3 handling
  logic        cmd_valid, cmd_ready;
  logic [31:0] cmd_data, words_written;

  fx3_handler u_fx3 (
    .clk             (clk),
    .rst_n           (rst_n),
    .f_rdata         (f_rdata),
    .f_empty         (f_empty),
    .f_pop           (f_pop),
    .fx3_dq_o        (fx3_dq_o),
    .fx3_dq_i        (fx3_dq_i),
    .fx3_dq_oe       (fx3_dq_oe),
    .fx3_addr        (fx3_addr),
    .fx3_slwr_n      (fx3_slwr_n),
    .fx3_slrd_n      (fx3_slrd_n),
    .fx3_sloe_n      (fx3_sloe_n),
    .fx3_flag_wr_rdy (fx3_flag_wr_rdy),
    .fx3_flag_rd_rdy (fx3_flag_rd_rdy),
    .cmd_valid       (cmd_valid),
    .cmd_data        (cmd_data),
    .cmd_ready       (cmd_ready),
    .words_written   (words_written)
  );

  // ------------------------------------------------------ commands
  logic        fwd_valid, fwd_ready, master_mode;
  logic [31:0] fwd_data;
  logic [15:0] pix_period, td, line_gap;

  cmd_decoder u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .cmd_valid    (cmd_valid),
    .cmd_data     (cmd_data),
    .cmd_ready    (cmd_ready),
    .fwd_valid    (fwd_valid),
    .fwd_data     (fwd_data),
    .fwd_ready    (fwd_ready),
    .pix_period   (pix_period),
    .td           (td),
    .line_gap     (line_gap),
    .master_mode  (master_mode),
    .armed        (armed),
    .clear_pixnum (clear_pixnum),
    .bad_cmd      (bad_cmd)
  );

  cu_cmd_tx #(.NB(NB)) u_cmd_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (fwd_valid),
    .cmd_data  (fwd_data),
    .cmd_ready (fwd_ready),
    .tx_tdata  (cmd_tdata),
    .tx_tvalid (cmd_tvalid),
    .tx_tlast  (cmd_tlast),
    .tx_tready (cmd_tready)
  );

  // ------------------------------------------------------ scanning
  logic [31:0] lines_acquired;
  logic        frame_start;

  scan_sync #(
    .PIX_PER_LINE_P (PIX_PER_LINE_P),
    .LINES_P        (LINES_P)
  ) u_sync (
    .clk              (clk),
    .rst_n            (rst_n),
    .master_mode      (master_mode),
    .armed            (armed),
    .pix_period       (pix_period),
    .td               (td),
    .line_gap         (line_gap),
    .frame_active_in  (frame_active_in),
    .line_active_in   (line_active_in),
    .frame_active_out (frame_active_out),
    .line_active_out  (line_active_out),
    .pixel_clock      (pixel_clock),
    .enable_scan      (enable_scan),
    .frame_start      (frame_start),
    .line_error       (line_error),
    .lines_acquired   (lines_acquired)
  );

endmodule
