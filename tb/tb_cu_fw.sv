// Testbench for the control-unit firmware (cu_fw) with non-identity
// channel and board maps, 4 pixels per line and 2 lines per frame.
// The four lanes are driven with random gaps from queues of board pixels;
// the FX3 model takes the output and sends commands. The expected pixel
// stream is built here: for output block j the board BOARD_OF_BLOCK[j], in
// it detector position d holds the channel c with CH_TO_DET[c] = d, and
// each detector's 16 codes are packed into six words. The output is parsed
// by control words: every written pixel must match the pixel with that
// number, and the loss flag must be set exactly after a gap. Also checked:
// commands are forwarded to the boards, the pixel clock follows the
// microscope lines, pixels are dropped (and flagged) while the FX3 stalls.
module tb_cu_fw;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam chmap_t    M0 = {3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
  localparam chmap_t    M1 = {3'd6, 3'd7, 3'd4, 3'd5, 3'd2, 3'd3, 3'd0, 3'd1};
  localparam chmap_t    CHM [4] = '{M0, M1, CH_IDENTITY, M0};
  localparam boardmap_t BM = {2'd0, 2'd2, 2'd3, 2'd1};

  logic [15:0] rx_tdata [4];
  logic [3:0]  rx_tvalid = '0, rx_tlast = '0, rx_tready;
  logic [15:0] cmd_tdata;
  logic cmd_tvalid, cmd_tlast;
  logic [31:0] fx3_dq_o, fx3_dq_i, pixels_written, pixels_dropped;
  logic fx3_dq_oe, fx3_slwr_n, fx3_slrd_n, fx3_sloe_n, fx3_flag_wr_rdy, fx3_flag_rd_rdy;
  logic [1:0] fx3_addr;
  logic frame_active_in = 0, line_active_in = 0, frame_active_out, line_active_out, pixel_clock, enable_scan;
  logic armed, frame_error, line_error, bad_cmd, stall = 0;

  cu_fw #(.PIX_PER_LINE_P(4), .LINES_P(2), .CH_TO_DET(CHM), .BOARD_OF_BLOCK(BM)) dut (
    .cmd_tready(4'hF), .*);
  fx3_model fx3 (.clk(clk), .rst_n(rst_n), .dq_o(fx3_dq_o), .dq_oe(fx3_dq_oe), .addr(fx3_addr), .slwr_n(fx3_slwr_n),
                 .slrd_n(fx3_slrd_n), .sloe_n(fx3_sloe_n), .flag_wr_rdy(fx3_flag_wr_rdy),
                 .flag_rd_rdy(fx3_flag_rd_rdy), .dq_i(fx3_dq_i), .stall(stall));

  int checks = 0, failures = 0;
  logic [15:0] laneq [4][$];
  int          lane_cnt [4] = '{0, 0, 0, 0};
  logic [31:0] exp_pix [$][$];     // expected 192 data words per pixel number
  logic [15:0] cmd_words[$];
  int pclk_rises = 0;
  logic pclk_d = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial for (int b = 0; b < 4; b++) rx_tdata[b] = '0;

  // lane drivers: change at negedge, consume at posedge
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < 4; b++) if (rx_tvalid[b] && rx_tready[b]) begin
      void'(laneq[b].pop_front());
      lane_cnt[b]++;
    end
    if (cmd_tvalid) cmd_words.push_back(cmd_tdata);
    if (pixel_clock && !pclk_d) pclk_rises++;
    pclk_d <= pixel_clock;
  end
  always @(negedge clk) for (int b = 0; b < 4; b++) begin
    rx_tvalid[b] <= laneq[b].size() > 0 && $urandom_range(0, 4) != 0;
    rx_tdata[b]  <= laneq[b].size() > 0 ? laneq[b][0] : 16'h0;
    rx_tlast[b]  <= (lane_cnt[b] % 128) == 127;
  end

  task automatic board_pixel();
    logic [15:0] w [4][8][16];
    logic [31:0] e[$];
    for (int b = 0; b < 4; b++) for (int c = 0; c < 8; c++) for (int k = 0; k < 16; k++) begin
      w[b][c][k] = ($urandom_range(0, 3) == 0) ? 16'hFFFF : 16'($urandom_range(0, 4094));
      laneq[b].push_back(w[b][c][k]);
    end
    for (int j = 0; j < 4; j++) for (int d = 0; d < 8; d++) begin
      int b, c; logic [191:0] v;
      b = BM[j];
      c = -1;
      for (int x = 0; x < 8; x++) if (CHM[b][x] == 3'(d)) c = x;
      for (int k = 0; k < 16; k++) v[12*k +: 12] = w[b][c][k][11:0];
      for (int x = 0; x < 6; x++) e.push_back(v[32*x +: 32]);
    end
    exp_pix.push_back(e);
  endtask

  // parse everything the PC received
  task automatic parse(output int n_ok, output int n_lost_flags);
    int i, prev;
    i = 0; prev = -1; n_ok = 0; n_lost_flags = 0;
    while (i < fx3.rx.size()) begin
      logic [31:0] cw; int pn; bit bad;
      cw = fx3.rx[i];
      check(cw[31:24] == 8'hA5, $sformatf("control word marker at %0d: %h", i, cw));
      pn = int'(cw[15:0]);
      check(cw[16] == (pn != prev + 1), $sformatf("loss flag of pixel %0d", pn));
      if (cw[16]) n_lost_flags++;
      check(pn < exp_pix.size(), "pixel number in range");
      bad = 0;
      if (pn < exp_pix.size())
        for (int x = 0; x < 192; x++) if (i + 1 + x >= fx3.rx.size() || fx3.rx[i+1+x] != exp_pix[pn][x]) bad = 1;
      check(!bad, $sformatf("data of pixel %0d", pn));
      if (!bad) n_ok++;
      prev = pn;
      i += 193;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ok, n_lost;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fx3.send_cmd({OP_PIX_PERIOD, 24'd100});
    fx3.send_cmd({OP_BIN, 24'd2});
    fx3.send_cmd({OP_START, 24'd0});
    repeat (100) @(negedge clk);
    check(armed, "armed by START");
    check(cmd_words.size() == 4 && cmd_words[0] == {OP_BIN, 8'd0} && cmd_words[1] == 16'd2 &&
          cmd_words[2] == {OP_START, 8'd0}, "BIN and START forwarded to the boards");
    // microscope frame of 2 lines: 4 pixel clocks each
    frame_active_in = 1;
    for (int l = 0; l < 2; l++) begin
      @(negedge clk); line_active_in = 1;
      repeat (400) @(negedge clk); line_active_in = 0;
      repeat (100) @(negedge clk);
    end
    frame_active_in = 0;
    check(pclk_rises == 8, $sformatf("8 pixel clocks (%0d)", pclk_rises));
    // 6 pixels at full speed
    for (int p = 0; p < 6; p++) begin board_pixel(); repeat (200) @(negedge clk); end
    repeat (2000) @(negedge clk);
    parse(n_ok, n_lost);
    check(n_ok == 6 && n_lost == 0 && pixels_dropped == 0, $sformatf("6 pixels intact (%0d)", n_ok));
    // FX3 stalls: FIFO fills, pixels are dropped
    stall = 1;
    for (int p = 0; p < 10; p++) board_pixel();
    repeat (8000) @(negedge clk);
    stall = 0;
    board_pixel();
    repeat (4000) @(negedge clk);
    parse(n_ok, n_lost);
    check(pixels_dropped > 0 && n_lost == 1, $sformatf("drops while stalled (%0d dropped, %0d flags)", pixels_dropped, n_lost));
    check(n_ok + int'(pixels_dropped) == 17, $sformatf("every pixel written or dropped (%0d + %0d)", n_ok, pixels_dropped));
    check(!frame_error && !line_error && !bad_cmd, "no error flags");
    check(fx3.protocol_errors == 0, "slave FIFO protocol respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
