// End-to-end testbench of the 32-channel system (tcspc_system) at 4 pixels
// per line and 2 lines per frame, with non-identity channel and board maps.
// Models: a TAC/ADC per channel (STROBE with ADC code = time value + the
// channel's dither code), the microscope (frame/line active) and the FX3
// (commands in, pixel stream out). For every pixel the testbench fires
// random photons on all 32 channels inside the pixel, remembers their time
// values, and later checks the PC stream: control word (marker, pixel
// number, loss flag) and the 192 packed words of each pixel in detector
// order, with the bin size in force.
// Run: frame 1 slave mode, 1x bins, Td = 0; frame 2 slave mode, 4x bins,
// Td = 25 and the FX3 stalled (pixels dropped); frame 3 master mode, 2x
// bins. Mechanisms counted (each must occur): padding, 16-photon limit,
// channel sorting, board sorting, the three bin sizes, dither compensation,
// Td delay, gating during carriage return, pixel drop with loss flag,
// master-mode scanning, command forwarding (start, bin size).
module tb_tcspc_system;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int PIX = 4, NL = 2, P = 400;
  localparam chmap_t    M0 = {3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
  localparam chmap_t    M1 = {3'd6, 3'd7, 3'd4, 3'd5, 3'd2, 3'd3, 3'd0, 3'd1};
  localparam chmap_t    CHM [4] = '{M1, CH_IDENTITY, M0, M1};
  localparam boardmap_t BM = {2'd1, 2'd0, 2'd3, 2'd2};

  logic [31:0] tac_strobe = '0, tac_reset;
  logic [13:0] adc_data [32];
  logic [7:0]  dither_code [32];
  logic [31:0] fx3_dq_o, fx3_dq_i, pixels_written, pixels_dropped;
  logic fx3_dq_oe, fx3_slwr_n, fx3_slrd_n, fx3_sloe_n, fx3_flag_wr_rdy, fx3_flag_rd_rdy;
  logic [1:0] fx3_addr;
  logic frame_active_in = 0, line_active_in = 0, frame_active_out, line_active_out, pixel_clock, enable_scan;
  logic armed, frame_error, line_error, bad_cmd, stall = 0;
  logic [3:0] board_run, board_overrun;

  tcspc_system #(.PIX_PER_LINE_P(PIX), .LINES_P(NL), .CH_TO_DET(CHM), .BOARD_OF_BLOCK(BM)) dut (.*);
  fx3_model fx3 (.clk(clk), .rst_n(rst_n), .dq_o(fx3_dq_o), .dq_oe(fx3_dq_oe), .addr(fx3_addr), .slwr_n(fx3_slwr_n),
                 .slrd_n(fx3_slrd_n), .sloe_n(fx3_sloe_n), .flag_wr_rdy(fx3_flag_wr_rdy),
                 .flag_rd_rdy(fx3_flag_rd_rdy), .dq_i(fx3_dq_i), .stall(stall));

  int checks = 0, failures = 0;
  // expected 12-bit codes per pixel and physical channel
  logic [11:0] expc [$][32][$];
  bin_sel_e bin = BIN_X1;
  int n_pad = 0, n_sat = 0, n_dither = 0, n_gap = 0, n_loss = 0, n_bin[3] = '{0, 0, 0};
  int n_master_pix = 0, n_td = 0, n_sorted = 0;
  bit master = 0, in_gap_fire = 0;
  int cyc = 0, line_rise_cyc = 0, td_now = 0;
  logic pclk_d = 0, la_d = 0;

  initial for (int c = 0; c < 32; c++) adc_data[c] = '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [11:0] code_of(input int t, input bin_sel_e b);
    logic [13:0] v; logic [11:0] r;
    v = 14'(t);
    case (b)
      BIN_X1:  r = v[11:0];
      BIN_X2:  r = v[12:1];
      default: r = v[13:2];
    endcase
    return (r == 12'hFFF) ? 12'hFFE : r;
  endfunction

  // TAC/ADC model: one photon on channel c with time value t
  task automatic fire(input int c, input int t);
    adc_data[c] = 14'(t + int'(dither_code[c]));
    if (dither_code[c] != 0) n_dither++;
    tac_strobe[c] = 1;
    repeat (3) @(negedge clk);
    tac_strobe[c] = 0;
    repeat (9) @(negedge clk);
  endtask

  task automatic channel_pixel(input int c, input int pix);
    int n;
    n = (c % 9 == pix % 9) ? 20 : $urandom_range(0, 10);
    repeat (30) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      int t; t = $urandom_range(0, 16383 - 255);
      if (i < 16) expc[pix][c].push_back(code_of(t, bin));
      fire(c, t);
    end
    if (n > 16) n_sat++;
    if (n < 16) n_pad++;
  endtask

  // pixel-start watcher: fires the photons of every pixel
  int pix_count = 0;
  always @(negedge clk) if (rst_n) begin
    if (pixel_clock && !pclk_d && enable_scan) begin
      automatic int pix = pix_count;
      logic [11:0] blank [32][$];
      expc.push_back(blank);
      if (master) n_master_pix++;
      n_bin[int'(bin)]++;
      pix_count++;
      for (int c = 0; c < 32; c++) begin
        automatic int cc = c;
        fork channel_pixel(cc, pix); join_none
      end
    end
    pclk_d <= pixel_clock;
  end

  // Td measurement: line_active_in rise to the first pixel clock
  logic pc_q = 0;
  bit   first_of_line = 0;
  int   base_off = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (line_active_in && !la_d) begin line_rise_cyc = cyc; first_of_line = 1; end
    if (pixel_clock && !pc_q && !master && first_of_line) begin
      first_of_line = 0;
      if (td_now == 0) base_off = cyc - line_rise_cyc;
      else if (base_off >= 0) begin
        checks++;
        if (cyc - line_rise_cyc == base_off + td_now) n_td++;
        else begin failures++; $display("FAIL: first pixel clock %0d cycles after line start, exp %0d", cyc - line_rise_cyc, base_off + td_now); end
      end
    end
    la_d <= line_active_in;
    pc_q <= pixel_clock;
  end

  task automatic cmd(input opcode_e op, input int arg);
    fx3.send_cmd({op, 24'(arg)});
    repeat (40) @(negedge clk);
  endtask

  // one microscope frame in slave mode, with photons during carriage returns
  task automatic slave_frame();
    frame_active_in = 1;
    repeat (20) @(negedge clk);
    for (int l = 0; l < NL; l++) begin
      line_active_in = 1;
      repeat (PIX * P) @(negedge clk);
      line_active_in = 0;
      repeat (td_now + 60) @(negedge clk);
      fire(l, 100); n_gap++;          // carriage return: must not be recorded
      repeat (200) @(negedge clk);
    end
    frame_active_in = 0;
    repeat (300) @(negedge clk);
  endtask

  // parse the PC stream
  task automatic parse();
    int i, prev, n_pix;
    i = 0; prev = -1; n_pix = 0;
    while (i + 193 <= fx3.rx.size()) begin
      logic [31:0] cw; int pn; bit bad;
      cw = fx3.rx[i];
      check(cw[31:24] == 8'hA5, $sformatf("control word marker at %0d: %h", i, cw));
      pn = int'(cw[15:0]);
      check(cw[16] == (pn != prev + 1), $sformatf("loss flag of pixel %0d", pn));
      if (cw[16]) n_loss++;
      check(pn < expc.size(), $sformatf("pixel number %0d in range", pn));
      bad = 0;
      if (pn < expc.size()) begin
        for (int j = 0; j < 4; j++) for (int d = 0; d < 8; d++) begin
          int b, c, ch; logic [191:0] v;
          b = BM[j]; c = -1;
          for (int x = 0; x < 8; x++) if (CHM[b][x] == 3'(d)) c = x;
          ch = 8 * b + c;
          if (ch != 8 * j + d) n_sorted++;
          for (int k = 0; k < 16; k++) v[12*k +: 12] = (k < expc[pn][ch].size()) ? expc[pn][ch][k] : 12'hFFF;
          for (int x = 0; x < 6; x++)
            if (fx3.rx[i + 1 + 6 * (8 * j + d) + x] != v[32*x +: 32]) bad = 1;
        end
      end
      check(!bad, $sformatf("data of pixel %0d", pn));
      prev = pn;
      n_pix++;
      i += 193;
    end
    check(i == fx3.rx.size(), "whole pixels only");
    check(n_pix == int'(pixels_written), $sformatf("pixels parsed %0d, written %0d", n_pix, pixels_written));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // frame 1: slave, 1x bins
    cmd(OP_PIX_PERIOD, P);
    cmd(OP_BIN, 0);
    cmd(OP_START, 0);
    check(armed && board_run == 4'hF, "START reaches CU and all boards");
    bin = BIN_X1; td_now = 0;
    slave_frame();
    check(pixels_dropped == 0 && pixels_written == PIX * NL, $sformatf("frame 1 intact at 4 us pixels (%0d)", pixels_written));
    // frame 2: slave, 4x bins, Td = 25, FX3 stalled
    cmd(OP_BIN, 2); bin = BIN_X4;
    cmd(OP_TD, 25); td_now = 25;
    stall = 1;
    slave_frame();
    repeat (2000) @(negedge clk);
    stall = 0;
    repeat (3000) @(negedge clk);
    check(pixels_dropped > 0, $sformatf("pixels dropped while the FX3 stalls (%0d)", pixels_dropped));
    // frame 3: master mode, 2x bins
    cmd(OP_TD, 0); td_now = 0;
    cmd(OP_BIN, 1); bin = BIN_X2;
    master = 1;
    cmd(OP_LINE_GAP, 300);
    cmd(OP_SYNC_MODE, 1);
    wait (frame_active_out);
    wait (!frame_active_out);
    cmd(OP_STOP, 0);                    // in the gap after the frame: start no other
    repeat (3000) @(negedge clk);
    check(!armed && board_run == 4'h0, "STOP reaches CU and all boards");
    parse();
    check(pixels_written + pixels_dropped == 3 * PIX * NL, $sformatf("all %0d pixels accounted for", 3 * PIX * NL));
    check(frame_error == 0 && line_error == 0 && bad_cmd == 0 && board_overrun == 0, "no error flags");
    check(fx3.protocol_errors == 0, "slave FIFO protocol respected");
    $display("mechanisms: pad=%0d sat=%0d sorted=%0d bin1x=%0d bin2x=%0d bin4x=%0d dither=%0d td=%0d gap=%0d loss=%0d master=%0d",
             n_pad, n_sat, n_sorted, n_bin[0], n_bin[1], n_bin[2], n_dither, n_td, n_gap, n_loss, n_master_pix);
    check(n_pad > 0, "padding happened");
    check(n_sat > 0, "16-photon limit happened");
    check(n_sorted > 0, "channel/board sorting happened");
    check(n_bin[0] > 0 && n_bin[1] > 0 && n_bin[2] > 0, "all bin sizes used");
    check(n_dither > 0, "dither compensation happened");
    check(n_td > 0, "Td delay happened");
    check(n_gap > 0, "carriage-return gating happened");
    check(n_loss > 0, "loss flag seen");
    check(n_master_pix == PIX * NL, "master-mode frame scanned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
