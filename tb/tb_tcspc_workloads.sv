// Workload testbench: the two load cases of the intended application that
// the default-size bench does not reach.
//   * Frame 1, maximum count rate: every one of the 32 detectors fires 16
//     photons in every 4 us pixel (4 Mcps per detector, one photon per
//     18..24 cycles), so every pixel record is full of real events and the
//     whole chain runs at its peak rate.
//   * Lines of 512 pixels (PIX_PER_LINE_P = 512): an 8 us line-pixel split
//     into two 4 us pixels to be binned two by two in software, which
//     doubles the event limit per binned pixel to 32.
//   * Frame 2 follows frame 1 without a new START, with 0..16 photons per
//     detector and pixel, and the pixel numbers continue across frames.
// LINES_P is cut to 2 lines per frame to keep the run short. Every record
// is checked against the photons fired, and no pixel may be lost.
module tb_tcspc_workloads;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int PIX = 512, NL = 2, NF = 2, P = 400, GAP = 400;

  logic [31:0] tac_strobe = '0, tac_reset;
  logic [13:0] adc_data [32];
  logic [7:0]  dither_code [32];
  logic [31:0] fx3_dq_o, fx3_dq_i, pixels_written, pixels_dropped;
  logic fx3_dq_oe, fx3_slwr_n, fx3_slrd_n, fx3_sloe_n, fx3_flag_wr_rdy, fx3_flag_rd_rdy;
  logic [1:0] fx3_addr;
  logic frame_active_in = 0, line_active_in = 0, frame_active_out, line_active_out, pixel_clock, enable_scan;
  logic armed, frame_error, line_error, bad_cmd, stall = 0;
  logic [3:0] board_run, board_overrun;

  tcspc_system #(.PIX_PER_LINE_P(PIX), .LINES_P(NL)) dut (.*);
  fx3_model fx3 (.clk(clk), .rst_n(rst_n), .dq_o(fx3_dq_o), .dq_oe(fx3_dq_oe), .addr(fx3_addr), .slwr_n(fx3_slwr_n),
                 .slrd_n(fx3_slrd_n), .sloe_n(fx3_sloe_n), .flag_wr_rdy(fx3_flag_wr_rdy),
                 .flag_rd_rdy(fx3_flag_rd_rdy), .dq_i(fx3_dq_i), .stall(stall));

  int checks = 0, failures = 0, bad_pixels = 0, checked_pixels = 0, frame = 0, full_pixels = 0;
  logic [11:0] expc [$][32][$];
  logic pclk_d = 0;
  int pix_count = 0;

  initial for (int c = 0; c < 32; c++) adc_data[c] = '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic channel_pixel(input int c, input int pix);
    int n;
    n = (frame == 0) ? 16 : $urandom_range(0, 16);
    repeat (8) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      int t; t = $urandom_range(0, 16383 - 255);
      expc[pix - checked_pixels][c].push_back(t[11:0] == 12'hFFF ? 12'hFFE : t[11:0]);
      adc_data[c] = 14'(t + int'(dither_code[c]));
      tac_strobe[c] = 1;
      repeat (3) @(negedge clk);
      tac_strobe[c] = 0;
      repeat ($urandom_range(15, 21)) @(negedge clk);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (pixel_clock && !pclk_d && enable_scan) begin
      automatic int pix = pix_count;
      logic [11:0] blank [32][$];
      expc.push_back(blank);
      pix_count++;
      for (int c = 0; c < 32; c++) begin
        automatic int cc = c;
        fork channel_pixel(cc, pix); join_none
      end
    end
    pclk_d <= pixel_clock;
  end

  // streaming checker of the PC data
  always @(negedge clk) if (rst_n && fx3.rx.size() >= 193 && expc.size() > 0) begin
    logic [31:0] cw; bit bad;
    cw = fx3.rx[0];
    bad = (cw[31:24] != 8'hA5) || (cw[16] != 1'b0) || (int'(cw[15:0]) != (checked_pixels % 65536));
    for (int det = 0; det < 32; det++) begin
      logic [191:0] v;
      for (int k = 0; k < 16; k++) v[12*k +: 12] = (k < expc[0][det].size()) ? expc[0][det][k] : 12'hFFF;
      for (int x = 0; x < 6; x++) if (fx3.rx[1 + 6 * det + x] != v[32*x +: 32]) bad = 1;
    end
    checks++;
    if (!bad && checked_pixels < PIX * NL) full_pixels++;
    if (bad) begin
      failures++; bad_pixels++;
      if (bad_pixels < 5) $display("FAIL: pixel %0d (control word %h)", checked_pixels, cw);
    end
    repeat (193) void'(fx3.rx.pop_front());
    void'(expc.pop_front());
    checked_pixels++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    fx3.send_cmd({OP_PIX_PERIOD, 24'(P)});
    fx3.send_cmd({OP_START, 24'd0});
    repeat (100) @(negedge clk);
    check(armed && board_run == 4'hF, "started");
    for (int f = 0; f < NF; f++) begin
      frame = f;
      frame_active_in = 1;
      repeat (GAP) @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        line_active_in = 1;
        repeat (PIX * P) @(negedge clk);
        line_active_in = 0;
        repeat (GAP) @(negedge clk);
      end
      frame_active_in = 0;
      repeat (3000) @(negedge clk);
    end
    check(checked_pixels == NF * PIX * NL, $sformatf("%0d pixels checked of %0d", checked_pixels, NF * PIX * NL));
    check(pixels_written == NF * PIX * NL && pixels_dropped == 0, $sformatf("written %0d dropped %0d", pixels_written, pixels_dropped));
    check(full_pixels == PIX * NL, $sformatf("%0d of %0d pixels full at 4 Mcps", full_pixels, PIX * NL));
    check(frame_error == 0 && line_error == 0 && board_overrun == 0, "no error flags");
    check(fx3.protocol_errors == 0, "slave FIFO protocol respected");
    $display("workloads: %0d pixels, %0d full at 4 Mcps, %0d bad", checked_pixels, full_pixels, bad_pixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
