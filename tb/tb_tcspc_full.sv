// Full-size testbench: the system at its default parameters (256 x 256
// pixels, 32 channels, 16 events per detector per pixel, identity maps)
// acquires one complete frame from a microscope model in slave mode with
// 4 us pixels (400 cycles). Every channel fires 0..3 photons per pixel (one
// channel per pixel fires 18, above the limit). The PC stream is checked
// while it arrives: each pixel's control word (marker, consecutive pixel
// number, no loss) and its 192 packed data words against the photons fired.
// Passing means the design sustains the full 192 MB/s data rate for a whole
// frame without dropping a pixel.
module tb_tcspc_full;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int PIX = PIX_PER_LINE, NL = LINES, P = 400, GAP = 400;

  logic [31:0] tac_strobe = '0, tac_reset;
  logic [13:0] adc_data [32];
  logic [7:0]  dither_code [32];
  logic [31:0] fx3_dq_o, fx3_dq_i, pixels_written, pixels_dropped;
  logic fx3_dq_oe, fx3_slwr_n, fx3_slrd_n, fx3_sloe_n, fx3_flag_wr_rdy, fx3_flag_rd_rdy;
  logic [1:0] fx3_addr;
  logic frame_active_in = 0, line_active_in = 0, frame_active_out, line_active_out, pixel_clock, enable_scan;
  logic armed, frame_error, line_error, bad_cmd, stall = 0;
  logic [3:0] board_run, board_overrun;

  tcspc_system dut (.*);
  fx3_model fx3 (.clk(clk), .rst_n(rst_n), .dq_o(fx3_dq_o), .dq_oe(fx3_dq_oe), .addr(fx3_addr), .slwr_n(fx3_slwr_n),
                 .slrd_n(fx3_slrd_n), .sloe_n(fx3_sloe_n), .flag_wr_rdy(fx3_flag_wr_rdy),
                 .flag_rd_rdy(fx3_flag_rd_rdy), .dq_i(fx3_dq_i), .stall(stall));

  int checks = 0, failures = 0, bad_pixels = 0, checked_pixels = 0, n_sat = 0;
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
    n = (c == pix % 32) ? 18 : $urandom_range(0, 3);
    if (n > 16) n_sat++;
    repeat (30) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      int t; t = $urandom_range(0, 16383 - 255);
      if (i < 16) expc[pix - checked_pixels][c].push_back(t[11:0] == 12'hFFF ? 12'hFFE : t[11:0]);
      adc_data[c] = 14'(t + int'(dither_code[c]));
      tac_strobe[c] = 1;
      repeat (3) @(negedge clk);
      tac_strobe[c] = 0;
      repeat (9) @(negedge clk);
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
    if (bad) begin
      failures++; bad_pixels++;
      if (bad_pixels < 5) $display("FAIL: pixel %0d (control word %h)", checked_pixels, cw);
    end
    repeat (193) void'(fx3.rx.pop_front());
    void'(expc.pop_front());
    checked_pixels++;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
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
    check(checked_pixels == PIX * NL, $sformatf("%0d pixels checked of %0d", checked_pixels, PIX * NL));
    check(pixels_written == PIX * NL && pixels_dropped == 0, $sformatf("written %0d dropped %0d", pixels_written, pixels_dropped));
    check(n_sat > 0, "16-photon limit reached");
    check(frame_error == 0 && line_error == 0 && board_overrun == 0, "no error flags");
    check(fx3.protocol_errors == 0, "slave FIFO protocol respected");
    $display("full frame: %0d pixels, %0d bad", checked_pixels, bad_pixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
