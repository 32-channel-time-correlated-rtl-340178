// Testbench for one TCSPC board (tcspc_board_fw) at its default sizes.
// A TAC/ADC model per channel fires STROBEs whose ADC code is a random time
// value plus the channel's dither code; the pixel clock and enable_scan are
// generated here (4 pixels per line, 400-cycle pixels) and commands are sent
// on the return lane. The expected lane words of every pixel are computed
// from the time values: per channel the first min(n,16) codes after bin
// selection, then 0xFFFF padding. Checks all words, tlast framing, that
// stopped boards send padding only, the bin-size command, and that each
// pixel is on the lane within 200 cycles after it closes.
module tb_tcspc_board_fw;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int P = 400, PIX = 4;

  logic [7:0]  tac_strobe = '0, tac_reset;
  logic [13:0] adc_data [8];
  logic [7:0]  dither_code [8];
  logic pixel_clock = 0, enable_scan = 0;
  logic [15:0] tx_tdata, rx_tdata = 0;
  logic tx_tvalid, tx_tlast, tx_tready = 1, rx_tvalid = 0, rx_tlast = 0, run, overrun;
  logic [31:0] pixels_sent;

  tcspc_board_fw dut (.*);

  int checks = 0, failures = 0, nword = 0, saturated = 0, padded = 0;
  logic [15:0] expq[$];
  int close_cyc[$], cyc = 0, last_word_cyc = 0, max_lat = 0;
  bin_sel_e bin = BIN_X1;

  initial for (int c = 0; c < 8; c++) adc_data[c] = '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_tvalid && tx_tready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL: unexpected word"); end
      else begin
        if (tx_tdata != expq[0]) begin failures++; $display("FAIL: word %0d: %h exp %h", nword, tx_tdata, expq[0]); end
        void'(expq.pop_front());
      end
      if (tx_tlast != (nword % 128 == 127)) begin failures++; $display("FAIL: tlast at %0d", nword); end
      if (nword % 128 == 127 && close_cyc.size() > 0) begin
        if (cyc - close_cyc[0] > max_lat) max_lat = cyc - close_cyc[0];
        void'(close_cyc.pop_front());
      end
      nword++;
    end
  end

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

  task automatic cmd(input logic [7:0] op, input logic [23:0] arg);
    @(negedge clk); rx_tdata = {op, arg[23:16]}; rx_tvalid = 1; rx_tlast = 0;
    @(negedge clk); rx_tdata = arg[15:0]; rx_tlast = 1;
    @(negedge clk); rx_tvalid = 0; rx_tlast = 0;
  endtask

  // photons of one channel during one pixel
  task automatic channel_photons(input int c, input int ts[$]);
    repeat (20) @(negedge clk);
    foreach (ts[i]) begin
      adc_data[c] = 14'(ts[i] + int'(dither_code[c]));
      tac_strobe[c] = 1;
      repeat (3) @(negedge clk);
      tac_strobe[c] = 0;
      repeat (9) @(negedge clk);
    end
  endtask

  // one line of PIX pixels; expected words queued
  task automatic scan_line(input bit recording);
    for (int p = 0; p < PIX; p++) begin
      int ts [8][$];
      for (int c = 0; c < 8; c++) begin
        int n;
        n = (c == p) ? 20 : $urandom_range(0, 12);
        for (int i = 0; i < n; i++) ts[c].push_back($urandom_range(0, 16383 - 255));
        for (int k = 0; k < 16; k++)
          if (recording && k < n) expq.push_back({4'h0, code_of(ts[c][k], bin)});
          else expq.push_back(16'hFFFF);
        if (recording && n > 16) saturated++;
        if (!recording || n < 16) padded++;
      end
      @(negedge clk);
      pixel_clock = 1;
      if (p == 0) enable_scan = 1;
      fork
        begin repeat (P / 2) @(negedge clk); pixel_clock = 0; end
        channel_photons(0, ts[0]); channel_photons(1, ts[1]); channel_photons(2, ts[2]); channel_photons(3, ts[3]);
        channel_photons(4, ts[4]); channel_photons(5, ts[5]); channel_photons(6, ts[6]); channel_photons(7, ts[7]);
      join
      repeat (P - 1 - P / 2) @(negedge clk);
      close_cyc.push_back(cyc + 3);
    end
    @(negedge clk); enable_scan = 0;
    repeat (600) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    scan_line(0);                  // board not started: padding only
    cmd(OP_START, 0);
    check(run == 1, "board started");
    scan_line(1);
    cmd(OP_BIN, 1); bin = BIN_X2;
    scan_line(1);
    cmd(OP_BIN, 2); bin = BIN_X4;
    scan_line(1);
    cmd(OP_STOP, 0);
    check(run == 0, "board stopped");
    check(expq.size() == 0, $sformatf("all words received (%0d left)", expq.size()));
    check(pixels_sent == 4 * PIX, $sformatf("pixels_sent %0d", pixels_sent));
    check(overrun == 0, "no overrun");
    check(max_lat <= 200, $sformatf("pixel on the lane within 200 cycles (%0d)", max_lat));
    check(saturated > 0 && padded > 0, "16-photon limit and padding both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
