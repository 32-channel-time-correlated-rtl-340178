// Testbench for scan_sync at 8 pixels per line and 3 lines per frame.
// Slave mode: the microscope's frame/line signals are driven here; checks
// PIX pixel-clock pulses per line spaced by pix_period, the pulse width,
// that the first pulse comes 5 cycles (input synchroniser and registered
// outputs) plus exactly Td cycles after line_active, that enable_scan rises
// with the first pulse and lasts PIX*pix_period cycles, that nothing is
// produced when not armed, frame_start, and line_error for an early line.
// Master mode: checks line_active_out length and gap, the number of lines
// per frame, and that pixel clocks follow the generated lines.
module tb_scan_sync;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int PIX = 8, NL = 3;

  logic master_mode = 0, armed = 0, frame_active_in = 0, line_active_in = 0;
  logic [15:0] pix_period = 20, td = 0, line_gap = 30;
  logic frame_active_out, line_active_out, pixel_clock, enable_scan, frame_start, line_error;
  logic [31:0] lines_acquired;

  scan_sync #(.PIX_PER_LINE_P(PIX), .LINES_P(NL)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int pc_rise[$], en_rise[$], en_fall[$], la_rise[$], la_fall[$], fstarts = 0, pc_high = 0;
  logic pc_d = 0, en_d = 0, lao_d = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pixel_clock && !pc_d) pc_rise.push_back(cyc);
    if (pixel_clock) pc_high++;
    if (enable_scan && !en_d) en_rise.push_back(cyc);
    if (!enable_scan && en_d) en_fall.push_back(cyc);
    if (line_active_out && !lao_d) la_rise.push_back(cyc);
    if (!line_active_out && lao_d) la_fall.push_back(cyc);
    if (frame_start) fstarts++;
    pc_d <= pixel_clock; en_d <= enable_scan; lao_d <= line_active_out;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one microscope line; returns the cycle at which line_active rose
  task automatic line(output int t0);
    @(negedge clk); line_active_in = 1; t0 = cyc;
    repeat (PIX * pix_period) @(negedge clk);
    line_active_in = 0;
    repeat (60) @(negedge clk);
  endtask

  task automatic clear();
    pc_rise.delete(); en_rise.delete(); en_fall.delete(); pc_high = 0;
  endtask

  task automatic check_line(input int t0, input int exp_off);
    check(pc_rise.size() == PIX, $sformatf("%0d pulses per line (%0d)", PIX, pc_rise.size()));
    if (pc_rise.size() == PIX) begin
      check(pc_rise[0] - t0 == exp_off, $sformatf("first pulse offset %0d exp %0d", pc_rise[0] - t0, exp_off));
      for (int i = 1; i < PIX; i++) check(pc_rise[i] - pc_rise[i-1] == pix_period, "pulse spacing");
    end
    check(pc_high == PIX * (pix_period / 2), $sformatf("pulse width (%0d)", pc_high));
    check(en_rise.size() == 1 && en_fall.size() == 1, "one enable window");
    if (en_rise.size() == 1 && pc_rise.size() > 0) check(en_rise[0] == pc_rise[0], "enable rises with first pulse");
    if (en_rise.size() == 1 && en_fall.size() == 1) check(en_fall[0] - en_rise[0] == PIX * pix_period, "enable length");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, base;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not armed: nothing
    @(negedge clk); frame_active_in = 1;
    line(t0);
    @(negedge clk); frame_active_in = 0;
    check(pc_rise.size() == 0 && en_rise.size() == 0 && fstarts == 0, "silent when not armed");
    // armed, Td = 0
    armed = 1;
    repeat (5) @(negedge clk);
    frame_active_in = 1;
    repeat (10) @(negedge clk);
    check(fstarts == 1, "frame_start");
    clear(); line(t0); check_line(t0, 5); base = pc_rise.size() > 0 ? pc_rise[0] - t0 : 0;
    // Td = 13
    td = 13;
    clear(); line(t0); check_line(t0, base + 13);
    // Td = 1, different period
    td = 1; pix_period = 31;
    clear(); line(t0); check_line(t0, base + 1);
    // early line start
    td = 0; pix_period = 20;
    @(negedge clk); line_active_in = 1;
    repeat (40) @(negedge clk); line_active_in = 0;
    repeat (10) @(negedge clk); line_active_in = 1;
    repeat (10) @(negedge clk); line_active_in = 0;
    repeat (300) @(negedge clk);
    check(line_error == 1, "line_error on early line");
    frame_active_in = 0;
    check(lines_acquired == 4, $sformatf("lines_acquired %0d", lines_acquired));
    // master mode: one frame of NL lines
    armed = 0;
    repeat (10) @(negedge clk);
    clear();
    master_mode = 1; armed = 1;
    @(negedge clk); armed = 0;                 // one frame only
    repeat (NL * (PIX * 20 + 30) + 200) @(negedge clk);
    check(la_rise.size() == NL && la_fall.size() == NL, $sformatf("%0d generated lines (%0d)", NL, la_rise.size()));
    for (int i = 0; i < la_rise.size() && i < la_fall.size(); i++) check(la_fall[i] - la_rise[i] == PIX * 20, "line length");
    for (int i = 1; i < la_rise.size(); i++) check(la_rise[i] - la_fall[i-1] == 30, "line gap");
    check(frame_active_out == 0, "frame ends");
    check(pc_rise.size() == 0, "no pixels in a frame that starts disarmed");
    // master mode, armed through the frame: pixel clocks follow
    clear();
    armed = 1;
    repeat (NL * (PIX * 20 + 30) + 100) @(negedge clk);
    armed = 0;
    repeat (NL * (PIX * 20 + 30) + 100) @(negedge clk);
    check(pc_rise.size() >= NL * PIX, $sformatf("pixel clocks in master mode (%0d)", pc_rise.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
