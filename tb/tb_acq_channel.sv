// Testbench for acq_channel. A TAC/ADC model produces conversions whose
// ADC code is the time value plus the dither code in force; the expected
// 12-bit code is computed here from the time value and the bin size.
// Checks: dither stepping and compensation (with saturation at zero), the
// three bin sizes, the 0xFFF -> 0xFFE rule, the 16-photon limit, gating by
// run, the count register, the TAC reset pulse and the 4-cycle latency from
// STROBE to the channel FIFO.
module tb_acq_channel;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tac_strobe = 0, tac_reset, run = 0, pix_close = 0, ph_empty, ph_pop = 0, ph_overflow;
  logic [13:0] adc_data = '0;
  logic [7:0] dither_code;
  bin_sel_e bin_sel = BIN_X1;
  logic [4:0] cnt_reg;
  logic [11:0] ph_rdata;

  acq_channel dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] exp_dither = 0;
  logic [11:0] q[$];
  int in_pixel = 0;
  int dropped_at_limit = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [11:0] expect_code(input int t, input bin_sel_e b);
    logic [13:0] v; logic [11:0] r;
    v = 14'(t);
    case (b)
      BIN_X1:  r = v[11:0];
      BIN_X2:  r = v[12:1];
      default: r = v[13:2];
    endcase
    return (r == 12'hFFF) ? 12'hFFE : r;
  endfunction

  // one conversion with time value t (ADC code t + dither), or a raw code
  task automatic photon(input int t, input bit raw = 0, input int raw_code = 0);
    bit accept;
    @(negedge clk);
    check(dither_code == exp_dither, $sformatf("dither %0d exp %0d", dither_code, exp_dither));
    adc_data   = raw ? 14'(raw_code) : 14'(t + int'(exp_dither));
    tac_strobe = 1;
    accept = run && (in_pixel < 16);
    @(posedge clk); #1;
    check(tac_reset == 1, "tac_reset asserted after STROBE");
    @(posedge clk); #1;
    @(posedge clk); #1;
    if (accept && q.size() == 0) check(ph_empty == 1, "not yet in FIFO after 3 cycles");
    @(posedge clk); #1;
    if (accept && q.size() == 0) check(ph_empty == 0, "in FIFO 4 cycles after STROBE");
    check(tac_reset == 1, "tac_reset still high in 4th cycle");
    @(posedge clk); #1;
    check(tac_reset == 0, "tac_reset released after 4 cycles");
    @(negedge clk);
    tac_strobe = 0;
    if (accept) begin
      if (raw) q.push_back((raw_code < int'(exp_dither)) ? 12'h000 : expect_code(raw_code - int'(exp_dither), bin_sel));
      else     q.push_back(expect_code(t, bin_sel));
      in_pixel++;
    end else if (run) dropped_at_limit++;
    exp_dither = exp_dither + 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic close_and_drain(input int exp_cnt);
    @(negedge clk); pix_close = 1;
    @(negedge clk); pix_close = 0;
    check(cnt_reg == 5'(exp_cnt), $sformatf("cnt_reg %0d exp %0d", cnt_reg, exp_cnt));
    in_pixel = 0;
    while (q.size() > 0) begin
      check(ph_empty == 0, "FIFO holds expected photon");
      check(ph_rdata == q[0], $sformatf("code %h exp %h", ph_rdata, q[0]));
      void'(q.pop_front());
      ph_pop = 1; @(negedge clk); ph_pop = 0;
    end
    check(ph_empty == 1, "FIFO empty after drain");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    // 1x bins, a few photons including one whose code is all ones
    bin_sel = BIN_X1;
    photon(100); photon(4095); photon(1234); photon(16000); photon(7);
    close_and_drain(5);
    // 16-photon limit
    for (int i = 0; i < 20; i++) photon($urandom_range(0, 16000));
    close_and_drain(16);
    check(dropped_at_limit == 4, "four photons dropped at the limit");
    // 2x and 4x bins
    bin_sel = BIN_X2;
    photon(8191); photon(8190); photon(3001);
    close_and_drain(3);
    bin_sel = BIN_X4;
    photon(16383 - 255); photon(4); photon(10000);
    close_and_drain(3);
    // ADC code below the dither: compensation saturates at zero
    bin_sel = BIN_X1;
    photon(0, 1, 0);
    close_and_drain(1);
    // not running: nothing recorded, TAC still reset
    run = 0;
    photon(50); photon(60);
    close_and_drain(0);
    check(ph_overflow == 0, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
