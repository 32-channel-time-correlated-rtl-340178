// Testbench for board_pixel_wrap. Channel FIFOs are modelled by queues
// holding random photon codes; each pixel has random counts (0..16). The
// transmission FIFO model applies random back-pressure (tx_full). Checks
// that each pixel comes out as 8 x 16 words in channel order, recorded
// photons first and 0xFFFF padding after, that exactly the counted photons
// are popped, that a full pixel takes 128 cycles without back-pressure, and
// that a trigger arriving while one is pending sets overrun.
module tb_board_pixel_wrap;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic trigger = 0, tx_push, tx_full = 0, busy, overrun;
  logic [4:0]  cnt [8];
  logic [11:0] ch_rdata [8];
  logic [7:0]  ch_pop;
  logic [15:0] tx_wdata;

  board_pixel_wrap dut (.*);

  int checks = 0, failures = 0;
  logic [11:0] chq [8][$];
  logic [15:0] expq[$];
  bit  bp = 0;
  int  words = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_comb for (int c = 0; c < 8; c++) ch_rdata[c] = (chq[c].size() > 0) ? chq[c][0] : 12'h0;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 8; c++) if (ch_pop[c]) begin
      if (chq[c].size() == 0) begin checks++; failures++; $display("FAIL: pop of empty channel %0d at %0t", c, $time); end
      else void'(chq[c].pop_front());
    end
    if (tx_push) begin
      checks++; words++;
      if (tx_full) begin failures++; $display("FAIL: push while full"); end
      else if (expq.size() == 0) begin failures++; $display("FAIL: unexpected word"); end
      else begin
        if (tx_wdata != expq[0]) begin failures++; $display("FAIL: word %h exp %h", tx_wdata, expq[0]); end
        void'(expq.pop_front());
      end
    end
  end
  always @(negedge clk) tx_full <= bp ? ($urandom_range(0, 2) == 0) : 1'b0;

  task automatic one_pixel();
    int n;
    for (int c = 0; c < 8; c++) begin
      n = $urandom_range(0, 3) == 0 ? 16 : $urandom_range(0, 16);
      cnt[c] = 5'(n);
      for (int k = 0; k < 16; k++) begin
        if (k < n) begin
          logic [11:0] v; v = 12'($urandom_range(0, 4094));
          chq[c].push_back(v); expq.push_back({4'h0, v});
        end else expq.push_back(16'hFFFF);
      end
    end
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    @(negedge clk);
    for (int c = 0; c < 8; c++) cnt[c] = 5'($urandom);   // count registers are read one cycle after the trigger
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int c = 0; c < 8; c++) cnt[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // timing without back-pressure
    one_pixel();
    t0 = words;
    repeat (129) @(posedge clk);
    check(words - t0 == 128, $sformatf("128 words in 129 cycles, got %0d", words - t0));
    wait (!busy);
    // many pixels with back-pressure
    bp = 1;
    for (int p = 0; p < 30; p++) begin
      one_pixel();
      wait (!busy);
      @(negedge clk);
    end
    bp = 0;
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all words delivered");
    for (int c = 0; c < 8; c++) check(chq[c].size() == 0, "channel FIFO drained");
    check(overrun == 0, "no overrun yet");
    // two triggers back to back: overrun
    for (int c = 0; c < 8; c++) cnt[c] = '0;
    repeat (128) expq.push_back(16'hFFFF);
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    repeat (2) @(negedge clk);
    check(overrun == 1, "overrun flagged");
    wait (!busy);
    repeat (2) @(negedge clk);
    check(expq.size() == 0, "overrun pixel delivered once as padding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
