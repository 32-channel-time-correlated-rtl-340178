// Testbench for cu_pixel_wrap with a reversed board order. Queues stand for
// the four buffer 2 FIFOs (read as word pairs) and the FX3 FIFO is a
// capture queue with a free-space count driven here. The expected output
// is built independently: control word, then for each output block the
// board's 8 x 16 codes, each detector's 16 codes packed into six 32-bit
// words, first code in the low bits. Checks pixel numbers, the dropped-
// pixel flag, dropping when there is no room, clear_pixnum, the framing
// error bit and the 257-cycle pixel time.
module tb_cu_pixel_wrap;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam boardmap_t MAP = {2'd0, 2'd1, 2'd2, 2'd3};   // block j <- board 3-j

  logic [15:0] b2_rdata [4][2];
  logic [3:0]  b2_avail, b2_pop, b2_drop;
  logic        f_push, clear_pixnum = 0, frame_error = 0;
  logic [31:0] f_wdata, pixels_written, pixels_dropped;
  logic [10:0] f_free = 11'd1024;

  cu_pixel_wrap #(.BOARD_OF_BLOCK(MAP)) dut (.*);

  int checks = 0, failures = 0, first_push, last_push, cyc = 0;
  logic [15:0] bq [4][$];
  logic [31:0] got[$], expq[$];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_comb for (int b = 0; b < 4; b++) begin
    b2_avail[b]    = bq[b].size() >= 128;
    b2_rdata[b][0] = bq[b].size() > 0 ? bq[b][0] : 16'h0;
    b2_rdata[b][1] = bq[b].size() > 1 ? bq[b][1] : 16'h0;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int b = 0; b < 4; b++) begin
      if (b2_drop[b]) repeat (128) void'(bq[b].pop_front());
      else if (b2_pop[b]) repeat (2) void'(bq[b].pop_front());
    end
    if (f_push) begin
      if (got.size() == 0 || cyc > last_push + 5) first_push = cyc;
      last_push = cyc;
      got.push_back(f_wdata);
    end
  end

  // one pixel into the queues; expected words appended if write_exp
  task automatic add_pixel(input bit write_exp, input logic [15:0] pixnum, input bit lost, input bit ferr);
    logic [15:0] w [4][128];
    for (int b = 0; b < 4; b++) for (int i = 0; i < 128; i++) begin
      w[b][i] = ($urandom_range(0, 3) == 0) ? 16'hFFFF : 16'($urandom_range(0, 4094));
      bq[b].push_back(w[b][i]);
    end
    if (write_exp) begin
      expq.push_back({8'hA5, 6'd0, ferr, lost, pixnum});
      for (int j = 0; j < 4; j++) begin
        int b; b = 3 - j;
        for (int d = 0; d < 8; d++) begin
          logic [191:0] v; v = '0;
          for (int k = 0; k < 16; k++) v[12*k +: 12] = w[b][d*16 + k][11:0];
          for (int x = 0; x < 6; x++) expq.push_back(v[32*x +: 32]);
        end
      end
    end
  endtask

  task automatic compare();
    check(got.size() == expq.size(), $sformatf("word count %0d exp %0d", got.size(), expq.size()));
    for (int i = 0; i < expq.size() && i < got.size(); i++)
      if (got[i] != expq[i]) begin checks++; failures++; $display("FAIL: word %0d %h exp %h", i, got[i], expq[i]); break; end
    got.delete(); expq.delete();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    add_pixel(1, 0, 0, 0);
    repeat (300) @(negedge clk);
    check(last_push - first_push + 1 <= 257, $sformatf("pixel written in %0d cycles", last_push - first_push + 1));
    add_pixel(1, 1, 0, 0);
    add_pixel(1, 2, 0, 0);
    repeat (600) @(negedge clk);
    compare();
    // no room: pixel 3 dropped, pixel 4 carries the loss flag
    f_free = 11'd192;
    add_pixel(0, 0, 0, 0);
    repeat (10) @(negedge clk);
    check(pixels_dropped == 1 && bq[0].size() == 0, "pixel dropped when no room");
    f_free = 11'd193;
    add_pixel(1, 4, 1, 0);
    repeat (300) @(negedge clk);
    add_pixel(1, 5, 0, 1);
    frame_error = 1;
    repeat (300) @(negedge clk);
    frame_error = 0;
    compare();
    clear_pixnum = 1; @(negedge clk); clear_pixnum = 0;
    add_pixel(1, 0, 0, 0);
    repeat (300) @(negedge clk);
    compare();
    check(pixels_written == 6, $sformatf("pixels_written %0d", pixels_written));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
