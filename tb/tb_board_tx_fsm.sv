// Testbench for board_tx_fsm: a queue stands for the transmission FIFO;
// the lane applies random back-pressure. Checks word order, that tlast
// marks every 128th word and only those, the frame counter, and one word
// per cycle when the lane is always ready.
module tb_board_tx_fsm;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] fifo_rdata, tx_tdata;
  logic fifo_empty, fifo_pop, tx_tvalid, tx_tlast, tx_tready = 1;
  logic [31:0] frames_sent;

  board_tx_fsm dut (.*);

  int checks = 0, failures = 0, n_rx = 0;
  logic [15:0] q[$];
  logic [15:0] sent[$];
  bit bp = 0;

  assign fifo_rdata = q.size() > 0 ? q[0] : 16'h0;
  assign fifo_empty = (q.size() == 0);

  always @(posedge clk) if (rst_n) begin
    if (fifo_pop) void'(q.pop_front());
    if (tx_tvalid && tx_tready) begin
      checks += 2;
      if (tx_tdata != sent[n_rx]) begin failures++; $display("FAIL: data %h exp %h", tx_tdata, sent[n_rx]); end
      if (tx_tlast != ((n_rx % 128) == 127)) begin failures++; $display("FAIL: tlast at word %0d", n_rx); end
      n_rx++;
    end
  end
  always @(negedge clk) tx_tready <= bp ? ($urandom_range(0, 1) == 1) : 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin logic [15:0] v; v = 16'($urandom); q.push_back(v); sent.push_back(v); end
    repeat (256) @(posedge clk);
    #1;
    checks++;
    if (n_rx != 256) begin failures++; $display("FAIL: 256 words in 256 cycles, got %0d", n_rx); end
    bp = 1;
    @(negedge clk);
    for (int i = 0; i < 128 * 5; i++) begin logic [15:0] v; v = 16'($urandom); q.push_back(v); sent.push_back(v); end
    wait (q.size() == 0);
    repeat (3) @(negedge clk);
    checks++;
    if (frames_sent != 7) begin failures++; $display("FAIL: frames_sent %0d", frames_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
