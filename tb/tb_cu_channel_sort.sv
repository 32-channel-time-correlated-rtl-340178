// Testbench for cu_channel_sort with a non-identity channel map. A queue
// stands for buffer 1 and an array for the buffer 2 slot. Checks that the
// FSM waits for a whole pixel, that word k of channel c lands at offset
// CH_TO_DET[c]*16 + k, that the copy takes 128 cycles plus the commit, and
// that it waits while buffer 2 has no free slot.
module tb_cu_channel_sort;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam chmap_t MAP = {3'd0, 3'd2, 3'd4, 3'd6, 3'd1, 3'd3, 3'd5, 3'd7};

  logic [15:0] b1_rdata, b2_wdata;
  logic [8:0]  b1_count;
  logic b1_pop, b2_we, b2_commit, b2_free = 1;
  logic [6:0] b2_off;
  logic [31:0] pixels_sorted;

  cu_channel_sort #(.CH_TO_DET(MAP)) dut (.*);

  int checks = 0, failures = 0, commits = 0, busy_cycles = 0;
  logic [15:0] q[$];
  logic [15:0] slot [128];
  logic [15:0] sent [$][128];

  assign b1_rdata = q.size() > 0 ? q[0] : 16'h0;
  assign b1_count = 9'(q.size());

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (b1_pop) begin
      busy_cycles++;
      if (q.size() == 0) begin checks++; failures++; $display("FAIL: pop of empty buffer 1"); end
      else void'(q.pop_front());
    end
    if (b2_we) slot[b2_off] <= b2_wdata;
    if (b2_commit) begin
      commits++;
      #1;
      for (int c = 0; c < 8; c++) for (int k = 0; k < 16; k++)
        check(slot[MAP[c]*16 + k] == sent[0][c*16 + k], $sformatf("ch %0d word %0d", c, k));
      sent.pop_front();
    end
  end

  task automatic push_pixel();
    logic [15:0] p [128];
    for (int i = 0; i < 128; i++) begin p[i] = 16'($urandom); q.push_back(p[i]); end
    sent.push_back(p);
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
    @(negedge clk);
    // 127 words: must wait
    for (int i = 0; i < 127; i++) q.push_back(16'($urandom));
    repeat (10) @(negedge clk);
    check(busy_cycles == 0, "waits for a whole pixel");
    q.delete();
    push_pixel();
    @(negedge clk);
    repeat (130) @(negedge clk);
    check(commits == 1 && busy_cycles == 128, $sformatf("one pixel in 130 cycles (%0d commits, %0d pops)", commits, busy_cycles));
    // no free slot: must wait
    b2_free = 0;
    push_pixel();
    repeat (20) @(negedge clk);
    check(busy_cycles == 128, "waits for a free slot");
    b2_free = 1;
    push_pixel();
    push_pixel();
    repeat (500) @(negedge clk);
    check(commits == 4 && pixels_sorted == 4, $sformatf("four pixels sorted (%0d)", commits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
