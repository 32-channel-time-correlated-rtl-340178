// Testbench for sync_fifo: random pushes and pops against a queue model.
// Checks head data, empty/full/count, and that pushes when full and pops
// when empty are ignored.
module tb_sync_fifo;
  localparam int W = 12, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(count == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) check(rdata == q[0], $sformatf("rdata %h exp %h", rdata, q[0]));
      push  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35));
      pop   = ($urandom_range(0, 99) < ((i / 500) % 2 ? 35 : 70));
      wdata = W'($urandom);
      begin
        bit was_full, was_empty;
        was_full  = (q.size() == DEPTH);
        was_empty = (q.size() == 0);
        if (pop && !was_empty) void'(q.pop_front());
        if (push && !was_full) q.push_back(wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
