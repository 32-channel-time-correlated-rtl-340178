// Testbench for pixel_slot_buffer (buffer 2). Pixels of 16 words are
// written at shuffled offsets and committed; the reader checks word pairs in
// offset order, random drops, that free goes low with both slots full, and
// that avail follows the number of committed pixels.
module tb_pixel_slot_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int SLOT = 16;

  logic we = 0, commit = 0, free, avail, pop = 0, drop = 0;
  logic [3:0] off = 0;
  logic [15:0] wdata = 0;
  logic [15:0] rd_data [2];

  pixel_slot_buffer #(.W(16), .SLOT(SLOT), .NSLOTS(2)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] pix [$][SLOT];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write_pixel();
    logic [15:0] p [SLOT];
    int order [SLOT];
    for (int i = 0; i < SLOT; i++) begin p[i] = 16'($urandom); order[i] = i; end
    order.shuffle();
    for (int i = 0; i < SLOT; i++) begin
      @(negedge clk); we = 1; off = 4'(order[i]); wdata = p[order[i]];
    end
    @(negedge clk); we = 0; commit = 1;
    @(negedge clk); commit = 0;
    pix.push_back(p);
  endtask

  task automatic read_pixel(input bit do_drop);
    check(avail == 1, "avail before read");
    if (do_drop) begin
      drop = 1; @(negedge clk); drop = 0;
    end else begin
      for (int i = 0; i < SLOT / 2; i++) begin
        check(rd_data[0] == pix[0][2*i] && rd_data[1] == pix[0][2*i+1],
              $sformatf("pair %0d: %h %h exp %h %h", i, rd_data[0], rd_data[1], pix[0][2*i], pix[0][2*i+1]));
        pop = 1; @(negedge clk); pop = 0;
      end
    end
    pix.pop_front();
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
    check(free == 1 && avail == 0, "empty after reset");
    write_pixel();
    write_pixel();
    check(free == 0, "not free with two pixels");
    read_pixel(0);
    check(free == 1 && avail == 1, "one pixel left");
    write_pixel();
    read_pixel(1);
    read_pixel(0);
    check(avail == 0, "empty again");
    for (int n = 0; n < 20; n++) begin
      write_pixel();
      read_pixel($urandom_range(0, 3) == 0);
    end
    check(avail == 0 && free == 1, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
