// Testbench for fx3_handler with the FX3 slave FIFO model. A queue stands
// for the FX3 FIFO. Checks that data words reach the PC in order at one
// word per cycle, that writing pauses while the FX3 is not ready, that
// commands are read and delivered (also while data is flowing), that a
// command waits for cmd_ready, and that no protocol rule is broken.
module tb_fx3_handler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] f_rdata, fx3_dq_o, fx3_dq_i, cmd_data, words_written;
  logic f_empty, f_pop, fx3_dq_oe, fx3_slwr_n, fx3_slrd_n, fx3_sloe_n;
  logic fx3_flag_wr_rdy, fx3_flag_rd_rdy, cmd_valid, cmd_ready = 1, stall = 0;
  logic [1:0] fx3_addr;

  fx3_handler dut (.*);
  fx3_model fx3 (.clk(clk), .rst_n(rst_n), .dq_o(fx3_dq_o), .dq_oe(fx3_dq_oe), .addr(fx3_addr), .slwr_n(fx3_slwr_n),
                 .slrd_n(fx3_slrd_n), .sloe_n(fx3_sloe_n), .flag_wr_rdy(fx3_flag_wr_rdy),
                 .flag_rd_rdy(fx3_flag_rd_rdy), .dq_i(fx3_dq_i), .stall(stall));

  int checks = 0, failures = 0;
  logic [31:0] sent[$], cmds_got[$];

  logic        push = 0, f_full;
  logic [31:0] wdata = '0;
  logic [7:0]  f_count;
  sync_fifo #(.W(32), .DEPTH(128)) u_q (.clk(clk), .rst_n(rst_n), .push(push), .wdata(wdata), .pop(f_pop),
                                        .rdata(f_rdata), .full(f_full), .empty(f_empty), .count(f_count));
  task automatic put(input logic [31:0] v);
    @(negedge clk); push = 1; wdata = v; sent.push_back(v);
    @(negedge clk); push = 0;
  endtask
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) cmds_got.push_back(cmd_data);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
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
    stall = 1;
    @(negedge clk); push = 1;
    for (int i = 0; i < 100; i++) begin wdata = $urandom; sent.push_back(wdata); @(negedge clk); end
    push = 0;
    stall = 0;
    repeat (100) @(negedge clk);
    check(fx3.rx.size() == 100, $sformatf("100 words in 100 cycles (%0d)", fx3.rx.size()));
    // stall
    stall = 1;
    for (int i = 0; i < 50; i++) put($urandom);
    repeat (20) @(negedge clk);
    check(fx3.rx.size() == 100, "no writes while FX3 not ready");
    stall = 0;
    // commands during data
    fx3.send_cmd(32'h0400_0190);
    fx3.send_cmd(32'h0100_0000);
    cmd_ready = 0;
    repeat (30) @(negedge clk);
    check(cmds_got.size() == 0 && cmd_valid, "command held until ready");
    cmd_ready = 1;
    repeat (80) @(negedge clk);
    check(cmds_got.size() == 2 && cmds_got[0] == 32'h0400_0190 && cmds_got[1] == 32'h0100_0000, "commands received in order");
    check(fx3.rx.size() == sent.size(), "all data written");
    for (int i = 0; i < sent.size() && i < fx3.rx.size(); i++) check(fx3.rx[i] == sent[i], $sformatf("data word %0d", i));
    check(fx3.protocol_errors == 0, "slave FIFO protocol respected");
    check(words_written == 150, "words_written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
