// Testbench for cmd_decoder: every opcode, configuration registers, the
// armed flag and clear_pixnum pulse, forwarding of START/STOP/BIN only (and
// holding the next command until the forward is taken), and bad_cmd.
module tb_cmd_decoder;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, fwd_valid, fwd_ready = 0, master_mode, armed, clear_pixnum, bad_cmd;
  logic [31:0] cmd_data = 0, fwd_data;
  logic [15:0] pix_period, td, line_gap;

  cmd_decoder dut (.*);

  int checks = 0, failures = 0, clears = 0;
  logic [31:0] fwd[$];
  always @(posedge clk) if (rst_n) begin
    if (fwd_valid && fwd_ready) fwd.push_back(fwd_data);
    if (clear_pixnum) clears++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic send(input logic [31:0] c);
    @(negedge clk); cmd_valid = 1; cmd_data = c;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pix_period == 400 && td == 0 && !armed && !master_mode, "reset values");
    send({OP_PIX_PERIOD, 24'd800});
    send({OP_TD, 24'd37});
    send({OP_LINE_GAP, 24'd1000});
    send({OP_SYNC_MODE, 24'd1});
    check(pix_period == 800 && td == 37 && line_gap == 1000 && master_mode, "configuration");
    check(fwd.size() == 0 && !fwd_valid, "configuration is not forwarded");
    send({OP_START, 24'd0});
    @(negedge clk);
    check(armed && clears == 1 && fwd_valid, "start arms and is forwarded");
    // next command must wait for the forward
    fork send({OP_BIN, 24'd2}); join_none
    repeat (5) @(negedge clk);
    check(fwd_valid && fwd_data[31:24] == OP_START, "second command waits");
    fwd_ready = 1;
    repeat (6) @(negedge clk);
    send({OP_STOP, 24'd0});
    send({8'hEE, 24'd0});
    repeat (4) @(negedge clk);
    check(!armed, "stop disarms");
    check(bad_cmd, "unknown opcode flagged");
    check(fwd.size() == 3 && fwd[0][31:24] == OP_START && fwd[1] == {OP_BIN, 24'd2} && fwd[2][31:24] == OP_STOP,
          $sformatf("forwarded %0d", fwd.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
