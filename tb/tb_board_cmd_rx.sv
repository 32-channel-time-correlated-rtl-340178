// Testbench for board_cmd_rx: sends two-word commands and checks run and
// bin size, that unknown opcodes change nothing, and that a lone first word
// followed by a complete command is handled by the word carrying tlast.
module tb_board_cmd_rx;
  import tcspc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] rx_tdata = 0;
  logic rx_tvalid = 0, rx_tlast = 0, run;
  bin_sel_e bin_sel;
  logic [31:0] cmds_seen;

  board_cmd_rx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic word(input logic [15:0] d, input bit last);
    @(negedge clk); rx_tdata = d; rx_tvalid = 1; rx_tlast = last;
    @(negedge clk); rx_tvalid = 0; rx_tlast = 0;
  endtask
  task automatic cmd(input logic [7:0] op, input logic [23:0] arg);
    word({op, arg[23:16]}, 0);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    word(arg[15:0], 1);
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
    check(run == 0 && bin_sel == BIN_X1, "reset state");
    cmd(OP_START, 0);  check(run == 1, "start");
    cmd(OP_BIN, 2);    check(bin_sel == BIN_X4, "bin 4x");
    cmd(OP_BIN, 1);    check(bin_sel == BIN_X2, "bin 2x");
    cmd(8'h77, 24'h0); check(run == 1 && bin_sel == BIN_X2, "unknown opcode ignored");
    cmd(OP_STOP, 0);   check(run == 0, "stop");
    word({OP_START, 8'h00}, 0);     // lost second half
    cmd(OP_BIN, 0);    check(bin_sel == BIN_X1 && run == 0, "resynchronised on tlast");
    check(cmds_seen == 6, $sformatf("cmds_seen %0d", cmds_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
