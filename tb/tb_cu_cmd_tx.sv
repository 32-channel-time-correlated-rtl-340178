// Testbench for cu_cmd_tx: each command goes out as high then low half
// with tlast on the second word, only in cycles where all four lanes are
// ready; cmd_ready pulses once per command.
module tb_cu_cmd_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, tx_tvalid, tx_tlast;
  logic [31:0] cmd_data = 0;
  logic [15:0] tx_tdata;
  logic [3:0] tx_tready = '1;

  cu_cmd_tx dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] words[$];
  logic lasts[$];
  always @(posedge clk) if (rst_n && tx_tvalid && (&tx_tready)) begin words.push_back(tx_tdata); lasts.push_back(tx_tlast); end
  always @(negedge clk) tx_tready <= 4'($urandom) | 4'($urandom);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sent[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [31:0] c; c = $urandom;
      sent.push_back(c);
      @(negedge clk); cmd_valid = 1; cmd_data = c;
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
      @(negedge clk); cmd_valid = 0;
    end
    repeat (3) @(negedge clk);
    check(words.size() == 40, $sformatf("40 words (%0d)", words.size()));
    for (int i = 0; i < 20 && 2*i+1 < words.size(); i++) begin
      check(words[2*i] == sent[i][31:16] && words[2*i+1] == sent[i][15:0], $sformatf("command %0d halves", i));
      check(!lasts[2*i] && lasts[2*i+1], $sformatf("command %0d tlast", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
