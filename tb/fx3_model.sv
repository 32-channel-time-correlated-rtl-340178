// Behavioural model of the FX3 USB controller's slave FIFO side, for
// testbenches only. The PC -> FPGA thread is a queue of command words
// (send_cmd); flag_rd_rdy is high while it holds a word, and a word read
// with slrd_n low appears on dq_i two cycles later. The FPGA -> PC thread
// stores every word written with slwr_n low at address WR_ADDR in rx; the
// writer must only write while flag_wr_rdy is high. flag_wr_rdy is low
// while stall is high (the PC is not reading). Nothing is sampled in reset.
module fx3_model #(
  parameter logic [1:0] WR_ADDR = 2'd0,
  parameter logic [1:0] RD_ADDR = 2'd3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] dq_o,
  input  logic        dq_oe,
  input  logic [1:0]  addr,
  input  logic        slwr_n,
  input  logic        slrd_n,
  input  logic        sloe_n,
  output logic        flag_wr_rdy,
  output logic        flag_rd_rdy,
  output logic [31:0] dq_i,
  input  logic        stall
);
  logic [31:0] cmdq[$];
  logic [31:0] rx[$];
  logic [31:0] pipe = '0;
  int protocol_errors = 0;

  initial dq_i = '0;
  assign flag_wr_rdy = !stall;
  assign flag_rd_rdy = (cmdq.size() > 0);

  task automatic send_cmd(input logic [31:0] w);
    cmdq.push_back(w);
  endtask

  always @(posedge clk) if (rst_n) begin
    dq_i <= pipe;
    if (!slrd_n) begin
      if (addr != RD_ADDR || sloe_n || cmdq.size() == 0) protocol_errors++;
      else pipe <= cmdq.pop_front();
    end
    if (!slwr_n) begin
      if (addr != WR_ADDR || !dq_oe || stall) protocol_errors++;
      else rx.push_back(dq_o);
    end
  end
endmodule
