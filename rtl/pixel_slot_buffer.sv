// Buffer 2 FIFO of the control unit: a FIFO of whole pixels.
//
// The memory holds NSLOTS slots of SLOT words. The writer (channel sorting
// FSM) fills the slot at the tail at any offset (we, off, wdata) and then
// commits it; free says a slot is available to fill. The reader sees the
// head slot as a stream of word pairs: rd_data[0] and rd_data[1] are words
// 2i and 2i+1 while avail is high; pop advances to the next pair and, after
// the last pair, releases the slot. drop releases the whole head slot at
// once (pixel discarded). Even and odd words sit in two banks, so one word
// can be written and two read in every cycle; the two-word read lets the
// pixel wrapping FSM keep up with a 4 us pixel at 100 MHz.
// Writing at an offset lets the sorting be done while the pixel is copied
// in. Two slots, the addressed write and the paired read are this design's
// choices; the document gives only the FIFO's role.
module pixel_slot_buffer #(
  parameter int unsigned W      = 16,
  parameter int unsigned SLOT   = 128,   // words per pixel, even
  parameter int unsigned NSLOTS = 2,
  localparam int unsigned OW    = $clog2(SLOT),
  localparam int unsigned HW    = $clog2(SLOT / 2),
  localparam int unsigned SW    = (NSLOTS > 1) ? $clog2(NSLOTS) : 1,
  localparam int unsigned BW    = $clog2(NSLOTS * SLOT / 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side
  input  logic          we,
  input  logic [OW-1:0] off,
  input  logic [W-1:0]  wdata,
  input  logic          commit,
  output logic          free,
  // read side
  output logic [W-1:0]  rd_data [2],
  output logic          avail,
  input  logic          pop,
  input  logic          drop
);

  logic [W-1:0]  bank_even [NSLOTS * SLOT / 2];
  logic [W-1:0]  bank_odd  [NSLOTS * SLOT / 2];
  logic [SW-1:0] wslot, rslot;
  logic [HW-1:0] rpair;
  logic [SW:0]   used;

  function automatic logic [SW-1:0] next_slot(input logic [SW-1:0] s);
    return (s == SW'(NSLOTS - 1)) ? '0 : s + 1'b1;
  endfunction

  logic [BW-1:0] waddr, raddr;
  assign waddr = BW'(wslot * (SLOT / 2)) + BW'(off[OW-1:1]);
  assign raddr = BW'(rslot * (SLOT / 2)) + BW'(rpair);

  assign free       = (used < (SW+1)'(NSLOTS));
  assign avail      = (used != '0);
  assign rd_data[0] = bank_even[raddr];
  assign rd_data[1] = bank_odd[raddr];

  logic do_commit, release_slot;
  assign do_commit    = commit && free;
  assign release_slot = avail && (drop || (pop && rpair == HW'(SLOT / 2 - 1)));

  always_ff @(posedge clk) begin
    if (we && free && !off[0]) bank_even[waddr] <= wdata;
    if (we && free &&  off[0]) bank_odd[waddr]  <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wslot <= '0;
      rslot <= '0;
      rpair <= '0;
      used  <= '0;
    end else begin
      if (do_commit) wslot <= next_slot(wslot);
      if (release_slot) begin
        rslot <= next_slot(rslot);
        rpair <= '0;
      end else if (pop && avail) begin
        rpair <= rpair + 1'b1;
      end
      used <= used + (SW+1)'(do_commit) - (SW+1)'(release_slot);
    end
  end

endmodule
