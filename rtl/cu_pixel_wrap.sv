// Pixel wrapping FSM of the control unit.
//
// Waits until every board's buffer 2 holds a whole pixel. Then:
//   * if the FX3 FIFO has room for a whole pixel (USB_PIXEL_WORDS = 193
//     words), it writes a control word and then the photons of output
//     blocks 0..N_BOARDS-1, block j being taken from board BOARD_OF_BLOCK[j]
//     (board-level sorting). Each 16-bit lane word is cut to its 12-bit code
//     (padding 0xFFFF becomes 0xFFF) and the codes are packed into 32-bit
//     words, first code in the low bits; 16 codes of a detector fill six
//     words exactly. Two codes are taken per cycle.
//   * otherwise the pixel is dropped from all buffers in one cycle, so the
//     fixed pixel size the PC relies on is kept, and the next control word
//     reports the loss.
// Control word: [31:24] 0xA5, [17] a lane framing error was seen (sticky
// input), [16] one or more pixels were dropped since the last control word,
// [15:0] pixel number. The pixel number counts written and dropped pixels,
// wraps every 256x256 pixels, and is cleared by clear_pixnum.
// Timing: two codes per cycle, so a pixel takes 1 + 256 cycles to write,
// within the 400 cycles of a 4 us pixel at 100 MHz.
// Dropping, the control word and board-order sorting follow the document;
// the word layout and packing order are this design's choices.
module cu_pixel_wrap
  import tcspc_pkg::*;
#(
  parameter int unsigned MAX_PHOTONS    = MAX_PH,
  parameter boardmap_t   BOARD_OF_BLOCK = BOARD_IDENTITY,
  parameter int unsigned FIFO_AW        = 10,
  localparam int unsigned NB            = N_BOARDS,
  localparam int unsigned BLOCK_WORDS   = NCH * MAX_PHOTONS,
  localparam int unsigned PIXEL_WORDS   = 1 + NB * BLOCK_WORDS * PH_W / USB_W,
  localparam int unsigned IW            = $clog2(BLOCK_WORDS / 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  // buffer 2 FIFOs
  input  logic [LINK_W-1:0] b2_rdata [NB][2],
  input  logic [NB-1:0]     b2_avail,
  output logic [NB-1:0]     b2_pop,
  output logic [NB-1:0]     b2_drop,
  // FX3 FIFO
  output logic              f_push,
  output logic [USB_W-1:0]  f_wdata,
  input  logic [FIFO_AW:0]  f_free,
  // control / status
  input  logic              clear_pixnum,
  input  logic              frame_error,
  output logic [31:0]       pixels_written,
  output logic [31:0]       pixels_dropped
);

  typedef enum logic [1:0] {S_IDLE, S_CTRL, S_DATA} state_e;
  state_e state;

  logic [15:0]   pixnum;
  logic          lost;
  logic [1:0]    blk;
  logic [IW-1:0] idx;
  logic [63:0]   acc;
  logic [6:0]    nbits;

  logic [1:0]       src;
  logic [2*PH_W-1:0] codes;
  logic [63:0]      acc_in;
  logic [6:0]       nbits_in;
  assign src      = BOARD_OF_BLOCK[blk];
  assign codes    = {b2_rdata[src][1][PH_W-1:0], b2_rdata[src][0][PH_W-1:0]};
  assign acc_in   = acc | (64'(codes) << nbits);
  assign nbits_in = nbits + 7'(2 * PH_W);

  logic all_avail, room;
  assign all_avail = &b2_avail;
  assign room      = (f_free >= (FIFO_AW+1)'(PIXEL_WORDS));

  always_comb begin
    f_push  = 1'b0;
    f_wdata = '0;
    b2_pop  = '0;
    b2_drop = '0;
    unique case (state)
      S_IDLE: if (all_avail && !room) b2_drop = '1;
      S_CTRL: begin
        f_push  = 1'b1;
        f_wdata = {CTRL_MARKER, 6'd0, frame_error, lost, pixnum};
      end
      S_DATA: begin
        b2_pop[src] = 1'b1;
        if (nbits_in >= 7'd32) begin
          f_push  = 1'b1;
          f_wdata = acc_in[31:0];
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      pixnum         <= '0;
      lost           <= 1'b0;
      blk            <= '0;
      idx            <= '0;
      acc            <= '0;
      nbits          <= '0;
      pixels_written <= '0;
      pixels_dropped <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (all_avail) begin
          if (room) begin
            state <= S_CTRL;
          end else begin
            lost           <= 1'b1;
            pixnum         <= pixnum + 1'b1;
            pixels_dropped <= pixels_dropped + 1'b1;
          end
        end
        S_CTRL: begin
          lost  <= 1'b0;
          blk   <= '0;
          idx   <= '0;
          acc   <= '0;
          nbits <= '0;
          state <= S_DATA;
        end
        S_DATA: begin
          if (nbits_in >= 7'd32) begin
            acc   <= acc_in >> 32;
            nbits <= nbits_in - 7'd32;
          end else begin
            acc   <= acc_in;
            nbits <= nbits_in;
          end
          idx <= idx + 1'b1;
          if (idx == IW'(BLOCK_WORDS / 2 - 1)) begin
            blk <= blk + 1'b1;
            if (blk == 2'(NB - 1)) begin
              pixnum         <= pixnum + 1'b1;
              pixels_written <= pixels_written + 1'b1;
              state          <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
      if (clear_pixnum) pixnum <= '0;
    end
  end

endmodule
