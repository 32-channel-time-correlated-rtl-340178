// Shared constants and types of the 32-channel TCSPC firmware.
//
// The system has four TCSPC boards of eight channels each (32 detectors).
// Every detector delivers exactly MAX_PH = 16 events per pixel; missing
// events are padded. On the board-to-control-unit lanes an event is one
// 16-bit word: a 12-bit time code zero-extended, or PAD_WORD (0xFFFF) for
// padding. Towards the PC the events are packed as 12-bit codes, so one
// detector's 16 events fill six 32-bit words exactly.
//
// Commands from the PC are 32-bit words: opcode in bits 31:24, argument in
// bits 23:0. The command set and its encoding are this design's own choice.
package tcspc_pkg;

  localparam int unsigned N_BOARDS     = 4;
  localparam int unsigned NCH          = 8;    // channels per board
  localparam int unsigned N_DET        = N_BOARDS * NCH;
  localparam int unsigned MAX_PH       = 16;   // events per detector per pixel
  localparam int unsigned ADC_W        = 14;
  localparam int unsigned PH_W         = 12;   // downloaded time code width
  localparam int unsigned LINK_W       = 16;   // lane user word
  localparam int unsigned USB_W        = 32;   // FX3 slave FIFO width
  localparam int unsigned PIX_PER_LINE = 256;
  localparam int unsigned LINES        = 256;
  localparam int unsigned DITHER_W     = 8;

  localparam int unsigned BOARD_PIXEL_WORDS = NCH * MAX_PH;                 // 128
  localparam int unsigned PACKED_DET_WORDS  = MAX_PH * PH_W / USB_W;        // 6
  localparam int unsigned USB_PIXEL_WORDS   = 1 + N_DET * PACKED_DET_WORDS; // 193

  localparam logic [LINK_W-1:0] PAD_WORD     = '1;
  localparam logic [PH_W-1:0]   MAX_REAL_PH  = {{(PH_W-1){1'b1}}, 1'b0};    // 0xFFE
  localparam logic [7:0]        CTRL_MARKER  = 8'hA5;

  // Bin-size selection: which 12 of the 14 ADC bits are kept.
  typedef enum logic [1:0] {
    BIN_X1 = 2'd0,   // bits 11:0
    BIN_X2 = 2'd1,   // bits 12:1
    BIN_X4 = 2'd2    // bits 13:2
  } bin_sel_e;

  typedef enum logic [7:0] {
    OP_NOP        = 8'h00,
    OP_START      = 8'h01,  // arm acquisition (boards and CU)
    OP_STOP       = 8'h02,  // disarm acquisition
    OP_BIN        = 8'h03,  // arg[1:0] = bin_sel_e, forwarded to the boards
    OP_PIX_PERIOD = 8'h04,  // arg[15:0] = pixel period in clock cycles
    OP_TD         = 8'h05,  // arg[15:0] = delay Td in clock cycles
    OP_SYNC_MODE  = 8'h06,  // arg[0] = 1: the CU drives the scan (master)
    OP_LINE_GAP   = 8'h07   // arg[15:0] = carriage-return gap in master mode
  } opcode_e;

  // Which physical channel of a board feeds which detector position.
  typedef logic [2:0] chidx_t;
  typedef chidx_t [NCH-1:0] chmap_t;          // [c] = detector position of channel c
  typedef logic [1:0] bidx_t;
  typedef bidx_t [N_BOARDS-1:0] boardmap_t;   // [j] = board read for output block j

  localparam chmap_t    CH_IDENTITY    = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0};
  localparam boardmap_t BOARD_IDENTITY = {2'd3, 2'd2, 2'd1, 2'd0};

endpackage
