// Channel sorting FSM of the control unit (one per board).
//
// The channels of a board are not wired to the detectors in order, so the
// 16-word channel blocks of each pixel must be re-ordered. As soon as
// buffer 1 holds a whole pixel (NCHAN*MAX_PH words) and buffer 2 has a free
// slot, the FSM pops the pixel word by word, one per cycle, and writes word
// k of channel c at offset CH_TO_DET[c]*MAX_PH + k of the buffer 2 slot,
// then commits the slot (one cycle after the last word).
// CH_TO_DET comes from the board's PCB routing, which the document does not
// give; it defaults to the identity. The block's role follows the document,
// the way of sorting is this design's choice.
module cu_channel_sort
  import tcspc_pkg::*;
#(
  parameter int unsigned MAX_PHOTONS = MAX_PH,
  parameter int unsigned B1_AW       = 8,
  parameter chmap_t      CH_TO_DET   = CH_IDENTITY,
  localparam int unsigned NCHAN      = NCH,
  localparam int unsigned PIXW       = NCHAN * MAX_PHOTONS,
  localparam int unsigned OW         = $clog2(PIXW),
  localparam int unsigned KW         = $clog2(MAX_PHOTONS),
  localparam int unsigned CHW        = $clog2(NCHAN)
) (
  input  logic              clk,
  input  logic              rst_n,
  // buffer 1 FIFO
  input  logic [LINK_W-1:0] b1_rdata,
  input  logic [B1_AW:0]    b1_count,
  output logic              b1_pop,
  // buffer 2 slot write
  output logic              b2_we,
  output logic [OW-1:0]     b2_off,
  output logic [LINK_W-1:0] b2_wdata,
  output logic              b2_commit,
  input  logic              b2_free,
  output logic [31:0]       pixels_sorted
);

  typedef enum logic [1:0] {S_IDLE, S_COPY, S_COMMIT} state_e;
  state_e state;

  logic [OW-1:0]  idx;
  logic [CHW-1:0] c;
  logic [KW-1:0]  k;
  assign c = idx[OW-1:KW];
  assign k = idx[KW-1:0];

  assign b1_pop    = (state == S_COPY);
  assign b2_we     = (state == S_COPY);
  assign b2_off    = {CH_TO_DET[c], k};
  assign b2_wdata  = b1_rdata;
  assign b2_commit = (state == S_COMMIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      idx           <= '0;
      pixels_sorted <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (b1_count >= (B1_AW+1)'(PIXW) && b2_free) begin
          idx   <= '0;
          state <= S_COPY;
        end
        S_COPY: begin
          idx <= idx + 1'b1;
          if (idx == OW'(PIXW - 1)) state <= S_COMMIT;
        end
        S_COMMIT: begin
          pixels_sorted <= pixels_sorted + 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
