// Pixel wrapping FSM of a TCSPC board.
//
// At every pixel boundary (trigger) the photon counts of the closed pixel,
// held by the acquisition pipelines in their count registers, are captured.
// The FSM then walks channels 0..NCH-1 in turn and writes exactly MAX_PH
// words per channel into the transmission FIFO: first the photons actually
// recorded, popped from the channel FIFO, then PAD_WORD (0xFFFF) for the
// missing ones. A pixel is therefore always NCH*MAX_PH = 128 words, and the
// detector of a word follows from its position.
// One word is written per cycle while the transmission FIFO has room.
// If a trigger arrives before the previous one has been taken up, the
// sticky overrun flag is set and that pixel's counts are replaced.
// The count-then-pad scheme and the 0xFFFF padding follow the document; the
// stall on a full FIFO and the overrun flag are this design's choices.
module board_pixel_wrap
  import tcspc_pkg::*;
#(
  parameter int unsigned NCHAN       = NCH,
  parameter int unsigned MAX_PHOTONS = MAX_PH,
  parameter int unsigned PH_BITS     = PH_W,
  localparam int unsigned CW         = $clog2(MAX_PHOTONS + 1),
  localparam int unsigned CHW        = (NCHAN > 1) ? $clog2(NCHAN) : 1,
  localparam int unsigned KW         = $clog2(MAX_PHOTONS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                trigger,
  input  logic [CW-1:0]       cnt      [NCHAN],
  input  logic [PH_BITS-1:0]  ch_rdata [NCHAN],
  output logic [NCHAN-1:0]    ch_pop,
  output logic                tx_push,
  output logic [LINK_W-1:0]   tx_wdata,
  input  logic                tx_full,
  output logic                busy,
  output logic                overrun
);

  typedef enum logic {S_IDLE, S_COPY} state_e;
  state_e state;

  logic          pending;
  logic [CW-1:0] work_cnt [NCHAN];
  logic [CHW-1:0] ch;
  logic [KW-1:0]  k;

  logic real_word;
  assign real_word = (CW'(k) < work_cnt[ch]);
  assign busy      = (state == S_COPY) || pending;

  always_comb begin
    tx_push  = 1'b0;
    tx_wdata = PAD_WORD;
    ch_pop   = '0;
    if (state == S_COPY && !tx_full) begin
      tx_push = 1'b1;
      if (real_word) begin
        tx_wdata   = LINK_W'(ch_rdata[ch]);
        ch_pop[ch] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pending <= 1'b0;
      overrun <= 1'b0;
      ch      <= '0;
      k       <= '0;
      for (int i = 0; i < NCHAN; i++) work_cnt[i] <= '0;
    end else begin
      if (trigger) begin
        pending <= 1'b1;
        if (pending) overrun <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (pending && !trigger) begin
            pending <= 1'b0;
            for (int i = 0; i < NCHAN; i++) work_cnt[i] <= cnt[i];
            ch    <= '0;
            k     <= '0;
            state <= S_COPY;
          end
        end
        S_COPY: begin
          if (!tx_full) begin
            k <= k + 1'b1;
            if (k == KW'(MAX_PHOTONS - 1)) begin
              if (ch == CHW'(NCHAN - 1)) state <= S_IDLE;
              else                       ch <= ch + 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
