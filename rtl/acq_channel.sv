// Acquisition pipeline of one TCSPC channel, with its channel FIFO and the
// 16-photon limit.
//
// Steps, as on the board block diagram: sample ADC, reset TAC, compensate
// dithering, choose bin size, save to FIFO.
//   * A rising edge of tac_strobe (already synchronised to clk) means the TAC
//     has a conversion; adc_data is sampled in that cycle and tac_reset is
//     pulsed for RESET_CYCLES cycles.
//   * Sliding-scale dithering: dither_code goes to a DAC that adds an offset
//     to the TAC output. The code in force at the STROBE is subtracted from
//     the ADC code (saturating at 0) and the code then steps by one.
//   * Bin size: bin_sel keeps ADC bits 11:0 (1x), 12:1 (2x) or 13:2 (4x).
//     A result of all ones is reserved for padding and becomes 0xFFE.
//   * Save: the 12-bit code is pushed into the channel FIFO if recording is
//     allowed (run was high at the STROBE) and the current pixel holds fewer
//     than MAX_PH photons. Extra photons are dropped.
// pix_close ends the current pixel: the number of photons it holds is
// latched into cnt_reg (valid from the next cycle) and the counter restarts.
// A photon is counted in the pixel in which it reaches the FIFO, three
// cycles after its STROBE.
// The step order and the 16-photon limit follow the document; the dither
// scheme, encodings and latencies are this design's own choices.
module acq_channel
  import tcspc_pkg::*;
#(
  parameter int unsigned ADC_BITS     = ADC_W,
  parameter int unsigned PH_BITS      = PH_W,
  parameter int unsigned MAX_PHOTONS  = MAX_PH,
  parameter int unsigned DITHER_BITS  = DITHER_W,
  parameter int unsigned RESET_CYCLES = 4,
  parameter int unsigned FIFO_DEPTH   = 32,
  localparam int unsigned CW          = $clog2(MAX_PHOTONS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // TAC / ADC side
  input  logic                   tac_strobe,
  input  logic [ADC_BITS-1:0]    adc_data,
  output logic                   tac_reset,
  output logic [DITHER_BITS-1:0] dither_code,
  // control
  input  logic                   run,
  input  logic                   pix_close,
  input  bin_sel_e               bin_sel,
  // pixel handling side
  output logic [CW-1:0]          cnt_reg,
  output logic [PH_BITS-1:0]     ph_rdata,
  output logic                   ph_empty,
  input  logic                   ph_pop,
  output logic                   ph_overflow
);

  // ---------------------------------------------------------------- stage 0
  logic strobe_d;
  logic strobe_rise;
  assign strobe_rise = tac_strobe && !strobe_d;

  logic [$clog2(RESET_CYCLES+1)-1:0] rst_cnt;

  logic                   s1_valid, s1_run;
  logic [ADC_BITS-1:0]    s1_adc;
  logic [DITHER_BITS-1:0] s1_dither;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_d    <= 1'b0;
      rst_cnt     <= '0;
      tac_reset   <= 1'b0;
      dither_code <= '0;
      s1_valid    <= 1'b0;
      s1_run      <= 1'b0;
      s1_adc      <= '0;
      s1_dither   <= '0;
    end else begin
      strobe_d <= tac_strobe;
      s1_valid <= strobe_rise;
      if (strobe_rise) begin
        s1_adc      <= adc_data;
        s1_dither   <= dither_code;
        s1_run      <= run;
        dither_code <= dither_code + 1'b1;
        rst_cnt     <= ($clog2(RESET_CYCLES+1))'(RESET_CYCLES);
        tac_reset   <= 1'b1;
      end else if (rst_cnt > 1) begin
        rst_cnt <= rst_cnt - 1'b1;
      end else begin
        rst_cnt   <= '0;
        tac_reset <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- stage 1
  logic                s2_valid, s2_run;
  logic [ADC_BITS-1:0] s2_comp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_run   <= 1'b0;
      s2_comp  <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_run   <= s1_run;
      if (s1_adc >= ADC_BITS'(s1_dither)) s2_comp <= s1_adc - ADC_BITS'(s1_dither);
      else                                s2_comp <= '0;
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic               s3_valid, s3_run;
  logic [PH_BITS-1:0] s3_code;
  logic [PH_BITS-1:0] binned;

  always_comb begin
    unique case (bin_sel)
      BIN_X1:  binned = s2_comp[PH_BITS-1:0];
      BIN_X2:  binned = s2_comp[PH_BITS:1];
      default: binned = s2_comp[PH_BITS+1:2];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0;
      s3_run   <= 1'b0;
      s3_code  <= '0;
    end else begin
      s3_valid <= s2_valid;
      s3_run   <= s2_run;
      s3_code  <= (binned == '1) ? (binned - 1'b1) : binned;
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [CW-1:0] ph_cnt;
  logic          accept;
  logic          fifo_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  assign accept = s3_valid && s3_run && (ph_cnt < CW'(MAX_PHOTONS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_cnt      <= '0;
      cnt_reg     <= '0;
      ph_overflow <= 1'b0;
    end else begin
      if (pix_close) begin
        cnt_reg <= ph_cnt;
        ph_cnt  <= CW'(accept);
      end else if (accept) begin
        ph_cnt <= ph_cnt + 1'b1;
      end
      if (accept && fifo_full) ph_overflow <= 1'b1;
    end
  end

  sync_fifo #(.W(PH_BITS), .DEPTH(FIFO_DEPTH)) u_channel_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (accept),
    .wdata (s3_code),
    .pop   (ph_pop),
    .rdata (ph_rdata),
    .full  (fifo_full),
    .empty (ph_empty),
    .count (fifo_count)
  );

endmodule
