// Synchronization FSM of the control unit.
//
// Produces the scanning signals for the TCSPC boards from the microscope's
// frame_active and line_active (high while a frame / a line is scanned):
//   * at each rising edge of line_active inside an acquired frame, it waits
//     td cycles and then generates PIX_PER_LINE pixel-clock periods of
//     pix_period cycles each; pixel_clock is high in the first half of a
//     period (at least one cycle);
//   * enable_scan, the gate of the acquisition, is high from the first
//     pixel-clock pulse to the end of the last pixel period: a replica of
//     line_active delayed by td and aligned to the pixel clock.
// A frame is acquired when the acquisition is armed as frame_active rises;
// frame_start pulses then. A line that starts while the previous line's
// pixels are still being generated is ignored and sets line_error.
// Slave mode (master_mode = 0): frame_active_in / line_active_in come from
// the microscope and pass a two-flop synchroniser. Master mode: this block
// drives frame_active_out / line_active_out itself while armed: a frame
// is a gap of line_gap cycles, then LINES lines of PIX_PER_LINE*pix_period
// cycles each followed by line_gap cycles (frame_active low in the gap
// after the last line). pixel_clock and enable_scan are
// registered, one cycle after the internal state.
// The 256 pixel clocks per line, Td and enable_scan follow the document;
// Td is measured from the line_active rise, with enable_scan and the first
// pixel pulse starting together, as the document's timing diagram draws it
// (its text can also be read as a delay from enable_scan to the first
// pulse). Pulse width, arming per frame and the master-mode timing are
// this design's choices.
module scan_sync
  import tcspc_pkg::*;
#(
  parameter int unsigned PIX_PER_LINE_P = PIX_PER_LINE,
  parameter int unsigned LINES_P        = LINES
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        master_mode,
  input  logic        armed,
  input  logic [15:0] pix_period,
  input  logic [15:0] td,
  input  logic [15:0] line_gap,
  // microscope
  input  logic        frame_active_in,
  input  logic        line_active_in,
  output logic        frame_active_out,
  output logic        line_active_out,
  // to the TCSPC boards
  output logic        pixel_clock,
  output logic        enable_scan,
  // status
  output logic        frame_start,
  output logic        line_error,
  output logic [31:0] lines_acquired
);

  localparam int unsigned PW = $clog2(PIX_PER_LINE_P + 1);
  localparam int unsigned LW = $clog2(LINES_P + 1);

  // --------------------------------------------------- master-mode scan
  typedef enum logic [1:0] {G_IDLE, G_LINE, G_GAP, G_FGAP} gen_e;
  gen_e          gst;
  logic [15:0]   gcnt;
  logic [PW-1:0] gpix;
  logic [LW-1:0] gline;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gst   <= G_IDLE;
      gcnt  <= '0;
      gpix  <= '0;
      gline <= '0;
    end else begin
      unique case (gst)
        G_IDLE: if (master_mode && armed) begin
          gst   <= G_GAP;
          gcnt  <= '0;
          gpix  <= '0;
          gline <= '0;
        end
        G_LINE: begin
          if (gcnt == pix_period - 1'b1) begin
            gcnt <= '0;
            gpix <= gpix + 1'b1;
            if (gpix == PW'(PIX_PER_LINE_P - 1)) begin
              gpix  <= '0;
              gline <= gline + 1'b1;
              gst   <= (gline == LW'(LINES_P - 1)) ? G_FGAP : G_GAP;
            end
          end else begin
            gcnt <= gcnt + 1'b1;
          end
        end
        G_GAP, G_FGAP: begin
          if (gcnt >= line_gap - 1'b1) begin
            gcnt <= '0;
            gst  <= (gst == G_GAP) ? G_LINE : G_IDLE;
          end else begin
            gcnt <= gcnt + 1'b1;
          end
        end
        default: gst <= G_IDLE;
      endcase
    end
  end

  assign line_active_out  = (gst == G_LINE);
  assign frame_active_out = (gst == G_LINE) || (gst == G_GAP);

  // --------------------------------------------------- input selection
  logic [1:0] fa_sync, la_sync;
  logic       fa, la, fa_d, la_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa_sync <= '0;
      la_sync <= '0;
      fa_d    <= 1'b0;
      la_d    <= 1'b0;
    end else begin
      fa_sync <= {fa_sync[0], frame_active_in};
      la_sync <= {la_sync[0], line_active_in};
      fa_d    <= fa;
      la_d    <= la;
    end
  end

  assign fa = master_mode ? frame_active_out : fa_sync[1];
  assign la = master_mode ? line_active_out  : la_sync[1];

  // --------------------------------------------------- pixel clock
  typedef enum logic [1:0] {P_IDLE, P_DELAY, P_PIX} pix_e;
  pix_e          pst;
  logic          acq_on;
  logic [15:0]   pcnt;
  logic [PW-1:0] pidx;
  logic [15:0]   half;
  logic          line_rise;

  assign half      = (pix_period >> 1) == '0 ? 16'd1 : (pix_period >> 1);
  logic acq_now;   // acquisition state including a frame starting this cycle
  assign acq_now   = (fa && !fa_d) ? armed : acq_on;
  assign line_rise = la && !la_d && fa && acq_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst            <= P_IDLE;
      acq_on         <= 1'b0;
      pcnt           <= '0;
      pidx           <= '0;
      frame_start    <= 1'b0;
      line_error     <= 1'b0;
      lines_acquired <= '0;
      pixel_clock    <= 1'b0;
      enable_scan    <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (fa && !fa_d) begin
        acq_on      <= armed;
        frame_start <= armed;
      end else if (!fa && fa_d) begin
        acq_on <= 1'b0;
      end

      unique case (pst)
        P_IDLE: if (line_rise) begin
          pcnt <= td;
          pidx <= '0;
          pst  <= (td == '0) ? P_PIX : P_DELAY;
          if (td == '0) pcnt <= '0;
        end
        P_DELAY: begin
          if (line_rise) line_error <= 1'b1;
          if (pcnt <= 16'd1) begin
            pcnt <= '0;
            pst  <= P_PIX;
          end else begin
            pcnt <= pcnt - 1'b1;
          end
        end
        P_PIX: begin
          if (line_rise) line_error <= 1'b1;
          if (pcnt == pix_period - 1'b1) begin
            pcnt <= '0;
            pidx <= pidx + 1'b1;
            if (pidx == PW'(PIX_PER_LINE_P - 1)) begin
              pst            <= P_IDLE;
              lines_acquired <= lines_acquired + 1'b1;
            end
          end else begin
            pcnt <= pcnt + 1'b1;
          end
        end
        default: pst <= P_IDLE;
      endcase

      pixel_clock <= (pst == P_PIX) && (pcnt < half);
      enable_scan <= (pst == P_PIX);
    end
  end

endmodule
