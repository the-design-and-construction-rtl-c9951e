// monitor_control: raster counters, blanking and synchronising pulses for a
// 625-line interlaced television, the MOVE STORE read strobe and the video
// bistable.
//
// One clock period is one line section (8 MHz for the 64 us line: the
// original ran an 8-bit counter from a 4 MHz clock and used the clock itself
// as the ninth bit). The beam address is {field, line[7:0], section[8:0]}.
//   Line: at the end of each line (section 511) the line blanking pulse
//     (LINE_BLANK clocks, 12 us) starts, and after LSYNC_DELAY (1.5 us) the
//     line sync pulse (LSYNC_WIDTH, 4.7 us).
//   Field: half-way through line 255 the field blanking pulse starts and the
//     field sync follows FSYNC_DELAY (1 ms) later for FSYNC_WIDTH (1.2 ms).
//     Field blanking lasts FBLANK_LINES line ends, during which the line
//     count (not the field bit) is held at zero. At the end of the first
//     field the line count rolls into the field bit and sections run on; at
//     the end of the second field the counters are reset half-way through
//     the line, so the next line sync comes one and a half lines after the
//     last and the two fields interlace.
//   CLK II: clk2_tick marks one clock in every four (2 MHz), the rate for
//     bulk shifting of the store.
//   Read: when register D equals the beam address (d_eq_beam), move_store
//     shifts the store once, unless INSERT or DELETE is active. The video
//     bistable is set to the background (reverse = black-on-white) during
//     field blanking; a match with the flag clear toggles it, a match with
//     the flag set inverts the video for that one section only.
//   video is forced to black during line and field blanking; comp_sync
//     combines the line and field sync pulses.
//
// Follows the document: the 9-bit section and 8-bit line counters with the
// field bit, the blanking and sync times, the field-blanking start point,
// the hold of the line count, the interlace reset, the video bistable and
// the MOVE STORE inhibit. Own choices: the monostables are counters of
// clocks; field blanking is counted as FBLANK_LINES = 57 line ends (the
// document says it covers the 312 - 255 unused lines, which is 3.65 ms,
// against its figure of 3.1 ms); the sync pulses are active high; the
// combined sync is line sync XOR field sync, which gives the inverted line
// pulses of the document's combined waveform; video black during blanking.
module monitor_control
  import vdu_pkg::*;
#(
  parameter int LINE_BLANK   = 96,    // 12 us at 8 MHz
  parameter int LSYNC_DELAY  = 12,    // 1.5 us
  parameter int LSYNC_WIDTH  = 38,    // 4.7 us
  parameter int FBLANK_LINES = 57,    // 312 - 255 lines
  parameter int FSYNC_DELAY  = 8000,  // 1 ms
  parameter int FSYNC_WIDTH  = 9600   // 1.2 ms
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  reverse,       // 1 = black image on white background
  input  logic  modifying,     // INSERT or DELETE active
  input  logic  d_eq_beam,     // equivalence from the comparators
  input  logic  d_flag,        // flag bit of register D
  output addr_t beam,
  output logic  clk2_tick,
  output logic  move_store,
  output logic  line_blank,
  output logic  field_blank,
  output logic  line_sync,
  output logic  field_sync,
  output logic  comp_sync,
  output logic  video
);

  localparam int LW = $clog2(LINE_BLANK + LSYNC_DELAY + LSYNC_WIDTH + 2);
  localparam int FW = $clog2(FSYNC_DELAY + FSYNC_WIDTH + 2);
  localparam int BW = $clog2(FBLANK_LINES + 1);
  localparam logic [LW-1:0] LMAX = '1;
  localparam logic [FW-1:0] FMAX = '1;

  logic [ILC_W-1:0]  sec;
  logic [LINE_W-1:0] line;
  logic              field;
  logic [LW-1:0]     since_eol;
  logic [FW-1:0]     since_fb;
  logic [BW-1:0]     fb_count;
  logic              state;
  logic              eol, fb_fire, match;

  assign beam      = {field, line, sec};
  assign eol       = (sec == '1);
  assign fb_fire   = !field_blank && (line == '1) && (sec == ILC_W'(255));
  assign clk2_tick = (sec[1:0] == 2'b11);
  assign match     = d_eq_beam;
  assign move_store = match && !modifying;

  assign line_blank = since_eol < LW'(LINE_BLANK);
  assign line_sync  = (since_eol >= LW'(LSYNC_DELAY)) &&
                      (since_eol <  LW'(LSYNC_DELAY + LSYNC_WIDTH));
  assign field_sync = (since_fb >= FW'(FSYNC_DELAY)) &&
                      (since_fb <  FW'(FSYNC_DELAY + FSYNC_WIDTH));
  assign comp_sync  = line_sync ^ field_sync;
  assign video      = (state ^ match) && !line_blank && !field_blank;

  always_ff @(posedge clk) begin
    if (rst) begin
      sec         <= '0;
      line        <= '0;
      field       <= 1'b0;
      since_eol   <= LMAX;
      since_fb    <= FMAX;
      fb_count    <= '0;
      field_blank <= 1'b0;
      state       <= 1'b0;
    end else begin
      // section / line / field counters
      sec <= sec + 1'b1;
      if (eol) begin
        {field, line} <= {field, line} + 1'b1;
        if (field_blank)
          line <= '0;
      end
      if (fb_fire && field) begin
        sec   <= '0;
        line  <= '0;
        field <= 1'b0;
      end

      // line blanking / sync monostables
      if (eol)
        since_eol <= '0;
      else if (since_eol != LMAX)
        since_eol <= since_eol + 1'b1;

      // field blanking, counted in line ends
      if (fb_fire) begin
        field_blank <= 1'b1;
        fb_count    <= '0;
      end else if (field_blank && eol) begin
        if (fb_count == BW'(FBLANK_LINES - 1))
          field_blank <= 1'b0;
        fb_count <= fb_count + 1'b1;
      end

      // field sync monostable
      if (fb_fire)
        since_fb <= '0;
      else if (since_fb != FMAX)
        since_fb <= since_fb + 1'b1;

      // video bistable
      if (field_blank)
        state <= reverse;
      else if (match && !d_flag)
        state <= !state;
    end
  end

endmodule
