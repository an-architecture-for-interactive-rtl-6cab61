// line_sequencer: scanline and frame timing of the display controller.
//
// The pixel generator is refreshed at fixed time intervals. This block
// divides time into scanline periods of LINE_CYCLES clocks and frames of
// NUM_LINES scanlines. In the first clock of a period it pulses line_start
// with the scanline number on y (frame_start as well for scanline 0), which
// starts the Y-processors on that scanline. The last clock of the period is
// the Refresh slot (refresh_slot=1): the scanline command bus then sends
// Refresh to the X-processor arrays instead of a Y-processor command, so
// LINE_CYCLES-1 command slots remain per scanline. The counters run while
// run is high and hold while it is low; reset starts at scanline 0.
//
// LINE_CYCLES defaults to the 4096-pixel scanline, because the array can
// take as many commands per scanline as the scanline has pixels. NUM_LINES
// (1024) is a choice of this design, the architecture gives no vertical
// resolution.
module line_sequencer
  import dc_pkg::*;
#(
  parameter int unsigned LINE_CYCLES = 4096,
  parameter int unsigned NUM_LINES   = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  output logic  line_start,
  output logic  frame_start,
  output line_t y,
  output logic  refresh_slot
);

  localparam int unsigned CW = $clog2(LINE_CYCLES);

  logic [CW-1:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= '0;
      y   <= '0;
    end else if (run) begin
      if (cyc == CW'(LINE_CYCLES - 1)) begin
        cyc <= '0;
        y   <= (y == line_t'(NUM_LINES - 1)) ? '0 : y + 1'b1;
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end

  assign line_start   = run && (cyc == '0);
  assign frame_start  = line_start && (y == '0);
  assign refresh_slot = run && (cyc == CW'(LINE_CYCLES - 1));

endmodule
