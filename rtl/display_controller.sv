// display_controller: a raster display controller without a frame buffer.
//
// The screen is described by a structured list of visible, non-overlapping
// objects (object_list) instead of pixels. Every scanline, NUM_YPROC
// shading processors (yproc) each walk their part of the list and turn the
// objects that cross the scanline into span commands; the scanline command
// bus (scan_cmd_bus) merges them into one command stream per colour and,
// at the end of each scanline period set by line_sequencer, adds Refresh.
// Per colour a systolic pixel generator (xproc_array, one X-processor per
// pixel) executes the commands and, after each Refresh, streams out the
// scanline's 12-bit pixel values one per clock, ready for a video DAC.
//
// Interface: the object list is written through wr_* (by hidden surface
// removal or a host; a write may happen at any time and a frame starts
// from the list's contents at scanline 0). run starts the scanline timing.
// pix_out[c] is colour c's pixel stream. y/line_start/frame_start show the
// scanline being converted; overrun[k] pulses when Y-processor k had not
// finished its objects when the next scanline began.
//
// Timing: commands for scanline y are issued during its LINE_CYCLES-clock
// period; the Refresh closing that period is in the period's last clock t,
// and pixel p of scanline y leaves on pix_out in clock t+2+NUM_PIX+p (one
// clock in the bus register, NUM_PIX+1+p in the array).
//
// The division into Y-processors, command stream, and one X-processor
// array per colour follows the architecture, as do the 4096-pixel
// scanline, the 36-bit intensities and the 12-bit pixels. The number of
// Y-processors and list entries, the number of scanlines and the host
// write port are choices of this design.
module display_controller
  import dc_pkg::*;
#(
  parameter int unsigned NUM_PIX     = 4096,
  parameter int unsigned NUM_LINES   = 1024,
  parameter int unsigned LINE_CYCLES = NUM_PIX,
  parameter int unsigned NUM_YPROC   = 4,
  parameter int unsigned OBJ_DEPTH   = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  logic                          wr_en,
  input  logic [$clog2(NUM_YPROC)-1:0]  wr_bank,
  input  logic [$clog2(OBJ_DEPTH)-1:0]  wr_idx,
  input  obj_t                          wr_obj,
  output xpix_t                         pix_out [NCOL],
  output line_t                         y,
  output logic                          line_start,
  output logic                          frame_start,
  output logic  [NUM_YPROC-1:0]         overrun
);

  logic refresh_slot;

  line_sequencer #(
    .LINE_CYCLES (LINE_CYCLES),
    .NUM_LINES   (NUM_LINES)
  ) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .run          (run),
    .line_start   (line_start),
    .frame_start  (frame_start),
    .y            (y),
    .refresh_slot (refresh_slot)
  );

  logic [$clog2(OBJ_DEPTH)-1:0] rd_idx [NUM_YPROC];
  obj_t                         rd_obj [NUM_YPROC];

  object_list #(
    .NUM_BANKS (NUM_YPROC),
    .DEPTH     (OBJ_DEPTH)
  ) u_list (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_en),
    .wr_bank (wr_bank),
    .wr_idx  (wr_idx),
    .wr_obj  (wr_obj),
    .rd_idx  (rd_idx),
    .rd_obj  (rd_obj)
  );

  logic         [NUM_YPROC-1:0] req, gnt, busy;
  xcmd_bundle_t                 ycmd [NUM_YPROC];

  for (genvar k = 0; k < NUM_YPROC; k++) begin : g_yproc
    yproc #(
      .DEPTH   (OBJ_DEPTH),
      .NUM_PIX (NUM_PIX)
    ) u_yproc (
      .clk        (clk),
      .rst_n      (rst_n),
      .line_start (line_start),
      .y          (y),
      .rd_idx     (rd_idx[k]),
      .rd_obj     (rd_obj[k]),
      .req        (req[k]),
      .cmd        (ycmd[k]),
      .gnt        (gnt[k]),
      .busy       (busy[k]),
      .overrun    (overrun[k])
    );
  end

  xcmd_bundle_t xcmd;

  scan_cmd_bus #(
    .NUM_YPROC (NUM_YPROC)
  ) u_bus (
    .clk          (clk),
    .rst_n        (rst_n),
    .refresh_slot (refresh_slot),
    .req          (req),
    .cmd          (ycmd),
    .gnt          (gnt),
    .cmd_out      (xcmd)
  );

  for (genvar c = 0; c < NCOL; c++) begin : g_colour
    xcmd_t unused_cmd;
    xproc_array #(
      .NUM_PIX (NUM_PIX)
    ) u_array (
      .clk     (clk),
      .rst_n   (rst_n),
      .cmd_in  (xcmd[c]),
      .cmd_out (unused_cmd),
      .pix_out (pix_out[c])
    );
  end

endmodule
