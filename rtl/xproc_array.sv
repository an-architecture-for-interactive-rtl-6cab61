// xproc_array: the pixel generator for one colour, a one-dimensional
// systolic array of NUM_PIX X-processors (xproc_pe), processor k owning
// pixel address k.
//
// Scanline commands enter processor 0 on cmd_in, one per clock (OP_NOP when
// there is none), and move one processor per clock toward the far end,
// where they leave on cmd_out (for cascading a further array). Results of
// all commands on a pixel accumulate until a Refresh command passes. The
// Refresh also launches the pixel output token, and the scanline's pixels
// then leave the far end on pix_out one per clock in address order.
//
// Timing: if cmd_in carries a command in clock t, processor k acts on it in
// clock t+k. If cmd_in carries Refresh in clock t, pixel k appears on
// pix_out (valid=1, sol=1 for pixel 0) in clock t+NUM_PIX+1+k. A Refresh
// may follow the previous one after NUM_PIX clocks at the earliest, so the
// array accepts at most NUM_PIX commands per scanline including Refresh.
//
// NUM_PIX defaults to 4096, the span the 12-bit pixel address reaches and
// the designed maximum scanline length; one processor per pixel follows the
// architecture (each processor issues one pixel value per Refresh).
module xproc_array
  import dc_pkg::*;
#(
  parameter int unsigned NUM_PIX = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  xcmd_t cmd_in,
  output xcmd_t cmd_out,
  output xpix_t pix_out
);

  xcmd_t cmd_chain  [NUM_PIX+1];
  logic  tok_chain  [NUM_PIX+1];
  xpix_t lane_chain [NUM_PIX+1];

  assign cmd_chain[0]  = cmd_in;
  assign tok_chain[0]  = (cmd_in.op == OP_REFRESH);
  assign lane_chain[0] = '0;

  for (genvar k = 0; k < NUM_PIX; k++) begin : g_pe
    xproc_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .my_addr  (addr_t'(k)),
      .cmd_in   (cmd_chain[k]),
      .cmd_out  (cmd_chain[k+1]),
      .tok_in   (tok_chain[k]),
      .tok_out  (tok_chain[k+1]),
      .lane_in  (lane_chain[k]),
      .lane_out (lane_chain[k+1])
    );
  end

  assign cmd_out = cmd_chain[NUM_PIX];
  assign pix_out = lane_chain[NUM_PIX];

endmodule
