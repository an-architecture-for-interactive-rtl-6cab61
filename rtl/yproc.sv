// yproc: one shading processor (Y-processor).
//
// Once per scanline the Y-processor turns the 2-D objects of its part of
// the structured object list into 1-D scanline commands for the pixel
// generator. On line_start it visits its DEPTH objects in order, one per
// clock. An object is active on scanline y when its op is not OP_NOP and
// ytop <= y <= ybot. For an active object whose left and right edges cover
// at least one pixel it requests the command bus with one command per
// colour: the object's op, x = first covered pixel, dx = last covered pixel
// minus x (the X-processors treat x..x+dx as inclusive), and the colour
// function's running value and forward differences at the left edge. When
// the request is granted (gnt) it moves on; while it is not, it stalls.
// After use an active object is stepped to the next scanline: the edges
// advance by their slopes and every colour coefficient by its per-line
// increment, all by addition. The stepped copies are kept in a working
// memory; on scanline 0 the processor starts again from the list itself,
// so a frame always starts from the list's current contents.
//
// Edges are signed fixed point with EDGE_FRAC fraction bits. The pixels
// covered on a scanline are floor(xl) .. floor(xr)-1, clamped to the
// screen. If a new line_start arrives before all objects are visited the
// processor pulses overrun and starts the new scanline; the objects it did
// not reach are not stepped for the missed scanline.
//
// Turning objects into per-scanline commands, one bus shared by all
// Y-processors and one Y-processor per part of the list follow the
// architecture. The architecture does Phong shading by angular
// interpolation with a piecewise quadratic approximation of cos^n; that
// approximation is not given in enough detail to build, so here the
// per-scanline quadratic coefficients are stepped linearly from values
// prepared in the object record. The record format, the stepping, the
// clamping and the overrun handling are choices of this design.
module yproc
  import dc_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned NUM_PIX = 4096
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           line_start,
  input  line_t                          y,
  // read port into this processor's part of the object list
  output logic [$clog2(DEPTH)-1:0]     rd_idx,
  input  obj_t                           rd_obj,
  // command bus request
  output logic                           req,
  output xcmd_bundle_t                   cmd,
  input  logic                           gnt,
  output logic                           busy,
  output logic                           overrun
);

  localparam int unsigned IW = $clog2(DEPTH);

  obj_t          work [DEPTH];
  logic [IW-1:0] k;
  line_t         cur_y;
  logic          scanning;

  obj_t  cur, nxt;
  logic  active, nonempty;
  localparam int unsigned PW = EDGE_W - EDGE_FRAC + 1;  // pixel position width
  typedef logic signed [PW-1:0] px_t;
  px_t first_px, end_px;
  logic [EDGE_W-1:0] xl_u, xr_u;

  assign rd_idx = k;

  always_comb begin
    cur    = (cur_y == '0) ? rd_obj : work[k];
    active = scanning && (cur.op != OP_NOP) && (cur.ytop <= cur_y) && (cur_y <= cur.ybot);

    // floor() of the edges, clamped to the screen
    xl_u     = cur.xl;
    xr_u     = cur.xr;
    first_px = px_t'($signed(xl_u[EDGE_W-1:EDGE_FRAC]));
    end_px   = px_t'($signed(xr_u[EDGE_W-1:EDGE_FRAC]));
    if (first_px < 0) first_px = '0;
    if (end_px > px_t'(NUM_PIX)) end_px = px_t'(NUM_PIX);
    nonempty = end_px > first_px;

    for (int c = 0; c < NCOL; c++) begin
      cmd[c].op  = cur.op;
      cmd[c].x   = addr_t'(first_px);
      cmd[c].dx  = addr_t'(end_px - first_px - px_t'(1));
      cmd[c].i   = cur.shade[c].i;
      cmd[c].di  = cur.shade[c].di;
      cmd[c].ddi = cur.shade[c].ddi;
    end

    nxt     = cur;
    nxt.xl  = cur.xl + cur.dxl;
    nxt.xr  = cur.xr + cur.dxr;
    for (int c = 0; c < NCOL; c++) begin
      nxt.shade[c].i   = cur.shade[c].i   + cur.dshade[c].i;
      nxt.shade[c].di  = cur.shade[c].di  + cur.dshade[c].di;
      nxt.shade[c].ddi = cur.shade[c].ddi + cur.dshade[c].ddi;
    end

    req = active && nonempty && !line_start;
  end

  // the object at k is finished this clock
  logic done_obj;
  assign done_obj = scanning && !line_start && (!active || !nonempty || gnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k        <= '0;
      cur_y    <= '0;
      scanning <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (line_start) begin
        overrun  <= scanning;
        scanning <= 1'b1;
        k        <= '0;
        cur_y    <= y;
      end else if (done_obj) begin
        if (k == IW'(DEPTH - 1)) scanning <= 1'b0;
        else                     k <= k + 1'b1;
      end
    end
  end

  // working copies of the objects (written only, never reset: scanline 0
  // rebuilds them from the list)
  always_ff @(posedge clk) begin
    if (done_obj) work[k] <= active ? nxt : cur;
  end

  assign busy = scanning;

  a_hold_req: assert property (@(posedge clk) disable iff (!rst_n)
                               (req && !gnt && !$past(line_start)) |=> (req || line_start || $past(line_start)));

endmodule
