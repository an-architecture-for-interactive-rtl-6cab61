// dc_pkg: types and constants shared by the frame-buffer-less display
// controller (X-processor pixel generator, Y-processor shading processors,
// scanline command bus, structured object list).
//
// Numbers that follow the architecture: 12-bit pixel addresses, 36-bit
// fixed-point intensities, 12-bit pixel values, one pixel generator array
// per colour, and the instruction set of the X-processor (Nop, Set*, SetP*,
// Eval0..Eval3, Dis, Acc_mode, Refresh).
// Choices of this design: the opcode encoding, the position of the binary
// point in the intensity (23 fraction bits, so the integer part spans
// -4096..4095 and a clamped pixel value covers 0..4095), a command that is
// one wide word carrying all of its operands, and the object record format.
package dc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ADDR_W    = 12;  // pixel address width
  localparam int unsigned INT_W     = 36;  // intensity word width
  localparam int unsigned FRAC_W    = 23;  // fraction bits of an intensity
  localparam int unsigned PIX_W     = 12;  // output pixel value width
  localparam int unsigned NCOL      = 3;   // colours, one array each
  localparam int unsigned LINE_W    = 12;  // scanline number width
  localparam int unsigned EDGE_W    = 28;  // object edge position width
  localparam int unsigned EDGE_FRAC = 12;  // fraction bits of an edge

  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic signed [INT_W-1:0]  inten_t;
  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic [LINE_W-1:0]        line_t;
  typedef logic signed [EDGE_W-1:0] edge_t;

  // ----------------------------------------------------- instruction set
  typedef enum logic [3:0] {
    OP_NOP     = 4'h0,
    OP_SETI    = 4'h1,
    OP_SETDI   = 4'h2,
    OP_SETDDI  = 4'h3,
    OP_SETPI   = 4'h4,
    OP_SETPDI  = 4'h5,
    OP_SETPDDI = 4'h6,
    OP_EVAL0   = 4'h7,
    OP_EVAL1   = 4'h8,
    OP_EVAL2   = 4'h9,
    OP_EVAL3   = 4'hA,
    OP_DIS     = 4'hB,
    OP_ACCMODE = 4'hC,
    OP_REFRESH = 4'hD
  } xop_e;

  // One scanline command as it travels through an X-processor array.
  // i/di/ddi are the running intensity and its first and second forward
  // differences; Set commands carry their value in the field they set;
  // Acc_mode carries its enable flag in i[0].
  typedef struct packed {
    xop_e   op;
    addr_t  x;
    addr_t  dx;
    inten_t i;
    inten_t di;
    inten_t ddi;
  } xcmd_t;

  // Pixel leaving the array: valid, start-of-line marker, value.
  typedef struct packed {
    logic valid;
    logic sol;
    pix_t value;
  } xpix_t;

  // Quadratic colour function along a scanline and its per-line step.
  typedef struct packed {
    inten_t i;
    inten_t di;
    inten_t ddi;
  } shade_t;

  // One entry of the structured list of visible objects: a trapezoid
  // between scanlines ytop and ybot whose left and right edges step by
  // dxl/dxr per scanline, with per colour a quadratic colour function
  // (value at the left edge) and its per-scanline increments.
  typedef struct packed {
    xop_e               op;      // command issued per scanline, OP_NOP = empty
    line_t              ytop;
    line_t              ybot;
    edge_t              xl;
    edge_t              xr;
    edge_t              dxl;
    edge_t              dxr;
    shade_t [NCOL-1:0]  shade;
    shade_t [NCOL-1:0]  dshade;
  } obj_t;

  typedef xcmd_t [NCOL-1:0] xcmd_bundle_t;

  localparam xcmd_t XCMD_NOP = '{op: OP_NOP, x: '0, dx: '0, i: '0, di: '0, ddi: '0};

  // Clamp a fixed-point intensity to an unsigned pixel value.
  function automatic pix_t to_pixel(inten_t v);
    inten_t ip;
    ip = v >>> FRAC_W;
    if (ip < 0) return '0;
    if (ip > inten_t'((1 << PIX_W) - 1)) return '1;
    return pix_t'(ip);
  endfunction

endpackage
