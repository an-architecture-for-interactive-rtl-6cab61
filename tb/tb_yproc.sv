// tb_yproc: self-checking test of one shading processor with 4 objects on
// a 64-pixel scanline.
//
// Random trapezoids (random first/last scanline, fractional edges and
// slopes, quadratic colour functions with per-scanline increments, any
// Eval opcode, sometimes an empty slot) are served from a test-side list.
// For every scanline the expected commands are computed directly from the
// scanline number (edge = start + lines*slope, coefficient = start +
// lines*increment), independent of the processor's stepping, and compared
// in order with the commands the processor hands over on req&gnt. The bus
// grant is withheld at random to make the processor stall. Also checked:
// one object per clock (busy ends DEPTH+1 clocks plus the stalled clocks
// after line_start), a second frame that restarts from changed list
// contents, and the overrun pulse when a scanline starts too early.
module tb_yproc;
  import dc_pkg::*;

  localparam int unsigned D = 4, NP = 64;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  line_start = 1'b0, gnt, req, busy, overrun;
  line_t y = '0;
  logic [$clog2(D)-1:0] rd_idx;
  obj_t  rd_obj;
  xcmd_bundle_t cmd;

  obj_t list [D];
  assign rd_obj = list[rd_idx];

  yproc #(.DEPTH(D), .NUM_PIX(NP)) dut (
    .clk(clk), .rst_n(rst_n), .line_start(line_start), .y(y), .rd_idx(rd_idx),
    .rd_obj(rd_obj), .req(req), .cmd(cmd), .gnt(gnt), .busy(busy), .overrun(overrun)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, stalls = 0, emitted = 0, overruns = 0;
  logic gnt_en = 1'b0;
  assign gnt = req && gnt_en;

  xcmd_bundle_t exp_q [$];

  // clean EDGE_W-bit edge value from a signed integer
  function automatic edge_t mk_edge(int v);
    logic [EDGE_W-1:0] u;
    u = v[EDGE_W-1:0];
    return u;
  endfunction

  // signed edge field of an object record, taken from the record's bits
  localparam int EDGE_LSB_DXR = 2 * NCOL * $bits(shade_t);
  function automatic longint edge_fld(obj_t o, int lsb);
    logic [$bits(obj_t)-1:0] raw;
    logic [EDGE_W-1:0]       u;
    longint                  r;
    raw = o;
    u   = raw[lsb +: EDGE_W];
    r   = longint'(u);
    if (u[EDGE_W-1]) r = r - (longint'(1) << EDGE_W);
    return r;
  endfunction

  function automatic inten_t rv(int bits);
    longint v = longint'({$urandom, $urandom}) & ((64'd1 << bits) - 1);
    if ($urandom_range(0, 1)) v = -v;
    return inten_t'(v);
  endfunction

  function automatic obj_t rnd_obj();
    obj_t o;
    int yt = $urandom_range(0, 6);
    o.op   = ($urandom_range(0, 5) == 0) ? OP_NOP : xop_e'($urandom_range(int'(OP_EVAL0), int'(OP_EVAL3)));
    o.ytop = line_t'(yt);
    o.ybot = line_t'(yt + $urandom_range(0, 6));
    o.xl   = mk_edge(int'($urandom_range(0, 50 << EDGE_FRAC)) - (4 << EDGE_FRAC));
    o.xr   = mk_edge(int'(o.xl) + int'($urandom_range(0, 30 << EDGE_FRAC)));
    o.dxl  = mk_edge(int'($urandom_range(0, 4 << EDGE_FRAC)) - (2 << EDGE_FRAC));
    o.dxr  = mk_edge(int'($urandom_range(0, 4 << EDGE_FRAC)) - (2 << EDGE_FRAC));
    for (int c = 0; c < NCOL; c++) begin
      o.shade[c]  = '{i: rv(32), di: rv(28), ddi: rv(24)};
      o.dshade[c] = '{i: rv(28), di: rv(24), ddi: rv(20)};
    end
    return o;
  endfunction

  function automatic void expect_line(int yy);
    obj_t o;
    int n;
    longint xl;
    longint xr;
    longint f;
    longint e;
    for (int k = 0; k < D; k++) begin
      o = list[k];
      if (o.op != OP_NOP && yy >= int'(o.ytop) && yy <= int'(o.ybot)) begin
        n = yy - int'(o.ytop);
        xl = edge_fld(o, EDGE_LSB_DXR + 3 * EDGE_W) + longint'(n) * edge_fld(o, EDGE_LSB_DXR + EDGE_W);
        xr = edge_fld(o, EDGE_LSB_DXR + 2 * EDGE_W) + longint'(n) * edge_fld(o, EDGE_LSB_DXR);
        f = xl >>> EDGE_FRAC;
        e = xr >>> EDGE_FRAC;
        if (f < 0) f = 0;
        if (e > longint'(NP)) e = longint'(NP);
        if (e > f) begin
          xcmd_bundle_t b;
          for (int c = 0; c < NCOL; c++) begin
            b[c].op  = o.op;
            b[c].x   = addr_t'(f);
            b[c].dx  = addr_t'(e - f - 1);
            b[c].i   = o.shade[c].i   + inten_t'(n) * o.dshade[c].i;
            b[c].di  = o.shade[c].di  + inten_t'(n) * o.dshade[c].di;
            b[c].ddi = o.shade[c].ddi + inten_t'(n) * o.dshade[c].ddi;
          end
          exp_q.push_back(b);
        end
      end
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (req && !gnt) stalls++;
    if (req && gnt) begin
      emitted++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected command"); end
      else begin
        xcmd_bundle_t b;
        b = exp_q.pop_front();
        if (b != cmd) begin
          failures++;
          $display("FAIL: y=%0d cmd x %0d dx %0d i %0d, exp x %0d dx %0d i %0d", y,
                   cmd[0].x, cmd[0].dx, cmd[0].i, b[0].x, b[0].dx, b[0].i);
        end
      end
    end
    if (overrun) overruns++;
  end

  task automatic run_line(int yy);
    int unsigned st0, clocks;
    expect_line(yy);
    @(negedge clk);
    y = line_t'(yy);
    line_start = 1'b1;
    st0 = stalls;
    @(negedge clk);
    line_start = 1'b0;
    clocks = 1;
    while (busy) begin
      gnt_en = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      clocks++;
    end
    checks++;
    if (clocks != D + 1 + (stalls - st0)) begin
      failures++; $display("FAIL: y=%0d scan took %0d clocks, %0d stalls", yy, clocks, stalls - st0);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: y=%0d %0d commands missing", yy, exp_q.size()); exp_q.delete(); end
  endtask

  initial begin
    for (int k = 0; k < D; k++) list[k] = rnd_obj();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      for (int yy = 0; yy < 14; yy++) run_line(yy);
      for (int k = 0; k < D; k++) list[k] = rnd_obj();
    end
    // overrun: a new scanline while the processor still waits for the bus
    list[0].op = OP_EVAL1; list[0].ytop = '0; list[0].ybot = 20;
    list[0].xl = edge_t'(2 << EDGE_FRAC); list[0].xr = edge_t'(9 << EDGE_FRAC);
    @(negedge clk);
    gnt_en = 1'b0;
    y = '0; line_start = 1'b1;
    @(negedge clk);
    line_start = 1'b0;
    @(negedge clk);
    y = 1; line_start = 1'b1;
    @(negedge clk);
    line_start = 1'b0;
    checks++;
    if (!overrun) begin failures++; $display("FAIL: no overrun pulse"); end
    @(negedge clk);
    checks++;
    if (overrun) begin failures++; $display("FAIL: overrun longer than one clock"); end
    checks++;
    if (stalls == 0 || emitted < 20) begin failures++; $display("FAIL: too little exercised: %0d stalls %0d commands", stalls, emitted); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
