// tb_display_controller: end-to-end test of the display controller at a
// reduced size (32-pixel scanlines, 12 scanlines per frame, 4 shading
// processors with 8 list entries each).
//
// The test writes random objects into the structured list (any opcode of
// the X-processor instruction set, random geometry and colour functions)
// and rewrites part of the list in the middle of every frame. For each
// scanline it records the command stream entering the pixel generators.
// (1) In frames without overrun, the commands of every scanline must be,
// in any order, exactly those computed directly from the objects of the
// list as it was at the frame start. (2) Every scanline's pixels for all
// three colours must equal a behavioural pixel-generator model applied to
// the recorded stream, and pixel p must leave NUM_PIX+1+p clocks after the
// pixel generator took the Refresh. Frame 3 fills every list entry with an
// object covering all scanlines, more commands than a scanline has slots,
// so the overrun mechanism must fire. The test also counts bus stalls,
// frames, every opcode reaching the arrays and clamped pixels, and fails
// if any of them never happened.
module tb_display_controller;
  import dc_pkg::*;

  localparam int unsigned NP = 32, NL = 12, NY = 4, OD = 8, FRAMES = 6;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic wr_en = 1'b0;
  logic [$clog2(NY)-1:0] wr_bank = '0;
  logic [$clog2(OD)-1:0] wr_idx = '0;
  obj_t  wr_obj;
  xpix_t pix_out [NCOL];
  line_t y;
  logic  line_start, frame_start;
  logic [NY-1:0] overrun;

  display_controller #(
    .NUM_PIX(NP), .NUM_LINES(NL), .LINE_CYCLES(NP), .NUM_YPROC(NY), .OBJ_DEPTH(OD)
  ) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .wr_en(wr_en), .wr_bank(wr_bank), .wr_idx(wr_idx),
    .wr_obj(wr_obj), .pix_out(pix_out), .y(y), .line_start(line_start),
    .frame_start(frame_start), .overrun(overrun)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------ list shadow
  obj_t shadow [NY][OD];
  obj_t snap   [NY][OD];

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
    if ($urandom_range(0, 3) == 0) v = -v;
    return inten_t'(v);
  endfunction

  function automatic obj_t rnd_obj(bit full);
    obj_t o;
    int yt = full ? 0 : $urandom_range(0, NL - 1);
    int r  = $urandom_range(0, 19);
    if (full)        o.op = OP_EVAL1;
    else if (r < 10) o.op = xop_e'($urandom_range(int'(OP_EVAL0), int'(OP_EVAL3)));
    else if (r < 15) o.op = xop_e'($urandom_range(int'(OP_SETI), int'(OP_SETPDDI)));
    else if (r < 18) o.op = ($urandom_range(0, 1) != 0) ? OP_DIS : OP_ACCMODE;
    else             o.op = OP_NOP;
    o.ytop = line_t'(yt);
    o.ybot = full ? line_t'(NL - 1) : line_t'(yt + $urandom_range(0, 5));
    o.xl   = mk_edge(int'($urandom_range(0, 30 << EDGE_FRAC)) - (2 << EDGE_FRAC));
    o.xr   = mk_edge(int'(o.xl) + int'($urandom_range(1 << EDGE_FRAC, 16 << EDGE_FRAC)));
    o.dxl  = mk_edge(int'($urandom_range(0, 2 << EDGE_FRAC)) - (1 << EDGE_FRAC));
    o.dxr  = mk_edge(int'($urandom_range(0, 2 << EDGE_FRAC)) - (1 << EDGE_FRAC));
    for (int c = 0; c < NCOL; c++) begin
      o.shade[c]  = '{i: rv(34), di: rv(31), ddi: rv(27)};
      o.dshade[c] = '{i: rv(30), di: rv(27), ddi: rv(23)};
      if (o.op == OP_ACCMODE) o.shade[c].i = inten_t'($urandom_range(0, 1));
    end
    return o;
  endfunction

  task automatic write_obj(int b, int k, obj_t o);
    @(negedge clk);
    wr_en = 1'b1; wr_bank = ($clog2(NY))'(b); wr_idx = ($clog2(OD))'(k); wr_obj = o;
    shadow[b][k] = o;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // expected commands of scanline yy from the frame-start snapshot
  xcmd_bundle_t exp_cmds [$];
  function automatic void expect_line(int yy);
    obj_t o;
    int n;
    longint xl;
    longint xr;
    longint f;
    longint e;
    exp_cmds.delete();
    for (int b = 0; b < NY; b++)
      for (int k = 0; k < OD; k++) begin
        o = snap[b][k];
        if (o.op != OP_NOP && yy >= int'(o.ytop) && yy <= int'(o.ybot)) begin
          n = yy - int'(o.ytop);
          xl = edge_fld(o, EDGE_LSB_DXR + 3 * EDGE_W) + longint'(n) * edge_fld(o, EDGE_LSB_DXR + EDGE_W);
          xr = edge_fld(o, EDGE_LSB_DXR + 2 * EDGE_W) + longint'(n) * edge_fld(o, EDGE_LSB_DXR);
          f = xl >>> EDGE_FRAC;
          e = xr >>> EDGE_FRAC;
          if (f < 0) f = 0;
          if (e > longint'(NP)) e = longint'(NP);
          if (e > f) begin
            xcmd_bundle_t bd;
            for (int c = 0; c < NCOL; c++) begin
              bd[c].op  = o.op;
              bd[c].x   = addr_t'(f);
              bd[c].dx  = addr_t'(e - f - 1);
              bd[c].i   = o.shade[c].i   + inten_t'(n) * o.dshade[c].i;
              bd[c].di  = o.shade[c].di  + inten_t'(n) * o.dshade[c].di;
              bd[c].ddi = o.shade[c].ddi + inten_t'(n) * o.dshade[c].ddi;
            end
            exp_cmds.push_back(bd);
          end
        end
      end
  endfunction

  // ------------------------------------------- pixel generator model
  inten_t m_acc [NCOL][NP];
  bit     m_lock [NCOL][NP], m_dis [NCOL][NP], m_siv [NCOL][NP], m_sdv [NCOL][NP], m_sddv [NCOL][NP];
  inten_t m_si [NCOL][NP], m_sd [NCOL][NP], m_sdd [NCOL][NP];
  bit     m_neg [NCOL];

  typedef struct { int unsigned edge_no; int unsigned p; pix_t v; } exp_t;
  exp_t exp_pix [NCOL][$];
  int unsigned clamped = 0;

  function automatic pix_t clamp_pix(inten_t v);
    longint ip = longint'(v) >>> FRAC_W;
    if (ip < 0) return 0;
    if (ip > 4095) return 12'hFFF;
    return pix_t'(ip);
  endfunction

  function automatic void model_cmd(int col, xcmd_t c, int unsigned edge_no);
    inten_t ri = c.i, rdi = c.di, rddi = c.ddi;
    int     rx = int'(c.x);
    for (int a = 0; a < NP; a++) begin
      bit inspan = (a >= int'(c.x)) && (a <= int'(c.x) + int'(c.dx));
      bit atx    = (a == rx);
      inten_t ie  = m_siv[col][a]  ? m_si[col][a]  : ri;
      inten_t de  = m_sdv[col][a]  ? m_sd[col][a]  : rdi;
      inten_t dde = m_sddv[col][a] ? m_sdd[col][a] : rddi;
      case (c.op)
        OP_SETI, OP_SETPI:     if (atx) begin m_siv[col][a] = 1; m_si[col][a] = c.i; end
        OP_SETDI, OP_SETPDI:   if (atx) begin m_sdv[col][a] = 1; m_sd[col][a] = c.di; end
        OP_SETDDI, OP_SETPDDI: if (atx) begin m_sddv[col][a] = 1; m_sdd[col][a] = c.ddi; end
        default: ;
      endcase
      if (atx && (c.op inside {OP_SETPI, OP_SETPDI, OP_SETPDDI})) rx = (rx + int'(c.dx)) % 4096;
      if (inspan && (c.op inside {OP_EVAL0, OP_EVAL1, OP_EVAL2, OP_EVAL3})) begin
        if (m_dis[col][a]) m_dis[col][a] = 0;
        else if (c.op == OP_EVAL0) begin m_acc[col][a] = ie; m_lock[col][a] = 1; end
        else if (!m_lock[col][a]) m_acc[col][a] = m_acc[col][a] + ((!m_neg[col] && ie < 0) ? inten_t'(0) : ie);
        case (c.op)
          OP_EVAL0, OP_EVAL1: ri = ie;
          OP_EVAL2: begin ri = ie + de; rdi = de; end
          OP_EVAL3: begin ri = ie + de; rdi = de + dde; rddi = dde; end
          default: ;
        endcase
      end
      if (inspan && c.op == OP_DIS) m_dis[col][a] = 1;
      if (c.op == OP_REFRESH) begin
        pix_t pv = clamp_pix(m_acc[col][a]);
        if (pv == 12'hFFF || (pv == 0 && m_acc[col][a] < 0)) clamped++;
        exp_pix[col].push_back('{edge_no: edge_no + NP + 1 + a, p: a, v: pv});
        m_acc[col][a] = 0; m_lock[col][a] = 0; m_dis[col][a] = 0;
        m_siv[col][a] = 0; m_sdv[col][a] = 0; m_sddv[col][a] = 0;
      end
    end
    if (c.op == OP_ACCMODE) m_neg[col] = c.i[0];
  endfunction

  // --------------------------------------------------------- monitors
  int unsigned frame_no = 0, frames_seen = 0, stalls = 0, overruns = 0, lines_checked = 0;
  int unsigned op_seen [16];
  bit          frame_overrun [FRAMES + 2];
  int          line_y_q [$];
  int          line_frame_q [$];
  xcmd_bundle_t line_cmds [$];

  always @(posedge clk) if (rst_n) begin
    xcmd_bundle_t xc;
    xc = dut.xcmd;
    stalls += $countones(dut.req & ~dut.gnt);
    if (|overrun) begin
      overruns++;
      frame_overrun[frame_no] = 1;
    end
    if (xc[0].op != OP_NOP) op_seen[xc[0].op]++;
    for (int c = 0; c < NCOL; c++)
      if (xc[c].op != OP_NOP) model_cmd(c, xc[c], cyc);
    if (xc[0].op == OP_REFRESH) begin
      int ly, lf;
      ly = line_y_q.pop_front();
      lf = line_frame_q.pop_front();
      // a shading processor still busy at the Refresh: this frame overran
      if (|dut.busy) frame_overrun[lf] = 1;
      if (!frame_overrun[lf]) begin
        expect_line(ly);
        checks++;
        lines_checked++;
        if (exp_cmds.size() != line_cmds.size()) begin
          failures++;
          $display("FAIL frame %0d line %0d: %0d commands, expected %0d", lf, ly, line_cmds.size(), exp_cmds.size());
          foreach (exp_cmds[e]) $display("  exp op %0d x %0d dx %0d i %0h", exp_cmds[e][0].op, exp_cmds[e][0].x, exp_cmds[e][0].dx, exp_cmds[e][0].i);
          foreach (line_cmds[e]) $display("  got op %0d x %0d dx %0d i %0h", line_cmds[e][0].op, line_cmds[e][0].x, line_cmds[e][0].dx, line_cmds[e][0].i);
        end else begin
          foreach (line_cmds[j]) begin
            int hit;
            hit = -1;
            foreach (exp_cmds[e]) if (hit < 0 && exp_cmds[e] == line_cmds[j]) hit = e;
            if (hit < 0) begin
              failures++;
              $display("FAIL frame %0d line %0d: unexpected command op %0d x %0d", lf, ly, line_cmds[j][0].op, line_cmds[j][0].x);
            end else exp_cmds.delete(hit);
          end
        end
      end
      line_cmds.delete();
    end else if (xc[0].op != OP_NOP) begin
      line_cmds.push_back(xc);
    end
    if (line_start) begin
      if (frame_start) begin
        snap = shadow;
        if (frames_seen > 0) frame_no++;
        frames_seen++;
      end
      line_y_q.push_back(int'(y));
      line_frame_q.push_back(int'(frame_no));
    end
  end

  int unsigned pix_seen = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCOL; c++) begin
      if (pix_out[c].valid) begin
        exp_t e;
        pix_seen++;
        checks++;
        if (exp_pix[c].size() == 0) begin failures++; $display("FAIL colour %0d: unexpected pixel", c); end
        else begin
          e = exp_pix[c].pop_front();
          if (e.edge_no != cyc || e.v != pix_out[c].value || pix_out[c].sol != (e.p == 0)) begin
            failures++;
            $display("FAIL colour %0d pixel %0d: edge %0d (exp %0d) value %0d (exp %0d)", c, e.p, cyc,
                     e.edge_no, pix_out[c].value, e.v);
          end
        end
      end else if (exp_pix[c].size() != 0 && exp_pix[c][0].edge_no < cyc) begin
        failures++; checks++;
        void'(exp_pix[c].pop_front());
        $display("FAIL colour %0d: pixel missing at edge %0d", c, cyc);
      end
    end
  end

  // --------------------------------------------------------- stimulus
  task automatic count_check(string what, int unsigned n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    for (int c = 0; c < NCOL; c++) begin
      m_neg[c] = 1;
      for (int a = 0; a < NP; a++) begin
        m_acc[c][a] = 0; m_lock[c][a] = 0; m_dis[c][a] = 0;
        m_siv[c][a] = 0; m_sdv[c][a] = 0; m_sddv[c][a] = 0;
        m_si[c][a] = 0; m_sd[c][a] = 0; m_sdd[c][a] = 0;
      end
    end
    for (int b = 0; b < NY; b++) for (int k = 0; k < OD; k++) shadow[b][k].op = OP_NOP;
    wr_obj = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first frame: entries 0..11 carry opcodes 1..12 on every scanline
    for (int b = 0; b < NY; b++)
      for (int k = 0; k < OD; k++) begin
        obj_t o;
        o = rnd_obj(0);
        if (b * OD + k < 12) begin
          o.op   = xop_e'(b * OD + k + 1);
          o.ytop = '0;
          o.ybot = line_t'(NL - 1);
          o.xl   = mk_edge(int'($urandom_range(0, 20)) << EDGE_FRAC);
          o.xr   = mk_edge(int'(o.xl) + (4 << EDGE_FRAC));
          o.dxl  = '0;
          o.dxr  = '0;
        end
        write_obj(b, k, o);
      end
    @(negedge clk);
    run = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      // wait for scanline 3 of this frame, then change the list for the next
      while (!(line_start && y == 3)) @(negedge clk);
      for (int j = 0; j < 6; j++)
        write_obj($urandom_range(0, NY - 1), $urandom_range(0, OD - 1), rnd_obj(0));
      if (f == 2)
        for (int b = 0; b < NY; b++) for (int k = 0; k < OD; k++) write_obj(b, k, rnd_obj(1));
      while (!(line_start && y == NL - 1)) @(negedge clk);
      @(negedge clk);
    end
    // let the last scanlines drain out
    while (!(line_start && y == 2)) @(negedge clk);
    run = 1'b0;
    repeat (3 * NP) @(negedge clk);
    for (int c = 0; c < NCOL; c++) begin
      checks++;
      if (exp_pix[c].size() != 0) begin failures++; $display("FAIL colour %0d: %0d pixels never came", c, exp_pix[c].size()); end
    end
    count_check("pixel output", pix_seen);
    count_check("command check", lines_checked);
    count_check("bus stall", stalls);
    count_check("overrun", overruns);
    count_check("second frame", frames_seen - 1);
    count_check("clamped pixel", clamped);
    for (int o = 1; o <= 13; o++) count_check($sformatf("opcode %0d", o), op_seen[o]);
    $display("mechanisms: frames %0d lines checked %0d stalls %0d overruns %0d clamped %0d pixels %0d",
             frames_seen, lines_checked, stalls, overruns, clamped, pix_seen);
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
