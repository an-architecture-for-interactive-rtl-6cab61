// tb_xproc_array: self-checking test of the pixel generator array.
//
// A 16-processor array gets random scanlines of random commands drawn from
// the whole instruction set, each closed by a Refresh. A behavioural model
// applies every command to the 16 pixels in address order (which is the
// order in which the processors see it) and predicts each scanline's
// pixels. The test checks every pixel value, that pixel p of a scanline
// appears exactly NUM_PIX+2+p clocks after the clock edge on which the
// Refresh was driven (NUM_PIX+1+p after the array sampled it), that pixel 0
// carries the start-of-line marker, that no stray pixel appears, and that
// commands leave the far end NUM_PIX clocks after entering.
module tb_xproc_array;
  import dc_pkg::*;

  localparam int unsigned N     = 16;
  localparam int unsigned LINES = 60;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  xcmd_t cmd_in, cmd_out;
  xpix_t pix_out;

  xproc_array #(.NUM_PIX(N)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_in(cmd_in), .cmd_out(cmd_out), .pix_out(pix_out)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------- reference
  inten_t m_acc [N];
  bit     m_lock [N], m_dis [N], m_siv [N], m_sdv [N], m_sddv [N];
  inten_t m_si [N], m_sd [N], m_sdd [N];
  bit     m_neg = 1'b1;

  typedef struct { int unsigned edge_no; int unsigned p; pix_t v; } exp_t;
  exp_t exp_q [$];

  function automatic pix_t clamp_pix(inten_t v);
    longint ip = longint'(v) >>> FRAC_W;
    if (ip < 0) return 0;
    if (ip > 4095) return 12'hFFF;
    return pix_t'(ip);
  endfunction

  task automatic model_cmd(xcmd_t c, int unsigned drive_edge);
    inten_t ri = c.i, rdi = c.di, rddi = c.ddi;
    int     rx = int'(c.x);
    for (int a = 0; a < N; a++) begin
      bit inspan = (a >= int'(c.x)) && (a <= int'(c.x) + int'(c.dx));
      bit atx    = (a == rx);
      inten_t ie  = m_siv[a]  ? m_si[a]  : ri;
      inten_t de  = m_sdv[a]  ? m_sd[a]  : rdi;
      inten_t dde = m_sddv[a] ? m_sdd[a] : rddi;
      case (c.op)
        OP_SETI, OP_SETPI:     if (atx) begin m_siv[a] = 1; m_si[a] = c.i; end
        OP_SETDI, OP_SETPDI:   if (atx) begin m_sdv[a] = 1; m_sd[a] = c.di; end
        OP_SETDDI, OP_SETPDDI: if (atx) begin m_sddv[a] = 1; m_sdd[a] = c.ddi; end
        default: ;
      endcase
      if (atx && (c.op inside {OP_SETPI, OP_SETPDI, OP_SETPDDI}))
        rx = (rx + int'(c.dx)) % 4096;
      if (inspan && (c.op inside {OP_EVAL0, OP_EVAL1, OP_EVAL2, OP_EVAL3})) begin
        if (m_dis[a]) m_dis[a] = 0;
        else if (c.op == OP_EVAL0) begin m_acc[a] = ie; m_lock[a] = 1; end
        else if (!m_lock[a]) m_acc[a] = m_acc[a] + ((!m_neg && ie < 0) ? inten_t'(0) : ie);
        case (c.op)
          OP_EVAL0, OP_EVAL1: ri = ie;
          OP_EVAL2: begin ri = ie + de; rdi = de; end
          OP_EVAL3: begin ri = ie + de; rdi = de + dde; rddi = dde; end
          default: ;
        endcase
      end
      if (inspan && c.op == OP_DIS) m_dis[a] = 1;
      if (c.op == OP_REFRESH) begin
        exp_q.push_back('{edge_no: drive_edge + N + 2 + a, p: a, v: clamp_pix(m_acc[a])});
        m_acc[a] = 0; m_lock[a] = 0; m_dis[a] = 0; m_siv[a] = 0; m_sdv[a] = 0; m_sddv[a] = 0;
      end
    end
    if (c.op == OP_ACCMODE) m_neg = c.i[0];
  endtask

  // ------------------------------------------------------------ monitors
  int unsigned pix_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_out.valid) begin
      pix_seen++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected pixel at edge %0d", cyc);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (e.edge_no != cyc || e.v != pix_out.value || pix_out.sol != (e.p == 0)) begin
          failures++;
          $display("FAIL: pixel %0d edge %0d (exp %0d) value %0d (exp %0d) sol %0b",
                   e.p, cyc, e.edge_no, pix_out.value, e.v, pix_out.sol);
        end
      end
    end else if (exp_q.size() != 0 && exp_q[0].edge_no < cyc) begin
      exp_t e;
      e = exp_q.pop_front();
      failures++; checks++;
      $display("FAIL: pixel %0d missing at edge %0d", e.p, e.edge_no);
    end
  end

  // command passes through: op leaves the far end N clocks later
  xop_e op_hist [$];
  always @(posedge clk) if (rst_n) begin
    op_hist.push_back(cmd_in.op);
    if (op_hist.size() > N) begin
      xop_e o;
      o = op_hist.pop_front();
      checks++;
      if (o != cmd_out.op) begin
        failures++;
        $display("FAIL: cmd_out op %0d expected %0d at edge %0d", cmd_out.op, o, cyc);
      end
    end
  end

  // -------------------------------------------------------------- stimulus
  function automatic inten_t rnd_val(int mag_bits);
    longint v = longint'({$urandom, $urandom}) & ((64'd1 << mag_bits) - 1);
    if ($urandom_range(0, 3) == 0) v = -v;
    return inten_t'(v);
  endfunction

  function automatic xcmd_t rnd_cmd();
    xcmd_t c;
    c.op  = xop_e'($urandom_range(0, 12));
    c.x   = addr_t'($urandom_range(0, N + 1));
    c.dx  = addr_t'($urandom_range(0, N));
    c.i   = rnd_val(33);
    c.di  = rnd_val(29);
    c.ddi = rnd_val(25);
    if (c.op == OP_ACCMODE) c.i = inten_t'($urandom_range(0, 1));
    return c;
  endfunction

  int unsigned op_count [16];

  task automatic drive(xcmd_t c);
    cmd_in <= c;
    model_cmd(c, cyc);
    op_count[c.op]++;
    @(posedge clk);
  endtask

  initial begin
    cmd_in = XCMD_NOP;
    for (int a = 0; a < N; a++) begin
      m_acc[a] = 0; m_lock[a] = 0; m_dis[a] = 0; m_siv[a] = 0; m_sdv[a] = 0; m_sddv[a] = 0;
      m_si[a] = 0; m_sd[a] = 0; m_sdd[a] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int l = 0; l < LINES; l++) begin
      int unsigned ncmd;
      ncmd = $urandom_range(0, N - 1);
      for (int j = 0; j < ncmd; j++) drive(rnd_cmd());
      for (int j = ncmd; j < N - 1; j++) drive(XCMD_NOP);
      begin
        xcmd_t r;
        r = XCMD_NOP;
        r.op = OP_REFRESH;
        drive(r);
      end
    end
    repeat (3 * N + 8) drive(XCMD_NOP);
    checks++;
    if (pix_seen != LINES * N || exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d pixels seen, %0d still expected", pix_seen, exp_q.size());
    end
    for (int o = 1; o <= 12; o++) begin
      checks++;
      if (op_count[o] == 0) begin failures++; $display("FAIL: op %0d never issued", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
