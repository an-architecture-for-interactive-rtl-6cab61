// tb_display_controller_full: the display controller at its full default
// size (4096-pixel scanlines, three colours, 4 shading processors) taken
// through complete scanlines.
//
// Two objects are written into the list: a quadratically shaded span over
// pixels 100..199 on scanlines 0 and 1 (shading processor 0) and a
// linearly falling span from pixel 3000 to the end of the scanline on
// scanline 0 (shading processor 1), whose intensity goes negative and must
// clamp to 0. Every pixel of scanlines 0 and 1 in every colour is
// compared with values computed here in closed form (I + j*dI +
// j*(j-1)/2*ddI), and pixel p must appear NUM_PIX+1+p clocks after the
// pixel generators took the scanline's Refresh.
module tb_display_controller_full;
  import dc_pkg::*;

  localparam int unsigned NP = 4096;
  localparam longint      ONE = longint'(1) << FRAC_W;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic wr_en = 1'b0;
  logic [1:0] wr_bank = '0;
  logic [3:0] wr_idx = '0;
  obj_t  wr_obj;
  xpix_t pix_out [NCOL];
  line_t y;
  logic  line_start, frame_start;
  logic [3:0] overrun;

  display_controller dut (
    .clk(clk), .rst_n(rst_n), .run(run), .wr_en(wr_en), .wr_bank(wr_bank), .wr_idx(wr_idx),
    .wr_obj(wr_obj), .pix_out(pix_out), .y(y), .line_start(line_start),
    .frame_start(frame_start), .overrun(overrun)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int expect_pix(int line, int c, int p);
    longint v, ip;
    v = 0;
    if (p >= 100 && p <= 199 && line <= 1) begin
      longint j  = longint'(p - 100);
      longint i0 = longint'(10 + 7 * c) * ONE + longint'(line) * ONE;
      longint d0 = ONE / 4 + longint'(c) * (ONE / 16);
      longint dd = ONE / 512;
      v += i0 + j * d0 + (j * (j - 1) / 2) * dd;
    end
    if (p >= 3000 && line == 0) v += (4000 + c) * ONE - longint'(p - 3000) * 4 * ONE;
    ip = v >>> FRAC_W;
    if (ip < 0) ip = 0;
    if (ip > 4095) ip = 4095;
    return int'(ip);
  endfunction

  int refresh_edge [$];
  int line_no = 0, pix_no = 0, r_edge = 0;
  int unsigned pixels = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.xcmd[0].op == OP_REFRESH) refresh_edge.push_back(cyc);
    if (pix_out[0].valid) begin
      if (pix_no == 0) r_edge = refresh_edge.pop_front();
      for (int c = 0; c < NCOL; c++) begin
        int e;
        e = expect_pix(line_no, c, pix_no);
        checks++;
        if (!pix_out[c].valid || int'(pix_out[c].value) != e || cyc != r_edge + NP + 1 + pix_no ||
            pix_out[c].sol != (pix_no == 0)) begin
          failures++;
          if (failures < 20)
            $display("FAIL line %0d colour %0d pixel %0d: %0d expected %0d (edge %0d, expected %0d)",
                     line_no, c, pix_no, pix_out[c].value, e, cyc, r_edge + NP + 1 + pix_no);
        end
      end
      pixels++;
      if (pix_no == NP - 1) begin pix_no = 0; line_no++; end
      else pix_no++;
    end
  end

  task automatic write_obj(int b, int k, obj_t o);
    @(negedge clk);
    wr_en = 1'b1; wr_bank = 2'(b); wr_idx = 4'(k); wr_obj = o;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    obj_t o;
    wr_obj = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    o = '0;
    o.op = OP_EVAL3; o.ytop = 0; o.ybot = 1;
    o.xl = edge_t'(100 << EDGE_FRAC); o.xr = edge_t'(200 << EDGE_FRAC);
    for (int c = 0; c < NCOL; c++) begin
      o.shade[c].i   = inten_t'((10 + 7 * c) * ONE);
      o.shade[c].di  = inten_t'(ONE / 4 + c * (ONE / 16));
      o.shade[c].ddi = inten_t'(ONE / 512);
      o.dshade[c].i  = inten_t'(ONE);
    end
    write_obj(0, 0, o);
    o = '0;
    o.op = OP_EVAL2; o.ytop = 0; o.ybot = 0;
    o.xl = edge_t'(3000 << EDGE_FRAC); o.xr = edge_t'(5000 << EDGE_FRAC);
    for (int c = 0; c < NCOL; c++) begin
      o.shade[c].i  = inten_t'((4000 + c) * ONE);
      o.shade[c].di = inten_t'(-4 * ONE);
    end
    write_obj(1, 0, o);
    @(negedge clk);
    run = 1'b1;
    while (line_no < 2) @(posedge clk);
    checks++;
    if (pixels != 2 * NP) begin failures++; $display("FAIL: %0d pixels", pixels); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NP + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
