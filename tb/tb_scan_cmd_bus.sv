// tb_scan_cmd_bus: random request patterns from four requesters against a
// round-robin reference. Checks the grant vector each clock, the command
// bundle registered onto the output one clock after a grant, Refresh on
// every colour in the Refresh slot (with no grant), Nop when idle, and
// that every requester is eventually served (no starvation).
module tb_scan_cmd_bus;
  import dc_pkg::*;

  localparam int unsigned NY = 4;

  logic clk = 1'b0, rst_n = 1'b0, refresh_slot;
  logic [NY-1:0] req, gnt;
  xcmd_bundle_t  cmd [NY];
  xcmd_bundle_t  cmd_out;

  scan_cmd_bus #(.NUM_YPROC(NY)) dut (
    .clk(clk), .rst_n(rst_n), .refresh_slot(refresh_slot), .req(req), .cmd(cmd),
    .gnt(gnt), .cmd_out(cmd_out)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int          last = NY - 1;
  xcmd_bundle_t exp_out;
  int unsigned served [NY];

  initial begin
    req = '0; refresh_slot = 1'b0;
    for (int k = 0; k < NY; k++) cmd[k] = {NCOL{XCMD_NOP}};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int win;
      @(negedge clk);
      req = NY'($urandom);
      refresh_slot = ($urandom_range(0, 9) == 0);
      for (int k = 0; k < NY; k++)
        for (int c = 0; c < NCOL; c++) begin
          cmd[k][c].op  = OP_EVAL3;
          cmd[k][c].x   = addr_t'($urandom);
          cmd[k][c].dx  = addr_t'(k);
          cmd[k][c].i   = inten_t'($urandom);
          cmd[k][c].di  = inten_t'(c);
          cmd[k][c].ddi = inten_t'(t);
        end
      // reference arbitration
      win = -1;
      if (!refresh_slot)
        for (int j = 1; j <= NY; j++)
          if (win < 0 && req[(last + j) % NY]) win = (last + j) % NY;
      #1;
      checks++;
      if (gnt != ((win < 0) ? NY'(0) : NY'(1) << win)) begin
        failures++; $display("FAIL grant %b exp winner %0d req %b", gnt, win, req);
      end
      if (refresh_slot) begin
        exp_out = {NCOL{XCMD_NOP}};
        for (int c = 0; c < NCOL; c++) exp_out[c].op = OP_REFRESH;
      end else if (win >= 0) begin
        exp_out = cmd[win];
        last = win;
        served[win]++;
      end else exp_out = {NCOL{XCMD_NOP}};
      @(posedge clk); #1;
      checks++;
      if (cmd_out != exp_out) begin failures++; $display("FAIL cmd_out at t=%0d", t); end
    end
    for (int k = 0; k < NY; k++) begin
      checks++;
      if (served[k] < 100) begin failures++; $display("FAIL requester %0d served %0d times", k, served[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
