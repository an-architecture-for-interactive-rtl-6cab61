// tb_xproc_pe: directed self-checking test of one X-processor.
//
// The processor under test has pixel address 3. Commands are driven one
// per clock and the test checks, one clock later, the forwarded command
// (running intensity and forward differences, moved SetP target) and, via
// Refresh and the output token, the accumulated pixel value: Eval0..Eval3
// inside and outside the span, stored Set values overriding the running
// ones, Eval0 locking, Dis skipping one Eval, Acc_mode dropping negative
// contributions, Refresh clearing state, and pixel lane pass-through.
module tb_xproc_pe;
  import dc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  xcmd_t cmd_in, cmd_out;
  logic  tok_in, tok_out;
  xpix_t lane_in, lane_out;

  xproc_pe dut (
    .clk(clk), .rst_n(rst_n), .my_addr(addr_t'(3)),
    .cmd_in(cmd_in), .cmd_out(cmd_out), .tok_in(tok_in), .tok_out(tok_out),
    .lane_in(lane_in), .lane_out(lane_out)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  localparam inten_t ONE = inten_t'(1) <<< FRAC_W;   // intensity 1.0

  function automatic xcmd_t mk(xop_e op, int x, int dx, inten_t i, inten_t di, inten_t ddi);
    xcmd_t c;
    c.op = op; c.x = addr_t'(x); c.dx = addr_t'(dx); c.i = i; c.di = di; c.ddi = ddi;
    return c;
  endfunction

  task automatic issue(xcmd_t c);
    cmd_in <= c;
    @(posedge clk);
    #1;
    cmd_in <= XCMD_NOP;
  endtask

  task automatic check_fwd(string what, xcmd_t exp);
    checks++;
    if (cmd_out != exp) begin
      failures++;
      $display("FAIL %s: fwd op %0d x %0d i %0d di %0d ddi %0d", what,
               cmd_out.op, cmd_out.x, cmd_out.i, cmd_out.di, cmd_out.ddi);
    end
  endtask

  // Refresh, then the token: returns the pixel put on the lane
  task automatic read_pixel(string what, int exp);
    issue(mk(OP_REFRESH, 0, 0, 0, 0, 0));
    tok_in <= 1'b1;
    @(posedge clk); #1;
    tok_in <= 1'b0;
    @(posedge clk); #1;
    checks++;
    if (!lane_out.valid || int'(lane_out.value) != exp || lane_out.sol) begin
      failures++;
      $display("FAIL %s: pixel %0d valid %0b, expected %0d", what, lane_out.value, lane_out.valid, exp);
    end
    checks++;
    if (!tok_out) begin failures++; $display("FAIL %s: token not forwarded after two clocks", what); end
    @(posedge clk); #1;
  endtask

  initial begin
    cmd_in  = XCMD_NOP;
    tok_in  = 1'b0;
    lane_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Eval3 inside the span: accumulate 10, forward 10+2, 2+1, 1
    issue(mk(OP_EVAL3, 1, 5, 10*ONE, 2*ONE, ONE));
    check_fwd("eval3 in span", mk(OP_EVAL3, 1, 5, 12*ONE, 3*ONE, ONE));
    // Eval3 outside the span: untouched
    issue(mk(OP_EVAL3, 4, 5, 7*ONE, 2*ONE, ONE));
    check_fwd("eval3 outside", mk(OP_EVAL3, 4, 5, 7*ONE, 2*ONE, ONE));
    // span end inclusive: x=0,dx=3 covers address 3, Eval2
    issue(mk(OP_EVAL2, 0, 3, 5*ONE, ONE, 9*ONE));
    check_fwd("eval2 at end", mk(OP_EVAL2, 0, 3, 6*ONE, ONE, 9*ONE));
    issue(mk(OP_EVAL1, 2, 1, 20*ONE, 4*ONE, 0));
    check_fwd("eval1", mk(OP_EVAL1, 2, 1, 20*ONE, 4*ONE, 0));
    read_pixel("sum 10+5+20", 35);

    // stored values override the running ones
    issue(mk(OP_SETI, 3, 0, 100*ONE, 0, 0));
    issue(mk(OP_SETDDI, 3, 0, 0, 0, 2*ONE));
    issue(mk(OP_SETDI, 2, 0, 0, 50*ONE, 0));     // another pixel: ignored here
    issue(mk(OP_EVAL3, 0, 10, ONE, ONE, ONE));
    check_fwd("eval3 with set I/ddI", mk(OP_EVAL3, 0, 10, 101*ONE, 3*ONE, 2*ONE));
    read_pixel("set value used", 100);

    // periodic set: hit at x=3 moves the target by dx
    issue(mk(OP_SETPI, 3, 4, 40*ONE, 0, 0));
    check_fwd("setp hit", mk(OP_SETPI, 7, 4, 40*ONE, 0, 0));
    issue(mk(OP_SETPDI, 1, 2, 0, 8*ONE, 0));
    check_fwd("setp miss", mk(OP_SETPDI, 1, 2, 0, 8*ONE, 0));
    issue(mk(OP_EVAL2, 3, 0, 0, ONE, 0));
    check_fwd("eval2 setp", mk(OP_EVAL2, 3, 0, 41*ONE, ONE, 0));
    read_pixel("setp value", 40);

    // Eval0 overwrites and locks
    issue(mk(OP_EVAL1, 0, 9, 30*ONE, 0, 0));
    issue(mk(OP_EVAL0, 3, 0, 7*ONE, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, 30*ONE, 0, 0));
    read_pixel("eval0 lock", 7);

    // Dis skips exactly the next covering Eval
    issue(mk(OP_DIS, 2, 2, 0, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, 30*ONE, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, 12*ONE, 0, 0));
    read_pixel("dis", 12);

    // Acc_mode: negative contributions dropped when disabled
    issue(mk(OP_EVAL1, 0, 9, 50*ONE, 0, 0));
    issue(mk(OP_ACCMODE, 0, 0, 0, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, -20*ONE, 0, 0));
    read_pixel("neg dropped", 50);
    issue(mk(OP_ACCMODE, 0, 0, 1, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, 50*ONE, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, -20*ONE, 0, 0));
    read_pixel("neg accumulated", 30);

    // clamping: negative total gives 0, large total gives 4095
    issue(mk(OP_EVAL1, 0, 9, -5*ONE, 0, 0));
    read_pixel("clamp low", 0);
    issue(mk(OP_EVAL1, 0, 9, 4000*ONE, 0, 0));
    issue(mk(OP_EVAL1, 0, 9, 95*ONE, 0, 0));
    read_pixel("clamp high", 4095);
    // fractional part truncated
    issue(mk(OP_EVAL1, 0, 9, 3*ONE + ONE/2, 0, 0));
    read_pixel("fraction", 3);

    // lane pass-through when no token
    lane_in <= '{valid: 1'b1, sol: 1'b1, value: 12'hABC};
    @(posedge clk); #1;
    lane_in <= '0;
    checks++;
    if (lane_out != xpix_t'{valid: 1'b1, sol: 1'b1, value: 12'hABC}) begin
      failures++; $display("FAIL lane pass-through");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
