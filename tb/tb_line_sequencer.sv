// tb_line_sequencer: checks the scanline timing with 8-clock scanlines and
// 3-line frames: line_start exactly every LINE_CYCLES clocks, scanline
// numbers wrapping at NUM_LINES, frame_start only with scanline 0, the
// Refresh slot in the last clock of each period, and counters holding
// while run is low.
module tb_line_sequencer;
  import dc_pkg::*;

  localparam int unsigned LC = 8, NL = 3;

  logic  clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic  line_start, frame_start, refresh_slot;
  line_t y;

  line_sequencer #(.LINE_CYCLES(LC), .NUM_LINES(NL)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .line_start(line_start),
    .frame_start(frame_start), .y(y), .refresh_slot(refresh_slot)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned m_cyc = 0, m_y = 0;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b (cyc %0d y %0d)", what, got, exp, m_cyc, m_y); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("idle line_start", line_start, 1'b0);
    run = 1'b1;
    for (int t = 0; t < 200; t++) begin
      #1;
      if (t % 37 == 5) begin
        // pause for two clocks: nothing may move
        run = 1'b0;
        #1;
        chk("paused line_start", line_start, 1'b0);
        chk("paused refresh", refresh_slot, 1'b0);
        @(negedge clk); @(negedge clk);
        run = 1'b1;
        #1;
      end
      chk("line_start", line_start, m_cyc == 0);
      chk("refresh_slot", refresh_slot, m_cyc == LC - 1);
      chk("frame_start", frame_start, m_cyc == 0 && m_y == 0);
      checks++;
      if (int'(y) != m_y) begin failures++; $display("FAIL y %0d exp %0d", y, m_y); end
      @(posedge clk);
      if (m_cyc == LC - 1) begin m_cyc = 0; m_y = (m_y + 1) % NL; end
      else m_cyc++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
