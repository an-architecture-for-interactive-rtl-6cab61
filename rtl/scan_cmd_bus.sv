// scan_cmd_bus: the scanline command path from the Y-processors to the
// X-processor arrays.
//
// Every Y-processor may request the bus with a bundle of one command per
// colour (req/cmd). One request is granted per clock (gnt, one-hot),
// chosen round-robin starting after the last winner, and its bundle is
// registered onto cmd_out, which feeds the arrays, one array per colour.
// A Y-processor that is not granted keeps its request and stalls. In the
// Refresh slot from the line sequencer no request is granted and every
// array receives Refresh. Clocks with neither carry Nop.
//
// That all Y-processors share one command stream into the arrays follows
// the architecture; the round-robin arbitration, the one-clock register
// and the req/gnt handshake are choices of this design.
module scan_cmd_bus
  import dc_pkg::*;
#(
  parameter int unsigned NUM_YPROC = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         refresh_slot,
  input  logic         [NUM_YPROC-1:0] req,
  input  xcmd_bundle_t                 cmd [NUM_YPROC],
  output logic         [NUM_YPROC-1:0] gnt,
  output xcmd_bundle_t                 cmd_out
);

  localparam int unsigned IW = $clog2(NUM_YPROC);

  logic [IW-1:0] last;     // index granted most recently
  logic [IW-1:0] win;
  logic          any;
  int unsigned   idx;

  always_comb begin
    win = last;
    any = 1'b0;
    gnt = '0;
    idx = 0;
    if (!refresh_slot) begin
      for (int unsigned k = 1; k <= NUM_YPROC; k++) begin
        idx = (int'(last) + k) % NUM_YPROC;
        if (!any && req[idx]) begin
          any = 1'b1;
          win = IW'(idx);
        end
      end
      if (any) gnt[win] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last    <= IW'(NUM_YPROC - 1);
      cmd_out <= {NCOL{XCMD_NOP}};
    end else begin
      if (refresh_slot) begin
        for (int c = 0; c < NCOL; c++) begin
          cmd_out[c]    <= XCMD_NOP;
          cmd_out[c].op <= OP_REFRESH;
        end
      end else if (any) begin
        cmd_out <= cmd[win];
        last    <= win;
      end else begin
        cmd_out <= {NCOL{XCMD_NOP}};
      end
    end
  end

  // at most one grant, and only to a requester
  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_gnt_req:    assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
