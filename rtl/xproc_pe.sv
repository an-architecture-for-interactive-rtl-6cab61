// xproc_pe: one X-processor of the systolic pixel generator.
//
// Each processor owns one pixel of the scanline (its address is the
// constant my_addr) and accumulates that pixel's intensity from the
// scanline commands that pass by. A command enters on cmd_in, is acted on
// and leaves on cmd_out one clock later, so a command moves one processor
// per clock. For the Eval commands the running intensity and its forward
// differences travel inside the command: a processor inside the span
// x..x+dx (both ends included) adds the running intensity to its
// accumulator and forwards i+di, di+ddi, ddi, which is second-order forward
// differencing spread over the array. Values stored by SetI/SetdI/SetddI (one pixel) or SetPI/
// SetPdI/SetPddI (pixels x, x+dx, x+2dx, ...) replace the running values
// when an Eval reaches that pixel. Eval0 overwrites the pixel and locks it
// against accumulation until Refresh; Dis makes the pixel skip the next
// Eval that covers it; Acc_mode (flag in i[0]) enables or disables the
// accumulation of negative contributions. Refresh copies the clamped pixel
// value to a hold register and clears the accumulator, the stored values
// and the flags, so the next scanline can start on the following clock.
//
// Pixel output: a hold register cannot be shifted out at the moment the
// Refresh passes, because all pixels would then reach the array end at the
// same clock. Instead a token travels behind the Refresh at half its speed
// (two registers per processor, tok_in -> tok_out); when it reaches this
// processor the held pixel is put on the pixel lane (lane_in -> lane_out),
// which moves one processor per clock. The pixels of a scanline thus leave
// the last processor in address order, one per clock.
//
// The instruction set and its meaning, the 36-bit intensity, 12-bit
// addresses and pixels, and one processor per clock follow the
// architecture. The half-speed output token, the hold register, the span
// convention (x..x+dx inclusive), the way SetP steps its target address,
// Dis skipping exactly one Eval, negative accumulation enabled after reset
// and kept across Refresh, and doing all orders of differencing in one
// clock are choices of this design.
module xproc_pe
  import dc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  addr_t        my_addr,   // constant pixel address of this processor
  input  xcmd_t        cmd_in,
  output xcmd_t        cmd_out,
  input  logic         tok_in,    // pixel output token from the left
  output logic         tok_out,
  input  xpix_t        lane_in,   // pixel lane from the left
  output xpix_t        lane_out
);

  inten_t acc;
  logic   locked;       // Eval0 seen: no accumulation until Refresh
  logic   dis;          // Dis seen: skip the next covering Eval
  logic   neg_en;       // accumulate negative contributions
  logic   set_i_v, set_di_v, set_ddi_v;
  inten_t set_i, set_di, set_ddi;
  pix_t   hold;
  logic   tok_a, tok_b;

  // ------------------------------------------------- decode (combinational)
  logic [ADDR_W:0] span_end;
  logic            in_span, at_x;
  inten_t          i_e, di_e, ddi_e, contrib;
  xcmd_t           fwd;

  always_comb begin
    span_end = {1'b0, cmd_in.x} + {1'b0, cmd_in.dx};
    at_x     = (my_addr == cmd_in.x);
    in_span  = ({1'b0, my_addr} >= {1'b0, cmd_in.x}) && ({1'b0, my_addr} <= span_end);

    i_e   = set_i_v   ? set_i   : cmd_in.i;
    di_e  = set_di_v  ? set_di  : cmd_in.di;
    ddi_e = set_ddi_v ? set_ddi : cmd_in.ddi;

    contrib = (!neg_en && i_e < 0) ? '0 : i_e;

    fwd = cmd_in;
    if (in_span) begin
      unique case (cmd_in.op)
        OP_EVAL0, OP_EVAL1: fwd.i = i_e;
        OP_EVAL2: begin
          fwd.i  = i_e + di_e;
          fwd.di = di_e;
        end
        OP_EVAL3: begin
          fwd.i   = i_e + di_e;
          fwd.di  = di_e + ddi_e;
          fwd.ddi = ddi_e;
        end
        default: ;
      endcase
    end
    // periodic Set: the target address moves on by dx after each hit
    if (at_x && cmd_in.op inside {OP_SETPI, OP_SETPDI, OP_SETPDDI})
      fwd.x = cmd_in.x + cmd_in.dx;
  end

  // ----------------------------------------------------------- processor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      locked    <= 1'b0;
      dis       <= 1'b0;
      neg_en    <= 1'b1;
      set_i_v   <= 1'b0;
      set_di_v  <= 1'b0;
      set_ddi_v <= 1'b0;
      set_i     <= '0;
      set_di    <= '0;
      set_ddi   <= '0;
      hold      <= '0;
      cmd_out   <= XCMD_NOP;
    end else begin
      cmd_out <= fwd;
      unique case (cmd_in.op)
        OP_SETI, OP_SETPI: if (at_x) begin
          set_i_v <= 1'b1;
          set_i   <= cmd_in.i;
        end
        OP_SETDI, OP_SETPDI: if (at_x) begin
          set_di_v <= 1'b1;
          set_di   <= cmd_in.di;
        end
        OP_SETDDI, OP_SETPDDI: if (at_x) begin
          set_ddi_v <= 1'b1;
          set_ddi   <= cmd_in.ddi;
        end
        OP_EVAL0: if (in_span) begin
          if (dis) dis <= 1'b0;
          else begin
            acc    <= i_e;
            locked <= 1'b1;
          end
        end
        OP_EVAL1, OP_EVAL2, OP_EVAL3: if (in_span) begin
          if (dis) dis <= 1'b0;
          else if (!locked) acc <= acc + contrib;
        end
        OP_DIS: if (in_span) dis <= 1'b1;
        OP_ACCMODE: neg_en <= cmd_in.i[0];
        OP_REFRESH: begin
          hold      <= to_pixel(acc);
          acc       <= '0;
          locked    <= 1'b0;
          dis       <= 1'b0;
          set_i_v   <= 1'b0;
          set_di_v  <= 1'b0;
          set_ddi_v <= 1'b0;
        end
        default: ;
      endcase
    end
  end

  // --------------------------------------------------- pixel output path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_a    <= 1'b0;
      tok_b    <= 1'b0;
      lane_out <= '0;
    end else begin
      tok_a    <= tok_in;
      tok_b    <= tok_a;
      lane_out <= tok_a ? xpix_t'{valid: 1'b1, sol: (my_addr == '0), value: hold}
                        : lane_in;
    end
  end

  assign tok_out = tok_b;

endmodule
