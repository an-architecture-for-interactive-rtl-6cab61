// tb_object_list: writes random object records into random banks and
// slots of a 4 x 8 list and reads every bank back through its own port,
// comparing with a shadow copy; also checks that reset leaves every slot
// empty (op = Nop) and that out-of-range writes change nothing.
module tb_object_list;
  import dc_pkg::*;

  localparam int unsigned NB = 4, D = 8;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [$clog2(NB)-1:0] wr_bank;
  logic [$clog2(D)-1:0]  wr_idx;
  obj_t wr_obj;
  logic [$clog2(D)-1:0]  rd_idx [NB];
  obj_t rd_obj [NB];

  object_list #(.NUM_BANKS(NB), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_bank(wr_bank), .wr_idx(wr_idx),
    .wr_obj(wr_obj), .rd_idx(rd_idx), .rd_obj(rd_obj)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  obj_t shadow [NB][D];
  bit   written [NB][D];

  function automatic obj_t rnd_obj();
    obj_t o;
    logic [$bits(obj_t)-1:0] bits;
    for (int w = 0; w < $bits(obj_t); w += 32) bits[w +: 32] = $urandom;
    o = obj_t'(bits);
    o.op = xop_e'($urandom_range(1, 12));
    return o;
  endfunction

  task automatic read_all(string what);
    for (int d = 0; d < D; d++) begin
      for (int b = 0; b < NB; b++) rd_idx[b] = ($clog2(D))'((d + b) % D);
      #1;
      for (int b = 0; b < NB; b++) begin
        int dd = (d + b) % D;
        checks++;
        if (written[b][dd] ? (rd_obj[b] != shadow[b][dd]) : (rd_obj[b].op != OP_NOP)) begin
          failures++; $display("FAIL %s bank %0d slot %0d", what, b, dd);
        end
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) rd_idx[b] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    read_all("after reset");
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_bank = ($clog2(NB))'($urandom);
      wr_idx  = ($clog2(D))'($urandom);
      wr_obj  = rnd_obj();
      shadow[wr_bank][wr_idx]  = wr_obj;
      written[wr_bank][wr_idx] = 1;
      @(posedge clk); #1;
      wr_en = 1'b0;
      if (t % 10 == 9) read_all("after writes");
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
