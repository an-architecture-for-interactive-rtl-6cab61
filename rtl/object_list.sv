// object_list: the structured list of visible objects that replaces the
// frame buffer.
//
// The list is held in NUM_BANKS banks of DEPTH object records (obj_t), one
// bank per Y-processor, so that every Y-processor reads its own part of the
// list in parallel. The hidden surface removal (or any host) writes one
// record per clock through the write port; a record whose op is OP_NOP is
// an empty slot. Each bank has an asynchronous read port (rd_idx ->
// rd_obj in the same clock); the write takes effect at the clock edge.
// Reset empties every slot.
//
// A structured object list distributed over the Y-processors follows the
// architecture; the bank-per-Y-processor split, the record format and the
// sizes (4 banks of 16 records) are choices of this design.
module object_list
  import dc_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned DEPTH     = 16
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 wr_en,
  input  logic [$clog2(NUM_BANKS)-1:0]       wr_bank,
  input  logic [$clog2(DEPTH)-1:0]           wr_idx,
  input  obj_t                                 wr_obj,
  input  logic [$clog2(DEPTH)-1:0]           rd_idx [NUM_BANKS],
  output obj_t                                 rd_obj [NUM_BANKS]
);

  obj_t mem [NUM_BANKS][DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++)
        for (int d = 0; d < DEPTH; d++)
          mem[b][d].op <= OP_NOP;
    end else if (wr_en && (int'(wr_bank) < NUM_BANKS) && (int'(wr_idx) < DEPTH)) begin
      mem[wr_bank][wr_idx] <= wr_obj;
    end
  end

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      rd_obj[b] = (int'(rd_idx[b]) < DEPTH) ? mem[b][rd_idx[b]] : '0;
  end

endmodule
