// oram_posmap: on-chip position map of the ORAM controller.
//
// One entry per logical ORAM block: a valid bit (the block has been written
// at least once) and the leaf of the tree path the block is mapped to. The
// default of 65536 entries of 32 bits is the document's 256 KB on-chip
// position map; the entry layout is this design's choice.
//
// After reset the map clears itself, one entry per cycle; `init_busy` is high
// until that sweep ends and no access may be made before. Reads are
// synchronous: rd_data is valid the cycle after rd_en. A write and a read of
// the same entry in the same cycle return the old value.
module oram_posmap #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned LEAF_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_busy,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output logic [LEAF_W-1:0] rd_leaf,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [LEAF_W-1:0] wr_leaf
);
  localparam int unsigned ENTRIES = 1 << ADDR_W;

  logic [LEAF_W:0]   mem [ENTRIES];
  logic [ADDR_W-1:0] init_ptr;
  logic [LEAF_W:0]   rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_ptr  <= '0;
    end else if (init_busy) begin
      init_ptr <= init_ptr + 1'b1;
      if (init_ptr == ADDR_W'(ENTRIES - 1)) init_busy <= 1'b0;
    end
  end

  // Memory array: no reset, cleared by the sweep above.
  always_ff @(posedge clk) begin
    if (init_busy)  mem[init_ptr] <= '0;
    else if (wr_en) mem[wr_addr]  <= {1'b1, wr_leaf};
    if (rd_en)      rd_q          <= mem[rd_addr];
  end

  assign rd_valid = rd_q[LEAF_W];
  assign rd_leaf  = rd_q[LEAF_W-1:0];

endmodule
