// iscratchpad: on-chip instruction scratchpad (16 KB by default, as in the
// document).
//
// Holds the decrypted program. It is written only while the program is being
// loaded, one 32-bit word per cycle from the program decryption unit, and read
// by the core's fetch. Both ports are synchronous: rd_data is valid the cycle
// after rd_en. Addresses are word indices. Being on chip, its accesses are not
// visible outside the trust boundary.
module iscratchpad #(
  parameter int unsigned BYTES = 16 * 1024,
  parameter int unsigned AW    = $clog2(BYTES / 4)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data
);
  logic [31:0] mem [BYTES / 4];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
