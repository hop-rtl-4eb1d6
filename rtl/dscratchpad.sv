// dscratchpad: on-chip data scratchpad (512 KB by default, as in the
// document), software managed.
//
// The core's loads and stores are served only from here; data moves between
// the scratchpad and ORAM a whole 512-bit ORAM block at a time under the
// spld instruction. To give both widths one array, the storage is 16 banks of
// 32-bit words: word w of the scratchpad is in bank w mod 16, row w / 16, so a
// 512-bit line is one row across all banks (this organisation is this
// design's choice).
//
// Word port (core): byte address, byte enables for stores, synchronous read
// (w_rdata the cycle after w_en). Block port (spld unit): line index, full
// 512-bit write or read, synchronous. The block port wins if both address the
// same bank in one cycle; the core is stalled during spld, so that does not
// happen in the design.
module dscratchpad #(
  parameter int unsigned BYTES = 512 * 1024,
  parameter int unsigned BANKS = hop_pkg::BLOCK_WORDS,
  parameter int unsigned ROWS  = BYTES / (4 * BANKS),
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned BW    = $clog2(BANKS),
  parameter int unsigned AW    = RW + BW + 2
) (
  input  logic                  clk,
  // word port
  input  logic                  w_en,
  input  logic                  w_we,
  input  logic [3:0]            w_be,
  input  logic [AW-1:0]         w_addr,
  input  logic [31:0]           w_wdata,
  output logic [31:0]           w_rdata,
  // block port
  input  logic                  b_en,
  input  logic                  b_we,
  input  logic [RW-1:0]         b_line,
  input  logic [BANKS*32-1:0]   b_wdata,
  output logic [BANKS*32-1:0]   b_rdata
);
  logic [BW-1:0] w_bank, w_bank_q;
  logic [RW-1:0] w_row;
  assign w_bank = w_addr[2 +: BW];
  assign w_row  = w_addr[2 + BW +: RW];

  logic [31:0] bank_q [BANKS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [31:0] mem [ROWS];
    logic        sel_w;
    assign sel_w = w_en && (w_bank == BW'(b)) && !b_en;
    always_ff @(posedge clk) begin
      if (b_en) begin
        if (b_we) mem[b_line] <= b_wdata[b*32 +: 32];
        bank_q[b] <= mem[b_line];
      end else if (sel_w) begin
        if (w_we) begin
          for (int i = 0; i < 4; i++)
            if (w_be[i]) mem[w_row][i*8 +: 8] <= w_wdata[i*8 +: 8];
        end
        bank_q[b] <= mem[w_row];
      end
    end
    assign b_rdata[b*32 +: 32] = bank_q[b];
  end

  always_ff @(posedge clk) w_bank_q <= w_bank;
  assign w_rdata = bank_q[w_bank_q];

endmodule
