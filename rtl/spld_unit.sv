// spld_unit: carries out the spld scratchpad-load instruction.
//
// spld addr, n, spaddr moves n consecutive 64-byte ORAM blocks, starting at
// main-memory byte address addr, into consecutive scratchpad lines starting
// at scratchpad byte address spaddr. As the document specifies, for each line
// the data currently held there is first written back to its place in main
// memory (ORAM), then the new block is read into it. To know where a line
// came from, the unit keeps a tag per scratchpad line: a valid bit and the
// ORAM block address; a line that holds nothing loaded by spld is not written
// back (this design's choice). Addresses are taken modulo the block size.
//
// The unit does not talk to the ORAM directly. It raises oreq_valid with a
// request and holds it; the A^N M scheduler takes it in its next memory slot
// (oreq_grant pulse) and returns the ORAM response with ores_valid. So each
// write-back and each load costs one memory slot of the fixed schedule.
// `done` pulses once the last block is in the scratchpad (also for n = 0,
// one cycle after start). Scratchpad line port: synchronous, one cycle.
module spld_unit #(
  parameter int unsigned LINES      = 8192,
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned BLOCK_BITS = hop_pkg::BLOCK_BITS,
  parameter int unsigned LINE_W     = $clog2(LINES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [31:0]           addr,
  input  logic [31:0]           nblocks,
  input  logic [31:0]           spaddr,
  output logic                  done,
  output logic                  busy,
  // scratchpad line port
  output logic                  b_en,
  output logic                  b_we,
  output logic [LINE_W-1:0]     b_line,
  output logic [BLOCK_BITS-1:0] b_wdata,
  input  logic [BLOCK_BITS-1:0] b_rdata,
  // ORAM request, served in the scheduler's memory slots
  output logic                  oreq_valid,
  output logic                  oreq_write,
  output logic [ADDR_W-1:0]     oreq_addr,
  output logic [BLOCK_BITS-1:0] oreq_wdata,
  input  logic                  oreq_grant,
  input  logic                  ores_valid,
  input  logic [BLOCK_BITS-1:0] ores_rdata
);
  localparam int unsigned OFF = $clog2(BLOCK_BITS / 8);

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_WB_RD, S_WB_REQ, S_LD_REQ, S_LD_FILL, S_DONE} state_e;
  state_e state_q;

  logic                  tag_v [LINES];
  logic [ADDR_W-1:0]     tag_a [LINES];
  logic [ADDR_W-1:0]     blk_q;
  logic [LINE_W-1:0]     line_q;
  logic [31:0]           cnt_q;
  logic                  granted_q;
  logic [BLOCK_BITS-1:0] data_q;

  assign busy       = (state_q != S_IDLE);
  assign oreq_valid = ((state_q == S_WB_REQ) || (state_q == S_LD_REQ)) && !granted_q;
  assign oreq_write = (state_q == S_WB_REQ);
  assign oreq_addr  = (state_q == S_WB_REQ) ? tag_a[line_q] : blk_q;
  assign oreq_wdata = data_q;

  assign b_en    = (state_q == S_CHECK && tag_v[line_q]) || (state_q == S_LD_FILL);
  assign b_we    = (state_q == S_LD_FILL);
  assign b_line  = line_q;
  assign b_wdata = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      blk_q     <= '0;
      line_q    <= '0;
      cnt_q     <= '0;
      granted_q <= 1'b0;
      data_q    <= '0;
      done      <= 1'b0;
      for (int i = 0; i < LINES; i++) tag_v[i] <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          blk_q   <= addr[OFF +: ADDR_W];
          line_q  <= spaddr[OFF +: LINE_W];
          cnt_q   <= nblocks;
          state_q <= (nblocks == 32'd0) ? S_DONE : S_CHECK;
        end
        // a line with a tag is read out (b_en) and written back first
        S_CHECK: state_q <= tag_v[line_q] ? S_WB_RD : S_LD_REQ;
        S_WB_RD: begin
          data_q  <= b_rdata;
          state_q <= S_WB_REQ;
        end
        S_WB_REQ: begin
          if (oreq_grant) granted_q <= 1'b1;
          if (ores_valid) begin
            granted_q <= 1'b0;
            state_q   <= S_LD_REQ;
          end
        end
        S_LD_REQ: begin
          if (oreq_grant) granted_q <= 1'b1;
          if (ores_valid) begin
            granted_q <= 1'b0;
            data_q    <= ores_rdata;
            state_q   <= S_LD_FILL;
          end
        end
        S_LD_FILL: begin
          tag_v[line_q] <= 1'b1;
          tag_a[line_q] <= blk_q;
          blk_q  <= blk_q + 1'b1;
          line_q <= line_q + 1'b1;
          cnt_q  <= cnt_q - 32'd1;
          state_q <= (cnt_q == 32'd1) ? S_DONE : S_CHECK;
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
