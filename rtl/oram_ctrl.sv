// oram_ctrl: Path ORAM controller, the chip's only way to external memory.
//
// Logical memory is a set of 512-bit blocks. Physically the blocks live in a
// binary tree of LEVELS levels of buckets in DRAM, each bucket holding Z
// slots, and every block is mapped to one leaf (a root-to-leaf path) by the
// on-chip position map. Each access, real or dummy, does exactly the same
// work, so the DRAM sees nothing that depends on the address or the data:
//   1. a fresh leaf is drawn from a pseudorandom function: AES under key K2
//      of a per-session access counter; the block is remapped to it;
//   2. all LEVELS*Z slots of the old path are read and the real blocks are
//      moved into the on-chip stash;
//   3. the requested block is read from / written into the stash (a block
//      that was never written reads as zero);
//   4. the path is written back from the leaf up to the root: for each
//      bucket the whole stash is scanned once and up to Z blocks whose leaf
//      shares the path down to that bucket are placed, the rest of the
//      bucket is filled with empty slots.
// A dummy access (req_dummy) reads and rewrites a random path without
// touching the position map, as the A^N M schedule needs.
//
// Defaults follow the document's configuration: 25 levels, 4 blocks per
// bucket, 512-bit blocks, a 128-block stash. The document's controller uses
// a recursive position map to cover 4 GB and MACs the position map for
// integrity; neither is built here. This controller keeps a flat on-chip
// position map of 2^ADDR_W entries (65536 entries of 32 bits = 256 KB, the
// document's on-chip position map size), so it addresses 4 MB of logical
// memory. Slot format (this design's choice): {valid, addr, leaf, data}.
//
// Interface: req_valid/req_ready handshake; rsp_valid pulses once when the
// whole access, write-back included, is over, with rsp_rdata for reads.
// stash_overflow is sticky and means a block was lost (a real block found on
// the path when the stash was full); the design does not expect it.
module oram_ctrl #(
  parameter int unsigned LEVELS     = 25,
  parameter int unsigned Z          = 4,
  parameter int unsigned STASH      = 128,
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned BLOCK_BITS = 512,
  parameter int unsigned LEAF_W     = LEVELS - 1,
  parameter int unsigned SLOT_BITS  = 1 + ADDR_W + LEAF_W + BLOCK_BITS,
  parameter int unsigned DRAM_AW    = LEVELS + $clog2(Z)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [127:0]          key,          // K2: seeds the leaf PRF
  // logical request port
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_dummy,
  input  logic                  req_write,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [BLOCK_BITS-1:0] req_wdata,
  output logic                  rsp_valid,
  output logic [BLOCK_BITS-1:0] rsp_rdata,
  output logic                  stash_overflow,
  // towards the memory encryption unit
  output logic                  m_req_valid,
  input  logic                  m_req_ready,
  output logic                  m_req_write,
  output logic [DRAM_AW-1:0]    m_req_addr,
  output logic [SLOT_BITS-1:0]  m_req_wdata,
  input  logic                  m_rsp_valid,
  input  logic [SLOT_BITS-1:0]  m_rsp_rdata
);
  localparam int unsigned SI_W = $clog2(STASH);
  localparam int unsigned LV_W = $clog2(LEVELS + 1);
  localparam int unsigned ZW   = $clog2(Z + 1);
  localparam int unsigned ZI   = (Z > 1) ? $clog2(Z) : 1;

  typedef struct packed {
    logic                  valid;
    logic [ADDR_W-1:0]     addr;
    logic [LEAF_W-1:0]     leaf;
    logic [BLOCK_BITS-1:0] data;
  } slot_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_PRF, S_RD_REQ, S_RD_WAIT, S_HIT, S_SCAN, S_WR_REQ, S_WR_WAIT, S_DONE
  } state_e;
  state_e state_q;

  // request registers
  logic                  dummy_q, write_q;
  logic [ADDR_W-1:0]     addr_q;
  logic [BLOCK_BITS-1:0] wdata_q;
  logic [LEAF_W-1:0]     path_q, new_leaf_q;
  logic [63:0]           acc_ctr_q;

  // stash
  logic                  st_valid [STASH];
  logic [ADDR_W-1:0]     st_addr  [STASH];
  logic [LEAF_W-1:0]     st_leaf  [STASH];
  logic [BLOCK_BITS-1:0] st_data  [STASH];

  // path walk
  logic [LV_W-1:0]       lvl_q;
  logic [ZW-1:0]         slot_q, npick_q;
  logic [SI_W-1:0]       scan_q;
  logic [SI_W-1:0]       pick_q [Z];

  // posmap
  logic                  pm_init_busy, pm_rd_en, pm_valid, pm_wr_en;
  logic [LEAF_W-1:0]     pm_leaf;

  oram_posmap #(.ADDR_W(ADDR_W), .LEAF_W(LEAF_W)) u_posmap (
    .clk, .rst_n,
    .init_busy(pm_init_busy),
    .rd_en    (pm_rd_en),
    .rd_addr  (req_addr),
    .rd_valid (pm_valid),
    .rd_leaf  (pm_leaf),
    .wr_en    (pm_wr_en),
    .wr_addr  (addr_q),
    .wr_leaf  (new_leaf_q)
  );

  // leaf PRF
  logic         prf_start, prf_busy, prf_done;
  logic [127:0] prf_out;
  aes128_core u_prf (
    .clk, .rst_n,
    .start    (prf_start),
    .key      (key),
    .block_in ({acc_ctr_q, 64'h484f_505f_4c45_4146}),
    .busy     (prf_busy),
    .done     (prf_done),
    .block_out(prf_out)
  );

  // free stash entry and stash lookup
  logic            free_found, hit_found;
  logic [SI_W-1:0] free_idx, hit_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    hit_found  = 1'b0;
    hit_idx    = '0;
    for (int i = STASH - 1; i >= 0; i--) begin
      if (!st_valid[i]) begin
        free_found = 1'b1;
        free_idx   = SI_W'(i);
      end
      if (st_valid[i] && st_addr[i] == addr_q) begin
        hit_found = 1'b1;
        hit_idx   = SI_W'(i);
      end
    end
  end

  // bucket of the current level on the current path, and its slot address
  logic [LEAF_W-1:0]  shift_amt;
  logic [DRAM_AW-1:0] bucket, slot_addr;
  assign shift_amt = LEAF_W'(LEAF_W - lvl_q);
  assign bucket    = (DRAM_AW'(1) << lvl_q) - DRAM_AW'(1) + DRAM_AW'(path_q >> shift_amt);
  assign slot_addr = DRAM_AW'(bucket * Z) + DRAM_AW'(slot_q);

  // can the scanned stash entry live in the current bucket?
  logic scan_fits;
  assign scan_fits = st_valid[scan_q] && (((st_leaf[scan_q] ^ path_q) >> shift_amt) == '0);

  slot_t rd_slot, wr_slot;
  assign rd_slot = slot_t'(m_rsp_rdata);
  always_comb begin
    wr_slot = '0;
    if (slot_q < npick_q) begin
      wr_slot.valid = 1'b1;
      wr_slot.addr  = st_addr[pick_q[ZI'(slot_q)]];
      wr_slot.leaf  = st_leaf[pick_q[ZI'(slot_q)]];
      wr_slot.data  = st_data[pick_q[ZI'(slot_q)]];
    end
  end

  assign req_ready   = (state_q == S_IDLE);
  assign pm_rd_en    = req_valid && req_ready;
  assign m_req_valid = (state_q == S_RD_REQ) || (state_q == S_WR_REQ);
  assign m_req_write = (state_q == S_WR_REQ);
  assign m_req_addr  = slot_addr;
  assign m_req_wdata = wr_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_INIT;
      dummy_q        <= 1'b0;
      write_q        <= 1'b0;
      addr_q         <= '0;
      wdata_q        <= '0;
      path_q         <= '0;
      new_leaf_q     <= '0;
      acc_ctr_q      <= '0;
      lvl_q          <= '0;
      slot_q         <= '0;
      npick_q        <= '0;
      scan_q         <= '0;
      prf_start      <= 1'b0;
      pm_wr_en       <= 1'b0;
      rsp_valid      <= 1'b0;
      rsp_rdata      <= '0;
      stash_overflow <= 1'b0;
      for (int i = 0; i < STASH; i++) st_valid[i] <= 1'b0;
      for (int i = 0; i < Z; i++) pick_q[i] <= '0;
    end else begin
      prf_start <= 1'b0;
      pm_wr_en  <= 1'b0;
      rsp_valid <= 1'b0;
      unique case (state_q)
        S_INIT: if (!pm_init_busy) state_q <= S_IDLE;

        S_IDLE: if (req_valid) begin
          dummy_q   <= req_dummy;
          write_q   <= req_write;
          addr_q    <= req_addr;
          wdata_q   <= req_wdata;
          prf_start <= 1'b1;
          state_q   <= S_PRF;
        end

        // posmap data arrived the cycle after S_IDLE; wait for the PRF.
        S_PRF: if (prf_done) begin
          acc_ctr_q  <= acc_ctr_q + 64'd1;
          new_leaf_q <= prf_out[LEAF_W-1:0];
          if (!dummy_q && pm_valid) path_q <= pm_leaf;
          else                      path_q <= prf_out[64 +: LEAF_W];
          pm_wr_en   <= !dummy_q && (pm_valid || write_q);
          lvl_q      <= '0;
          slot_q     <= '0;
          state_q    <= S_RD_REQ;
        end

        S_RD_REQ: if (m_req_ready) state_q <= S_RD_WAIT;

        S_RD_WAIT: if (m_rsp_valid) begin
          if (rd_slot.valid) begin
            if (free_found) begin
              st_valid[free_idx] <= 1'b1;
              st_addr[free_idx]  <= rd_slot.addr;
              st_leaf[free_idx]  <= rd_slot.leaf;
              st_data[free_idx]  <= rd_slot.data;
            end else begin
              stash_overflow <= 1'b1;
            end
          end
          if (slot_q == ZW'(Z - 1)) begin
            slot_q <= '0;
            if (lvl_q == LV_W'(LEVELS - 1)) state_q <= S_HIT;
            else begin
              lvl_q   <= lvl_q + 1'b1;
              state_q <= S_RD_REQ;
            end
          end else begin
            slot_q  <= slot_q + 1'b1;
            state_q <= S_RD_REQ;
          end
        end

        S_HIT: begin
          rsp_rdata <= '0;
          if (!dummy_q) begin
            if (hit_found) begin
              rsp_rdata         <= st_data[hit_idx];
              st_leaf[hit_idx]  <= new_leaf_q;
              if (write_q) st_data[hit_idx] <= wdata_q;
            end else if (write_q) begin
              if (free_found) begin
                st_valid[free_idx] <= 1'b1;
                st_addr[free_idx]  <= addr_q;
                st_leaf[free_idx]  <= new_leaf_q;
                st_data[free_idx]  <= wdata_q;
              end else begin
                stash_overflow <= 1'b1;
              end
            end
          end
          lvl_q   <= LV_W'(LEVELS - 1);
          scan_q  <= '0;
          npick_q <= '0;
          state_q <= S_SCAN;
        end

        // one stash entry per cycle; pick up to Z for the current bucket
        S_SCAN: begin
          if (scan_fits && npick_q < ZW'(Z)) begin
            pick_q[ZI'(npick_q)] <= scan_q;
            npick_q          <= npick_q + 1'b1;
            st_valid[scan_q] <= 1'b0;
          end
          if (scan_q == SI_W'(STASH - 1)) begin
            slot_q  <= '0;
            state_q <= S_WR_REQ;
          end else begin
            scan_q <= scan_q + 1'b1;
          end
        end

        S_WR_REQ: if (m_req_ready) state_q <= S_WR_WAIT;

        S_WR_WAIT: if (m_rsp_valid) begin
          if (slot_q == ZW'(Z - 1)) begin
            if (lvl_q == '0) state_q <= S_DONE;
            else begin
              lvl_q   <= lvl_q - 1'b1;
              scan_q  <= '0;
              npick_q <= '0;
              state_q <= S_SCAN;
            end
          end else begin
            slot_q  <= slot_q + 1'b1;
            state_q <= S_WR_REQ;
          end
        end

        S_DONE: begin
          rsp_valid <= 1'b1;
          state_q   <= S_IDLE;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
