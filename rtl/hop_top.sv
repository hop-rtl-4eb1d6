// hop_top: HOP, a processor that runs obfuscated programs.
//
// Everything in this module is inside the trust boundary. The untrusted host
// loads an encrypted program and a cleartext input, starts the run and, after
// a fixed amount of work T chosen by the program's sender, reads one result
// word. What the host can observe in between - the DRAM traffic and its
// timing - is the same for every program and input of that T:
//   * the program is decrypted (prog_dec_unit, key K1) into the instruction
//     scratchpad; the header chunk carries T; program and header are
//     authenticated (prog_mac_unit, CMAC over the ciphertext) and nothing
//     runs unless the sender's tag matches;
//   * the input blocks are written into ORAM before the run starts;
//   * the RV32I core works only out of its two scratchpads; data reach the
//     data scratchpad only through spld, which moves 64-byte blocks between
//     ORAM and scratchpad lines;
//   * the A^N M scheduler gives the core N instruction slots of 3 cycles and
//     then makes one ORAM access, real (pending spld work) or dummy, and stops
//     after T accesses;
//   * the Path ORAM controller (leaf PRF key K2) hides which block is used,
//     and the memory encryption unit (key K3) encrypts every slot it writes.
// The result is register a0 of the core, released on `outp` only once `done`
// is high.
//
// Host port: host_valid/host_ready handshake with host_cmd (hop_pkg::
// host_cmd_e), host_addr and host_data. HCMD_PROG: host_data[127:0] is
// encrypted program chunk host_addr (instructions 4*host_addr..+3, the first
// in bits 31:0). HCMD_HDR: host_data[127:0] is the encrypted header, T in
// plaintext bits 63:0. HCMD_INPUT: host_data is the 512-bit input block for
// ORAM block host_addr. HCMD_START: host_data[127:0] is the sender's MAC tag
// (prog_mac_unit) over the program chunks, sent in index order, and the
// header, sent after them; if the tag or the order is wrong the program does
// not run and auth_fail rises. After the run host_ready stays low until
// reset. DRAM port: see mem_enc_unit.
//
// Defaults are the document's configuration: 16 KB instruction and 512 KB
// data scratchpad, N = 1000 with 3-cycle slots, 25-level ORAM with 4 blocks
// per bucket, 512-bit blocks and a 128-block stash. The keys are parameters
// standing for the key hardwired at manufacture. Host command encoding, the MAC
// scheme, key use per unit and the result register are this design's choices.
module hop_top #(
  parameter int unsigned   N           = 1000,
  parameter int unsigned   SLOT_CYCLES = 3,
  parameter int unsigned   IBYTES      = 16 * 1024,
  parameter int unsigned   DBYTES      = 512 * 1024,
  parameter int unsigned   LEVELS      = 25,
  parameter int unsigned   Z           = 4,
  parameter int unsigned   STASH       = 128,
  parameter int unsigned   ADDR_W      = 16,
  parameter logic [127:0]  K1          = 128'h3c4fcf098815f7aba6d2ae2816157e2b,
  parameter logic [127:0]  K2          = 128'h0f0e0d0c0b0a09080706050403020100,
  parameter logic [127:0]  K3          = 128'h9a8b7c6d5e4f30211203f4e5d6c7b8a9,
  parameter int unsigned   LEAF_W      = LEVELS - 1,
  parameter int unsigned   SLOT_BITS   = 1 + ADDR_W + LEAF_W + hop_pkg::BLOCK_BITS,
  parameter int unsigned   DRAM_AW     = LEVELS + $clog2(Z)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // untrusted host
  input  logic                     host_valid,
  output logic                     host_ready,
  input  hop_pkg::host_cmd_e       host_cmd,
  input  logic [31:0]              host_addr,
  input  logic [511:0]             host_data,
  output logic                     done,
  output logic [31:0]              outp,
  output logic                     auth_fail,
  output logic                     stash_overflow,
  // untrusted DRAM (ORAM bank)
  output logic                     dram_req_valid,
  input  logic                     dram_req_ready,
  output logic                     dram_req_write,
  output logic [DRAM_AW-1:0]       dram_req_addr,
  output logic [64+SLOT_BITS-1:0]  dram_req_wdata,
  input  logic                     dram_rsp_valid,
  input  logic [64+SLOT_BITS-1:0]  dram_rsp_rdata
);
  import hop_pkg::*;

  localparam int unsigned BB    = BLOCK_BITS;
  localparam int unsigned IAW   = $clog2(IBYTES / 4);
  localparam int unsigned DAW   = $clog2(DBYTES);
  localparam int unsigned LINES = DBYTES / BLOCK_BYTES;
  localparam int unsigned LW    = $clog2(LINES);

  // ---------------------------------------------------------------- loader
  typedef enum logic [2:0] {L_IDLE, L_DEC, L_IWR, L_INPUT, L_RUN, L_DONE, L_FAIL} lstate_e;
  lstate_e lstate_q;

  logic         dec_in_valid, dec_in_ready, dec_out_valid;
  logic [31:0]  dec_in_index, dec_out_index;
  logic [127:0] dec_out_data;
  logic [63:0]  t_max_q;
  logic [1:0]   iw_k_q;
  logic [31:0]  iw_base_q;
  logic [127:0] iw_data_q;
  logic         go;
  logic         mac_ready, mac_in_valid;
  logic [127:0] mac_tag;
  logic [31:0]  n_chunks_q;   // program chunks accepted so far
  logic         hdr_seen_q, order_bad_q;

  prog_dec_unit u_dec (
    .clk, .rst_n, .key(K1),
    .in_valid (dec_in_valid),
    .in_ready (dec_in_ready),
    .in_index (dec_in_index),
    .in_data  (host_data[127:0]),
    .out_valid(dec_out_valid),
    .out_index(dec_out_index),
    .out_data (dec_out_data)
  );

  // Encrypt-then-MAC: the MAC runs over the ciphertext chunks as they arrive.
  // Program chunks must come in index order and before the header, which
  // closes the message; START carries the sender's tag in host_data[127:0].
  prog_mac_unit u_mac (
    .clk, .rst_n, .key(K1),
    .ready   (mac_ready),
    .in_valid(mac_in_valid),
    .in_last (host_cmd == HCMD_HDR),
    .in_data (host_data[127:0]),
    .tag     (mac_tag)
  );
  assign mac_in_valid = dec_in_valid;
  assign auth_fail    = (lstate_q == L_FAIL);

  assign host_ready   = (lstate_q == L_IDLE) && mac_ready;
  assign dec_in_valid = host_valid && host_ready && (host_cmd == HCMD_PROG || host_cmd == HCMD_HDR);
  assign dec_in_index = (host_cmd == HCMD_HDR) ? HDR_CHUNK_INDEX : host_addr;
  logic auth_ok;
  assign auth_ok      = hdr_seen_q && !order_bad_q && host_data[127:0] == mac_tag;
  assign go           = host_valid && host_ready && (host_cmd == HCMD_START) && auth_ok;

  // ---------------------------------------------------------------- ORAM port mux
  logic                o_req_valid, o_req_ready, o_req_dummy, o_req_write, o_rsp_valid;
  logic [ADDR_W-1:0]   o_req_addr;
  logic [BB-1:0]       o_req_wdata, o_rsp_rdata;
  logic                s_req_valid, s_req_dummy, s_req_write;
  logic [ADDR_W-1:0]   s_req_addr;
  logic [BB-1:0]       s_req_wdata;
  logic                ld_req_valid;
  logic                ld_issued_q;
  logic [BB-1:0]       host_data_q;

  assign ld_req_valid = (lstate_q == L_INPUT) && !ld_issued_q;
  always_comb begin
    if (lstate_q == L_RUN) begin
      o_req_valid = s_req_valid;
      o_req_dummy = s_req_dummy;
      o_req_write = s_req_write;
      o_req_addr  = s_req_addr;
      o_req_wdata = s_req_wdata;
    end else begin
      o_req_valid = ld_req_valid;
      o_req_dummy = 1'b0;
      o_req_write = 1'b1;
      o_req_addr  = iw_base_q[ADDR_W-1:0];
      o_req_wdata = host_data_q;
    end
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate_q    <= L_IDLE;
      t_max_q     <= '0;
      iw_k_q      <= '0;
      iw_base_q   <= '0;
      iw_data_q   <= '0;
      host_data_q <= '0;
      ld_issued_q <= 1'b0;
      n_chunks_q  <= '0;
      hdr_seen_q  <= 1'b0;
      order_bad_q <= 1'b0;
    end else begin
      unique case (lstate_q)
        L_IDLE: if (host_valid && host_ready) begin
          unique case (host_cmd)
            HCMD_PROG: begin
              if (hdr_seen_q || host_addr != n_chunks_q) order_bad_q <= 1'b1;
              n_chunks_q <= n_chunks_q + 32'd1;
              lstate_q   <= L_DEC;
            end
            HCMD_HDR: begin
              if (hdr_seen_q) order_bad_q <= 1'b1;
              hdr_seen_q <= 1'b1;
              lstate_q   <= L_DEC;
            end
            HCMD_INPUT: begin
              iw_base_q   <= host_addr;
              host_data_q <= host_data;
              ld_issued_q <= 1'b0;
              lstate_q    <= L_INPUT;
            end
            default:                      // HCMD_START
              lstate_q <= auth_ok ? L_RUN : L_FAIL;
          endcase
        end
        L_DEC: if (dec_out_valid) begin
          if (dec_out_index == HDR_CHUNK_INDEX) begin
            t_max_q  <= dec_out_data[63:0];
            lstate_q <= L_IDLE;
          end else begin
            iw_base_q <= dec_out_index;
            iw_data_q <= dec_out_data;
            iw_k_q    <= '0;
            lstate_q  <= L_IWR;
          end
        end
        L_IWR: begin
          iw_k_q    <= iw_k_q + 2'd1;
          iw_data_q <= iw_data_q >> 32;
          if (iw_k_q == 2'd3) lstate_q <= L_IDLE;
        end
        L_INPUT: begin
          if (o_req_valid && o_req_ready) ld_issued_q <= 1'b1;
          if (o_rsp_valid) lstate_q <= L_IDLE;
        end
        L_RUN: if (done) lstate_q <= L_DONE;
        default: ;                         // L_DONE, L_FAIL: wait for reset
      endcase
    end
  end

  // ---------------------------------------------------------------- scratchpads and core
  logic           i_wr_en, i_rd_en;
  logic [IAW-1:0] i_wr_addr, i_rd_addr;
  logic [31:0]    i_rd_data;
  assign i_wr_en   = (lstate_q == L_IWR);
  assign i_wr_addr = IAW'({iw_base_q[IAW-3:0], iw_k_q});

  iscratchpad #(.BYTES(IBYTES)) u_iscratch (
    .clk,
    .wr_en  (i_wr_en),
    .wr_addr(i_wr_addr),
    .wr_data(iw_data_q[31:0]),
    .rd_en  (i_rd_en),
    .rd_addr(i_rd_addr),
    .rd_data(i_rd_data)
  );

  logic           d_en, d_we, b_en, b_we;
  logic [3:0]     d_be;
  logic [DAW-1:0] d_addr;
  logic [31:0]    d_wdata, d_rdata;
  logic [LW-1:0]  b_line;
  logic [BB-1:0]  b_wdata, b_rdata;

  dscratchpad #(.BYTES(DBYTES)) u_dscratch (
    .clk,
    .w_en(d_en), .w_we(d_we), .w_be(d_be), .w_addr(d_addr), .w_wdata(d_wdata), .w_rdata(d_rdata),
    .b_en, .b_we, .b_line, .b_wdata, .b_rdata
  );

  logic        slot_start, core_stalled, retire;
  logic        spld_start, spld_done, spld_busy;
  logic [31:0] spld_addr, spld_nblocks, spld_spaddr, a0;

  rv32_core #(.IAW(IAW), .DAW(DAW)) u_core (
    .clk, .rst_n,
    .slot_start,
    .stalled   (core_stalled),
    .retire,
    .imem_en   (i_rd_en),
    .imem_addr (i_rd_addr),
    .imem_rdata(i_rd_data),
    .dmem_en   (d_en),
    .dmem_we   (d_we),
    .dmem_be   (d_be),
    .dmem_addr (d_addr),
    .dmem_wdata(d_wdata),
    .dmem_rdata(d_rdata),
    .spld_start,
    .spld_addr,
    .spld_nblocks,
    .spld_spaddr,
    .spld_done,
    .a0
  );

  // ---------------------------------------------------------------- spld and schedule
  logic              sp_req_valid, sp_req_write, sp_grant, sp_rsp_valid;
  logic [ADDR_W-1:0] sp_req_addr;
  logic [BB-1:0]     sp_req_wdata;

  spld_unit #(.LINES(LINES), .ADDR_W(ADDR_W)) u_spld (
    .clk, .rst_n,
    .start     (spld_start),
    .addr      (spld_addr),
    .nblocks   (spld_nblocks),
    .spaddr    (spld_spaddr),
    .done      (spld_done),
    .busy      (spld_busy),
    .b_en, .b_we, .b_line, .b_wdata, .b_rdata,
    .oreq_valid(sp_req_valid),
    .oreq_write(sp_req_write),
    .oreq_addr (sp_req_addr),
    .oreq_wdata(sp_req_wdata),
    .oreq_grant(sp_grant),
    .ores_valid(sp_rsp_valid),
    .ores_rdata(o_rsp_rdata)
  );

  logic        running, ev_dummy_a, ev_real_m, ev_dummy_m;
  logic [63:0] t_count;

  anm_sched #(.N(N), .SLOT_CYCLES(SLOT_CYCLES), .ADDR_W(ADDR_W)) u_sched (
    .clk, .rst_n,
    .go,
    .t_max       (t_max_q),
    .running,
    .done,
    .t_count,
    .slot_start,
    .core_stalled,
    .sp_req_valid,
    .sp_req_write,
    .sp_req_addr,
    .sp_req_wdata,
    .sp_grant,
    .sp_rsp_valid,
    .o_req_valid (s_req_valid),
    .o_req_ready (o_req_ready),
    .o_req_dummy (s_req_dummy),
    .o_req_write (s_req_write),
    .o_req_addr  (s_req_addr),
    .o_req_wdata (s_req_wdata),
    .o_rsp_valid (o_rsp_valid),
    .ev_dummy_a,
    .ev_real_m,
    .ev_dummy_m
  );

  // the result leaves the chip only when the run is over
  assign outp = done ? a0 : 32'd0;

  // ---------------------------------------------------------------- ORAM and memory encryption
  logic                 m_req_valid, m_req_ready, m_req_write, m_rsp_valid;
  logic [DRAM_AW-1:0]   m_req_addr;
  logic [SLOT_BITS-1:0] m_req_wdata, m_rsp_rdata;

  oram_ctrl #(.LEVELS(LEVELS), .Z(Z), .STASH(STASH), .ADDR_W(ADDR_W), .BLOCK_BITS(BB)) u_oram (
    .clk, .rst_n, .key(K2),
    .req_valid  (o_req_valid),
    .req_ready  (o_req_ready),
    .req_dummy  (o_req_dummy),
    .req_write  (o_req_write),
    .req_addr   (o_req_addr),
    .req_wdata  (o_req_wdata),
    .rsp_valid  (o_rsp_valid),
    .rsp_rdata  (o_rsp_rdata),
    .stash_overflow,
    .m_req_valid, .m_req_ready, .m_req_write, .m_req_addr, .m_req_wdata,
    .m_rsp_valid, .m_rsp_rdata
  );

  mem_enc_unit #(.SLOT_BITS(SLOT_BITS), .DRAM_AW(DRAM_AW)) u_menc (
    .clk, .rst_n, .key(K3),
    .o_req_valid(m_req_valid),
    .o_req_ready(m_req_ready),
    .o_req_write(m_req_write),
    .o_req_addr (m_req_addr),
    .o_req_wdata(m_req_wdata),
    .o_rsp_valid(m_rsp_valid),
    .o_rsp_rdata(m_rsp_rdata),
    .d_req_valid(dram_req_valid),
    .d_req_ready(dram_req_ready),
    .d_req_write(dram_req_write),
    .d_req_addr (dram_req_addr),
    .d_req_wdata(dram_req_wdata),
    .d_rsp_valid(dram_rsp_valid),
    .d_rsp_rdata(dram_rsp_rdata)
  );

endmodule
