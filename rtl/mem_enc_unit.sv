// mem_enc_unit: encryption unit between the ORAM controller and the DRAM.
//
// Every ORAM bucket slot leaves the chip encrypted and is decrypted when it
// comes back, as the document requires of the unit that faces the DRAM. The
// cipher mode is this design's choice: AES-128 in counter mode. Each write
// takes a fresh 64-bit initialisation vector (IV) from an on-chip counter,
// and the slot is stored as {IV, plaintext XOR pad}, where pad chunk j is
//   AES_key({IV, 32-bit slot address, 24'h0, 8-bit j}).
// NCH AES cores run in parallel so the whole pad is ready 11 cycles after the
// IV is known. A slot whose IV is zero has never been written and reads back
// as all zeros, i.e. an empty slot; the AES cores run in that case too, so
// the latency does not depend on the data.
//
// ORAM side (trusted): o_req_valid/o_req_ready handshake with o_req_write,
// o_req_addr (slot index) and o_req_wdata (plain slot); one o_rsp_valid pulse
// per request, carrying o_rsp_rdata for reads. DRAM side (untrusted):
// d_req_valid is held until d_req_ready; the DRAM answers each request, read
// or write, with one d_rsp_valid pulse. One request is in flight at a time.
module mem_enc_unit #(
  parameter int unsigned SLOT_BITS = 553,
  parameter int unsigned DRAM_AW   = 27,
  parameter int unsigned NCH       = hop_pkg::aes_chunks(SLOT_BITS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [127:0]            key,
  // ORAM controller side
  input  logic                    o_req_valid,
  output logic                    o_req_ready,
  input  logic                    o_req_write,
  input  logic [DRAM_AW-1:0]      o_req_addr,
  input  logic [SLOT_BITS-1:0]    o_req_wdata,
  output logic                    o_rsp_valid,
  output logic [SLOT_BITS-1:0]    o_rsp_rdata,
  // DRAM side
  output logic                    d_req_valid,
  input  logic                    d_req_ready,
  output logic                    d_req_write,
  output logic [DRAM_AW-1:0]      d_req_addr,
  output logic [64+SLOT_BITS-1:0] d_req_wdata,
  input  logic                    d_rsp_valid,
  input  logic [64+SLOT_BITS-1:0] d_rsp_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_DREAD, S_DWAIT, S_PAD, S_DWRITE, S_WACK} state_e;
  state_e state_q;

  logic                 write_q;
  logic [DRAM_AW-1:0]   addr_q;
  logic [SLOT_BITS-1:0] data_q;   // plaintext (write) or ciphertext (read)
  logic [63:0]          iv_q, iv_ctr_q;

  logic                 aes_start;
  logic [NCH-1:0]       aes_done;
  logic [NCH*128-1:0]   pad;

  for (genvar j = 0; j < NCH; j++) begin : g_aes
    logic busy_unused;
    aes128_core u_aes (
      .clk, .rst_n,
      .start    (aes_start),
      .key      (key),
      .block_in ({iv_q, 32'(addr_q), 24'h0, 8'(j)}),
      .busy     (busy_unused),
      .done     (aes_done[j]),
      .block_out(pad[j*128 +: 128])
    );
  end

  assign o_req_ready = (state_q == S_IDLE);
  assign d_req_valid = (state_q == S_DREAD) || (state_q == S_DWRITE);
  assign d_req_write = (state_q == S_DWRITE);
  assign d_req_addr  = addr_q;
  assign d_req_wdata = {iv_q, data_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      write_q     <= 1'b0;
      addr_q      <= '0;
      data_q      <= '0;
      iv_q        <= '0;
      iv_ctr_q    <= '0;
      aes_start   <= 1'b0;
      o_rsp_valid <= 1'b0;
      o_rsp_rdata <= '0;
    end else begin
      aes_start   <= 1'b0;
      o_rsp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (o_req_valid) begin
          write_q <= o_req_write;
          addr_q  <= o_req_addr;
          data_q  <= o_req_wdata;
          if (o_req_write) begin
            iv_q      <= iv_ctr_q + 64'd1;
            iv_ctr_q  <= iv_ctr_q + 64'd1;
            aes_start <= 1'b1;
            state_q   <= S_PAD;
          end else begin
            state_q <= S_DREAD;
          end
        end
        S_DREAD: if (d_req_ready) state_q <= S_DWAIT;
        S_DWAIT: if (d_rsp_valid) begin
          iv_q      <= d_rsp_rdata[64+SLOT_BITS-1 -: 64];
          data_q    <= d_rsp_rdata[SLOT_BITS-1:0];
          aes_start <= 1'b1;
          state_q   <= S_PAD;
        end
        S_PAD: if (aes_done[0]) begin
          if (write_q) begin
            data_q  <= data_q ^ pad[SLOT_BITS-1:0];
            state_q <= S_DWRITE;
          end else begin
            o_rsp_rdata <= (iv_q == 64'd0) ? '0 : (data_q ^ pad[SLOT_BITS-1:0]);
            o_rsp_valid <= 1'b1;
            state_q     <= S_IDLE;
          end
        end
        S_DWRITE: if (d_req_ready) state_q <= S_WACK;
        S_WACK: if (d_rsp_valid) begin
          o_rsp_valid <= 1'b1;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
