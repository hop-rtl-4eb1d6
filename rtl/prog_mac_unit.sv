// prog_mac_unit: authenticates the encrypted program and header (AES-CMAC).
//
// The sender encrypts the program and then MACs the ciphertext
// (encrypt-then-MAC), so the chip can refuse a program or a header (and
// with it T) that the receiver changed, reordered, cut short or extended.
// The MAC is CMAC over the 128-bit ciphertext chunks in the order they are
// given: the program chunks, then the header chunk as the last block. After
// reset the unit derives its own key from the chip key and the CMAC subkey:
//   Km = AES_key(MAC_KEY_DERIV),  L = AES_Km(0),
//   K1s = L << 1, XOR 0x87 into the low byte if L[127] was set.
// Each block then updates the chain X := AES_Km(X ^ block), and the last
// block is XORed with K1s first; the final X is the tag.
//
// Interface: `ready` is low while the subkeys are being derived (24 cycles
// after reset) and while a block is being absorbed (11 cycles after the
// in_valid cycle). A block is taken in any cycle with in_valid && ready;
// in_last marks the header block. `tag` holds the chain value and is the
// tag once the last block is absorbed and ready is high again. One message
// per reset.
//
// The document asks for an IND-CPA + INT-CTXT authenticated encryption of the
// program and header. Encrypt-then-MAC with counter mode and CMAC, the key
// derivation and the block order are this design's choices.
module prog_mac_unit (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  output logic         ready,
  input  logic         in_valid,
  input  logic         in_last,
  input  logic [127:0] in_data,
  output logic [127:0] tag
);
  typedef enum logic [1:0] {S_KM, S_L, S_IDLE, S_BLK} state_e;
  state_e state_q;
  logic started_q;
  logic [127:0] km_q, k1s_q, x_q;

  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_key, aes_in, aes_out;

  aes128_core u_aes (
    .clk, .rst_n, .start(aes_start), .key(aes_key), .block_in(aes_in),
    .busy(aes_busy), .done(aes_done), .block_out(aes_out)
  );

  assign ready     = (state_q == S_IDLE);
  assign aes_start = ((state_q == S_KM || state_q == S_L) && !started_q && !aes_busy)
                   || (ready && in_valid);
  assign aes_key   = (state_q == S_KM) ? key : km_q;
  always_comb begin
    unique case (state_q)
      S_KM:    aes_in = hop_pkg::MAC_KEY_DERIV;
      S_L:     aes_in = '0;
      default: aes_in = x_q ^ in_data ^ (in_last ? k1s_q : '0);
    endcase
  end
  assign tag = x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_KM;
      started_q <= 1'b0;
      km_q      <= '0;
      k1s_q     <= '0;
      x_q       <= '0;
    end else begin
      if (aes_start) started_q <= 1'b1;
      unique case (state_q)
        S_KM: if (aes_done) begin
          km_q      <= aes_out;
          started_q <= 1'b0;
          state_q   <= S_L;
        end
        S_L: if (aes_done) begin
          k1s_q   <= {aes_out[126:0], 1'b0} ^ (aes_out[127] ? 128'h87 : 128'h0);
          state_q <= S_IDLE;
        end
        S_IDLE: if (in_valid) state_q <= S_BLK;
        default: if (aes_done) begin          // S_BLK
          x_q     <= aes_out;
          state_q <= S_IDLE;
        end
      endcase
    end
  end
endmodule
