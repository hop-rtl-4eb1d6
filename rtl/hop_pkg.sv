// hop_pkg: shared constants and types of the HOP secure processor.
//
// The numbers that define the main configuration live here so every block
// agrees on them: a 512-bit ORAM block (64 bytes, one cache line), 32-bit
// RISC-V words, the spld custom opcode and the host command encoding.
// Block size, word size and the ORAM/scratchpad sizes follow the document;
// the opcode, the command encoding and the slot packing are this design's
// own choices.
package hop_pkg;

  // ORAM block: 512 bits = 64 bytes = 16 RISC-V words.
  localparam int unsigned BLOCK_BITS  = 512;
  localparam int unsigned WORD_BITS   = 32;
  localparam int unsigned BLOCK_WORDS = BLOCK_BITS / WORD_BITS;
  localparam int unsigned BLOCK_BYTES = BLOCK_BITS / 8;

  // spld uses the RISC-V custom-0 major opcode, R4-style register fields:
  //   rs1 = main-memory byte address, rs2 = number of blocks,
  //   rs3 (bits 31:27) = scratchpad byte address.
  localparam logic [6:0] OPC_SPLD = 7'b0001011;

  // Commands the untrusted host can send to the chip.
  typedef enum logic [1:0] {
    HCMD_PROG  = 2'd0,  // 128-bit encrypted program chunk, host_addr = chunk index
    HCMD_HDR   = 2'd1,  // 128-bit encrypted header {T, reserved}
    HCMD_INPUT = 2'd2,  // 512-bit clear input block, host_addr = ORAM block address
    HCMD_START = 2'd3   // begin execution
  } host_cmd_e;

  // Counter-mode nonce spaces of the program decryption unit.
  localparam logic [31:0] HDR_CHUNK_INDEX = 32'hFFFF_FFFF;
  // The program MAC key is AES_K1(MAC_KEY_DERIV), so K1 is never used both
  // as the counter-mode key and the MAC key.
  localparam logic [127:0] MAC_KEY_DERIV = 128'h484f_505f_4d41_434b_0000_0000_0000_0000;

  // Number of 128-bit AES blocks that cover a bit vector of the given width.
  function automatic int unsigned aes_chunks(input int unsigned bits);
    return (bits + 127) / 128;
  endfunction

endpackage
