// prog_dec_unit: decrypts the obfuscated program arriving from the host.
//
// The sender encrypts the program, and a header carrying the public run
// length T, under the chip's key K1; this unit sits between the host and the
// instruction scratchpad and undoes that encryption, as the document's
// second encryption unit does. The cipher mode is this design's choice:
// AES-128 counter mode over 128-bit chunks (four instructions), with chunk i
// encrypted as  C_i = P_i XOR AES_K1({64'h484f505f50524f47, 32'h0, i}).
// The header uses chunk index 32'hFFFF_FFFF. The document's scheme also
// authenticates these ciphertexts; prog_mac_unit does that alongside this
// unit (encrypt-then-MAC).
//
// Interface: in_valid/in_ready handshake with in_index and in_data; out_valid
// pulses 13 cycles after the handshake with out_index and the plaintext out_data. One chunk
// is processed at a time.
module prog_dec_unit (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [31:0]  in_index,
  input  logic [127:0] in_data,
  output logic         out_valid,
  output logic [31:0]  out_index,
  output logic [127:0] out_data
);
  logic         busy_q, aes_start, aes_busy, aes_done;
  logic [127:0] ct_q, pad;

  aes128_core u_aes (
    .clk, .rst_n,
    .start    (aes_start),
    .key      (key),
    .block_in ({64'h484f_505f_5052_4f47, 32'h0, out_index}),
    .busy     (aes_busy),
    .done     (aes_done),
    .block_out(pad)
  );

  assign in_ready = !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      aes_start <= 1'b0;
      ct_q      <= '0;
      out_index <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      aes_start <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid && !busy_q) begin
        busy_q    <= 1'b1;
        ct_q      <= in_data;
        out_index <= in_index;
        aes_start <= 1'b1;
      end else if (busy_q && aes_done) begin
        busy_q    <= 1'b0;
        out_data  <= ct_q ^ pad;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
