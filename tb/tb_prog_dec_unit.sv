// tb_prog_dec_unit: builds ciphertexts with an AES core acting as the sender
// (the core itself is checked against FIPS-197 on its own), feeds them to the
// decryption unit and checks the plaintexts, indices and latency. Also checks
// that the pad differs from chunk to chunk (counter mode) by sending the same
// ciphertext under two indices.
module tb_prog_dec_unit;
  localparam logic [127:0] K1 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid;
  logic [31:0] in_index, out_index;
  logic [127:0] in_data, out_data;

  prog_dec_unit dut (.clk, .rst_n, .key(K1), .in_valid, .in_ready, .in_index, .in_data,
                     .out_valid, .out_index, .out_data);

  // sender-side encryptor
  logic s_start, s_busy, s_done;
  logic [127:0] s_in, s_out;
  aes128_core u_sender (.clk, .rst_n, .start(s_start), .key(K1), .block_in(s_in),
                        .busy(s_busy), .done(s_done), .block_out(s_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic encrypt(input logic [31:0] idx, input logic [127:0] pt, output logic [127:0] ct);
    @(negedge clk); s_start = 1; s_in = {64'h484f505f50524f47, 32'h0, idx};
    @(negedge clk); s_start = 0;
    while (!s_done) @(negedge clk);
    ct = pt ^ s_out;
  endtask

  task automatic decrypt(input logic [31:0] idx, input logic [127:0] ct, output logic [127:0] pt);
    int cyc;
    @(negedge clk); in_valid = 1; in_index = idx; in_data = ct;
    @(negedge clk); in_valid = 0;
    cyc = 1;
    while (!out_valid) begin @(negedge clk); cyc++; end
    pt = out_data;
    check(out_index == idx, "index");
    check(cyc == 13, $sformatf("latency %0d", cyc));
  endtask

  initial begin
    logic [127:0] pt, ct, got, got2;
    in_valid = 0; in_index = 0; in_data = 0; s_start = 0; s_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [31:0] idx;
      idx = (i == 19) ? 32'hFFFF_FFFF : 32'(i * 3);
      pt = {$urandom, $urandom, $urandom, $urandom};
      encrypt(idx, pt, ct);
      decrypt(idx, ct, got);
      check(got == pt, $sformatf("chunk %0d", i));
      check(ct != pt, "ciphertext differs");
    end
    decrypt(1, 128'h0, got);
    decrypt(2, 128'h0, got2);
    check(got != got2, "pads differ per chunk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
