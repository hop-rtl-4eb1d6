// tb_prog_mac_unit: checks the program MAC against a CMAC computed here with
// a separate AES core (key derivation, subkey, chaining, last-block tweak),
// for messages of 1 to 6 blocks, and that a changed, swapped, dropped or
// added block, or a different last block, changes the tag. Also checks the
// setup time after reset and the 11-cycle busy time per block.
// Interface/timing: drives in_valid/in_last/in_data when ready is high and
// reads tag when ready returns; the DUT is reset before each message.
// The CMAC construction and its key derivation are this design's choice; the
// document only requires authenticated encryption of program and header.
module tb_prog_mac_unit;
  import hop_pkg::*;
  localparam logic [127:0] K = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic clk = 0, rst_n = 0;
  logic ready, in_valid = 0, in_last = 0;
  logic [127:0] in_data = '0, tag;
  int checks = 0, failures = 0;

  prog_mac_unit dut (.clk, .rst_n, .key(K), .ready, .in_valid, .in_last, .in_data, .tag);

  logic r_start = 0, r_busy, r_done;
  logic [127:0] r_key = '0, r_in = '0, r_out;
  aes128_core u_ref (.clk, .rst_n(1'b1), .start(r_start), .key(r_key), .block_in(r_in),
                     .busy(r_busy), .done(r_done), .block_out(r_out));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic aes_ref(input logic [127:0] k, input logic [127:0] b, output logic [127:0] o);
    @(negedge clk); r_key = k; r_in = b; r_start = 1;
    @(negedge clk); r_start = 0;
    while (!r_done) @(negedge clk);
    o = r_out;
  endtask

  task automatic cmac_ref(input logic [127:0] m [$], output logic [127:0] t);
    logic [127:0] km, l, k1s;
    aes_ref(K, MAC_KEY_DERIV, km);
    aes_ref(km, '0, l);
    k1s = {l[126:0], 1'b0} ^ (l[127] ? 128'h87 : 128'h0);
    t = '0;
    foreach (m[i]) aes_ref(km, t ^ m[i] ^ (i == m.size() - 1 ? k1s : '0), t);
  endtask

  task automatic dut_mac(input logic [127:0] m [$], output logic [127:0] t);
    int cyc;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == 24, $sformatf("setup %0d cycles", cyc));
    foreach (m[i]) begin
      in_valid = 1; in_last = (i == m.size() - 1); in_data = m[i];
      @(negedge clk);
      in_valid = 0; in_last = 0; in_data = '1;
      cyc = 0;
      while (!ready) begin @(negedge clk); cyc++; end
      if (i == 0) check(cyc == 11, $sformatf("block busy %0d cycles", cyc));
    end
    t = tag;
  endtask

  initial begin
    logic [127:0] m [$], m2 [$];
    logic [127:0] t, tr, t2;
    for (int n = 1; n <= 6; n++) begin
      m = {};
      for (int i = 0; i < n; i++) m.push_back({$urandom, $urandom, $urandom, $urandom});
      dut_mac(m, t);
      cmac_ref(m, tr);
      check(t == tr, $sformatf("tag of %0d blocks", n));
      if (n >= 2) begin
        m2 = m; m2[0][5] ^= 1'b1;
        dut_mac(m2, t2); check(t2 != t, "changed block");
        m2 = m; m2[0] = m[1]; m2[1] = m[0];
        dut_mac(m2, t2); check(t2 != t, "swapped blocks");
        m2 = m; m2.delete(0);
        dut_mac(m2, t2); check(t2 != t, "dropped block");
      end
      m2 = m; m2.push_back('0);
      dut_mac(m2, t2); check(t2 != t, "added block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
