// tb_aes128_core: checks the AES-128 core against the published FIPS-197
// example vectors and checks its 11-cycle latency.
module tb_aes128_core;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [127:0] key, pt, ct;
  int checks = 0, failures = 0;

  aes128_core dut (.clk, .rst_n, .start, .key, .block_in(pt), .busy, .done, .block_out(ct));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL ct=%h exp=%h", ct, exp);
    end
    checks++;
    if (cyc != 11) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    start = 0; key = '0; pt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // FIPS-197 Appendix B
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
