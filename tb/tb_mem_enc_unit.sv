// tb_mem_enc_unit: writes slots through the memory encryption unit into the
// DRAM model and reads them back. Checks that what reaches DRAM is not the
// plaintext, that every write uses a fresh nonzero IV, that a rewrite of the
// same data gives a different ciphertext, that reads return the plaintext and
// that a never-written slot reads as zero.
module tb_mem_enc_unit;
  localparam int SB = 100;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic o_req_valid, o_req_ready, o_req_write, o_rsp_valid;
  logic [AW-1:0] o_req_addr;
  logic [SB-1:0] o_req_wdata, o_rsp_rdata;
  logic d_req_valid, d_req_ready, d_req_write, d_rsp_valid;
  logic [AW-1:0] d_req_addr;
  logic [64+SB-1:0] d_req_wdata, d_rsp_rdata;

  mem_enc_unit #(.SLOT_BITS(SB), .DRAM_AW(AW)) dut (
    .clk, .rst_n, .key(128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0),
    .o_req_valid, .o_req_ready, .o_req_write, .o_req_addr, .o_req_wdata,
    .o_rsp_valid, .o_rsp_rdata,
    .d_req_valid, .d_req_ready, .d_req_write, .d_req_addr, .d_req_wdata,
    .d_rsp_valid, .d_rsp_rdata);

  dram_model #(.AW(AW), .DW(64+SB), .LATENCY(3)) u_dram (
    .clk, .req_valid(d_req_valid), .req_ready(d_req_ready), .req_write(d_req_write),
    .req_addr(d_req_addr), .req_wdata(d_req_wdata), .rsp_valid(d_rsp_valid),
    .rsp_rdata(d_rsp_rdata));

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

  task automatic access(input logic wr, input logic [AW-1:0] a, input logic [SB-1:0] d,
                        output logic [SB-1:0] q);
    @(negedge clk);
    o_req_valid = 1; o_req_write = wr; o_req_addr = a; o_req_wdata = d;
    do @(posedge clk); while (!o_req_ready);
    @(negedge clk);
    o_req_valid = 0;
    while (!o_rsp_valid) @(negedge clk);
    q = o_rsp_rdata;
  endtask

  logic [SB-1:0] data [8];
  logic [SB-1:0] q;
  logic [64+SB-1:0] stored, stored2;
  logic [63:0] last_iv;

  initial begin
    o_req_valid = 0; o_req_write = 0; o_req_addr = '0; o_req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_iv = 0;
    for (int i = 0; i < 8; i++) begin
      data[i] = {$urandom, $urandom, $urandom, $urandom};
      access(1, AW'(i * 37), data[i], q);
      stored = u_dram.peek(AW'(i * 37));
      check(stored[SB-1:0] != data[i], "ciphertext equals plaintext");
      check(stored[64+SB-1 -: 64] > last_iv, "IV not fresh");
      last_iv = stored[64+SB-1 -: 64];
    end
    for (int i = 0; i < 8; i++) begin
      access(0, AW'(i * 37), '0, q);
      check(q == data[i], $sformatf("readback %0d", i));
    end
    access(0, AW'(5), '0, q);
    check(q == '0, "unwritten slot not zero");
    // same data, same address: a different ciphertext
    stored = u_dram.peek(AW'(0));
    access(1, AW'(0), data[0], q);
    stored2 = u_dram.peek(AW'(0));
    check(stored2[SB-1:0] != stored[SB-1:0], "rewrite gives same ciphertext");
    access(0, AW'(0), '0, q);
    check(q == data[0], "readback after rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
