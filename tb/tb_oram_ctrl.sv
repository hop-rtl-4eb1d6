// tb_oram_ctrl: the ORAM controller with the memory encryption unit and a
// DRAM model, at a small tree. Random reads, writes and dummy accesses are
// checked against a reference memory. Every access must read and write
// exactly LEVELS*Z slots and take the same number of cycles, whatever its
// kind, address or data, and the stash must never overflow.
module tb_oram_ctrl;
  localparam int L = 4, Z = 4, ST = 32, AW = 4, BB = 64;
  localparam int LW = L - 1;
  localparam int SB = 1 + AW + LW + BB;
  localparam int DAW = L + 2;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, req_dummy, req_write, rsp_valid, stash_overflow;
  logic [AW-1:0] req_addr;
  logic [BB-1:0] req_wdata, rsp_rdata;
  logic m_req_valid, m_req_ready, m_req_write, m_rsp_valid;
  logic [DAW-1:0] m_req_addr;
  logic [SB-1:0] m_req_wdata, m_rsp_rdata;
  logic d_req_valid, d_req_ready, d_req_write, d_rsp_valid;
  logic [DAW-1:0] d_req_addr;
  logic [64+SB-1:0] d_req_wdata, d_rsp_rdata;

  oram_ctrl #(.LEVELS(L), .Z(Z), .STASH(ST), .ADDR_W(AW), .BLOCK_BITS(BB)) dut (
    .clk, .rst_n, .key(128'h11223344556677889900aabbccddeeff),
    .req_valid, .req_ready, .req_dummy, .req_write, .req_addr, .req_wdata,
    .rsp_valid, .rsp_rdata, .stash_overflow,
    .m_req_valid, .m_req_ready, .m_req_write, .m_req_addr, .m_req_wdata,
    .m_rsp_valid, .m_rsp_rdata);

  mem_enc_unit #(.SLOT_BITS(SB), .DRAM_AW(DAW)) u_enc (
    .clk, .rst_n, .key(128'h0102030405060708090a0b0c0d0e0f10),
    .o_req_valid(m_req_valid), .o_req_ready(m_req_ready), .o_req_write(m_req_write),
    .o_req_addr(m_req_addr), .o_req_wdata(m_req_wdata),
    .o_rsp_valid(m_rsp_valid), .o_rsp_rdata(m_rsp_rdata),
    .d_req_valid, .d_req_ready, .d_req_write, .d_req_addr, .d_req_wdata,
    .d_rsp_valid, .d_rsp_rdata);

  dram_model #(.AW(DAW), .DW(64+SB), .LATENCY(2)) u_dram (
    .clk, .req_valid(d_req_valid), .req_ready(d_req_ready), .req_write(d_req_write),
    .req_addr(d_req_addr), .req_wdata(d_req_wdata), .rsp_valid(d_rsp_valid),
    .rsp_rdata(d_rsp_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [BB-1:0] ref_m [1<<AW];
  logic          ref_w [1<<AW];
  int first_lat = -1;
  int n_dummy = 0, n_rd = 0, n_wr = 0;

  task automatic access(input logic dummy, input logic wr, input logic [AW-1:0] a,
                        input logic [BB-1:0] d);
    int cyc, r0, w0;
    r0 = u_dram.n_reads; w0 = u_dram.n_writes;
    @(negedge clk);
    req_valid = 1; req_dummy = dummy; req_write = wr; req_addr = a; req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    cyc = 1;
    while (!rsp_valid) begin @(negedge clk); cyc++; end
    if (!dummy && !wr)
      check(rsp_rdata == (ref_w[a] ? ref_m[a] : '0),
            $sformatf("read %0d got %h exp %h", a, rsp_rdata, ref_m[a]));
    if (!dummy && wr) begin ref_m[a] = d; ref_w[a] = 1; end
    check(u_dram.n_reads - r0 == L * Z, "path read size");
    check(u_dram.n_writes - w0 == L * Z, "path write size");
    if (first_lat < 0) first_lat = cyc;
    check(cyc == first_lat, $sformatf("latency %0d vs %0d", cyc, first_lat));
    check(!stash_overflow, "stash overflow");
  endtask

  initial begin
    req_valid = 0; req_dummy = 0; req_write = 0; req_addr = '0; req_wdata = '0;
    foreach (ref_m[i]) begin ref_m[i] = '0; ref_w[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill every block, then a random mix
    for (int i = 0; i < (1 << AW); i++) begin
      access(0, 1, AW'(i), {$urandom, $urandom}); n_wr++;
    end
    for (int n = 0; n < 300; n++) begin
      int k;
      k = $urandom_range(0, 2);
      if (k == 0) begin access(1, 0, '0, '0); n_dummy++; end
      else if (k == 1) begin access(0, 1, AW'($urandom), {$urandom, $urandom}); n_wr++; end
      else begin access(0, 0, AW'($urandom), '0); n_rd++; end
    end
    for (int i = 0; i < (1 << AW); i++) begin access(0, 0, AW'(i), '0); n_rd++; end
    check(n_dummy > 0 && n_rd > 0 && n_wr > 0, "mix");
    $display("accesses: %0d reads %0d writes %0d dummies, latency %0d", n_rd, n_wr, n_dummy, first_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
