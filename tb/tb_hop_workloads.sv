// tb_hop_workloads: small instances of the benchmark programs the design is
// meant for, run end to end on the chip at reduced sizes: findmax (a stream
// over the input), binsearch (one spld per probe, no locality; a present and
// an absent key) and hist (a small working set kept in the scratchpad). Each
// result is compared with the value computed here from the same input, and
// each run must end after exactly its T ORAM accesses with the program
// finished.
// Interface/timing: drives hop_top through its host port (encrypted program
// chunks, encrypted header with T, plaintext input blocks, start) against the
// behavioural DRAM model; the result is read from outp once done rises.
// From the document: the three programs and their access patterns (findmax
// and binsearch of Table III, hist of Fig. 8), spld use for loading data.
// Own choices: sizes (64-256 words), hand-assembled code, result in a0 and
// the hist checksum sum(hist[b] << b) so one 32-bit output covers all buckets.
module tb_hop_workloads;
  import rv_asm_pkg::*;
  import hop_pkg::*;

  localparam int N = 20, LEVELS = 6, Z = 4, STASH = 48, ADDR_W = 6;
  localparam int IBYTES = 1024, DBYTES = 4096;
  localparam logic [127:0] K1 = 128'h3c4fcf098815f7aba6d2ae2816157e2b;
  localparam int SB = 1 + ADDR_W + (LEVELS - 1) + 512;
  localparam int DAW = LEVELS + 2;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic host_valid, host_ready, done, stash_overflow, auth_fail;
  host_cmd_e host_cmd;
  logic [31:0] host_addr, outp;
  logic [511:0] host_data;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rsp_valid;
  logic [DAW-1:0] dram_req_addr;
  logic [64+SB-1:0] dram_req_wdata, dram_rsp_rdata;

  hop_top #(.N(N), .IBYTES(IBYTES), .DBYTES(DBYTES), .LEVELS(LEVELS), .Z(Z), .STASH(STASH),
            .ADDR_W(ADDR_W), .K1(K1)) dut (.*);

  dram_model #(.AW(DAW), .DW(64+SB), .LATENCY(3)) u_dram (
    .clk, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req_write(dram_req_write),
    .req_addr(dram_req_addr), .req_wdata(dram_req_wdata), .rsp_valid(dram_rsp_valid),
    .rsp_rdata(dram_rsp_rdata));

  logic s_start, s_busy, s_done;
  logic [127:0] s_in, s_out;
  logic [127:0] s_key = K1;
  aes128_core u_sender (.clk, .rst_n(1'b1), .start(s_start), .key(s_key), .block_in(s_in),
                        .busy(s_busy), .done(s_done), .block_out(s_out));

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_send(input host_cmd_e c, input logic [31:0] a, input logic [511:0] d);
    @(negedge clk);
    host_valid = 1; host_cmd = c; host_addr = a; host_data = d;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
    @(posedge clk);
    while (!host_ready && !(c == HCMD_START)) @(posedge clk);
  endtask

  task automatic aes_blk(input logic [127:0] k, input logic [127:0] b, output logic [127:0] o);
    @(negedge clk); s_key = k; s_start = 1; s_in = b;
    @(negedge clk); s_start = 0;
    while (!s_done) @(negedge clk);
    o = s_out;
  endtask

  // sender side: counter-mode encryption under K1 and the CMAC tag over the
  // ciphertext chunks (program chunks in order, header last)
  task automatic enc_chunk(input logic [31:0] idx, input logic [127:0] pt, output logic [127:0] ct);
    logic [127:0] pad;
    aes_blk(K1, {64'h484f505f50524f47, 32'h0, idx}, pad);
    ct = pt ^ pad;
  endtask

  logic [127:0] mac_km, mac_k1s, mac_x;
  task automatic mac_begin();
    logic [127:0] l;
    aes_blk(K1, MAC_KEY_DERIV, mac_km);
    aes_blk(mac_km, '0, l);
    mac_k1s = {l[126:0], 1'b0} ^ (l[127] ? 128'h87 : 128'h0);
    mac_x = '0;
  endtask
  task automatic mac_add(input logic [127:0] ct, input logic last);
    aes_blk(mac_km, mac_x ^ ct ^ (last ? mac_k1s : '0), mac_x);
  endtask

  logic [31:0] prog [$];
  logic [31:0] words [$];     // input, 16 words per ORAM block from block 0

  task automatic run(input string name, input int t, input logic [31:0] exp);
    logic [127:0] ct, pt;
    logic [511:0] blk;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!dut.u_oram.req_ready) @(posedge clk);
    mac_begin();
    for (int c = 0; c < (prog.size() + 3) / 4; c++) begin
      for (int k = 0; k < 4; k++) pt[32*k +: 32] = (4*c + k < prog.size()) ? prog[4*c + k] : 32'h13;
      enc_chunk(c, pt, ct);
      mac_add(ct, 1'b0);
      host_send(HCMD_PROG, c, {384'd0, ct});
    end
    enc_chunk(HDR_CHUNK_INDEX, {64'd0, 64'(t)}, ct);
    mac_add(ct, 1'b1);
    host_send(HCMD_HDR, 0, {384'd0, ct});
    for (int b = 0; b < (words.size() + 15) / 16; b++) begin
      for (int k = 0; k < 16; k++) blk[32*k +: 32] = (16*b + k < words.size()) ? words[16*b + k] : 0;
      host_send(HCMD_INPUT, b, blk);
    end
    host_send(HCMD_START, 0, {384'd0, mac_x});
    while (!done) @(posedge clk);
    check(outp == exp, $sformatf("%s: result %0d expected %0d", name, outp, exp));
    check(dut.t_count == t, $sformatf("%s: T", name));
    check(dut.u_core.pc_q == 4 * (prog.size() - 1), $sformatf("%s: program finished", name));
    check(!stash_overflow, $sformatf("%s: stash", name));
    $display("%s: result %0d", name, outp);
  endtask

  initial begin
    logic [31:0] exp;
    int hist [16];
    host_valid = 0; host_cmd = HCMD_PROG; host_addr = 0; host_data = '0; s_start = 0; s_in = '0;

    // ---- findmax over 64 words
    words = {};
    exp = 0;
    for (int i = 0; i < 64; i++) begin
      words.push_back($urandom);
      if (words[i] > exp) exp = words[i];
    end
    prog = {
      addi(1, 0, 0), addi(2, 0, 4), addi(3, 0, 0), spld(1, 2, 3),
      addi(10, 0, 0), addi(4, 0, 0), addi(5, 0, 256),
      lw(6, 4, 0), bgeu(10, 6, 8), addi(10, 6, 0), addi(4, 4, 4), bne(4, 5, -16),
      beq(0, 0, 0)
    };
    run("findmax", 40, exp);

    // ---- binsearch over 256 sorted words, key in block 16
    prog = {
      addi(1, 0, 1024), addi(2, 0, 1), addi(3, 0, 0), spld(1, 2, 3),      //  0.. 3
      lw(20, 0, 0), addi(11, 0, 0), addi(12, 0, 256), addi(16, 0, 64),     //  4.. 7
      addi(10, 0, -1),                                                     //  8
      bgeu(11, 12, 64),                                                    //  9 loop
      add(13, 11, 12), srli(13, 13, 1), slli(14, 13, 2), andi(15, 14, -64),// 10..13
      spld(15, 2, 16), andi(17, 14, 63), lw(18, 17, 64),                   // 14..16
      bne(18, 20, 12), addi(10, 13, 0), jal(0, 24),                        // 17..19
      bltu(18, 20, 12), addi(12, 13, 0), jal(0, -52),                      // 20..22
      addi(11, 13, 1), jal(0, -60),                                        // 23..24
      beq(0, 0, 0)                                                         // 25
    };
    words = {};
    for (int i = 0; i < 256; i++) words.push_back(32'(7 * i + 3));
    words.push_back(32'(7 * 201 + 3));
    run("binsearch hit", 60, 201);
    words[256] = 32'(7 * 100 + 5);
    run("binsearch miss", 60, 32'hffffffff);

    // ---- hist of 64 values into 16 buckets kept in the scratchpad
    words = {};
    foreach (hist[b]) hist[b] = 0;
    for (int i = 0; i < 64; i++) begin
      words.push_back($urandom);
      hist[words[i] & 15]++;
    end
    exp = 0;
    foreach (hist[b]) exp += 32'(hist[b]) << b;
    prog = {
      addi(1, 0, 0), addi(2, 0, 4), addi(3, 0, 0), spld(1, 2, 3),          //  0.. 3
      addi(4, 0, 1024), addi(5, 0, 1088),                                  //  4.. 5
      sw(0, 4, 0), addi(4, 4, 4), bne(4, 5, -8),                           //  6.. 8 clear
      addi(4, 0, 0), addi(5, 0, 256),                                      //  9..10
      lw(6, 4, 0), andi(6, 6, 15), slli(6, 6, 2), lw(7, 6, 1024),          // 11..14
      addi(7, 7, 1), sw(7, 6, 1024), addi(4, 4, 4), bne(4, 5, -28),        // 15..18
      addi(10, 0, 0), addi(8, 0, 0), addi(9, 0, 16),                       // 19..21
      slli(6, 8, 2), lw(7, 6, 1024), sll(7, 7, 8), add(10, 10, 7),         // 22..25
      addi(8, 8, 1), bne(8, 9, -20),                                       // 26..27
      beq(0, 0, 0)                                                         // 28
    };
    run("hist", 50, exp);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
