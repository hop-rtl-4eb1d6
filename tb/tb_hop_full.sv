// tb_hop_full: one complete obfuscated run on the chip at its default sizes
// (25-level ORAM tree, 65536-entry position map, 128-block stash, 16 KB and
// 512 KB scratchpads, N = 1000 slots of 3 cycles). The testbench encrypts a
// small program under the default K1, loads two input blocks, runs for T = 4
// ORAM accesses and checks the result (the sum of the 32 input words), that
// exactly T accesses of 2 * 25 * 4 DRAM slots each were made, and the length
// of one schedule round.
module tb_hop_full;
  import rv_asm_pkg::*;
  import hop_pkg::*;

  localparam int T = 4;
  localparam logic [127:0] K1 = 128'h3c4fcf098815f7aba6d2ae2816157e2b;
  localparam int SB = 1 + 16 + 24 + 512;
  localparam int DAW = 27;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic host_valid, host_ready, done, stash_overflow, auth_fail;
  host_cmd_e host_cmd;
  logic [31:0] host_addr, outp;
  logic [511:0] host_data;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rsp_valid;
  logic [DAW-1:0] dram_req_addr;
  logic [64+SB-1:0] dram_req_wdata, dram_rsp_rdata;

  hop_top dut (.*);

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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  // length of each schedule round, from one ORAM acceptance to the next
  int last_m = -1, round_len [$];
  always @(posedge clk) if (dut.o_req_valid && dut.o_req_ready && dut.lstate_q == dut.L_RUN) begin
    if (last_m >= 0) round_len.push_back(cyc - last_m);
    last_m = cyc;
  end

  initial begin
    logic [31:0] prog [$];
    logic [127:0] ct, pt;
    logic [511:0] blk;
    logic [31:0] exp;
    int d0;
    host_valid = 0; host_cmd = HCMD_PROG; host_addr = 0; host_data = '0; s_start = 0; s_in = '0;
    prog = {
      addi(1, 0, 0), addi(2, 0, 2), addi(3, 0, 0), spld(1, 2, 3),
      addi(10, 0, 0), addi(4, 0, 0), addi(5, 0, 128),
      lw(6, 4, 0), add(10, 10, 6), addi(4, 4, 4), bne(4, 5, -12),
      beq(0, 0, 0), addi(0, 0, 0), addi(0, 0, 0), addi(0, 0, 0), addi(0, 0, 0)
    };
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!dut.u_oram.req_ready) @(posedge clk);
    check(cyc > 65536, "position map cleared before first access");
    mac_begin();
    for (int c = 0; c < prog.size() / 4; c++) begin
      for (int k = 0; k < 4; k++) pt[32*k +: 32] = prog[4*c + k];
      enc_chunk(c, pt, ct);
      mac_add(ct, 1'b0);
      host_send(HCMD_PROG, c, {384'd0, ct});
    end
    enc_chunk(HDR_CHUNK_INDEX, {64'd0, 64'(T)}, ct);
    mac_add(ct, 1'b1);
    host_send(HCMD_HDR, 0, {384'd0, ct});
    exp = 0;
    for (int b = 0; b < 2; b++) begin
      for (int k = 0; k < 16; k++) begin
        blk[32*k +: 32] = 1000 * b + 7 * k + 3;
        exp += blk[32*k +: 32];
      end
      host_send(HCMD_INPUT, b, blk);
    end
    d0 = u_dram.n_reads + u_dram.n_writes;
    check(d0 == 2 * 2 * 25 * 4, $sformatf("input insertion DRAM accesses %0d", d0));
    host_send(HCMD_START, 0, {384'd0, mac_x});
    while (!done) @(posedge clk);
    check(outp == exp, $sformatf("result %0d exp %0d", outp, exp));
    check(dut.t_count == T, "T accesses");
    check(u_dram.n_reads + u_dram.n_writes - d0 == T * 2 * 25 * 4, "DRAM accesses per ORAM access");
    check(!stash_overflow, "stash");
    check(round_len.size() == T - 1, "rounds");
    foreach (round_len[i]) check(round_len[i] == round_len[0] && round_len[0] > 1000 * 3,
                                 $sformatf("round %0d length %0d", i, round_len[i]));
    $display("round length %0d cycles (%0d of them the 1000 instruction slots)", round_len[0], 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
