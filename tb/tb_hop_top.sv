// tb_hop_top: end-to-end run of the whole chip at reduced sizes.
//
// The testbench plays the sender (it encrypts a program and a header under
// K1 with its own AES core and computes their CMAC tag) and the host (it loads program, header and input,
// starts the run and reads the result), and models the DRAM. The program sums
// the 64 input words it brings in with spld, stores the sum, forces a
// write-back of that scratchpad line to ORAM with a second spld, brings the
// block back with a third and returns sum + reloaded sum + word of a
// never-written block (= 2 * sum). Three tampered submissions (wrong tag,
// chunks out of order, changed header) must each be refused with auth_fail,
// without running or touching DRAM. The run is done twice with different
// input data: the result must follow the data while the DRAM address trace
// and the run length must be identical. Each mechanism of the design must
// occur: dummy instruction slots, real ORAM reads and write-backs through
// spld, dummy ORAM accesses, stopping after exactly T accesses.
module tb_hop_top;
  import rv_asm_pkg::*;
  import hop_pkg::*;

  localparam int N = 20, LEVELS = 5, Z = 4, STASH = 32, ADDR_W = 6;
  localparam int IBYTES = 1024, DBYTES = 4096;
  localparam int T = 40;
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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_dummy_a = 0, n_real_m = 0, n_dummy_m = 0, n_wb = 0, n_spld = 0;
  always @(posedge clk) begin
    if (dut.ev_dummy_a) n_dummy_a++;
    if (dut.ev_real_m) n_real_m++;
    if (dut.ev_dummy_m) n_dummy_m++;
    if (dut.ev_real_m && dut.sp_req_write) n_wb++;
    if (dut.spld_start) n_spld++;
  end

  // DRAM trace fingerprint
  longint unsigned trace_hash;
  int n_dram;
  always @(posedge clk) if (dram_req_valid && dram_req_ready) begin
    trace_hash = trace_hash * 1000003 + longint'(dram_req_addr) * 2 + longint'(dram_req_write);
    n_dram++;
  end

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
  int spin_pc;

  task automatic run(input int seed, output logic [31:0] result, output int run_len,
                     output longint unsigned hash, output logic [31:0] exp);
    logic [127:0] ct;
    logic [511:0] blk;
    int t0, s;
    s = seed;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!dut.u_oram.req_ready) @(posedge clk);
    mac_begin();
    for (int c = 0; c < (prog.size() + 3) / 4; c++) begin
      logic [127:0] pt;
      for (int k = 0; k < 4; k++) pt[32*k +: 32] = (4*c + k < prog.size()) ? prog[4*c + k] : 32'h13;
      enc_chunk(c, pt, ct);
      mac_add(ct, 1'b0);
      host_send(HCMD_PROG, c, {384'd0, ct});
    end
    enc_chunk(HDR_CHUNK_INDEX, {64'd0, 64'(T)}, ct);
    mac_add(ct, 1'b1);
    host_send(HCMD_HDR, 0, {384'd0, ct});
    exp = 0;
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 16; k++) begin
        blk[32*k +: 32] = 32'($urandom(s + 16*b + k) & 32'hffff);
        exp += blk[32*k +: 32];
      end
      host_send(HCMD_INPUT, b, blk);
    end
    exp = 2 * exp;
    trace_hash = 0;
    n_dram = 0;
    t0 = cyc;
    host_send(HCMD_START, 0, {384'd0, mac_x});
    check(outp == 0, "result hidden while running");
    while (!done) @(posedge clk);
    run_len = cyc - t0;
    result = outp;
    hash = trace_hash;
  endtask

  // A tampered submission: 1 = wrong tag, 2 = chunks 0 and 1 swapped in
  // order, 3 = header ciphertext changed after the sender's MAC (another T).
  // The chip must refuse it: auth_fail, no run, no DRAM traffic.
  int n_rejected = 0;
  task automatic tamper_run(input int kind);
    logic [127:0] ct, pt, c0, c1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!dut.u_oram.req_ready) @(posedge clk);
    mac_begin();
    for (int c = 0; c < (prog.size() + 3) / 4; c++) begin
      for (int k = 0; k < 4; k++) pt[32*k +: 32] = (4*c + k < prog.size()) ? prog[4*c + k] : 32'h13;
      enc_chunk(c, pt, ct);
      mac_add(ct, 1'b0);
      if (kind == 2 && c == 0) c0 = ct;
      else if (kind == 2 && c == 1) begin
        host_send(HCMD_PROG, 1, {384'd0, ct});
        host_send(HCMD_PROG, 0, {384'd0, c0});
      end else host_send(HCMD_PROG, c, {384'd0, ct});
    end
    enc_chunk(HDR_CHUNK_INDEX, {64'd0, 64'(T)}, ct);
    mac_add(ct, 1'b1);
    c1 = (kind == 3) ? ct ^ 128'h1 : ct;
    host_send(HCMD_HDR, 0, {384'd0, c1});
    n_dram = 0;
    host_send(HCMD_START, 0, {384'd0, (kind == 1) ? mac_x ^ 128'h100 : mac_x});
    repeat (3000) @(posedge clk);
    check(auth_fail && !done && !host_ready, $sformatf("tamper %0d refused", kind));
    check(n_dram == 0 && dut.u_core.pc_q == 0 && outp == 0, $sformatf("tamper %0d did not run", kind));
    if (auth_fail) n_rejected++;
  endtask

  initial begin
    logic [31:0] r1, r2, e1, e2;
    int l1, l2;
    longint unsigned h1, h2;
    int dram1;
    host_valid = 0; host_cmd = HCMD_PROG; host_addr = 0; host_data = '0; s_start = 0; s_in = '0;
    prog = {
      addi(1, 0, 0), addi(2, 0, 4), addi(3, 0, 0), spld(1, 2, 3),   // blocks 0..3 -> lines 0..3
      addi(10, 0, 0), addi(4, 0, 0), addi(5, 0, 256),
      lw(6, 4, 0), add(10, 10, 6), addi(4, 4, 4), bne(4, 5, -12),   // sum 64 words
      sw(10, 0, 0),                                                 // line 0 word 0 = sum
      addi(1, 0, 640), addi(2, 0, 1), spld(1, 2, 3),                // line 0 <- block 10, write back block 0
      addi(1, 0, 0), addi(3, 0, 64), spld(1, 2, 3),                 // line 1 <- block 0, write back block 1
      lw(7, 0, 64), lw(8, 0, 0), add(10, 10, 7), add(10, 10, 8),
      beq(0, 0, 0)
    };
    spin_pc = 4 * (prog.size() - 1);
    run(1, r1, l1, h1, e1);
    dram1 = n_dram;
    check(r1 == e1, $sformatf("run 1 result %0d exp %0d", r1, e1));
    check(dut.u_core.pc_q == spin_pc, "run 1 reached the end of the program");
    check(dut.t_count == T, "run 1 made T accesses");
    check(dram1 == T * 2 * LEVELS * Z, $sformatf("run 1 DRAM accesses %0d", dram1));
    check(!stash_overflow, "stash");
    run(777, r2, l2, h2, e2);
    check(r2 == e2, $sformatf("run 2 result %0d exp %0d", r2, e2));
    check(r1 != r2, "results differ with input");
    check(l1 == l2, $sformatf("run length %0d vs %0d", l1, l2));
    check(h1 == h2 && n_dram == dram1, "DRAM trace identical");
    // mechanisms (two runs)
    $display("dummy A %0d, real M %0d (write-backs %0d), dummy M %0d, spld %0d, run %0d cycles",
             n_dummy_a, n_real_m, n_wb, n_dummy_m, n_spld, l1);
    check(n_dummy_a > 0, "dummy A slots occurred");
    check(n_real_m == 2 * 8, "real ORAM accesses");
    check(n_wb == 2 * 2, "spld write-backs");
    check(n_dummy_m == 2 * (T - 8), "dummy ORAM accesses");
    check(n_spld == 2 * 3, "spld instructions");
    check(!auth_fail, "genuine program accepted");
    for (int k = 1; k <= 3; k++) tamper_run(k);
    $display("tampered submissions refused %0d", n_rejected);
    check(n_rejected == 3, "authentication rejections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
