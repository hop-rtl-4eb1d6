// tb_anm_sched: the A^N M scheduler with N = 5 and 3-cycle slots, a stand-in
// ORAM with a fixed latency and a stand-in spld requester. Checks that every
// round has exactly N slots 3 cycles apart followed by one ORAM access, that
// pending requests become real accesses and the rest are dummies, that slots
// while the core is stalled are counted as dummy A slots, and that done rises
// after exactly T accesses at the predicted cycle.
module tb_anm_sched;
  localparam int N = 5, SC = 3, OLAT = 7, T = 12;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic go, running, done, slot_start, core_stalled;
  logic [63:0] t_count;
  logic sp_req_valid, sp_req_write, sp_grant, sp_rsp_valid;
  logic [15:0] sp_req_addr;
  logic [511:0] sp_req_wdata, o_req_wdata;
  logic o_req_valid, o_req_ready, o_req_dummy, o_req_write, o_rsp_valid;
  logic [15:0] o_req_addr;
  logic ev_dummy_a, ev_real_m, ev_dummy_m;

  anm_sched #(.N(N), .SLOT_CYCLES(SC)) dut (
    .clk, .rst_n, .go, .t_max(64'(T)), .running, .done, .t_count,
    .slot_start, .core_stalled,
    .sp_req_valid, .sp_req_write, .sp_req_addr, .sp_req_wdata, .sp_grant, .sp_rsp_valid,
    .o_req_valid, .o_req_ready, .o_req_dummy, .o_req_write, .o_req_addr, .o_req_wdata,
    .o_rsp_valid, .ev_dummy_a, .ev_real_m, .ev_dummy_m);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // stand-in ORAM: ready when idle, response OLAT cycles after acceptance
  int obusy = 0;
  assign o_req_ready = (obusy == 0);
  always @(posedge clk) begin
    o_rsp_valid <= 0;
    if (o_req_valid && o_req_ready) obusy <= OLAT;
    else if (obusy > 0) begin
      obusy <= obusy - 1;
      if (obusy == 1) o_rsp_valid <= 1;
    end
  end

  // requester: a request is pending in rounds 2, 3 and 7; core stalled meanwhile
  int round = 0;
  int slots_in_round = 0, bad_rounds = 0, last_slot = -1, bad_gap = 0;
  int n_real = 0, n_dummy = 0, n_dummy_a = 0, n_rsp_real = 0, n_acc = 0;
  logic pending = 0;
  assign sp_req_valid = pending;
  assign sp_req_write = 1'b0;
  assign sp_req_addr  = 16'(round);
  assign sp_req_wdata = '0;
  assign core_stalled = pending;
  always @(posedge clk) begin
    if (slot_start) begin
      slots_in_round++;
      if (last_slot >= 0 && slots_in_round > 1 && cyc - last_slot != SC) bad_gap++;
      last_slot = cyc;
    end
    if (o_req_valid && o_req_ready) begin
      n_acc++;
      if (slots_in_round != N) bad_rounds++;
      slots_in_round = 0;
      if (o_req_dummy != !pending) bad_rounds++;
    end
    if (ev_real_m) n_real++;
    if (ev_dummy_m) n_dummy++;
    if (ev_dummy_a) n_dummy_a++;
    if (sp_grant) pending <= 0;
    if (sp_rsp_valid) n_rsp_real++;
    if (o_rsp_valid) begin
      round++;
      if (round == 2 || round == 3 || round == 7) pending <= 1;
    end
  end

  int t_go, t_done;
  initial begin
    go = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); go = 1; t_go = cyc;
    @(negedge clk); go = 0;
    wait (done);
    t_done = cyc;
    repeat (50) @(posedge clk);
    check(n_acc == T, $sformatf("accesses %0d", n_acc));
    check(t_count == T, "t_count");
    check(bad_rounds == 0, "round shape");
    check(bad_gap == 0, "slot spacing");
    check(n_real == 3 && n_rsp_real == 3, $sformatf("real M %0d/%0d", n_real, n_rsp_real));
    check(n_dummy == T - 3, "dummy M");
    check(n_dummy_a == 3 * N, $sformatf("dummy A %0d", n_dummy_a));
    // each round: N*SC cycles of slots, 1 request cycle, OLAT+1 wait cycles
    check(t_done - t_go == T * (N * SC + 1 + OLAT + 1) + 1,
          $sformatf("run length %0d", t_done - t_go));
    check(!running && slots_in_round == 0, "stops after T");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
