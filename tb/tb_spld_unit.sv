// tb_spld_unit: the spld unit with a data scratchpad and a stand-in memory
// slot server over a reference ORAM array. Checks that blocks land in the
// right scratchpad lines, that a line loaded earlier is written back to its
// own ORAM block (with the core's later changes) before it is reused, that
// fresh lines are not written back, and the request counts, including n = 0.
module tb_spld_unit;
  localparam int LINES = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic start, done, busy;
  logic [31:0] addr, nblocks, spaddr;
  logic b_en, b_we;
  logic [5:0] b_line;
  logic [511:0] b_wdata, b_rdata, oreq_wdata, ores_rdata;
  logic oreq_valid, oreq_write, oreq_grant, ores_valid;
  logic [AW-1:0] oreq_addr;
  logic w_en, w_we;
  logic [3:0] w_be;
  logic [11:0] w_addr;
  logic [31:0] w_wdata, w_rdata;

  spld_unit #(.LINES(LINES), .ADDR_W(AW)) dut (.*);
  dscratchpad #(.BYTES(LINES * 64)) u_sp (.clk, .w_en, .w_we, .w_be, .w_addr, .w_wdata,
    .w_rdata, .b_en, .b_we, .b_line, .b_wdata, .b_rdata);

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

  // stand-in memory slots: grant after a few cycles, answer 5 cycles later
  logic [511:0] oram [1<<AW];
  int n_rd = 0, n_wr = 0, wait_c = 0;
  logic inflight = 0;
  always @(posedge clk) begin
    oreq_grant <= 0;
    ores_valid <= 0;
    if (!inflight && oreq_valid && !oreq_grant && ($urandom % 4 == 0)) begin
      oreq_grant <= 1;
      inflight <= 1;
      wait_c <= 5;
      if (oreq_write) begin oram[oreq_addr] <= oreq_wdata; n_wr++; end
      else begin ores_rdata <= oram[oreq_addr]; n_rd++; end
    end else if (inflight) begin
      if (wait_c == 1) begin ores_valid <= 1; inflight <= 0; end
      wait_c <= wait_c - 1;
    end
  end

  task automatic do_spld(input int a, input int n, input int s);
    @(negedge clk);
    start = 1; addr = a; nblocks = n; spaddr = s;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic line_is(input int line, input logic [511:0] exp, input string what);
    @(negedge clk);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); w_en = 1; w_we = 0; w_addr = 12'(line * 64 + 4 * k);
      @(negedge clk); w_en = 0;
      check(w_rdata == exp[k*32 +: 32], $sformatf("%s word %0d", what, k));
    end
  endtask

  logic [511:0] b3, b4, b8;
  initial begin
    start = 0; addr = 0; nblocks = 0; spaddr = 0;
    w_en = 0; w_we = 0; w_be = 4'hf; w_addr = '0; w_wdata = '0;
    oreq_grant = 0; ores_valid = 0; ores_rdata = '0;
    foreach (oram[i]) for (int k = 0; k < 16; k++) oram[i][k*32 +: 32] = $urandom;
    b3 = oram[3]; b4 = oram[4]; b8 = oram[8];
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_spld(3 * 64, 2, 5 * 64);
    check(n_rd == 2 && n_wr == 0, "first spld: 2 loads, no write-back");
    line_is(5, b3, "line5=blk3");
    line_is(6, b4, "line6=blk4");
    // the core changes word 2 of line 5
    @(negedge clk); w_en = 1; w_we = 1; w_addr = 12'(5 * 64 + 8); w_wdata = 32'hcafef00d;
    @(negedge clk); w_en = 0; w_we = 0;
    b3[2*32 +: 32] = 32'hcafef00d;
    do_spld(8 * 64, 1, 5 * 64);
    check(n_rd == 3 && n_wr == 1, "second spld: write-back then load");
    check(oram[3] == b3, "write-back carries the change");
    line_is(5, b8, "line5=blk8");
    do_spld(0, 0, 0);
    check(n_rd == 3 && n_wr == 1, "n=0 does nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
