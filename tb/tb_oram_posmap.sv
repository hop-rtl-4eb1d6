// tb_oram_posmap: checks the reset sweep clears every entry, then writes and
// reads random entries against a reference array.
module tb_oram_posmap;
  localparam int AW = 6, LW = 7;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic init_busy, rd_en, rd_valid, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [LW-1:0] rd_leaf, wr_leaf;
  logic [LW:0] ref_m [1<<AW];
  int cyc;

  oram_posmap #(.ADDR_W(AW), .LEAF_W(LW)) dut (.*);
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

  task automatic rd(input logic [AW-1:0] a);
    @(negedge clk); rd_en = 1; rd_addr = a;
    @(negedge clk); rd_en = 0;
    check({rd_valid, rd_leaf} == ref_m[a], $sformatf("entry %0d: %h vs %h", a, {rd_valid, rd_leaf}, ref_m[a]));
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_leaf = '0;
    foreach (ref_m[i]) ref_m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (init_busy) begin @(posedge clk); cyc++; end
    check(cyc == (1 << AW), $sformatf("sweep took %0d cycles", cyc));
    for (int i = 0; i < (1 << AW); i++) rd(AW'(i));
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'($urandom); wr_leaf = LW'($urandom);
      ref_m[wr_addr] = {1'b1, wr_leaf};
      @(negedge clk); wr_en = 0;
      rd(AW'($urandom));
    end
    for (int i = 0; i < (1 << AW); i++) rd(AW'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
