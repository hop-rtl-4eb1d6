// tb_dscratchpad: mixes byte/half/word stores and 512-bit line writes and
// checks word reads and line reads against a reference byte array.
module tb_dscratchpad;
  localparam int BYTES = 4096;
  localparam int AW = 12, RW = 6;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic w_en, w_we, b_en, b_we;
  logic [3:0] w_be;
  logic [AW-1:0] w_addr;
  logic [31:0] w_wdata, w_rdata;
  logic [RW-1:0] b_line;
  logic [511:0] b_wdata, b_rdata;
  logic [7:0] ref_b [BYTES];

  dscratchpad #(.BYTES(BYTES)) dut (.*);
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

  function automatic logic [31:0] ref_word(input int a);
    return {ref_b[a+3], ref_b[a+2], ref_b[a+1], ref_b[a]};
  endfunction

  initial begin
    w_en = 0; w_we = 0; b_en = 0; b_we = 0; w_be = '0; w_addr = '0; w_wdata = '0;
    b_line = '0; b_wdata = '0;
    // lines first, so every byte is defined
    for (int l = 0; l < BYTES / 64; l++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_line = RW'(l);
      for (int k = 0; k < 16; k++) b_wdata[k*32 +: 32] = $urandom;
      for (int k = 0; k < 64; k++) ref_b[l*64 + k] = b_wdata[k*8 +: 8];
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a, kind;
      a = ($urandom % BYTES) & ~3;
      kind = $urandom % 4;
      @(negedge clk);
      if (kind == 0) begin
        // word read
        w_en = 1; w_we = 0; w_addr = AW'(a);
        @(negedge clk); w_en = 0;
        check(w_rdata == ref_word(a), $sformatf("word %0d", a));
      end else if (kind == 1) begin
        // store with random byte enables
        w_en = 1; w_we = 1; w_addr = AW'(a); w_wdata = $urandom; w_be = 4'($urandom);
        for (int i = 0; i < 4; i++) if (w_be[i]) ref_b[a+i] = w_wdata[i*8 +: 8];
        @(negedge clk); w_en = 0; w_we = 0;
      end else if (kind == 2) begin
        // line read
        int l;
        l = $urandom % (BYTES / 64);
        b_en = 1; b_we = 0; b_line = RW'(l);
        @(negedge clk); b_en = 0;
        for (int k = 0; k < 16; k++)
          check(b_rdata[k*32 +: 32] == ref_word(l*64 + 4*k), $sformatf("line %0d word %0d", l, k));
      end else begin
        int l;
        l = $urandom % (BYTES / 64);
        b_en = 1; b_we = 1; b_line = RW'(l);
        for (int k = 0; k < 16; k++) b_wdata[k*32 +: 32] = $urandom;
        for (int k = 0; k < 64; k++) ref_b[l*64 + k] = b_wdata[k*8 +: 8];
        @(negedge clk); b_en = 0; b_we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
