// tb_iscratchpad: writes random words to random addresses and reads them
// back against a reference array, checking the one-cycle read latency.
module tb_iscratchpad;
  localparam int AW = 12;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [31:0] ref_m [logic [AW-1:0]];

  iscratchpad dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'($urandom); wr_data = $urandom;
      ref_m[wr_addr] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    foreach (ref_m[a]) begin
      @(negedge clk); rd_en = 1; rd_addr = a;
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== ref_m[a]) begin
        failures++;
        $display("FAIL %h: %h vs %h", a, rd_data, ref_m[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
