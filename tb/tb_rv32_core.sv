// tb_rv32_core: runs a hand-written RV32I program on the core with both
// scratchpads and a stand-in spld responder. Checks register results, stored
// memory, the spld operands, that each instruction takes one 3-cycle slot
// and that the core executes nothing while spld is pending.
module tb_rv32_core;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic slot_start, stalled, retire;
  logic imem_en, dmem_en, dmem_we, spld_start, spld_done;
  logic [11:0] imem_addr;
  logic [31:0] imem_rdata, dmem_wdata, dmem_rdata, spld_addr, spld_nblocks, spld_spaddr, a0;
  logic [3:0] dmem_be;
  logic [18:0] dmem_addr;
  logic iw_en;
  logic [11:0] iw_addr;
  logic [31:0] iw_data;

  rv32_core dut (.*);
  iscratchpad u_imem (.clk, .wr_en(iw_en), .wr_addr(iw_addr), .wr_data(iw_data),
                      .rd_en(imem_en), .rd_addr(imem_addr), .rd_data(imem_rdata));
  logic [511:0] b_unused;
  dscratchpad #(.BYTES(4096)) u_dmem (.clk, .w_en(dmem_en), .w_we(dmem_we), .w_be(dmem_be),
    .w_addr(dmem_addr[11:0]), .w_wdata(dmem_wdata), .w_rdata(dmem_rdata),
    .b_en(1'b0), .b_we(1'b0), .b_line('0), .b_wdata('0), .b_rdata(b_unused));

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

  // slot generator: one slot every 3 cycles
  int phase = 0;
  always @(posedge clk) if (rst_n) phase <= (phase == 2) ? 0 : phase + 1;
  assign slot_start = rst_n && (phase == 0) && run;
  logic run = 0;

  // spld responder: done 20 cycles after start; counts retirements while pending
  int spld_seen = 0, spld_wait = 0, retire_while_stalled = 0, retired = 0;
  logic [31:0] sa, sn, ss;
  always @(posedge clk) begin
    spld_done <= 0;
    if (spld_start) begin spld_seen++; sa = spld_addr; sn = spld_nblocks; ss = spld_spaddr; spld_wait = 20; end
    else if (spld_wait > 0) begin spld_wait--; if (spld_wait == 0) spld_done <= 1; end
    if (retire) retired++;
    if (retire && stalled) retire_while_stalled++;
  end

  logic [31:0] prog [$];
  int first_retire, last_retire, cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    cyc = 0;
    iw_en = 0; iw_addr = '0; iw_data = '0; spld_done = 0;
    prog = {
      addi(1, 0, 10), addi(2, 0, 0),                          //  0,  4
      add(2, 2, 1), addi(1, 1, -1), bne(1, 0, -8),            //  8, 12, 16
      sw(2, 0, 0),                                            // 20 mem[0]=55
      lui(3, 32'h12345), addi(3, 3, 32'h678), sw(3, 0, 4),    // 24..32
      lb(4, 0, 7), lbu(5, 0, 4), lh(6, 0, 4),                 // 36..44
      addi(7, 0, -1), sh(7, 0, 8), lhu(8, 0, 8),              // 48..56
      sb(3, 0, 13), lbu(9, 0, 13),                            // 60, 64
      addi(11, 0, 4), sra(12, 7, 11), srl(13, 3, 11), sll(14, 3, 11),   // 68..80
      slt(15, 7, 0), sltu(16, 7, 0), xor_(17, 3, 7),          // 84..92
      jal(18, 8), addi(19, 0, 99),                            // 96, 100 (skipped)
      auipc(20, 0),                                           // 104
      spld(3, 11, 2),                                         // 108
      addi(10, 2, 1),                                         // 112 a0 = 56
      sub(21, 2, 3), or_(22, 5, 11), and_(23, 3, 7),          // 116..124
      addi(24, 0, 136), jalr(25, 24, 4),                      // 128, 132 -> 140
      addi(26, 0, 1),                                         // 136 (skipped)
      blt(7, 0, 8), addi(27, 0, 5),                           // 140, 144 (skipped)
      bgeu(7, 0, 8), addi(28, 0, 6),                          // 148, 152 (skipped)
      beq(0, 0, 0)                                            // 156 spin
    };
    foreach (prog[i]) begin
      @(negedge clk); iw_en = 1; iw_addr = 12'(i); iw_data = prog[i];
    end
    @(negedge clk); iw_en = 0;
    rst_n = 1;
    @(negedge clk); run = 1;
    // 4 loop iterations of 3 -> 35 + spld; give it plenty of slots
    repeat (3 * 200) @(posedge clk);
    run = 0;
    repeat (5) @(posedge clk);
    check(dut.rf[2] == 55, "sum loop");
    check(u_dmem.g_bank[0].mem[0] == 55, "sw result");
    check(dut.rf[3] == 32'h12345678, "lui/addi");
    check(dut.rf[4] == 32'h12, "lb");
    check(dut.rf[5] == 32'h78, "lbu");
    check(dut.rf[6] == 32'h5678, "lh");
    check(dut.rf[8] == 32'hffff, "sh/lhu");
    check(dut.rf[9] == 32'h78, "sb/lbu");
    check(dut.rf[12] == 32'hffffffff, "sra");
    check(dut.rf[13] == 32'h01234567, "srl");
    check(dut.rf[14] == 32'h23456780, "sll");
    check(dut.rf[15] == 1, "slt");
    check(dut.rf[16] == 0, "sltu");
    check(dut.rf[17] == 32'hedcba987, "xor");
    check(dut.rf[18] == 100, "jal link");
    check(dut.rf[19] == 0, "jal skip");
    check(dut.rf[20] == 104, "auipc");
    check(a0 == 56, "a0");
    check(dut.rf[21] == 32'(55 - 32'h12345678), "sub");
    check(dut.rf[22] == 32'h7c, "or");
    check(dut.rf[23] == 32'h12345678, "and");
    check(dut.rf[25] == 136 && dut.rf[26] == 0, "jalr");
    check(dut.rf[27] == 0, "blt taken");
    check(dut.rf[28] == 0, "bgeu taken");
    check(spld_seen == 1, "one spld");
    check(sa == 32'h12345678 && sn == 4 && ss == 55, $sformatf("spld operands %h %0d %0d", sa, sn, ss));
    check(retire_while_stalled == 0, "retire while stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slot timing: consecutive retirements outside spld are exactly 3 cycles apart
  int last_ret = -1, bad_gap = 0, gaps = 0;
  always @(posedge clk) if (retire) begin
    if (last_ret >= 0 && !spld_seen) begin gaps++; if (cyc - last_ret != 3) bad_gap++; end
    last_ret = cyc;
  end
  initial begin
    wait (spld_seen == 1);
    checks++;
    if (bad_gap != 0 || gaps < 20) begin failures++; $display("FAIL slot gaps bad=%0d n=%0d", bad_gap, gaps); end
  end
endmodule
