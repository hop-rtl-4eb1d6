// dram_model: behavioural model of the untrusted external DRAM that holds
// the encrypted ORAM tree. Not synthesizable logic: storage is a sparse
// associative array, so a large address space costs only what is written.
// A location never written reads as zero. Requests are accepted at once
// (req_ready is always 1); each request, read or write, is answered with
// one rsp_valid pulse LATENCY cycles later. Counts reads and writes so a
// testbench can check the access pattern.
module dram_model #(
  parameter int unsigned AW      = 27,
  parameter int unsigned DW      = 617,
  parameter int unsigned LATENCY = 4
) (
  input  logic          clk,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [AW-1:0] req_addr,
  input  logic [DW-1:0] req_wdata,
  output logic          rsp_valid,
  output logic [DW-1:0] rsp_rdata
);
  logic [DW-1:0] mem [logic [AW-1:0]];
  int unsigned n_reads = 0, n_writes = 0;
  int unsigned wait_q = 0;
  logic        pending = 1'b0;
  logic [DW-1:0] data_q;

  assign req_ready = !pending;

  initial begin
    rsp_valid = 1'b0;
    rsp_rdata = '0;
  end

  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (pending) begin
      if (wait_q <= 1) begin
        pending   <= 1'b0;
        rsp_valid <= 1'b1;
        rsp_rdata <= data_q;
      end
      wait_q <= wait_q - 1;
    end else if (req_valid) begin
      pending <= 1'b1;
      wait_q  <= LATENCY;
      if (req_write) begin
        mem[req_addr] = req_wdata;
        n_writes++;
        data_q <= '0;
      end else begin
        n_reads++;
        data_q <= mem.exists(req_addr) ? mem[req_addr] : '0;
      end
    end
  end

  function automatic logic [DW-1:0] peek(input logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction
endmodule
