// rv32_core: RV32I integer core with the scratchpad-load instruction spld.
//
// The core runs the sender's program one instruction per slot. A slot is
// SLOT_CYCLES = 3 cycles long and is opened by the A^N M scheduler with a
// one-cycle `slot_start` pulse; the core has no clock of its own beyond that,
// so the schedule, not the program, decides when work happens. Within a slot:
//   cycle 0  fetch: the instruction scratchpad is read at pc;
//   cycle 1  execute: decode, ALU, branch target; loads and stores address
//            the data scratchpad;
//   cycle 2  write-back: load data returns, rd and pc are updated.
// Every instruction, arithmetic or scratchpad access, takes the same three
// cycles, which is what the document asks of a core with a scratchpad so
// that the kind of instruction is not visible. Loads and stores reach only the
// data scratchpad; ORAM is reached only through spld.
//
// spld (custom-0 opcode, this design's encoding): rs1 = main-memory byte
// address, rs2 = number of 64-byte blocks, rs3 = instr[31:27] = scratchpad
// byte address. In the execute cycle the core pulses spld_start and then
// waits, executing nothing in the slots it is given, until spld_done; then pc
// moves on. The core implements the RV32I user-level base ISA; FENCE, ECALL
// and EBREAK, and unknown opcodes, retire as no-ops. The document builds on
// an existing single-stage RISC-V core; this core is written for this design.
// `a0` exposes register x10, which holds the program's result.
module rv32_core #(
  parameter int unsigned IAW = 12,   // instruction scratchpad word address bits
  parameter int unsigned DAW = 19    // data scratchpad byte address bits
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           slot_start,
  output logic           stalled,     // waiting for spld
  output logic           retire,      // an instruction completed this cycle
  // instruction scratchpad
  output logic           imem_en,
  output logic [IAW-1:0] imem_addr,
  input  logic [31:0]    imem_rdata,
  // data scratchpad word port
  output logic           dmem_en,
  output logic           dmem_we,
  output logic [3:0]     dmem_be,
  output logic [DAW-1:0] dmem_addr,
  output logic [31:0]    dmem_wdata,
  input  logic [31:0]    dmem_rdata,
  // spld
  output logic           spld_start,
  output logic [31:0]    spld_addr,
  output logic [31:0]    spld_nblocks,
  output logic [31:0]    spld_spaddr,
  input  logic           spld_done,
  output logic [31:0]    a0
);
  import hop_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WB, S_SPLD} state_e;
  state_e state_q;

  logic [31:0] pc_q;
  logic [31:0] rf [32];

  // execute-stage results carried to write-back
  logic [31:0] res_q, npc_q;
  logic [4:0]  rd_q;
  logic        rd_we_q, is_load_q;
  logic [2:0]  f3_q;
  logic [1:0]  off_q;

  // decode
  logic [31:0] ins;
  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [4:0]  rs1, rs2, rs3, rd;
  logic [31:0] v1, v2, v3, imm_i, imm_s, imm_b, imm_u, imm_j;
  assign ins   = imem_rdata;
  assign opc   = ins[6:0];
  assign f3    = ins[14:12];
  assign f7    = ins[31:25];
  assign rd    = ins[11:7];
  assign rs1   = ins[19:15];
  assign rs2   = ins[24:20];
  assign rs3   = ins[31:27];
  assign v1    = (rs1 == 5'd0) ? 32'd0 : rf[rs1];
  assign v2    = (rs2 == 5'd0) ? 32'd0 : rf[rs2];
  assign v3    = (rs3 == 5'd0) ? 32'd0 : rf[rs3];
  assign imm_i = {{20{ins[31]}}, ins[31:20]};
  assign imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
  assign imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
  assign imm_u = {ins[31:12], 12'd0};
  assign imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};

  function automatic logic [31:0] alu(input logic [2:0] op, input logic alt,
                                      input logic [31:0] a, input logic [31:0] b);
    unique case (op)
      3'b000: return alt ? a - b : a + b;
      3'b001: return a << b[4:0];
      3'b010: return {31'd0, $signed(a) < $signed(b)};
      3'b011: return {31'd0, a < b};
      3'b100: return a ^ b;
      3'b101: return alt ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      3'b110: return a | b;
      default: return a & b;
    endcase
  endfunction

  logic        taken;
  always_comb begin
    unique case (f3)
      3'b000:  taken = (v1 == v2);
      3'b001:  taken = (v1 != v2);
      3'b100:  taken = ($signed(v1) < $signed(v2));
      3'b101:  taken = ($signed(v1) >= $signed(v2));
      3'b110:  taken = (v1 < v2);
      3'b111:  taken = (v1 >= v2);
      default: taken = 1'b0;
    endcase
  end

  // execute-cycle combinational results
  logic [31:0] ex_res, ex_npc, ex_maddr;
  logic        ex_we, ex_load, ex_store, ex_spld;
  always_comb begin
    ex_res   = '0;
    ex_npc   = pc_q + 32'd4;
    ex_we    = 1'b0;
    ex_load  = 1'b0;
    ex_store = 1'b0;
    ex_spld  = 1'b0;
    ex_maddr = v1 + ((opc == 7'b0100011) ? imm_s : imm_i);
    unique case (opc)
      7'b0110111: begin ex_res = imm_u; ex_we = 1'b1; end                       // LUI
      7'b0010111: begin ex_res = pc_q + imm_u; ex_we = 1'b1; end                // AUIPC
      7'b1101111: begin ex_res = pc_q + 32'd4; ex_we = 1'b1; ex_npc = pc_q + imm_j; end
      7'b1100111: begin ex_res = pc_q + 32'd4; ex_we = 1'b1; ex_npc = (v1 + imm_i) & ~32'd1; end
      7'b1100011: if (taken) ex_npc = pc_q + imm_b;                              // branches
      7'b0000011: begin ex_load = 1'b1; ex_we = 1'b1; end
      7'b0100011: ex_store = 1'b1;
      7'b0010011: begin                                                          // OP-IMM
        ex_res = alu(f3, (f3 == 3'b101) && ins[30], v1, imm_i);
        ex_we  = 1'b1;
      end
      7'b0110011: begin                                                          // OP
        ex_res = alu(f3, ins[30], v1, v2);
        ex_we  = 1'b1;
      end
      OPC_SPLD: ex_spld = 1'b1;
      default: ;                                                                 // no-op
    endcase
  end

  // data scratchpad drive (execute cycle)
  always_comb begin
    dmem_en    = (state_q == S_EXEC) && (ex_load || ex_store);
    dmem_we    = (state_q == S_EXEC) && ex_store;
    dmem_addr  = ex_maddr[DAW-1:0];
    unique case (f3[1:0])
      2'b00:   begin dmem_be = 4'b0001 << ex_maddr[1:0]; dmem_wdata = {4{v2[7:0]}};  end
      2'b01:   begin dmem_be = 4'b0011 << ex_maddr[1:0]; dmem_wdata = {2{v2[15:0]}}; end
      default: begin dmem_be = 4'b1111;                  dmem_wdata = v2;            end
    endcase
  end

  assign imem_en      = (state_q == S_IDLE) && slot_start;
  assign imem_addr    = pc_q[IAW+1:2];
  assign spld_start   = (state_q == S_EXEC) && ex_spld;
  assign spld_addr    = v1;
  assign spld_nblocks = v2;
  assign spld_spaddr  = v3;
  assign stalled      = (state_q == S_SPLD);
  assign a0           = rf[10];

  // load data alignment (write-back cycle)
  logic [31:0] ld_shift, ld_val;
  always_comb begin
    ld_shift = dmem_rdata >> {off_q, 3'b000};
    unique case (f3_q)
      3'b000:  ld_val = {{24{ld_shift[7]}}, ld_shift[7:0]};
      3'b001:  ld_val = {{16{ld_shift[15]}}, ld_shift[15:0]};
      3'b100:  ld_val = {24'd0, ld_shift[7:0]};
      3'b101:  ld_val = {16'd0, ld_shift[15:0]};
      default: ld_val = dmem_rdata;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      pc_q      <= '0;
      res_q     <= '0;
      npc_q     <= '0;
      rd_q      <= '0;
      rd_we_q   <= 1'b0;
      is_load_q <= 1'b0;
      f3_q      <= '0;
      off_q     <= '0;
      retire    <= 1'b0;
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else begin
      retire <= 1'b0;
      unique case (state_q)
        S_IDLE: if (slot_start) state_q <= S_EXEC;
        S_EXEC: begin
          res_q     <= ex_res;
          npc_q     <= ex_npc;
          rd_q      <= rd;
          rd_we_q   <= ex_we;
          is_load_q <= ex_load;
          f3_q      <= f3;
          off_q     <= ex_maddr[1:0];
          state_q   <= ex_spld ? S_SPLD : S_WB;
        end
        S_WB: begin
          if (rd_we_q && rd_q != 5'd0) rf[rd_q] <= is_load_q ? ld_val : res_q;
          pc_q    <= npc_q;
          retire  <= 1'b1;
          state_q <= S_IDLE;
        end
        S_SPLD: if (spld_done) begin
          pc_q    <= npc_q;
          retire  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
