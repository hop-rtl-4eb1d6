// rv_asm_pkg: RV32I instruction encoders for the testbenches, so test
// programs can be written as readable calls instead of hex words. Includes
// the chip's spld instruction (custom-0 opcode, rs3 in bits 31:27).
package rv_asm_pkg;
  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1,
                                         input logic [2:0] f3);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1,
                                         input logic [2:0] f3);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] slli(input int rd, input int rs1, input int sh);
    return i_type(sh, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] srli(input int rd, input int rs1, input int sh);
    return i_type(sh, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] andi(input int rd, input int rs1, input int imm);
    return i_type(imm, rs1, 3'b111, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] add (input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (input int rd, input int a, input int b); return r_type(7'h20, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sll (input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] slt (input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sltu(input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] srl (input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sra (input int rd, input int a, input int b); return r_type(7'h20, b, a, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] or_ (input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] and_(input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'b111, rd, 7'b0110011); endfunction
  function automatic logic [31:0] lui (input int rd, input int imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] auipc(input int rd, input int imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] jal(input int rd, input int off);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] beq (input int a, input int b, input int off); return b_type(off, b, a, 3'b000); endfunction
  function automatic logic [31:0] bne (input int a, input int b, input int off); return b_type(off, b, a, 3'b001); endfunction
  function automatic logic [31:0] blt (input int a, input int b, input int off); return b_type(off, b, a, 3'b100); endfunction
  function automatic logic [31:0] bltu(input int a, input int b, input int off); return b_type(off, b, a, 3'b110); endfunction
  function automatic logic [31:0] bgeu(input int a, input int b, input int off); return b_type(off, b, a, 3'b111); endfunction
  function automatic logic [31:0] lb  (input int rd, input int rs1, input int imm); return i_type(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lh  (input int rd, input int rs1, input int imm); return i_type(imm, rs1, 3'b001, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lw  (input int rd, input int rs1, input int imm); return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lbu (input int rd, input int rs1, input int imm); return i_type(imm, rs1, 3'b100, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lhu (input int rd, input int rs1, input int imm); return i_type(imm, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sb  (input int rs2, input int rs1, input int imm); return s_type(imm, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] sh  (input int rs2, input int rs1, input int imm); return s_type(imm, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] sw  (input int rs2, input int rs1, input int imm); return s_type(imm, rs2, rs1, 3'b010); endfunction
  // spld rs1=main-memory address, rs2=#blocks, rs3=scratchpad address
  function automatic logic [31:0] spld(input int rs1, input int rs2, input int rs3);
    return {5'(rs3), 2'b00, 5'(rs2), 5'(rs1), 3'b000, 5'd0, 7'b0001011};
  endfunction
endpackage
