// rv_asm_pkg - instruction encoders for the testbenches.
//
// Functions that build the 32-bit machine words of the picoRISC-V
// instructions straight from the RV32I instruction formats (R, I, S, B, J),
// independently of the RTL, so that testbenches can write small programs
// in readable form. Branch and jump offsets are byte offsets relative to
// the instruction's own address.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] asm_add(input int rd, input int rs1, input int rs2);
    return r_type(7'b0000000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] asm_sub(input int rd, input int rs1, input int rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] asm_slt(input int rd, input int rs1, input int rs2);
    return r_type(7'b0000000, rs2, rs1, 3'b010, rd);
  endfunction
  function automatic logic [31:0] asm_or(input int rd, input int rs1, input int rs2);
    return r_type(7'b0000000, rs2, rs1, 3'b110, rd);
  endfunction
  function automatic logic [31:0] asm_and(input int rd, input int rs1, input int rs2);
    return r_type(7'b0000000, rs2, rs1, 3'b111, rd);
  endfunction
  function automatic logic [31:0] asm_addi(input int rd, input int rs1, input int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] asm_lw(input int rd, input int imm, input int rs1);
    return i_type(imm, rs1, 3'b010, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] asm_jalr(input int rd, input int rs1, input int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] asm_sw(input int rs2, input int imm, input int rs1);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] asm_beq(input int rs1, input int rs2, input int off);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'b000, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] asm_jal(input int rd, input int off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

endpackage
