// Instruction encoders for building TinyRV2 test programs in testbenches.
package rv_asm_pkg;
  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_type(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MUL (int rd, int rs1, int rs2); return r_type(7'h01, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR_(int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (int rd, int rs1, int rs2); return r_type(7'h20, rs2, rs1, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(int rd, int rs1, int sh);  return i_type(sh,  rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int rs1, int sh);  return i_type(sh | 32'h400, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW  (int rd, int rs1, int imm); return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs2, int rs1, int imm); return s_type(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BLT (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] JAL (int rd, int off);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] CSRR(int rd, int csr);  return i_type(csr, 0, 3'b010, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRW(int csr, int rs1); return i_type(csr, rs1, 3'b001, 0, 7'b1110011); endfunction
endpackage
