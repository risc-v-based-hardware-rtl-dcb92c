// tb_asm_pkg: instruction-word builders for the interval extension, written
// from the encoding tables independently of the RTL decoder.
//   R-type, opcode 0001011: {funct7, rs2, rs1, funct3, rd, opcode}
//     funct3 100: two-input forward (funct7 0 add, 1 sub, 2 mul, 3 div)
//     funct3 101: one-input forward (funct7 4 sqrt, 5 sqr, 6 exp, 7 log,
//                 8 cos, 9 sin)
//     funct3 110: one-input backward (funct7 4 sqrt, 5 sqr, 6 exp, 7 log)
//   R4-type, opcode 0101011: {rs3, funct2, rs2, rs1, funct3, rd, opcode}
//     funct3 000: backward 1, 001: backward 2; funct2 0 add .. 3 div
package tb_asm_pkg;

  function automatic logic [31:0] r_type(int f7, int f3, int rd, int rs1, int rs2);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0001011};
  endfunction

  function automatic logic [31:0] r4_type(int f2, int f3, int rd, int rs1, int rs2, int rs3);
    return {5'(rs3), 2'(f2), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0101011};
  endfunction

  // prim: 0 add, 1 sub, 2 mul, 3 div
  function automatic logic [31:0] fwctc(int prim, int rd, int rs1, int rs2);
    return r_type(prim, 3'b100, rd, rs1, rs2);
  endfunction

  function automatic logic [31:0] bwctc1(int prim, int rd, int rs1, int rs2, int rs3);
    return r4_type(prim, 3'b000, rd, rs1, rs2, rs3);
  endfunction

  function automatic logic [31:0] bwctc2(int prim, int rd, int rs1, int rs2, int rs3);
    return r4_type(prim, 3'b001, rd, rs1, rs2, rs3);
  endfunction

  function automatic logic [31:0] sqrtfwctc(int rd, int rs1);
    return r_type(4, 3'b101, rd, rs1, 0);
  endfunction

  function automatic logic [31:0] sqrfwctc(int rd, int rs1);
    return r_type(5, 3'b101, rd, rs1, 0);
  endfunction

  function automatic logic [31:0] sqrtbwctc(int rd, int rs1, int rs2);
    return r_type(4, 3'b110, rd, rs1, rs2);
  endfunction

  function automatic logic [31:0] sqrbwctc(int rd, int rs1, int rs2);
    return r_type(5, 3'b110, rd, rs1, rs2);
  endfunction

  function automatic logic [31:0] expfwctc(int rd, int rs1);
    return r_type(6, 3'b101, rd, rs1, 0);
  endfunction

  function automatic logic [31:0] logfwctc(int rd, int rs1);
    return r_type(7, 3'b101, rd, rs1, 0);
  endfunction

  function automatic logic [31:0] cosfwctc(int rd, int rs1);
    return r_type(8, 3'b101, rd, rs1, 0);
  endfunction

  function automatic logic [31:0] sinfwctc(int rd, int rs1);
    return r_type(9, 3'b101, rd, rs1, 0);
  endfunction

  function automatic logic [31:0] expbwctc(int rd, int rs1, int rs2);
    return r_type(6, 3'b110, rd, rs1, rs2);
  endfunction

  function automatic logic [31:0] logbwctc(int rd, int rs1, int rs2);
    return r_type(7, 3'b110, rd, rs1, rs2);
  endfunction

endpackage
