// beta_asm_pkg: instruction encoders for writing small Beta test programs.
//
// Each function returns one 32-bit Beta instruction word, with the operand
// order of the Beta assembly language: OP(Ra, Rb, Rc), OPC(Ra, literal, Rc),
// LD(Ra, literal, Rc), ST(Rc, literal, Ra), JMP(Ra, Rc), BEQ/BNE(Ra, offset,
// Rc) where the offset is in words from the instruction after the branch, and
// LDR(offset, Rc). Opcode 0x20 + fn is OP, 0x30 + fn is OPC.
package beta_asm_pkg;
  function automatic logic [31:0] OP(input logic [3:0] fn, input logic [4:0] ra, rb, rc);
    return {2'b10, fn, rc, ra, rb, 11'd0};
  endfunction
  function automatic logic [31:0] OPC(input logic [3:0] fn, input logic [4:0] ra,
                                      input logic [15:0] lit, input logic [4:0] rc);
    return {2'b11, fn, rc, ra, lit};
  endfunction
  function automatic logic [31:0] LD(input logic [4:0] ra, input logic [15:0] lit, input logic [4:0] rc);
    return {6'h18, rc, ra, lit};
  endfunction
  function automatic logic [31:0] ST(input logic [4:0] rc, input logic [15:0] lit, input logic [4:0] ra);
    return {6'h19, rc, ra, lit};
  endfunction
  function automatic logic [31:0] JMP(input logic [4:0] ra, input logic [4:0] rc);
    return {6'h1B, rc, ra, 16'd0};
  endfunction
  function automatic logic [31:0] BEQ(input logic [4:0] ra, input logic [15:0] ofs, input logic [4:0] rc);
    return {6'h1D, rc, ra, ofs};
  endfunction
  function automatic logic [31:0] BNE(input logic [4:0] ra, input logic [15:0] ofs, input logic [4:0] rc);
    return {6'h1E, rc, ra, ofs};
  endfunction
  function automatic logic [31:0] LDR(input logic [15:0] ofs, input logic [4:0] rc);
    return {6'h1F, rc, 5'd31, ofs};
  endfunction
  // ALU function codes
  localparam logic [3:0] F_ADD = 4'h0, F_SUB = 4'h1, F_MUL = 4'h2, F_DIV = 4'h3,
                         F_CMPEQ = 4'h4, F_CMPLT = 4'h5, F_CMPLE = 4'h6,
                         F_AND = 4'h8, F_OR = 4'h9, F_XOR = 4'hA,
                         F_SHL = 4'hC, F_SHR = 4'hD, F_SRA = 4'hE;
endpackage
