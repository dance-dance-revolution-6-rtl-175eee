// beta_alu: arithmetic/logic unit of the Beta CPU.
//
// Purely combinational. 'fn' selects the operation with the Beta ISA function
// code (instr[29:26] of OP and OPC instructions): add, subtract, multiply,
// divide, the three signed compares (result 1 or 0), AND/OR/XOR, logical and
// arithmetic shifts by b[4:0], and pass-through of a (used to form LDR
// addresses). Function codes and operations follow the Beta instruction set;
// divide is signed (computed at 64 bits, so 0x80000000 / -1 wraps to
// 0x80000000), and a divide by zero returns 0 (a choice of this design).
// Unused codes return 0.
module beta_alu
  import ddr_pkg::*;
(
  input  logic [3:0]  fn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (fn)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_MUL:   y = a * b;
      ALU_DIV:   y = (b == 32'd0) ? 32'd0 : 32'(64'($signed(a)) / 64'($signed(b)));
      ALU_CMPEQ: y = {31'd0, a == b};
      ALU_CMPLT: y = {31'd0, $signed(a) <  $signed(b)};
      ALU_CMPLE: y = {31'd0, $signed(a) <= $signed(b)};
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SHL:   y = a << b[4:0];
      ALU_SHR:   y = a >> b[4:0];
      ALU_SRA:   y = 32'($signed(a) >>> b[4:0]);
      ALU_A:     y = a;
      default:   y = 32'd0;
    endcase
  end
endmodule
