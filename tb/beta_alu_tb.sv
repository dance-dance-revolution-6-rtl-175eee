// beta_alu_tb: checks every ALU function against a reference model on random
// and corner-case operands. The reference computes signed compares from the
// sign bits and the unsigned difference and builds the arithmetic shift from
// a logical shift plus sign fill, so it does not share code with the ALU.
module beta_alu_tb;
  import beta_asm_pkg::*;
  logic [3:0]  fn;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  beta_alu dut (.fn, .a, .b, .y);

  function automatic logic [31:0] ref_model(input logic [3:0] f, input logic [31:0] x, z);
    logic lt;
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    lt = (x[31] != z[31]) ? x[31] : (x < z);
    case (f)
      F_ADD:   return x + z;
      F_SUB:   return x + ~z + 1;
      F_MUL:   return 32'(longint'(x) * longint'(z));
      F_DIV:   return (z == 0) ? 0 : 32'(sx / sz);
      F_CMPEQ: return (x ^ z) == 0 ? 1 : 0;
      F_CMPLT: return lt ? 1 : 0;
      F_CMPLE: return (lt || x == z) ? 1 : 0;
      F_AND:   return x & z;
      F_OR:    return x | z;
      F_XOR:   return (x | z) & ~(x & z);
      F_SHL:   return x << z[4:0];
      F_SHR:   return x >> z[4:0];
      F_SRA:   return (x >> z[4:0]) | (x[31] ? ~(32'hFFFF_FFFF >> z[4:0]) : 32'd0);
      4'hF:    return x;
      default: return 0;
    endcase
  endfunction

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd5};
    for (int f = 0; f < 16; f++) begin
      for (int i = 0; i < 236; i++) begin
        fn = 4'(f);
        if (i < 36) begin a = corner[i % 6]; b = corner[i / 6]; end
        else begin a = $urandom; b = (i % 3 == 0) ? 32'($urandom_range(0, 40)) : $urandom; end
        #1;
        checks++;
        if (y !== ref_model(fn, a, b)) begin
          failures++;
          if (failures < 10) $display("ALU fn=%h a=%h b=%h y=%h exp=%h", fn, a, b, y, ref_model(fn, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
