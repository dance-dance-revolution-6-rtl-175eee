// beta_regfile: the Beta's 32 x 32-bit register file.
//
// Two combinational read ports (ra/rda, rb/rdb) and one write port written on
// the rising clock edge when 'we' is high. Register 31 always reads as zero and
// ignores writes, as the Beta ISA requires. All registers clear on reset
// (synchronous, active high); the reset behaviour is this design's choice.
module beta_regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra,
  input  logic [4:0]  rb,
  output logic [31:0] rda,
  output logic [31:0] rdb,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [31];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 31; i++) regs[i] <= 32'd0;
    end else if (we && wa != 5'd31) begin
      regs[wa] <= wd;
    end
  end

  assign rda = (ra == 5'd31) ? 32'd0 : regs[ra];
  assign rdb = (rb == 5'd31) ? 32'd0 : regs[rb];
endmodule
