// sysmem_dp: the system's main memory, a dual-port block RAM of WORDS x 32 bits.
//
// Port A (read/write) serves the RAM controller; port B (read only) serves the
// video unit's frame-buffer reads. Both ports read synchronously: the word at
// the address presented in one cycle appears after the next rising edge. A
// write on port A stores 'dina' at 'addra' and returns the old word (read
// before write). 56320 words (220 KiB) is the size given for the system; out-
// of-range addresses read 0 and ignore writes. Contents are not initialised by
// the hardware; a program and data image is loaded into 'mem' before use.
module sysmem_dp #(
  parameter int WORDS = 56320,
  parameter int AW    = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addra,
  input  logic [31:0]   dina,
  input  logic          wea,
  output logic [31:0]   douta,
  input  logic [AW-1:0] addrb,
  output logic [31:0]   doutb
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wea && int'(addra) < WORDS) mem[addra] <= dina;
    douta <= (int'(addra) < WORDS) ? mem[addra] : 32'd0;
    doutb <= (int'(addrb) < WORDS) ? mem[addrb] : 32'd0;
  end
endmodule
