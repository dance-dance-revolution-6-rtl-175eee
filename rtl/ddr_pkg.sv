// ddr_pkg: types and constants shared by the DDR game system.
//
// The shared memory bus of the system is 56 bits wide: a read strobe, a write
// strobe, 22 address bits and 32 data bits. Here the master side of that bus is
// a packed struct (bus_req_t) with exactly those 56 bits, and the memory side
// answers with bus_rsp_t. The response adds a one-cycle 'done' strobe, which in
// the original tristate bus corresponds to the RAM controller enabling its data
// drivers; this design uses it as the completion signal for reads and writes.
//
// Also here: the Beta ALU function codes and opcodes (Beta ISA, 6.004), the two
// special store addresses that the CPU bus client intercepts (bus access vector
// and direct I/O), and the interrupt vector base.
package ddr_pkg;

  localparam int BUS_AW = 22;
  localparam int NDEV   = 16;

  typedef struct packed {
    logic              re;    // bus bit 55: read strobe
    logic              we;    // bus bit 54: write strobe
    logic [BUS_AW-1:0] addr;  // bus bits 53:32: byte address
    logic [31:0]       data;  // bus bits 31:0: write data
  } bus_req_t;

  typedef struct packed {
    logic        done;        // one-cycle completion strobe
    logic [31:0] data;        // read data, valid with done on reads
  } bus_rsp_t;

  // ALU function codes (instr[29:26] of OP/OPC instructions)
  typedef enum logic [3:0] {
    ALU_ADD  = 4'b0000, ALU_SUB  = 4'b0001, ALU_MUL  = 4'b0010, ALU_DIV  = 4'b0011,
    ALU_CMPEQ= 4'b0100, ALU_CMPLT= 4'b0101, ALU_CMPLE= 4'b0110,
    ALU_AND  = 4'b1000, ALU_OR   = 4'b1001, ALU_XOR  = 4'b1010,
    ALU_SHL  = 4'b1100, ALU_SHR  = 4'b1101, ALU_SRA  = 4'b1110, ALU_A = 4'b1111
  } alufn_t;

  // Opcodes of the memory/branch group (instr[31:26])
  localparam logic [5:0] OP_LD  = 6'h18;
  localparam logic [5:0] OP_ST  = 6'h19;
  localparam logic [5:0] OP_JMP = 6'h1B;
  localparam logic [5:0] OP_BEQ = 6'h1D;
  localparam logic [5:0] OP_BNE = 6'h1E;
  localparam logic [5:0] OP_LDR = 6'h1F;

  // Stores to these addresses never reach the bus
  localparam logic [31:0] BAXV_ADDR     = 32'h7FFF_FFFF;  // bus access vector
  localparam logic [31:0] DIRECTIO_ADDR = 32'h7FFF_FFF0;  // 4-bit direct output port

  localparam logic [31:0] RESET_PC  = 32'h8000_0000;      // supervisor mode, address 0
  localparam logic [31:0] IRQ_BASE  = 32'h8000_0000;      // handler = IRQ_BASE + 4*id
  localparam logic [4:0]  XP_REG    = 5'd30;

endpackage
