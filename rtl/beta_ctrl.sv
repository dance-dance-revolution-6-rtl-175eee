// beta_ctrl: control FSM of the multicycle Beta CPU.
//
// Each instruction walks through the stages IFETCH -> REGACCESS -> (MEMOP) ->
// WRITEBACK. In IFETCH the FSM holds 'ifetch_req' until the bus client answers
// with 'ifetch_ready', which also loads the instruction register. REGACCESS
// decodes the opcode and steers the datapath muxes so that the ALU computes the
// result or memory address. Loads and stores then hold 'memop_req' in MEMOP
// until 'memop_ready' (which loads the memory read register). WRITEBACK writes
// the register file and loads the next PC. Either wait can be arbitrarily long
// because another device may own the shared bus.
//
// Interrupts: an 8-bit request vector is watched every cycle. When no request
// is pending, the highest-numbered active bit is latched as the requester and
// marked pending. It is taken at the end of WRITEBACK, but only in user mode
// (PC[31] = 0) and only after an instruction that did not change the PC to an
// arbitrary target (jumps and branches defer it). An extra IRQ stage then
// writes the address of the next instruction into XP (R30) and sends the PC to
// IRQ_BASE + 4*id, entering supervisor mode. Choosing the highest bit when
// several requests arrive together is this design's choice.
//
// Outputs are decoded combinationally from the state and the instruction
// register. Opcodes outside the Beta ISA execute as no-ops (the system has no
// trap support). Reset (synchronous, active high) sends the PC to RESET_PC.
module beta_ctrl
  import ddr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  irq_vec,
  input  logic [31:0] instr,
  input  logic        z,            // Ra == 0
  input  logic        supervisor,   // PC[31]
  // bus client handshake
  output logic        ifetch_req,
  input  logic        ifetch_ready,
  output logic        memop_req,
  input  logic        memop_ready,
  output logic        mem_wr,
  output logic        mem_rd,
  // datapath control
  output logic        ir_le,
  output logic        mdr_le,
  output logic        pc_le,
  output logic [2:0]  pc_sel,       // 1 PC+4, 2 JMP, 3 branch, 4 IRQ vector, 5 reset
  output logic [1:0]  wd_sel,       // 0 PC+4, 1 ALU, 2 memory, 3 PC
  output logic        wa_sel,       // 1: write XP
  output logic        ra2_sel,      // 1: read Rc on port 2 (ST)
  output logic        a_sel,        // 1: A = PC+4+4*SXT(lit)
  output logic        b_sel,        // 1: B = SXT(lit)
  output logic [3:0]  alufn,
  output logic        werf,
  output logic [2:0]  irq_id,
  output logic        irq_pending,
  output logic [2:0]  stage         // current state, for observation
);
  typedef enum logic [2:0] {S_RESET, S_IFETCH, S_REGACCESS, S_MEMOP, S_WRITEBACK, S_IRQ} state_t;
  state_t state, next;

  logic [5:0] opc;
  logic is_op, is_opc, is_ld, is_st, is_ldr, is_jmp, is_beq, is_bne, is_mem, is_br;
  assign opc    = instr[31:26];
  assign is_op  = opc[5:4] == 2'b10;
  assign is_opc = opc[5:4] == 2'b11;
  assign is_ld  = opc == OP_LD;
  assign is_st  = opc == OP_ST;
  assign is_ldr = opc == OP_LDR;
  assign is_jmp = opc == OP_JMP;
  assign is_beq = opc == OP_BEQ;
  assign is_bne = opc == OP_BNE;
  assign is_mem = is_ld | is_st | is_ldr;
  assign is_br  = is_beq | is_bne;

  logic take_irq;
  assign take_irq = irq_pending && !supervisor && !is_jmp && !is_br;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_RESET;
      irq_pending <= 1'b0;
      irq_id      <= 3'd0;
    end else begin
      state <= next;
      if (state == S_IRQ) irq_pending <= 1'b0;
      if ((!irq_pending || state == S_IRQ) && irq_vec != 8'd0) begin
        irq_pending <= 1'b1;
        for (int i = 0; i < 8; i++) if (irq_vec[i]) irq_id <= 3'(i);
      end
    end
  end

  always_comb begin
    next       = state;
    ifetch_req = 1'b0;
    memop_req  = 1'b0;
    mem_wr     = 1'b0;
    mem_rd     = 1'b0;
    ir_le      = 1'b0;
    mdr_le     = 1'b0;
    pc_le      = 1'b0;
    pc_sel     = 3'd1;
    wd_sel     = 2'd1;
    wa_sel     = 1'b0;
    ra2_sel    = is_st;
    a_sel      = is_ldr;
    b_sel      = is_opc | is_ld | is_st;
    alufn      = is_op | is_opc ? instr[29:26] : (is_ldr ? 4'(ALU_A) : 4'(ALU_ADD));
    werf       = 1'b0;
    unique case (state)
      S_RESET: begin
        pc_le  = 1'b1;
        pc_sel = 3'd5;
        next   = S_IFETCH;
      end
      S_IFETCH: begin
        ifetch_req = 1'b1;
        if (ifetch_ready) begin
          ir_le = 1'b1;
          next  = S_REGACCESS;
        end
      end
      S_REGACCESS: next = is_mem ? S_MEMOP : S_WRITEBACK;
      S_MEMOP: begin
        memop_req = 1'b1;
        mem_wr    = is_st;
        mem_rd    = is_ld | is_ldr;
        if (memop_ready) begin
          mdr_le = 1'b1;
          next   = S_WRITEBACK;
        end
      end
      S_WRITEBACK: begin
        werf   = is_op | is_opc | is_ld | is_ldr | is_jmp | is_br;
        wd_sel = (is_jmp | is_br) ? 2'd0 : (is_ld | is_ldr) ? 2'd2 : 2'd1;
        pc_le  = 1'b1;
        if (is_jmp)                  pc_sel = 3'd2;
        else if (is_beq && z)        pc_sel = 3'd3;
        else if (is_bne && !z)       pc_sel = 3'd3;
        else                         pc_sel = 3'd1;
        next = take_irq ? S_IRQ : S_IFETCH;
      end
      S_IRQ: begin
        werf   = 1'b1;
        wa_sel = 1'b1;
        wd_sel = 2'd3;
        pc_le  = 1'b1;
        pc_sel = 3'd4;
        next   = S_IFETCH;
      end
      default: next = S_RESET;
    endcase
  end

  assign stage = 3'(state);
endmodule
