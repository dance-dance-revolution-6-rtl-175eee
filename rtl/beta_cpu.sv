// beta_cpu: multicycle Beta RISC CPU with a shared-bus memory port.
//
// Implements the 6.004 Beta instruction set (OP, OPC, LD, ST, LDR, JMP, BEQ,
// BNE) with one unified, byte-addressed, little-endian memory reached over the
// shared bus. It is not pipelined: one instruction is in flight at a time, and
// the instruction register and the memory read register (MDR) latch what
// memory returns. The datapath is the usual Beta one: register file, ALU with an
// A mux (Ra or PC+4+4*literal) and a B mux (Rb or the sign-extended literal),
// a write-data mux (PC+4, ALU, MDR, PC) and a PC mux. beta_ctrl sequences it and
// beta_bus_client turns its memory requests into bus transactions. With
// USE_CACHE set, beta_dmcache sits between the two; it is off by default, as
// in the source design's final system.
//
// PC[31] is the supervisor bit. Reset starts at RESET_PC in supervisor mode;
// an interrupt enters supervisor mode at IRQ_BASE + 4*id. A JMP keeps PC[31]
// only if both the old PC and the target have it set, so user code can never
// enter supervisor mode and JMP(XP) leaves it; branches keep the current
// PC[31]. This follows the 6.004 Beta rule; the target bits are word aligned.
//
// Timing: with the bus owned and the RAM controller answering three cycles
// after a strobe, an ALU instruction takes 8 cycles and a load or store 14.
module beta_cpu
  import ddr_pkg::*;
#(
  parameter bit USE_CACHE = 1'b0    // the source design's final system runs without it
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  irq_vec,
  input  logic        bus_en,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp,
  output logic        baxv_chg,
  output logic [3:0]  baxv,
  output logic [3:0]  direct_io,
  output logic [31:0] dbg_pc,
  output logic [31:0] dbg_instr,
  output logic        dbg_retire    // one cycle per completed instruction
);
  logic [31:0] pc, ir, mdr;
  logic [31:0] rda, rdb, alu_a, alu_b, alu_y, wd, sxt, pc_inc, br_sum, br_target, jmp_target, pc_next;
  logic [4:0]  rb_addr, wa;
  logic        z;

  logic        ifetch_req, ifetch_ready, memop_req, memop_ready, mem_wr, mem_rd;
  logic        ir_le, mdr_le, pc_le, wa_sel, ra2_sel, a_sel, b_sel, werf;
  logic [2:0]  pc_sel, irq_id, stage;
  logic [1:0]  wd_sel;
  logic [3:0]  alufn;
  logic        irq_pending;
  logic [31:0] rdata;

  assign sxt        = {{16{ir[15]}}, ir[15:0]};
  assign pc_inc     = pc + 32'd4;
  assign br_sum     = pc_inc + {sxt[29:0], 2'b00};
  assign br_target  = {pc[31], br_sum[30:2], 2'b00};
  assign jmp_target = {pc[31] & rda[31], rda[30:2], 2'b00};
  assign rb_addr    = ra2_sel ? ir[25:21] : ir[15:11];
  assign wa         = wa_sel ? XP_REG : ir[25:21];
  assign alu_a      = a_sel ? br_sum : rda;
  assign alu_b      = b_sel ? sxt : rdb;
  assign z          = (rda == 32'd0);

  always_comb begin
    unique case (wd_sel)
      2'd0: wd = pc_inc;
      2'd1: wd = alu_y;
      2'd2: wd = mdr;
      default: wd = pc;
    endcase
    unique case (pc_sel)
      3'd2: pc_next = jmp_target;
      3'd3: pc_next = br_target;
      3'd4: pc_next = IRQ_BASE + {27'd0, irq_id, 2'b00};
      3'd5: pc_next = RESET_PC;
      default: pc_next = pc_inc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= RESET_PC;
      ir  <= '0;
      mdr <= '0;
    end else begin
      if (pc_le)  pc  <= pc_next;
      if (ir_le)  ir  <= rdata;
      if (mdr_le) mdr <= rdata;
    end
  end

  beta_regfile u_rf (
    .clk, .rst,
    .ra(ir[20:16]), .rb(rb_addr), .rda, .rdb,
    .we(werf), .wa, .wd
  );

  beta_alu u_alu (.fn(alufn), .a(alu_a), .b(alu_b), .y(alu_y));

  beta_ctrl u_ctrl (
    .clk, .rst, .irq_vec, .instr(ir), .z, .supervisor(pc[31]),
    .ifetch_req, .ifetch_ready, .memop_req, .memop_ready, .mem_wr, .mem_rd,
    .ir_le, .mdr_le, .pc_le, .pc_sel, .wd_sel, .wa_sel, .ra2_sel, .a_sel, .b_sel,
    .alufn, .werf, .irq_id, .irq_pending, .stage
  );

  // memory requests, after the optional cache
  logic        c_ifetch_req, c_memop_req, c_wr, c_rd, c_ifetch_ready, c_memop_ready;
  logic [31:0] c_addr, c_wdata, c_rdata;

  if (USE_CACHE) begin : g_cache
    beta_dmcache u_cache (
      .clk, .rst,
      .ifetch_req, .memop_req, .wr(mem_wr), .rd(mem_rd),
      .addr(ifetch_req ? pc : alu_y), .wdata(rdb),
      .ifetch_ready, .memop_ready, .rdata,
      .d_ifetch_req(c_ifetch_req), .d_memop_req(c_memop_req), .d_wr(c_wr), .d_rd(c_rd),
      .d_addr(c_addr), .d_wdata(c_wdata),
      .d_ifetch_ready(c_ifetch_ready), .d_memop_ready(c_memop_ready), .d_rdata(c_rdata)
    );
  end else begin : g_nocache
    assign c_ifetch_req = ifetch_req;
    assign c_memop_req  = memop_req;
    assign c_wr         = mem_wr;
    assign c_rd         = mem_rd;
    assign c_addr       = ifetch_req ? pc : alu_y;
    assign c_wdata      = rdb;
    assign ifetch_ready = c_ifetch_ready;
    assign memop_ready  = c_memop_ready;
    assign rdata        = c_rdata;
  end

  beta_bus_client u_client (
    .clk, .rst,
    .ifetch_req(c_ifetch_req), .memop_req(c_memop_req), .wr(c_wr), .rd(c_rd),
    .addr(c_addr), .wdata(c_wdata),
    .ifetch_ready(c_ifetch_ready), .memop_ready(c_memop_ready), .rdata(c_rdata),
    .bus_en, .bus_req, .bus_rsp,
    .baxv_chg, .baxv, .direct_io
  );

  assign dbg_pc     = pc;
  assign dbg_instr  = ir;
  assign dbg_retire = (stage == 3'd4);
endmodule
