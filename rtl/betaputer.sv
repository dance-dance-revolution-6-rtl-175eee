// betaputer: the Beta computer -- CPU, bus arbiter, shared bus, RAM controller
// and timer interrupt.
//
// The Beta CPU is device 0 on the shared memory bus and owns it after reset.
// Other bus masters (the pad controller, and up to 14 more) present their
// requests on 'dev_req[1..NDEV-1]' (entry 0 is unused; the CPU's own request is
// internal) and see the memory's answers on 'bus_rsp'. Software moves the bus
// to device k by storing k to the bus access vector; that device gets its
// 'dev_en' bit and keeps the bus until it raises its 'dev_yield' bit.
//
// The timer interrupt fires every CLK_HZ/IRQ_HZ cycles and drives bits 0 and 7
// of the CPU's interrupt vector (so that the highest-priority bit is the timer,
// handler at IRQ_BASE + 28); bits 6:1 come from 'irq_ext'. The RAM's second port
// is brought out for the video unit ('vid_addr', 'vid_data'), and the CPU's
// 4-bit direct output register is brought out as 'direct_io'.
module betaputer
  import ddr_pkg::*;
#(
  parameter int          WORDS  = 56320,
  parameter int          AW     = 16,
  parameter int unsigned CLK_HZ = 27_000_000,
  parameter int unsigned IRQ_HZ = 100
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [6:1]      irq_ext,
  input  bus_req_t        dev_req [NDEV],
  input  logic [NDEV-1:0] dev_yield,
  output logic [NDEV-1:0] dev_en,
  output bus_rsp_t        bus_rsp,
  input  logic [AW-1:0]   vid_addr,
  output logic [31:0]     vid_data,
  output logic [3:0]      direct_io,
  output logic [31:0]     dbg_pc,
  output logic [31:0]     dbg_instr,
  output logic            dbg_retire
);
  bus_req_t   cpu_req, mem_req;
  bus_req_t   m_req [NDEV];
  logic       baxv_chg, clk_irq;
  logic [3:0] baxv, owner;

  always_comb begin
    m_req    = dev_req;
    m_req[0] = cpu_req;
  end

  beta_cpu u_cpu (
    .clk, .rst,
    .irq_vec({clk_irq, irq_ext, clk_irq}),
    .bus_en(dev_en[0]), .bus_req(cpu_req), .bus_rsp,
    .baxv_chg, .baxv, .direct_io,
    .dbg_pc, .dbg_instr, .dbg_retire
  );

  bus_arbiter u_arb (
    .clk, .rst, .baxv_chg, .baxv, .dev_yield, .dev_en, .owner
  );

  shared_bus u_bus (.m_req, .dev_en, .s_req(mem_req));

  sysram_busintf #(.WORDS(WORDS), .AW(AW)) u_ram (
    .clk, .rst, .bus_req(mem_req), .bus_rsp, .vid_addr, .vid_data
  );

  clock_irq #(.CLK_HZ(CLK_HZ), .IRQ_HZ(IRQ_HZ)) u_tick (.clk, .rst, .irq(clk_irq));
endmodule
