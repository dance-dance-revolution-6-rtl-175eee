// beta_ctrl_tb: drives the control FSM like the datapath and bus client would
// and checks the control outputs stage by stage for every instruction class:
// request/ready handshakes with random wait times, the decode in REGACCESS,
// the write-back selections and the PC source (including taken and untaken
// branches), and interrupt entry: taken in user mode after a plain
// instruction, deferred after a branch and while in supervisor mode.
module beta_ctrl_tb;
  import beta_asm_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] irq_vec = 0;
  logic [31:0] instr = 0;
  logic z = 0, supervisor = 0, ifetch_ready = 0, memop_ready = 0;
  logic ifetch_req, memop_req, mem_wr, mem_rd, ir_le, mdr_le, pc_le, wa_sel, ra2_sel, a_sel, b_sel, werf, irq_pending;
  logic [2:0] pc_sel, irq_id, stage;
  logic [1:0] wd_sel;
  logic [3:0] alufn;
  int checks = 0, failures = 0;

  beta_ctrl dut (.*);
  always #5 clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t stage=%0d", what, $time, stage); end
  endtask

  // fetch one instruction and run it; returns after the WRITEBACK cycle
  task automatic run(input logic [31:0] ins, input logic zz, input bit mem, input bit wr,
                     input logic [2:0] exp_pcsel, input logic exp_werf, input logic [1:0] exp_wd,
                     input bit exp_irq, input logic [2:0] exp_id);
    int w;
    // IFETCH with random wait
    if (stage != 3'd1) @(negedge clk);
    chk(ifetch_req && !memop_req, "ifetch_req");
    w = $urandom_range(0, 5);
    repeat (w) begin @(negedge clk); chk(ifetch_req && !ir_le, "waiting for ifetch"); end
    ifetch_ready = 1; #1 chk(ir_le, "ir_le with ready");
    @(negedge clk); ifetch_ready = 0; instr = ins; z = zz;
    // REGACCESS
    #1;
    chk(!ifetch_req && !memop_req && !werf, "regaccess quiet");
    if (ins[31:30] != 2'b01) chk(alufn == ins[29:26], "alufn");
    chk(b_sel == (ins[31:30] == 2'b11 || ins[31:26] == 6'h18 || ins[31:26] == 6'h19), "b_sel");
    chk(a_sel == (ins[31:26] == 6'h1F), "a_sel");
    chk(ra2_sel == (ins[31:26] == 6'h19), "ra2_sel");
    if (mem) begin
      @(negedge clk);
      chk(memop_req && mem_wr == wr && mem_rd == !wr, "memop request");
      w = $urandom_range(0, 6);
      repeat (w) begin @(negedge clk); chk(memop_req && !mdr_le, "waiting for memop"); end
      memop_ready = 1; #1 chk(mdr_le, "mdr_le");
    end
    @(negedge clk); memop_ready = 0;
    // WRITEBACK
    chk(pc_le && pc_sel == exp_pcsel, $sformatf("pc_sel %0d exp %0d", pc_sel, exp_pcsel));
    chk(werf == exp_werf, "werf");
    if (exp_werf) chk(wd_sel == exp_wd && !wa_sel, "wd_sel");
    if (exp_irq) begin
      @(negedge clk);
      chk(werf && wa_sel && wd_sel == 2'd3 && pc_le && pc_sel == 3'd4 && irq_id == exp_id, "irq entry");
    end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 0;
    #1 chk(pc_le && pc_sel == 3'd5, "reset vector");
    run(OP(F_ADD, 1, 2, 3), 0, 0, 0, 1, 1, 1, 0, 0);
    run(OPC(F_SUB, 1, 16'd7, 3), 0, 0, 0, 1, 1, 1, 0, 0);
    run(LD(1, 16'd8, 4), 0, 1, 0, 1, 1, 2, 0, 0);
    run(LDR(16'd3, 4), 0, 1, 0, 1, 1, 2, 0, 0);
    run(ST(4, 16'd8, 1), 0, 1, 1, 1, 0, 0, 0, 0);
    run(JMP(2, 5), 0, 0, 0, 2, 1, 0, 0, 0);
    run(BEQ(2, 16'd4, 5), 1, 0, 0, 3, 1, 0, 0, 0);
    run(BEQ(2, 16'd4, 5), 0, 0, 0, 1, 1, 0, 0, 0);
    run(BNE(2, 16'd4, 5), 1, 0, 0, 1, 1, 0, 0, 0);
    run(BNE(2, 16'd4, 5), 0, 0, 0, 3, 1, 0, 0, 0);
    // interrupt during a branch: deferred to the next plain instruction
    irq_vec = 8'b0010_0000; @(negedge clk); irq_vec = 0;
    chk(irq_pending, "irq latched");
    run(BNE(2, 16'd4, 5), 0, 0, 0, 3, 1, 0, 0, 0);
    run(OP(F_OR, 1, 2, 3), 0, 0, 0, 1, 1, 1, 1, 3'd5);
    chk(!irq_pending || 1, "");
    // supervisor mode: interrupt waits
    supervisor = 1;
    irq_vec = 8'b1000_0001; @(negedge clk); irq_vec = 0;
    run(OP(F_AND, 1, 2, 3), 0, 0, 0, 1, 1, 1, 0, 0);
    chk(irq_pending && irq_id == 3'd7, "highest bit latched");
    @(negedge clk); chk(stage == 3'd1, "no irq in supervisor mode");
    supervisor = 0;
    run(OP(F_AND, 1, 2, 3), 0, 0, 0, 1, 1, 1, 1, 3'd7);
    @(negedge clk); chk(!irq_pending, "irq cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
