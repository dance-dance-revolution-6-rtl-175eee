// beta_cpu_tb: runs a hand-assembled Beta program on the CPU against a memory
// model that answers bus strobes three cycles later. The program exercises
// ALU operations with registers and literals (add, multiply, divide, compare),
// store and load, a counted loop with BNE, BEQ, LDR, JMP into user mode (the
// skipped instructions must not execute), and an interrupt handler that counts
// interrupts and saves XP. Results are read back from memory and compared
// with values worked out by hand. Also checks the cycle count of an ALU
// instruction (8 cycles with the bus owned) and that handlers run in
// supervisor mode.
module beta_cpu_tb;
  import ddr_pkg::*;
  import beta_asm_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] irq_vec = 0;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp = '0;
  logic baxv_chg, dbg_retire;
  logic [3:0] baxv, direct_io;
  logic [31:0] dbg_pc, dbg_instr;
  logic [31:0] mem [1024];
  int pend = 0; logic [31:0] pend_data;
  int checks = 0, failures = 0, cycle = 0;
  int retire_t [$];
  bit sup_in_handler = 1;

  beta_cpu dut (.clk, .rst, .irq_vec, .bus_en(1'b1), .bus_req, .bus_rsp,
                .baxv_chg, .baxv, .direct_io, .dbg_pc, .dbg_instr, .dbg_retire);
  always #5 clk = !clk;

  always @(posedge clk) begin
    cycle++;
    bus_rsp.done <= 1'b0;
    if (bus_req.re || bus_req.we) begin
      pend <= 2;
      if (bus_req.we) mem[bus_req.addr[11:2]] <= bus_req.data;
      pend_data <= mem[bus_req.addr[11:2]];
    end else if (pend > 1) pend <= pend - 1;
    else if (pend == 1) begin pend <= 0; bus_rsp.done <= 1'b1; bus_rsp.data <= pend_data; end
    if (dbg_retire) retire_t.push_back(cycle);
    if (dbg_retire && dbg_pc[30:0] >= 31'h200 && dbg_pc[30:0] < 31'h210 && !dbg_pc[31]) sup_in_handler = 0;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic void put(input int a, input logic [31:0] w);
    mem[a >> 2] = w;
  endfunction

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    put('h00, BEQ(31, 16'd15, 31));
    put('h0C, BEQ(31, 16'd124, 31));
    put('h40, OPC(F_ADD, 31, 16'd5, 1));
    put('h44, OPC(F_ADD, 31, 16'd7, 2));
    put('h48, OP(F_MUL, 1, 2, 3));
    put('h4C, ST(3, 16'h100, 31));
    put('h50, LD(31, 16'h100, 4));
    put('h54, OPC(F_SUB, 4, 16'd1, 4));
    put('h58, BNE(4, -16'sd2, 5));
    put('h5C, ST(5, 16'h104, 31));
    put('h60, LDR(16'd2, 6));
    put('h64, ST(6, 16'h108, 31));
    put('h68, BEQ(31, 16'd1, 31));
    put('h6C, 32'hDEAD_BEEF);
    put('h70, OPC(F_ADD, 31, 16'h80, 7));
    put('h74, JMP(7, 8));
    put('h78, OPC(F_ADD, 31, 16'd99, 20));
    put('h7C, ST(20, 16'h120, 31));
    put('h80, ST(8, 16'h10C, 31));
    put('h84, OPC(F_DIV, 3, 16'd5, 9));
    put('h88, ST(9, 16'h114, 31));
    put('h8C, OPC(F_CMPLT, 1, 16'd6, 12));
    put('h90, ST(12, 16'h118, 31));
    put('h94, OPC(F_ADD, 11, 16'd1, 11));
    put('h98, BEQ(31, -16'sd2, 31));
    put('h200, OPC(F_ADD, 10, 16'd1, 10));
    put('h204, ST(10, 16'h110, 31));
    put('h208, ST(30, 16'h11C, 31));
    put('h20C, JMP(30, 31));
    repeat (2) @(negedge clk); rst = 0;
    wait (retire_t.size() >= 4);
    chk(retire_t[2] - retire_t[1] == 8, $sformatf("ALU instruction takes %0d cycles", retire_t[2] - retire_t[1]));
    wait (dbg_pc == 32'h0000_0094);
    chk(mem['h100 >> 2] == 35, "MUL and ST");
    chk(mem['h104 >> 2] == 32'h8000_005C, "BNE saves PC+4");
    chk(mem['h108 >> 2] == 32'hDEAD_BEEF, "LDR");
    chk(mem['h10C >> 2] == 32'h8000_0078, "JMP saves PC+4");
    chk(mem['h114 >> 2] == 7, "DIVC");
    chk(mem['h118 >> 2] == 1, "CMPLTC");
    chk(mem['h120 >> 2] == 0, "skipped by JMP");
    chk(dut.u_rf.regs[4] == 0, "loop ran to zero");
    // interrupts
    repeat (50) @(negedge clk);
    irq_vec = 8'h08; @(negedge clk); irq_vec = 0;
    wait (dbg_pc == 32'h8000_000C);
    repeat (200) @(negedge clk);
    chk(mem['h110 >> 2] == 1, "handler ran once");
    chk(mem['h11C >> 2] == 32'h0000_0098, $sformatf("XP = %h", mem['h11C >> 2]));
    chk(!dbg_pc[31], "back in user mode");
    irq_vec = 8'h08; @(negedge clk); irq_vec = 0;
    repeat (200) @(negedge clk);
    chk(mem['h110 >> 2] == 2, "handler ran twice");
    chk(sup_in_handler, "handler runs in supervisor mode");
    chk(dut.u_rf.regs[11] > 5, "main loop progressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
