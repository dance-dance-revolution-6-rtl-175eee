// betaputer_tb: the Beta computer (CPU, arbiter, shared bus, RAM controller,
// timer) with a small RAM and a fast timer. A program is placed in the RAM
// before reset:
//   reset vector -> supervisor code that jumps into user mode;
//   user loop: counts in R2 and stores it, reads an unaligned word, writes the
//     direct-output register, and on one pass stores 3 to the bus access
//     vector, handing the bus to a device played by the testbench;
//   timer vector (IRQ_BASE + 28) -> handler that counts ticks in memory and
//     returns through XP.
// The device, once granted, writes four words through the shared bus and
// yields. Checks: the timer handler runs once per timer period; the CPU
// retires nothing while the device owns the bus and carries on afterwards;
// the device's writes land in memory; the unaligned read returns the bytes
// across the word boundary; the direct-output register follows the store.
module betaputer_tb;
  import ddr_pkg::*;
  import beta_asm_pkg::*;
  localparam int PERIOD = 2000;
  logic clk = 0, rst = 1;
  logic [6:1] irq_ext = 0;
  bus_req_t dev_req [NDEV];
  logic [NDEV-1:0] dev_yield = 0, dev_en;
  bus_rsp_t bus_rsp;
  logic [9:0] vid_addr = 0;
  logic [31:0] vid_data, dbg_pc, dbg_instr;
  logic [3:0] direct_io;
  logic dbg_retire;
  int checks = 0, failures = 0;
  int retire_while_dev = 0, grants = 0, dev_writes = 0;

  betaputer #(.WORDS(1024), .AW(10), .CLK_HZ(PERIOD * 100), .IRQ_HZ(100)) dut (.*);
  always #5 clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic void put(input int a, input logic [31:0] w);
    dut.u_ram.u_mem.mem[a >> 2] = w;
  endfunction
  function automatic logic [31:0] peek(input int a);
    return dut.u_ram.u_mem.mem[a >> 2];
  endfunction

  always @(negedge clk) if (dev_en[3] && dbg_retire) retire_while_dev++;

  // device 3: four writes through the shared bus, then yield
  initial begin
    for (int i = 0; i < NDEV; i++) dev_req[i] = '0;
    forever begin
      @(negedge clk);
      if (dev_en[3]) begin
        grants++;
        for (int k = 0; k < 4; k++) begin
          dev_req[3].we = 1; dev_req[3].addr = 22'(32'h340 + 4 * k);
          dev_req[3].data = 32'hD0D0_0000 + 32'(k) + 32'(grants << 8);
          @(negedge clk); dev_req[3] = '0;
          while (!bus_rsp.done) @(negedge clk);
          dev_writes++;
          @(negedge clk);
        end
        dev_yield[3] = 1; @(negedge clk); dev_yield[3] = 0;
        while (dev_en[3]) @(negedge clk);
      end
    end
  end

  initial begin
    #3ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, r0;
    for (int i = 0; i < 1024; i++) put(4 * i, 0);
    put('h00, BEQ(31, 16'd15, 31));               // reset -> 0x40
    put('h1C, BEQ(31, 16'd56, 31));               // timer -> 0x100
    put('h40, OPC(F_ADD, 31, 16'h80, 1));
    put('h44, JMP(1, 31));                        // into user mode at 0x80
    put('h80, OPC(F_ADD, 31, 16'hFFFF, 5));       // R5 = -1
    put('h84, OPC(F_SHR, 5, 16'd1, 5));           // R5 = 0x7FFFFFFF (bus access vector)
    put('h88, OPC(F_SUB, 5, 16'd15, 6));          // R6 = 0x7FFFFFF0 (direct output)
    put('h8C, OPC(F_ADD, 2, 16'd1, 2));           // loop: R2++
    put('h90, ST(2, 16'h300, 31));
    put('h94, LD(31, 16'h321, 3));                // unaligned read
    put('h98, ST(3, 16'h304, 31));
    put('h9C, ST(2, 16'd0, 6));                   // direct output = R2
    put('hA0, OPC(F_CMPEQ, 2, 16'd20, 4));
    put('hA4, BEQ(4, -16'sd7, 31));               // R2 != 20: loop
    put('hA8, OPC(F_ADD, 31, 16'd3, 7));
    put('hAC, ST(7, 16'd0, 5));                   // hand the bus to device 3
    put('hB0, BEQ(31, -16'sd10, 31));             // back to loop
    put('h100, LD(31, 16'h310, 10));              // timer handler
    put('h104, OPC(F_ADD, 10, 16'd1, 10));
    put('h108, ST(10, 16'h310, 31));
    put('h10C, JMP(30, 31));
    put('h320, 32'h4433_2211);
    put('h324, 32'h8877_6655);
    repeat (3) @(negedge clk); rst = 0;
    wait (dev_en[3]);
    r0 = peek('h300);
    wait (!dev_en[3] && dev_en[0]);
    repeat (100) @(negedge clk);
    chk(grants == 1 && dev_writes == 4, "device granted once, four writes");
    chk(retire_while_dev == 0, "CPU stalled while device owned the bus");
    chk(r0 == 20, $sformatf("loop count at grant %0d", r0));
    for (int k = 0; k < 4; k++) chk(peek('h340 + 4 * k) == 32'hD0D0_0100 + k, "device write landed");
    chk(peek('h300) > 20, "CPU continues after yield");
    chk(peek('h304) == 32'h5544_3322, $sformatf("unaligned read %h", peek('h304)));
    chk(direct_io == peek('h300) % 16 || direct_io == (peek('h300) - 1) % 16, "direct output register");
    // timer
    t0 = peek('h310);
    repeat (10 * PERIOD) @(negedge clk);
    chk(peek('h310) - t0 >= 9 && peek('h310) - t0 <= 11, $sformatf("timer handler ran %0d times in 10 periods", peek('h310) - t0));
    chk(!dbg_pc[31] || dbg_pc[30:0] >= 31'h100, "user code runs in user mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
