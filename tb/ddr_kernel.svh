// ddr_kernel.svh: a small game-kernel test program for the complete system,
// included inside the system testbenches (which import beta_asm_pkg and name
// the system instance 'dut'). load_kernel() writes it into the system RAM
// before reset, after clearing it.
//   0x000 reset vector: jump to 0x040, which enters user mode at 0x080.
//   0x01C timer vector: jump to the handler at 0x100.
//   user code: builds the bus access vector (R5) and direct-output (R6)
//     addresses, fills FILL words of frame-buffer row 0 with white, copies an
//     unaligned word from 0x321 to 0x304, then waits until the tick counter
//     at 0x310 reaches PLAY_TICK and sets the play bit (direct output 4).
//   handler: counts ticks at 0x310, hands the bus to the pad controller
//     (stores 3 to the bus access vector, so the pad is sampled once per
//     tick), and returns through XP.
task automatic load_kernel(input int play_tick, input int fill);
  logic [31:0] p [int];
  foreach (dut.u_computer.u_ram.u_mem.mem[i]) dut.u_computer.u_ram.u_mem.mem[i] = 32'd0;
  p['h000] = BEQ(31, 16'd15, 31);
  p['h01C] = BEQ(31, 16'd56, 31);
  p['h040] = OPC(F_ADD, 31, 16'h80, 1);
  p['h044] = JMP(1, 31);
  p['h080] = OPC(F_ADD, 31, 16'hFFFF, 5);
  p['h084] = OPC(F_SHR, 5, 16'd1, 5);              // R5 = 0x7FFFFFFF
  p['h088] = OPC(F_SUB, 5, 16'd15, 6);             // R6 = 0x7FFFFFF0
  p['h08C] = OPC(F_ADD, 31, 16'd1, 8);
  p['h090] = OPC(F_SHL, 8, 16'd16, 8);
  p['h094] = OPC(F_OR, 8, 16'h17F0, 8);            // R8 = frame buffer (byte 0x117F0)
  p['h098] = OPC(F_ADD, 31, 16'hFFFF, 9);          // R9 = white pixels
  p['h09C] = OPC(F_ADD, 31, 16'(fill), 11);
  p['h0A0] = ST(9, 16'd0, 8);                      // fill loop
  p['h0A4] = OPC(F_ADD, 8, 16'd4, 8);
  p['h0A8] = OPC(F_SUB, 11, 16'd1, 11);
  p['h0AC] = BNE(11, -16'sd4, 31);
  p['h0B0] = LD(31, 16'h321, 3);                   // unaligned read
  p['h0B4] = ST(3, 16'h304, 31);
  p['h0B8] = LD(31, 16'h310, 12);                  // wait for PLAY_TICK ticks
  p['h0BC] = OPC(F_CMPLT, 12, 16'(play_tick), 13);
  p['h0C0] = BNE(13, -16'sd3, 31);
  p['h0C4] = OPC(F_ADD, 31, 16'd4, 14);
  p['h0C8] = ST(14, 16'd0, 6);                     // play
  p['h0CC] = BEQ(31, -16'sd1, 31);
  p['h100] = LD(31, 16'h310, 10);                  // timer handler
  p['h104] = OPC(F_ADD, 10, 16'd1, 10);
  p['h108] = ST(10, 16'h310, 31);
  p['h10C] = OPC(F_ADD, 31, 16'd3, 15);
  p['h110] = ST(15, 16'd0, 5);                     // sample the pad
  p['h114] = JMP(30, 31);
  p['h320] = 32'h4433_2211;
  p['h324] = 32'h8877_6655;
  foreach (p[a]) dut.u_computer.u_ram.u_mem.mem[a >> 2] = p[a];
endtask
