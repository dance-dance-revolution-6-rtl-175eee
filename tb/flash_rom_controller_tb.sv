// flash_rom_controller_tb: the whole flash controller against the chip model,
// with a small block count. Checks that erase_all erases every block exactly
// once and then pulses erase_done, that words written one after another read
// back in order after 'start' (which needs the read-array command the
// controller must insert), that reads of unwritten words give 0xFFFF, and that
// requests made while the controller is busy are dropped.
module flash_rom_controller_tb;
  localparam int NBLOCKS = 4;
  logic clk = 0, rst = 1, erase_all = 0, start = 0, wr_req = 0, rd_req = 0;
  logic [15:0] wr_data = 0, rd_data, fl_dout, fl_din;
  logic rd_valid, busy, erase_done, fl_ce_b, fl_oe_b, fl_we_b, fl_rp_b, fl_doe, fl_sts;
  logic [23:0] fl_addr;
  int errors, n_erase, n_prog, n_rdarr;
  int checks = 0, failures = 0, edones = 0;

  flash_rom_controller #(.NBLOCKS(NBLOCKS)) dut (.*);
  flash_chip_model #(.ERASE_BUSY(100), .PROG_BUSY(20)) chip (.*);
  always #5 clk = !clk;
  always @(negedge clk) if (!rst) edones += erase_done;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic read_word(output logic [15:0] d);
    pulse(rd_req);
    while (!rd_valid) @(negedge clk);
    d = rd_data;
    wait_idle();
  endtask

  initial begin
    #20ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v [12], d; int p0;
    repeat (3) @(negedge clk); rst = 0;
    // pre-load junk into every block so the erase is visible
    for (int b = 0; b < NBLOCKS; b++) chip.mem[b * 65536 + 7] = 16'h1234;
    pulse(erase_all);
    wait_idle();
    @(negedge clk);
    chk(n_erase == NBLOCKS && edones == 1, $sformatf("erased %0d blocks", n_erase));
    chk(chip.mem.num() == 0, "all junk erased");
    // write a sequence
    foreach (v[i]) begin
      v[i] = 16'($urandom);
      wr_data = v[i]; pulse(wr_req);
      if (i == 3) begin wr_data = 16'h0; pulse(wr_req); end   // dropped: busy
      wait_idle();
    end
    chk(n_prog == 12, $sformatf("twelve programs (%0d)", n_prog));
    // read back from the start
    pulse(start); wait_idle();
    p0 = n_rdarr;
    foreach (v[i]) begin
      read_word(d);
      chk(d == v[i], $sformatf("word %0d read %h exp %h", i, d, v[i]));
    end
    chk(n_rdarr == p0 + 1, "one read-array command for consecutive reads");
    read_word(d);
    chk(d == 16'hFFFF, "unwritten word reads erased");
    // a write then a read again needs a new read-array command
    wr_data = 16'h5A5A; pulse(wr_req); wait_idle();
    pulse(start); wait_idle();
    read_word(d);
    chk(d == v[0] && n_rdarr == p0 + 2, "read-array reissued after a program");
    chk(errors == 0, "chip saw no protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
