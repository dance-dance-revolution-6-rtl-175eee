// flash_minor_fsm_tb: the minor FSM against the flash chip model. Checks the
// chip write cycle shape (CE# one clock ahead of WE#, WE# low five clocks,
// data driven for the last four), that erase and program wait for STS to go
// low and high again, that a read holds CE#/OE# for READ_CYC clocks and
// returns the word, that read-array gives no done pulse, and that programmed
// words read back (random addresses and data).
module flash_minor_fsm_tb;
  localparam int READ_CYC = 16;
  logic clk = 0, rst = 1, go = 0, busy, done, fl_ce_b, fl_oe_b, fl_we_b, fl_rp_b, fl_doe, fl_sts;
  logic [1:0] op = 0;
  logic [22:0] addr = 0;
  logic [15:0] wdata = 0, rdata, fl_dout, fl_din;
  logic [23:0] fl_addr;
  int errors, n_erase, n_prog, n_rdarr;
  int checks = 0, failures = 0, dones = 0;
  int ce_lead = 0, we_low = 0, doe_cnt = 0, shape_bad = 0, oe_low = 0;

  flash_minor_fsm #(.READ_CYC(READ_CYC)) dut (.*);
  flash_chip_model #(.ERASE_BUSY(200), .PROG_BUSY(30)) chip (.*);
  always #5 clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // pin shape monitor
  logic we_q = 1, ce_q = 1;
  always @(negedge clk) if (!rst) begin
    dones += done;
    if (!fl_ce_b && fl_we_b && fl_oe_b) ce_lead++;
    if (!fl_we_b) begin we_low++; doe_cnt += fl_doe; end
    if (!fl_oe_b) oe_low++;
    if (fl_we_b && !we_q) begin
      if (we_low != 5 || doe_cnt != 4 || ce_lead != 1) begin
        shape_bad++;
        $display("write cycle: ce lead %0d, we low %0d, data %0d", ce_lead, we_low, doe_cnt);
      end
      we_low = 0; doe_cnt = 0; ce_lead = 0;
    end
    if (!fl_we_b && !fl_oe_b) shape_bad++;
    we_q = fl_we_b;
  end

  task automatic run(input logic [1:0] o, input logic [22:0] a, input logic [15:0] d, output int cycles);
    @(negedge clk); go = 1; op = o; addr = a; wdata = d;
    @(negedge clk); go = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    #10ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, d0;
    logic [22:0] a [8]; logic [15:0] v [8];
    repeat (3) @(negedge clk); rst = 0;
    // erase block 2 and wait for it
    d0 = dones;
    run(2'd0, 23'(2 * 65536 + 5), 0, cyc);
    chk(n_erase == 1 && dones == d0 + 1, "erase done once");
    chk(cyc > 200 && cyc < 240, $sformatf("erase waits for STS (%0d cycles)", cyc));
    chk(!chip.mem.exists(2 * 65536 + 5), "block erased");
    // program random words in block 2
    foreach (a[i]) begin
      a[i] = 23'(2 * 65536 + $urandom_range(0, 65535)); v[i] = 16'($urandom);
      run(2'd1, a[i], v[i], cyc);
      chk(cyc > 30 && cyc < 60, $sformatf("program waits for STS (%0d)", cyc));
    end
    chk(n_prog == 8, "eight programs");
    // read array: no done pulse
    d0 = dones;
    run(2'd2, 0, 0, cyc);
    chk(dones == d0 && n_rdarr == 1 && cyc == 9, $sformatf("read array: one write cycle, no done (%0d)", cyc));
    // read back
    foreach (a[i]) begin
      d0 = oe_low;
      run(2'd3, a[i], 0, cyc);
      chk(rdata == v[i], $sformatf("read back %h exp %h", rdata, v[i]));
      chk(oe_low - d0 == READ_CYC, $sformatf("read holds OE# %0d clocks", oe_low - d0));
      chk(cyc == READ_CYC + 2, $sformatf("read takes %0d cycles", cyc));
    end
    chk(shape_bad == 0, "write cycle shape");
    chk(errors == 0, "chip saw no protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
