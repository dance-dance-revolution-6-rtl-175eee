// pad_controller_tb: grants the bus to the pad controller the way the arbiter
// does and checks the cycle-exact sequence: nothing happens without a grant;
// after a grant the synchronized buttons are written to PAD_ADDR with the
// write strobe held two cycles, 'bus_yield' rises exactly ten cycles after the
// grant is first seen (two store cycles, seven waits) and lasts two cycles;
// after the yield the controller never strobes again, and a grant that stays
// high does not cause a second sample.
module pad_controller_tb;
  import ddr_pkg::*;
  logic clk = 0, rst = 1, bus_en = 0;
  logic [9:0] pad_in = 0;
  bus_req_t bus_req;
  logic bus_yield, sample_strobe;
  int checks = 0, failures = 0, cyc = 0, grant_cyc = 0, we_cycles = 0, yield_cycles = 0, first_yield = -1;
  logic [31:0] stored;
  bit yielded = 0;

  pad_controller #(.PAD_ADDR(32'h6000)) dut (.*);
  always #5 clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (bus_req.we) begin
      we_cycles++;
      stored = bus_req.data;
      if (!bus_en || yielded) failures++;
      if (bus_req.addr != 22'h6000) failures++;
    end
    if (bus_yield) begin
      yield_cycles++;
      if (first_yield < 0) first_yield = cyc - grant_cyc;
      yielded = 1;
    end
  end

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    pad_in = 10'h2A5;
    repeat (20) @(negedge clk);
    chk(we_cycles == 0 && yield_cycles == 0, "idle without grant");
    // first grant: arbiter takes the bus back one cycle after the yield
    bus_en = 1; grant_cyc = cyc + 1;
    wait (bus_yield); @(negedge clk); bus_en = 0;
    repeat (20) @(negedge clk);
    chk(we_cycles == 2, $sformatf("write strobe cycles %0d", we_cycles));
    chk(stored == 32'h2A5, "stored the buttons");
    chk(first_yield == 10, $sformatf("yield %0d cycles after grant", first_yield));
    chk(yield_cycles == 2, "yield lasts two cycles");
    // second grant held high: exactly one more sample
    yielded = 0; we_cycles = 0; yield_cycles = 0; first_yield = -1;
    pad_in = 10'h15A;
    repeat (4) @(negedge clk);
    bus_en = 1; grant_cyc = cyc + 1;
    repeat (60) @(negedge clk);
    bus_en = 0;
    chk(we_cycles == 2 && stored == 32'h15A, "second sample");
    chk(yield_cycles == 2, "one yield only while grant stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
