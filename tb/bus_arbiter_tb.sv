// bus_arbiter_tb: random sequences of bus-access-vector pulses and yields,
// compared with a reference owner register: the CPU owns the bus after reset,
// a pulse moves it to the named device one cycle later, only the owner's yield
// counts and it returns the bus to the CPU; the grant is always one-hot.
module bus_arbiter_tb;
  logic clk = 0, rst = 1, baxv_chg = 0;
  logic [3:0] baxv = 0, owner;
  logic [15:0] dev_yield = 0, dev_en;
  int checks = 0, failures = 0, moves = 0, yields = 0;
  int ref_owner = 0;

  bus_arbiter dut (.*);
  always #5 clk = !clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    checks++; if (dev_en != 16'h0001) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      baxv_chg = ($urandom_range(0, 9) == 0);
      baxv = 4'($urandom);
      dev_yield = ($urandom_range(0, 3) == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'd0;
      if (baxv_chg) begin ref_owner = baxv; moves++; end
      else if (ref_owner != 0 && dev_yield[ref_owner]) begin ref_owner = 0; yields++; end
      @(posedge clk); #1;
      checks++;
      if (dev_en != 16'(1 << ref_owner) || owner != 4'(ref_owner)) begin
        failures++;
        if (failures < 5) $display("en=%h exp owner %0d", dev_en, ref_owner);
      end
    end
    if (moves == 0 || yields == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
