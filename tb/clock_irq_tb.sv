// clock_irq_tb: with a 1 kHz "clock" and 100 Hz interrupts the pulse must come
// every 10 cycles, one cycle wide, first one 10 cycles after reset.
module clock_irq_tb;
  logic clk = 0, rst = 1, irq;
  int checks = 0, failures = 0, cyc = 0, last = 1, n = 0;

  clock_irq #(.CLK_HZ(1000), .IRQ_HZ(100)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (irq) begin
      checks++;
      if (cyc - last != 10) begin failures++; $display("period %0d", cyc - last); end
      last = cyc; n++;
    end
  end

  initial begin
    @(negedge clk); rst = 0;
    repeat (205) @(negedge clk);
    checks++; if (n != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
