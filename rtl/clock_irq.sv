// clock_irq: clock divider that requests a timer interrupt.
//
// Counts system clock cycles and emits a one-cycle pulse on 'irq' every
// CLK_HZ/IRQ_HZ cycles: with the 27 MHz system clock and IRQ_HZ = 100 this is
// one request every 1/100 s, the tick the kernel uses to keep game time.
// Synchronous active-high reset restarts the count; the first pulse comes one
// full period after reset.
module clock_irq #(
  parameter int unsigned CLK_HZ = 27_000_000,
  parameter int unsigned IRQ_HZ = 100
) (
  input  logic clk,
  input  logic rst,
  output logic irq
);
  localparam int unsigned PERIOD = CLK_HZ / IRQ_HZ;
  localparam int CW = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      irq <= 1'b0;
    end else if (cnt == CW'(PERIOD - 1)) begin
      cnt <= '0;
      irq <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
      irq <= 1'b0;
    end
  end
endmodule
