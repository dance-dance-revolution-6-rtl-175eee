// pad_sync: synchronizer for the dance pad's button lines.
//
// The pad's buttons are asynchronous to the system clock. Each of the W lines
// passes through a chain of three flip-flops, so 'q' follows 'd' three rising
// edges later and a metastable first stage has two more cycles to settle.
// The three-register chain follows the source design; the reset value (all
// buttons released, 0) is this design's choice.
module pad_sync #(
  parameter int W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
      q  <= '0;
    end else begin
      s1 <= d;
      s2 <= s1;
      q  <= s2;
    end
  end
endmodule
