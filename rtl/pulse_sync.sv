// pulse_sync: carries single-cycle pulses from one clock domain to another.
//
// Each pulse on 'src_pulse' flips a toggle flip-flop in the source domain. The
// toggle passes through three flip-flops in the destination domain, and a
// change between the last two gives one 'dst_pulse' cycle. Pulses must be at
// least three destination clocks apart to be seen separately. Each domain has
// its own synchronous, active-high reset.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tog;
  logic [2:0] s;

  always_ff @(posedge src_clk) begin
    if (src_rst)        tog <= 1'b0;
    else if (src_pulse) tog <= !tog;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) s <= '0;
    else         s <= {s[1:0], tog};
  end

  assign dst_pulse = s[2] ^ s[1];
endmodule
