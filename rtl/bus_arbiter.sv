// bus_arbiter: cooperative arbiter for the shared memory bus.
//
// Exactly one of NDEV devices owns the bus at any time and sees its bit of
// 'dev_en' high. Device 0 is the Beta CPU, which owns the bus after reset. The
// CPU hands the bus to device k by storing k to the bus access vector, which
// reaches the arbiter as a one-cycle 'baxv_chg' pulse with 'baxv' = k. The new
// owner keeps the bus until it raises its bit of 'dev_yield'; only then does
// the arbiter take the grant away and give the bus back to the CPU. Yields from
// devices that do not own the bus are ignored. Grants change one cycle after the
// pulse or yield. The grant is one-hot by construction, and an assertion checks it.
module bus_arbiter
  import ddr_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            baxv_chg,
  input  logic [3:0]      baxv,
  input  logic [NDEV-1:0] dev_yield,
  output logic [NDEV-1:0] dev_en,
  output logic [3:0]      owner
);
  always_ff @(posedge clk) begin
    if (rst)                                 owner <= 4'd0;
    else if (baxv_chg)                       owner <= baxv;
    else if (owner != 4'd0 && dev_yield[owner]) owner <= 4'd0;
  end

  assign dev_en = NDEV'(1) << owner;

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(dev_en));
endmodule
