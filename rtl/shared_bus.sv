// shared_bus: the 56-bit shared memory bus as a multiplexer.
//
// The original bus is a tristate bus on which only the granted device drives
// the read/write strobes, address and data. Inside one chip this design builds
// the same thing as an AND-OR multiplexer: every master presents a bus_req_t,
// and the request of the master whose enable is high reaches the memory. With
// the one-hot grant of bus_arbiter no two masters can drive at once; a master
// that strobes without the grant is simply not heard. The memory response goes
// back to all masters unchanged. Purely combinational.
module shared_bus
  import ddr_pkg::*;
(
  input  bus_req_t        m_req [NDEV],
  input  logic [NDEV-1:0] dev_en,
  output bus_req_t        s_req
);
  always_comb begin
    s_req = '0;
    for (int i = 0; i < NDEV; i++)
      if (dev_en[i]) s_req = s_req | m_req[i];
  end
endmodule
