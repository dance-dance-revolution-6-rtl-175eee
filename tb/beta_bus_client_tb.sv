// beta_bus_client_tb: checks the CPU bus client against a small memory model
// that answers three cycles after each strobe: fetches and loads return the
// right word, stores reach memory, nothing is strobed while the bus is not
// granted, a store to the bus access vector produces the arbiter pulse and
// completes only after the bus has come back, and a store to the direct I/O
// address loads the output register without any bus cycle.
module beta_bus_client_tb;
  import ddr_pkg::*;
  logic clk = 0, rst = 1;
  logic ifetch_req = 0, memop_req = 0, wr = 0, rd = 0, bus_en = 1;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic ifetch_ready, memop_ready, baxv_chg;
  logic [3:0] baxv, direct_io;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp = '0;
  logic [31:0] mem [256];
  int pend = 0; logic [31:0] pend_data;
  int checks = 0, failures = 0, strobes = 0, bax_pulses = 0;

  beta_bus_client dut (.*);
  always #5 clk = !clk;

  // memory model: done three cycles after the strobe
  always @(posedge clk) begin
    bus_rsp.done <= 1'b0;
    if (bus_req.re || bus_req.we) begin
      strobes++;
      if (!bus_en) failures++;
      pend <= 2;
      if (bus_req.we) mem[bus_req.addr[9:2]] <= bus_req.data;
      pend_data <= mem[bus_req.addr[9:2]];
    end else if (pend > 1) pend <= pend - 1;
    else if (pend == 1) begin pend <= 0; bus_rsp.done <= 1'b1; bus_rsp.data <= pend_data; end
    if (baxv_chg) bax_pulses++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(input bit fetch, input bit w, input logic [31:0] a, d, output logic [31:0] q, output int cyc);
    @(negedge clk);
    ifetch_req = fetch; memop_req = !fetch; wr = w; rd = !fetch && !w; addr = a; wdata = d;
    cyc = 1;
    while (!(fetch ? ifetch_ready : memop_ready)) begin @(negedge clk); cyc++; end
    q = rdata;
    ifetch_req = 0; memop_req = 0; wr = 0; rd = 0;
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q; int cyc, s0;
    for (int i = 0; i < 256; i++) mem[i] = 32'hA000_0000 + i;
    repeat (2) @(negedge clk); rst = 0;
    access(1, 0, 32'h40, 0, q, cyc);
    chk(q == 32'hA000_0010, "fetch data");
    chk(cyc == 6, $sformatf("fetch latency %0d cycles", cyc));
    access(0, 1, 32'h80, 32'h1234_5678, q, cyc);
    chk(mem[32] == 32'h1234_5678, "store reached memory");
    access(0, 0, 32'h80, 0, q, cyc);
    chk(q == 32'h1234_5678, "load data");
    // no grant: request must wait
    bus_en = 0;
    fork
      access(0, 0, 32'h84, 0, q, cyc);
      begin repeat (10) @(negedge clk); chk(strobes == 3, "no strobe without grant"); bus_en = 1; end
    join
    chk(q == 32'hA000_0021 && cyc > 10, "stalled load completes");
    // BAXv store: give bus to device 3, return it later
    s0 = strobes;
    fork
      access(0, 1, BAXV_ADDR, 32'd3, q, cyc);
      begin
        @(negedge clk); @(posedge clk); @(posedge clk); #1 chk(bax_pulses == 1 && baxv == 4'd3, "BAXv pulse");
        @(negedge clk); bus_en = 0;
        repeat (6) begin @(negedge clk); chk(!memop_ready, "BAXv store waits for bus"); end
        bus_en = 1;
      end
    join
    chk(cyc > 8, $sformatf("BAXv store completes only after the bus returns (%0d cycles)", cyc));
    chk(strobes == s0, "BAXv store made no bus cycle");
    access(0, 1, BAXV_ADDR, 32'd0, q, cyc);
    @(posedge clk); #1 chk(bax_pulses == 2 && baxv == 0 && cyc < 4, "BAXv to CPU completes at once");
    access(0, 1, DIRECTIO_ADDR, 32'h0000_000C, q, cyc);
    chk(direct_io == 4'hC && strobes == s0, "direct io");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
