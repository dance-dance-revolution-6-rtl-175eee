// beta_dmcache_tb: the cache between a request driver (acting as the control
// FSM) and a stand-in bus client that answers after four cycles from a
// reference memory. Random fetches, loads and stores over a small address
// range that aliases in the cache are checked against the reference memory.
// Also checks: a read hit is ready two cycles after the request and makes no
// downstream request; a miss and every write go downstream; a store to the bus
// access vector empties the cache; unaligned reads are passed through.
module beta_dmcache_tb;
  import ddr_pkg::*;
  logic clk = 0, rst = 1;
  logic ifetch_req = 0, memop_req = 0, wr = 0, rd = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic ifetch_ready, memop_ready;
  logic d_ifetch_req, d_memop_req, d_wr, d_rd, d_ifetch_ready = 0, d_memop_ready = 0;
  logic [31:0] d_addr, d_wdata, d_rdata = 0;
  logic [31:0] ref_mem [logic [31:0]];
  int checks = 0, failures = 0, downs = 0;

  beta_dmcache dut (.*);
  always #5 clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] rmem(input logic [31:0] a);
    logic [31:0] w0, w1;
    w0 = ref_mem.exists({a[31:2], 2'b00}) ? ref_mem[{a[31:2], 2'b00}] : {a[31:2], 2'b00} ^ 32'h5A5A_0000;
    w1 = ref_mem.exists({a[31:2], 2'b00} + 4) ? ref_mem[{a[31:2], 2'b00} + 4] : ({a[31:2], 2'b00} + 4) ^ 32'h5A5A_0000;
    return 32'({w1, w0} >> (8 * a[1:0]));
  endfunction

  // stand-in bus client: idle/busy/done, like beta_bus_client
  initial forever begin
    @(negedge clk);
    if (d_ifetch_req || d_memop_req) begin
      downs++;
      repeat (3) @(negedge clk);
      if (d_memop_req && d_wr) begin
        if (d_addr != BAXV_ADDR) ref_mem[d_addr] = d_wdata;
      end else d_rdata = rmem(d_addr);
      if (d_ifetch_req) d_ifetch_ready = 1; else d_memop_ready = 1;
      @(negedge clk); d_ifetch_ready = 0; d_memop_ready = 0;
    end
  end

  task automatic access(input int kind, input logic [31:0] a, d, output logic [31:0] q, output int cyc);
    // kind 0 fetch, 1 load, 2 store
    @(negedge clk);
    ifetch_req = kind == 0; memop_req = kind != 0; rd = kind == 1; wr = kind == 2;
    addr = a; wdata = d; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!(ifetch_ready || memop_ready));
    q = rdata;
    @(posedge clk); #1 ifetch_req = 0; memop_req = 0; rd = 0; wr = 0;
  endtask

  initial begin
    #2ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, a; int cyc, d0;
    repeat (2) @(negedge clk); rst = 0;
    access(1, 32'h100, 0, q, cyc);
    chk(q == rmem(32'h100) && downs == 1, "first read misses");
    d0 = downs;
    access(1, 32'h100, 0, q, cyc);
    chk(q == rmem(32'h100) && downs == d0, "second read hits");
    chk(cyc == 2, $sformatf("hit ready %0d cycles after the request", cyc));
    access(0, 32'h100, 0, q, cyc);
    chk(downs == d0 && cyc == 2, "fetch hits the same line");
    access(2, 32'h100, 32'hCAFE_0001, q, cyc);
    chk(downs == d0 + 1, "write goes through");
    access(1, 32'h100, 0, q, cyc);
    chk(q == 32'hCAFE_0001 && downs == d0 + 2, "written line was invalidated");
    access(1, 32'h104, 0, q, cyc); d0 = downs;
    access(2, BAXV_ADDR, 32'd3, q, cyc);
    access(1, 32'h104, 0, q, cyc);
    chk(downs == d0 + 2, "bus hand-over empties the cache");
    d0 = downs;
    access(1, 32'h102, 0, q, cyc);
    access(1, 32'h102, 0, q, cyc);
    chk(q == rmem(32'h102) && downs == d0 + 2, "unaligned reads pass through");
    // random traffic over addresses that alias (4 KB range, 2 KB cache)
    repeat (2000) begin
      int k; k = $urandom_range(0, 2);
      a = {20'd0, 10'($urandom), 2'b00};
      if (k == 2) access(2, a, $urandom, q, cyc);
      else begin
        access(k, a, 0, q, cyc);
        chk(q == rmem(a), $sformatf("read %h got %h exp %h", a, q, rmem(a)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
