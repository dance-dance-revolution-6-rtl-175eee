// sysram_busintf_tb: bus-level test of the RAM controller. Random aligned
// writes, then reads at every byte offset: each answer must be the 32 bits
// starting at that byte in little-endian order (worked out from a byte-array
// shadow), arrive with 'done' exactly three cycles after the strobe, and the
// video port must return the stored words.
module sysram_busintf_tb;
  import ddr_pkg::*;
  logic clk = 0, rst = 1;
  bus_req_t bus_req = '0;
  bus_rsp_t bus_rsp;
  logic [15:0] vid_addr = 0;
  logic [31:0] vid_data;
  logic [7:0] bytes [4096];
  int checks = 0, failures = 0;

  sysram_busintf #(.WORDS(1024), .AW(10)) dut (.clk, .rst, .bus_req, .bus_rsp,
                                               .vid_addr(vid_addr[9:0]), .vid_data);
  always #5 clk = !clk;

  task automatic xfer(input bit w, input logic [21:0] a, input logic [31:0] d, output logic [31:0] q, output int lat);
    @(negedge clk);
    bus_req.re = !w; bus_req.we = w; bus_req.addr = a; bus_req.data = d;
    @(negedge clk);
    bus_req = '0;
    lat = 1;
    while (!bus_rsp.done) begin @(negedge clk); lat++; end
    q = bus_rsp.data;
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, e; int lat; logic [21:0] a;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 256; i++) begin
      e = $urandom;
      xfer(1, 22'(i * 4), e, q, lat);
      for (int b = 0; b < 4; b++) bytes[i*4+b] = e[8*b +: 8];
      checks++; if (lat != 3) failures++;
    end
    for (int n = 0; n < 300; n++) begin
      a = 22'($urandom_range(0, 1015));
      xfer(0, a, 0, q, lat);
      e = {bytes[a+3], bytes[a+2], bytes[a+1], bytes[a]};
      checks++;
      if (q != e || lat != 3) begin
        failures++;
        if (failures < 5) $display("read %h got %h exp %h lat %0d", a, q, e, lat);
      end
    end
    for (int i = 0; i < 20; i++) begin
      vid_addr = 16'(i); @(negedge clk); @(negedge clk);
      checks++;
      if (vid_data != {bytes[i*4+3], bytes[i*4+2], bytes[i*4+1], bytes[i*4]}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
