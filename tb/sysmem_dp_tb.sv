// sysmem_dp_tb: writes random words through port A and reads them back through
// both ports one cycle after the address, against a shadow copy; also checks
// the highest word and that out-of-range addresses read zero.
module sysmem_dp_tb;
  logic clk = 0, wea = 0;
  logic [15:0] addra = 0, addrb = 0;
  logic [31:0] dina = 0, douta, doutb;
  logic [31:0] shadow [int];
  int checks = 0, failures = 0;

  sysmem_dp dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = (n == 0) ? 56319 : $urandom_range(0, 56319);
      wea = 1; addra = 16'(a); dina = $urandom; shadow[a] = dina;
    end
    @(negedge clk); wea = 0;
    foreach (shadow[k]) begin
      addra = 16'(k); addrb = 16'(k);
      @(negedge clk);
      checks++;
      if (douta != shadow[k] || doutb != shadow[k]) failures++;
    end
    addrb = 16'd60000; @(negedge clk); checks++; if (doutb != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
