// beta_regfile_tb: writes random values to random registers and compares both
// read ports with a shadow array; checks that R31 stays zero and that reset
// clears the file.
module beta_regfile_tb;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] ra = 0, rb = 0, wa = 0;
  logic [31:0] rda, rdb, wd = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  beta_regfile dut (.*);
  always #5 clk = !clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin ra = 5'(i); #1 chk(rda, 0, "after reset"); end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1; wa = 5'($urandom); wd = $urandom;
      if (wa != 31) shadow[wa] = wd;
      @(negedge clk);
      we = 0;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      chk(rda, shadow[ra], "port A");
      chk(rdb, shadow[rb], "port B");
    end
    ra = 31; rb = 31; #1 chk(rda, 0, "R31 A"); chk(rdb, 0, "R31 B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
