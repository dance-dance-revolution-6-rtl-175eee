// pad_sync_tb: random button patterns; the output must equal the input of
// three clock edges earlier, and be zero right after reset.
module pad_sync_tb;
  logic clk = 0, rst = 1;
  logic [9:0] d = 0, q;
  logic [9:0] hist [$];
  int checks = 0, failures = 0;

  pad_sync #(.W(10)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (q != 0) failures++;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      d = 10'($urandom);
      hist.push_back(d);
      @(negedge clk);
      if (hist.size() > 3) void'(hist.pop_front());
      if (hist.size() == 3) begin checks++; if (q != hist[0]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
