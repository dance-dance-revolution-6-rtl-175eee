// vga_vsync_tb: feeds 'line_done' pulses every 7 clocks to the vertical FSM
// set to 6 display lines, porches 2 and 3, sync 1, and checks the order and
// lengths of the vertical phases over three frames: after reset the front porch
// comes first, then 1 line of sync, 3 of back porch with 'frame_start' at the
// end, then lines 0..5 marked active in order; also that 'run' goes high.
module vga_vsync_tb;
  localparam int VA = 6, VF = 2, VS = 1, VB = 3, FR = VA + VF + VS + VB;
  logic clk = 0, rst = 1, line_done = 0;
  logic run, line_active, vsync_n, frame_start;
  logic [9:0] line;
  int checks = 0, failures = 0;

  vga_vsync #(.V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);
  always #5 clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fs = 0;
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk); chk(run, "run");
    for (int n = 0; n < 3 * FR; n++) begin
      int k; k = n % FR;
      // state of line n, checked before its end
      repeat (6) begin
        @(negedge clk);
        if (frame_start) fs++;
      end
      if (k < VF)                 chk(!line_active && vsync_n, "front porch");
      else if (k < VF + VS)       chk(!line_active && !vsync_n, "sync");
      else if (k < VF + VS + VB)  chk(!line_active && vsync_n, "back porch");
      else                        chk(line_active && vsync_n && line == 10'(k - VF - VS - VB), $sformatf("active line %0d got %0d", k - VF - VS - VB, line));
      line_done = 1; @(negedge clk); line_done = 0;
      if (frame_start) fs++;
    end
    chk(fs == 3, $sformatf("frame_start count %0d", fs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
