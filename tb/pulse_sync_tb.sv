// pulse_sync_tb: sends random single-cycle pulses from a 27 MHz domain into a
// 12.288 MHz domain and back the other way, spaced as the audio unit spaces
// them, and checks that every pulse arrives exactly once as a single-cycle
// pulse within four destination clocks.
module pulse_sync_tb;
  logic ca = 0, cb = 0, rst = 1;
  logic pa = 0, pb = 0, qa, qb;
  int checks = 0, failures = 0, sent_ab = 0, got_ab = 0, sent_ba = 0, got_ba = 0, late = 0;
  realtime t_sent;

  pulse_sync ab (.src_clk(ca), .src_rst(rst), .src_pulse(pa), .dst_clk(cb), .dst_rst(rst), .dst_pulse(qb));
  pulse_sync ba (.src_clk(cb), .src_rst(rst), .src_pulse(pb), .dst_clk(ca), .dst_rst(rst), .dst_pulse(qa));
  always #18.5ns ca = !ca;
  always #40.69ns cb = !cb;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic qb_q = 0, qa_q = 0;
  always @(posedge cb) if (!rst) begin
    if (qb) begin got_ab++; if ($realtime - t_sent > 5 * 81.38ns) late++; end
    chk(!(qb && qb_q), "single-cycle pulse (b)");
    qb_q <= qb;
  end
  always @(posedge ca) if (!rst) begin
    if (qa) got_ba++;
    chk(!(qa && qa_q), "single-cycle pulse (a)");
    qa_q <= qa;
  end

  initial begin
    #10ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge cb); rst = 0;
    repeat (200) begin
      repeat ($urandom_range(20, 60)) @(negedge ca);
      pa = 1; t_sent = $realtime; sent_ab++; @(negedge ca); pa = 0;
      repeat ($urandom_range(4, 30)) @(negedge cb);
      pb = 1; sent_ba++; @(negedge cb); pb = 0;
    end
    repeat (20) @(negedge cb);
    chk(got_ab == sent_ab, $sformatf("fast to slow: %0d of %0d", got_ab, sent_ab));
    chk(got_ba == sent_ba, $sformatf("slow to fast: %0d of %0d", got_ba, sent_ba));
    chk(late == 0, "latency within four destination clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
