// vga_hsync_tb: runs the horizontal FSM with a small line (16 active clocks,
// porches 2 and 5, sync 3, 4 words per row) against a frame-buffer model that
// answers after the worst-case two clocks. For every line it checks the line
// period, the sync width and its distance from the end of the active pixels,
// one 'line_done' per line, and that every active clock shows the right 15-bit
// pixel: word fb_base + (line/2)*4 + k/4, high pixel for the first two clocks
// of each word, low pixel for the next two. Blanked lines must stay dark.
module vga_hsync_tb;
  localparam int HA = 16, HF = 2, HS = 3, HB = 5, FW = 4, PER = HA + HF + HS + HB;
  logic clk = 0, rst = 1, run = 0, line_active = 0;
  logic [9:0] line = 0;
  logic [15:0] fb_base = 16'h0100, vid_addr, a_d1, a_d2;
  logic [31:0] vid_data;
  logic [7:0] r, g, b;
  logic hsync_n, blank_n, line_done;
  int checks = 0, failures = 0, cyc = 0, act_k = 0, last_done = -1, last_act_end = -1, sync_len = 0;
  int dones = 0;

  vga_hsync #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .FB_WORDS(FW)) dut (.*);
  always #5 clk = !clk;

  function automatic logic [31:0] word(input logic [15:0] a);
    return 32'(a) * 32'h9E37_79B1 + 32'h1234;
  endfunction

  // two-cycle read latency
  always @(posedge clk) begin a_d1 <= vid_addr; a_d2 <= a_d1; end
  assign vid_data = word(a_d2);

  logic [9:0] shown_line;
  logic prev_blank = 0, prev_hs = 1;
  always @(posedge clk) if (!rst) begin
    logic [31:0] w; logic [14:0] p;
    cyc++;
    if (blank_n) begin
      w = word(fb_base + 16'(shown_line[9:1]) * 16'(FW) + 16'(act_k / 4));
      p = ((act_k % 4) < 2) ? w[31:17] : w[15:1];
      checks++;
      if ({r, g, b} != {p[14:10], 3'b0, p[9:5], 3'b0, p[4:0], 3'b0}) begin
        failures++;
        if (failures < 5) $display("pixel k=%0d got %h%h%h exp %h", act_k, r, g, b, p);
      end
      act_k++;
    end else if ({r, g, b} != 0) begin failures++; $display("colour while blank"); end
    if (prev_blank && !blank_n) begin
      checks++; if (act_k != HA) begin failures++; $display("act %0d", act_k); end
      last_act_end = cyc;
    end
    if (!blank_n && act_k == HA) act_k = 0;
    if (!hsync_n) sync_len++;
    if (prev_hs && !hsync_n && last_act_end >= 0) begin
      checks++;
      if (cyc - last_act_end != HF) begin failures++; $display("FP %0d", cyc - last_act_end); end
      last_act_end = -1;
    end
    if (!prev_hs && hsync_n) begin checks++; if (sync_len != HS) begin failures++; $display("sync %0d", sync_len); end sync_len = 0; end
    if (line_done) begin
      dones++;
      if (last_done >= 0) begin checks++; if (cyc - last_done != PER) begin failures++; $display("period %0d", cyc-last_done); end end
      last_done = cyc;
    end
    prev_blank = blank_n; prev_hs = hsync_n;
  end

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line/active follow line_done the way vga_vsync does; the outputs lag by
  // five clocks, so the checker uses the line value latched at line start
  initial begin
    int nlines = 0;
    repeat (2) @(negedge clk); rst = 0; run = 1;
    line_active = 1; line = 0; shown_line = 0;
    while (nlines < 12) begin
      @(posedge clk);
      if (line_done) begin
        nlines++;
        line_active = (nlines % 6) != 5;
        line = line_active ? 10'(nlines) : 10'd0;
        fork begin repeat (5) @(posedge clk); shown_line = line; end join_none
      end
    end
    checks++; if (dones < 11) begin failures++; $display("dones %0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
