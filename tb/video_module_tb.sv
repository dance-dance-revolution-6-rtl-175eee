// video_module_tb: the whole video unit at a reduced size (16x6 active clocks
// per frame, i.e. an 8x3-pixel frame buffer of 2 words per row shown 2x2)
// against a one-clock frame-buffer model. Over two frames it checks every
// active pixel against the frame buffer, the number of active clocks per
// frame, that each frame-buffer row appears on two consecutive lines, that
// hsync falls H_FP + 2 clocks after the active pixels end (the extra two
// clocks match the DAC pipeline), and the vsync pulse width in lines.
module video_module_tb;
  localparam int HA = 16, HF = 2, HS = 3, HB = 5, VA = 6, VF = 2, VS = 1, VB = 2, FW = 4;
  localparam int PER = HA + HF + HS + HB;
  logic clk = 0, rst = 1;
  logic [15:0] vid_addr;
  logic [31:0] vid_data;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_blank_n, vga_hsync_n, vga_vsync_n, frame_start;
  int checks = 0, failures = 0, cyc = 0, k = 0, row_line = 0, act_total = 0, last_end = -1;
  int vs_low = 0, frames = 0;
  logic prev_blank = 0, prev_hs = 1, prev_vs = 1;

  video_module #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_ACTIVE(VA), .V_FP(VF),
                 .V_SYNC(VS), .V_BP(VB), .FB_WORDS(FW)) dut (
    .clk, .rst, .fb_base(16'h0040), .vid_addr, .vid_data,
    .vga_r, .vga_g, .vga_b, .vga_blank_n, .vga_hsync_n, .vga_vsync_n, .frame_start);
  always #5 clk = !clk;

  function automatic logic [31:0] word(input int a);
    return 32'(a) * 32'h0101_0101 ^ 32'h5A5A_A5A5;
  endfunction
  always @(posedge clk) vid_data <= word(int'(vid_addr));

  always @(posedge clk) if (!rst) begin
    logic [31:0] w; logic [14:0] p;
    cyc++;
    if (vga_blank_n) begin
      w = word(16'h40 + (row_line / 2) * FW + k / 4);
      p = ((k % 4) < 2) ? w[31:17] : w[15:1];
      checks++;
      if ({vga_r, vga_g, vga_b} != {p[14:10], 3'b0, p[9:5], 3'b0, p[4:0], 3'b0}) failures++;
      k++; act_total++;
    end
    if (prev_blank && !vga_blank_n) begin k = 0; row_line++; last_end = cyc; end
    if (prev_hs && !vga_hsync_n && last_end >= 0) begin
      checks++;
      if (cyc - last_end != HF + 2) begin failures++; $display("hsync offset %0d", cyc - last_end); end
      last_end = -1;
    end
    if (!vga_vsync_n) vs_low++;
    if (prev_vs && !vga_vsync_n) begin row_line = 0; end
    if (!prev_vs && vga_vsync_n) begin
      checks++;
      if (vs_low != VS * PER) begin failures++; $display("vsync width %0d", vs_low); end
      vs_low = 0; frames++;
      if (frames > 1) begin
        checks++;
        if (act_total != HA * VA) begin failures++; $display("active clocks %0d", act_total); end
      end
      act_total = 0;
    end
    prev_blank = vga_blank_n; prev_hs = vga_hsync_n; prev_vs = vga_vsync_n;
  end

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    wait (frames == 3);
    checks++; if (checks < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
