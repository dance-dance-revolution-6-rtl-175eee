// ac97_frame_rx_tb: plays the codec's side of the link. A bit counter and sync
// are generated as the controller does (rising edge, sync for counts 0..15) and
// each frame bit is driven on the rising edge, one count ahead of its
// sampling point. Every frame has random valid tags, request bits and 20-bit
// samples; after each frame_done pulse the testbench checks the outputs
// against the previous frame (samples of a frame without a valid tag must not
// change the outputs), and that frame_done comes once per frame.
module ac97_frame_rx_tb;
  logic bit_clk = 0, rst = 1, sync = 0, sdata_in = 0;
  logic [7:0] bit_count = 8'd255;
  logic [19:0] pcm_left, pcm_right;
  logic valid_left, valid_right, req_left, req_right, frame_done;
  int checks = 0, failures = 0, frames = 0, dones = 0;
  logic [255:0] f = '0;
  // what was sent in the last complete frame, and what the outputs should hold
  logic [19:0] exp_l = 0, exp_r = 0, cur_l, cur_r;
  logic exp_vl = 0, exp_vr = 0, exp_ql = 0, exp_qr = 0, cur_vl, cur_vr, cur_ql, cur_qr;

  ac97_frame_rx dut (.*);
  always #40 bit_clk = !bit_clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge bit_clk) if (!rst) begin
    sdata_in <= f[bit_count];
    if (bit_count == 8'd255) begin
      if (frames > 0) begin
        if (cur_vl) exp_l = cur_l;
        if (cur_vr) exp_r = cur_r;
        exp_vl = cur_vl; exp_vr = cur_vr; exp_ql = cur_ql; exp_qr = cur_qr;
      end
      cur_vl = 1'($urandom); cur_vr = 1'($urandom); cur_ql = 1'($urandom); cur_qr = 1'($urandom);
      cur_l = 20'($urandom); cur_r = 20'($urandom);
      f = '0;
      f[0] = 1; f[3] = cur_vl; f[4] = cur_vr; f[24] = cur_ql; f[25] = cur_qr;
      for (int i = 0; i < 20; i++) begin f[56 + i] = cur_l[19 - i]; f[76 + i] = cur_r[19 - i]; end
      f[200] = 1'($urandom);   // noise in an unused slot
      frames++;
    end
    bit_count <= bit_count + 1'b1;
    sync <= (8'(bit_count + 1'b1) < 8'd16);
  end

  always @(negedge bit_clk) if (frame_done && frames > 1) begin
    dones++;
    chk(bit_count == 8'd1, "frame_done at the start of the next frame");
    chk(pcm_left == exp_l && pcm_right == exp_r, $sformatf("samples %h %h exp %h %h", pcm_left, pcm_right, exp_l, exp_r));
    chk(valid_left == exp_vl && valid_right == exp_vr, "valid tags");
    chk(req_left == exp_ql && req_right == exp_qr, "request bits");
  end

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge bit_clk); rst = 0;
    wait (frames == 40);
    @(negedge bit_clk);
    chk(dones == 38, $sformatf("one frame_done per frame (%0d)", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
