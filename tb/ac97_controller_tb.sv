// ac97_controller_tb: checks the frame counter and sync against each other for
// several frames, then feeds received-frame pulses with random samples and
// checks each mode: pass-through copies the samples, play sends the latest
// flash sample on both channels with one read request per frame and restarts
// on a new play edge, record sends the upper 16 bits of the left sample to the
// flash with one write request per frame and transmits silence. Record wins
// over play.
module ac97_controller_tb;
  logic bit_clk = 0, rst = 1, play = 0, record = 0, sync, rx_done = 0;
  logic [7:0] bit_count;
  logic [19:0] rx_left = 0, rx_right = 0, tx_left, tx_right;
  logic [1:0] mode;
  logic fl_start, fl_rd_req, fl_rd_valid = 0, fl_wr_req;
  logic [15:0] fl_rd_data = 0, fl_wr_data;
  int checks = 0, failures = 0, starts = 0, rds = 0, wrs = 0;

  ac97_controller dut (.*);
  always #40 bit_clk = !bit_clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge bit_clk) if (!rst) begin
    starts += fl_start; rds += fl_rd_req; wrs += fl_wr_req;
  end

  // one received frame: new samples, then a two-cycle frame_done pulse
  task automatic frame(output logic [19:0] l, r);
    l = 20'($urandom); r = 20'($urandom);
    @(negedge bit_clk); rx_left = l; rx_right = r; rx_done = 1;
    @(negedge bit_clk); @(negedge bit_clk); rx_done = 0;
    @(negedge bit_clk);
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] l, r; int s0;
    repeat (2) @(negedge bit_clk); rst = 0;
    // frame timing: bit_count counts 0..255, sync high exactly for 0..15
    for (int i = 0; i < 3 * 256; i++) begin
      @(negedge bit_clk);
      chk(sync == (bit_count < 16), "sync window");
      chk(bit_count == 8'(i), "bit_count runs freely from 0");
    end
    // pass-through
    repeat (5) begin
      frame(l, r);
      chk(mode == 0 && tx_left == l && tx_right == r, "pass-through copies samples");
    end
    chk(rds == 0 && wrs == 0 && starts == 0, $sformatf("no flash traffic when passing through %0d %0d %0d", rds, wrs, starts));
    // play
    play = 1; repeat (4) @(negedge bit_clk);
    chk(starts == 1 && mode == 1, "play edge restarts playback");
    s0 = rds;
    for (int k = 0; k < 6; k++) begin
      frame(l, r);
      chk(rds == s0 + k + 1, "one read request per frame");
      chk(tx_left == {16'(k ? k * 111 : 0), 4'h0} && tx_right == tx_left, "latest flash sample on both channels");
      @(negedge bit_clk); fl_rd_data = 16'((k + 1) * 111); fl_rd_valid = 1;
      @(negedge bit_clk); fl_rd_valid = 0;
    end
    // record (overrides play)
    record = 1; repeat (2) @(negedge bit_clk);
    chk(mode == 2, "record has priority");
    s0 = wrs;
    for (int k = 0; k < 6; k++) begin
      frame(l, r);
      chk(wrs == s0 + k + 1 && fl_wr_data == l[19:4], "record writes upper 16 bits of left");
      chk(tx_left == 0 && tx_right == 0, "silence while recording");
    end
    record = 0; play = 0; repeat (2) @(negedge bit_clk);
    play = 1; repeat (2) @(negedge bit_clk);
    chk(starts == 2, "second play edge restarts again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
