// audio_module_tb: the audio unit against the codec model, with the system
// clock (27 MHz) and the codec bit clock (12.288 MHz) unrelated. The
// testbench also plays a simple flash: it restarts at address 0 on fl_start
// and answers each read request a few cycles later with a sample derived from
// the address. Checks:
//   pass-through: the codec gets back its own ADC samples a fixed number of
//     frames later, on both channels, with valid tags set;
//   play: the codec gets consecutive flash samples, one per frame, on both
//     channels, starting again from address 0 after each play edge;
//   record: every write request carries the upper 16 bits of an ADC left
//     sample, the samples are consecutive, and the codec gets silence.
module audio_module_tb;
  logic clk = 0, rst = 1, play = 0, record = 0;
  logic ac97_bit_clk, ac97_sdata_in, ac97_sync, ac97_sdata_out;
  logic [1:0] mode;
  logic fl_start, fl_rd_req, fl_rd_valid = 0, fl_wr_req;
  logic [15:0] fl_rd_data = 0, fl_wr_data;
  logic [19:0] adc_left, adc_right, dac_left, dac_right, cmd_addr, cmd_data;
  logic dac_valid_left, dac_valid_right;
  int codec_frames;
  int checks = 0, failures = 0;
  int fl_addr = 0, rd_reqs = 0, wr_reqs = 0, starts = 0;
  logic [15:0] last_wr = 0;
  int wr_steps_bad = 0;

  audio_module dut (.*);
  ac97_codec_model #(.BIT_PERIOD(81.38ns)) codec (
    .bit_clk(ac97_bit_clk), .sync(ac97_sync), .sdata_out(ac97_sdata_out), .sdata_in(ac97_sdata_in),
    .adc_left, .adc_right, .dac_left, .dac_right, .dac_valid_left, .dac_valid_right,
    .cmd_addr, .cmd_data, .frames(codec_frames));

  always #18.5ns clk = !clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // flash stand-in
  always @(posedge clk) if (!rst) begin
    fl_rd_valid <= 0;
    if (fl_start) begin fl_addr <= 0; starts++; end
    if (fl_rd_req) begin
      rd_reqs++;
      fork begin
        repeat (3 + $urandom_range(0, 5)) @(posedge clk);
        fl_rd_data <= 16'h4000 + 16'(fl_addr);
        fl_rd_valid <= 1;
        fl_addr <= fl_addr + 1;
      end join_none
    end
    if (fl_wr_req) begin
      if (wr_reqs > 0 && fl_wr_data != 16'(last_wr + 1)) wr_steps_bad++;
      last_wr <= fl_wr_data;
      wr_reqs++;
    end
  end

  task automatic wait_frames(input int n);
    int f0; f0 = codec_frames;
    wait (codec_frames == f0 + n);
  endtask

  initial begin
    #100ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d0, w0, r0;
    logic [19:0] prev;
    repeat (10) @(negedge clk); rst = 0;
    wait_frames(12);
    // the nine configuration writes went out in the first frames; now idle reads
    chk(cmd_addr == 20'hFC000, "idle command is the vendor-ID read");
    // pass-through
    chk(mode == 0, "pass-through mode");
    wait_frames(1); @(negedge ac97_bit_clk);
    d0 = int'(20'(adc_left - dac_left) >> 4);
    chk(d0 >= 1 && d0 <= 4, $sformatf("loopback delay %0d frames", d0));
    for (int k = 0; k < 10; k++) begin
      wait_frames(1); @(negedge ac97_bit_clk);
      chk(20'(adc_left - dac_left) == 20'(d0 * 16) && 20'(adc_right - dac_right) == 20'(-d0)
          && dac_valid_left && dac_valid_right, "loopback of ADC samples");
    end
    chk(rd_reqs == 0 && wr_reqs == 0, "no flash traffic in pass-through");
    // play
    play = 1;
    wait_frames(6); @(negedge ac97_bit_clk);
    chk(starts == 1 && mode == 1, "play started");
    prev = dac_left;
    for (int k = 0; k < 10; k++) begin
      wait_frames(1); @(negedge ac97_bit_clk);
      chk(dac_left == dac_right && dac_left[3:0] == 0, "flash sample on both channels");
      chk(dac_left == prev + 20'h10, $sformatf("consecutive flash samples %h after %h", dac_left, prev));
      prev = dac_left;
    end
    r0 = rd_reqs;
    chk(r0 >= 14 && r0 <= 18, $sformatf("one read per frame (%0d)", r0));
    play = 0; wait_frames(2); play = 1; wait_frames(6); @(negedge ac97_bit_clk);
    chk(starts == 2 && dac_left < 20'h40060 && dac_left >= 20'h40000, $sformatf("playback restarts at 0 (%h)", dac_left));
    // record
    record = 1;
    wait_frames(4);
    w0 = wr_reqs;
    wait_frames(10); @(negedge ac97_bit_clk);
    chk(wr_reqs - w0 == 10, $sformatf("one write per frame (%0d)", wr_reqs - w0));
    chk(wr_steps_bad == 0, "recorded samples are consecutive ADC samples");
    chk(16'(adc_left[19:4] - last_wr) >= 1 && 16'(adc_left[19:4] - last_wr) <= 4,
        "recorded sample is a recent ADC sample");
    chk(dac_left == 0 && dac_right == 0 && mode == 2, "silence while recording");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
