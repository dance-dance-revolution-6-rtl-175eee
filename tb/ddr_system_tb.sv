// ddr_system_tb: end-to-end test of the complete system at reduced size (fast
// timer, small VGA raster, two flash blocks), with the codec and flash chip
// models attached and the test kernel (ddr_kernel.svh) in RAM.
// Scenario: the erase switch erases the flash; the record switch is held for
// a while, so codec samples go into the flash; the kernel, after PLAY_TICK
// timer ticks, sets the play bit and the recording plays back to the codec.
// Meanwhile every timer tick hands the bus to the pad controller, which
// stores the pad buttons, and the video unit scans the frame buffer the
// kernel painted.
// Each mechanism below is counted, and any that never happens is a failure:
//   timer interrupts, pad grants, pad yields, pad samples stored correctly,
//   CPU stalled during pad ownership, unaligned read, video frames with white
//   pixels only in painted lines, flash erase, flash programs, pass-through
//   audio, recorded audio, played-back audio matching the recording.
module ddr_system_tb;
  import ddr_pkg::*;
  import beta_asm_pkg::*;
  localparam int PERIOD = 5000, PLAY_TICK = 40, NBLOCKS = 2;
  localparam int HA = 64, VA = 16;
  logic clk = 0, rst = 1;
  logic [6:1] irq_ext = 0;
  logic [9:0] pad_in = 0;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_blank_n, vga_hsync_n, vga_vsync_n;
  logic ac97_bit_clk, ac97_sdata_in, ac97_sync, ac97_sdata_out;
  logic record_sw = 0, erase_sw = 0;
  logic [23:0] fl_addr;
  logic fl_ce_b, fl_oe_b, fl_we_b, fl_rp_b, fl_doe, fl_sts;
  logic [15:0] fl_dout, fl_din;
  logic [3:0] direct_io;
  logic [31:0] dbg_pc;
  logic dbg_retire, pad_sample, frame_start;
  logic [1:0] audio_mode;
  logic [19:0] adc_left, adc_right, dac_left, dac_right, cmd_addr, cmd_data;
  logic dac_valid_left, dac_valid_right;
  int codec_frames, errors, n_erase, n_prog, n_rdarr;
  int checks = 0, failures = 0;

  ddr_system #(.CLK_HZ(PERIOD * 100), .H_ACTIVE(HA), .H_FP(4), .H_SYNC(8), .H_BP(4),
               .V_ACTIVE(VA), .V_FP(1), .V_SYNC(1), .V_BP(1), .NBLOCKS(NBLOCKS)) dut (.*);
  ac97_codec_model codec (
    .bit_clk(ac97_bit_clk), .sync(ac97_sync), .sdata_out(ac97_sdata_out), .sdata_in(ac97_sdata_in),
    .adc_left, .adc_right, .dac_left, .dac_right, .dac_valid_left, .dac_valid_right,
    .cmd_addr, .cmd_data, .frames(codec_frames));
  flash_chip_model #(.ERASE_BUSY(300), .PROG_BUSY(40)) chip (
    .clk, .fl_addr, .fl_ce_b, .fl_oe_b, .fl_we_b, .fl_rp_b, .fl_dout, .fl_doe, .fl_din, .fl_sts,
    .errors, .n_erase, .n_prog, .n_rdarr);
  always #18.5ns clk = !clk;

  `include "ddr_kernel.svh"

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int n_irq = 0, n_grant = 0, n_yield = 0, n_sample = 0, n_sample_ok = 0, n_stall_bad = 0;
  int n_frames = 0, n_white = 0, n_white_bad = 0, n_pass = 0, n_rec = 0, n_play_ok = 0, n_play_bad = 0, n_play_pre = 0;
  int line = 0, first_white = -1;
  logic en3_q = 0, hs_q = 1, vs_q = 1;
  logic [19:0] last_play = 0;
  logic play_seen = 0;

  always @(negedge clk) if (!rst) begin
    if (dbg_retire && dbg_pc == 32'h8000_0100) n_irq++;     // handler's first instruction done
    if (dut.dev_en[3] && !en3_q) n_grant++;
    if (!dut.dev_en[3] && en3_q) n_yield++;
    if (dut.dev_en[3] && dbg_retire) n_stall_bad++;
    en3_q = dut.dev_en[3];
    if (pad_sample) begin
      // the stored word must be the pad state from before the sample; then
      // the pad changes for the next tick
      n_sample++;
      fork
        automatic logic [9:0] exp = pad_in;
        begin
          repeat (12) @(negedge clk);
          if (dut.u_computer.u_ram.u_mem.mem[32'h6000 >> 2] == {22'd0, exp}) n_sample_ok++;
        end
      join_none
      pad_in = 10'($urandom);
    end
    // video: count white pixels per line of the frame
    if (!vga_vsync_n && vs_q) begin n_frames++; line = -1; first_white = -1; end
    vs_q = vga_vsync_n;
    if (vga_hsync_n && !hs_q) begin line++; end
    hs_q = vga_hsync_n;
    if (vga_blank_n && vga_r == 8'hF8 && vga_g == 8'hF8 && vga_b == 8'hF8) begin
      n_white++;
      if (first_white < 0) first_white = line;
      else if (line > first_white + 1) n_white_bad++;
    end
    if (!vga_blank_n && (vga_r | vga_g | vga_b) != 0) n_white_bad++;
  end

  // audio: once per codec frame
  always @(codec_frames) if (!rst && codec_frames > 20) begin
    if (audio_mode == 0 && 20'(adc_left - dac_left) >= 20'h10 && 20'(adc_left - dac_left) <= 20'h40) n_pass++;
    if (audio_mode == 1 && dac_left != 0) begin
      if (!play_seen) begin
        // the first frames after the switch may still carry pass-through
        // samples; then playback starts at the first recorded sample
        if (dac_left[19:4] >= chip.rd(0) && dac_left[19:4] <= chip.rd(0) + 2) begin
          n_play_ok++; play_seen = 1;
        end else n_play_pre++;
      end else if (dac_left != last_play && dac_left != last_play + 20'h10) begin
        n_play_bad++; $display("play %h after %h", dac_left, last_play);
      end else if (dac_left == last_play + 20'h10) n_play_ok++;
      last_play = dac_left;
    end
  end
  always @(posedge clk) if (dut.fl_wr_req) n_rec++;

  initial begin
    #100ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_kernel(PLAY_TICK, 16);
    repeat (5) @(negedge clk); rst = 0;
    repeat (10) @(negedge clk); erase_sw = 1;
    repeat (10) @(negedge clk); erase_sw = 0;
    wait (n_erase == NBLOCKS && !dut.fl_busy);
    begin int f0; f0 = codec_frames; wait (codec_frames == f0 + 10); end
    record_sw = 1;
    begin int f0; f0 = codec_frames; wait (codec_frames == f0 + 100); end
    record_sw = 0;
    wait (direct_io[2]);
    begin int f0; f0 = codec_frames; wait (codec_frames == f0 + 40); end
    repeat (4) @(negedge clk);
    $display("irq %0d grant %0d yield %0d sample %0d/%0d stall_bad %0d frames %0d white %0d/%0d pass %0d rec %0d play %0d/%0d erase %0d prog %0d",
             n_irq, n_grant, n_yield, n_sample_ok, n_sample, n_stall_bad, n_frames, n_white, n_white_bad,
             n_pass, n_rec, n_play_ok, n_play_bad, n_erase, n_prog);
    chk(n_irq >= PLAY_TICK, "timer interrupts taken");
    chk(n_grant > 0 && n_grant == n_irq, "pad granted the bus once per tick");
    chk(n_yield > 0 && n_yield == n_grant, "pad yielded every grant");
    chk(n_sample > 0 && n_sample == n_grant, "pad sampled once per grant");
    chk(n_sample_ok > 0 && n_sample_ok == n_sample, "pad word stored in RAM");
    chk(n_stall_bad == 0 && n_grant > 0, "CPU stalls while the pad owns the bus");
    chk(dut.u_computer.u_ram.u_mem.mem['h304 >> 2] == 32'h5544_3322, "unaligned read");
    chk(n_frames > 5, "video frames");
    chk(n_white > 0 && n_white_bad == 0, "frame buffer shown in the right lines only");
    chk(n_erase == NBLOCKS, "flash erased");
    chk(n_rec >= 90 && n_prog >= 90, $sformatf("samples recorded (%0d requests, %0d programs)", n_rec, n_prog));
    chk(n_pass > 10, "pass-through audio");
    chk(n_play_ok > 20 && n_play_bad == 0 && n_play_pre <= 3, "recording played back");
    chk(errors == 0, "flash protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
