// audio_module: AC97 audio unit (controller, frame receiver, frame transmitter).
//
// Talks to an AC97 codec: 'ac97_sync' and 'ac97_sdata_out' go to the codec,
// 'ac97_bit_clk' and 'ac97_sdata_in' come from it. The frame logic runs on the
// codec's bit clock; everything facing the rest of the system ('play',
// 'record', the flash interface) is in the system clock domain 'clk'.
//
// Clock crossings: 'play' and 'record' are levels and pass through two flip-
// flops into the bit-clock domain. Flash requests (start, read, write) are
// single pulses and cross with pulse_sync; the write data is held stable in a
// bit-clock register for a whole frame, long after the pulse arrives. A flash
// read result is captured in a system-clock register when 'fl_rd_valid' pulses
// and its arrival is signalled across with pulse_sync. The reset is
// synchronized into the bit-clock domain with two flip-flops. The split into
// these clock domains is this design's choice.
module audio_module (
  input  logic        clk,
  input  logic        rst,
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  input  logic        play,
  input  logic        record,
  output logic [1:0]  mode,
  // flash side, system clock domain
  output logic        fl_start,
  output logic        fl_rd_req,
  input  logic        fl_rd_valid,
  input  logic [15:0] fl_rd_data,
  output logic        fl_wr_req,
  output logic [15:0] fl_wr_data
);
  logic [1:0]  brst_s, play_s, rec_s;
  logic        brst;
  logic [7:0]  bit_count;
  logic [19:0] rx_l, rx_r, tx_l, tx_r;
  logic        vl, vr, ql, qr, rx_done;
  logic        b_start, b_rd, b_wr, b_rdv;
  logic [15:0] rd_hold, b_wr_data;

  always_ff @(posedge ac97_bit_clk) begin
    brst_s <= {brst_s[0], rst};
    play_s <= {play_s[0], play};
    rec_s  <= {rec_s[0], record};
  end
  assign brst = brst_s[1];

  ac97_controller u_ctrl (
    .bit_clk(ac97_bit_clk), .rst(brst), .play(play_s[1]), .record(rec_s[1]),
    .sync(ac97_sync), .bit_count, .rx_done, .rx_left(rx_l), .rx_right(rx_r),
    .tx_left(tx_l), .tx_right(tx_r), .mode,
    .fl_start(b_start), .fl_rd_req(b_rd), .fl_rd_valid(b_rdv), .fl_rd_data(rd_hold),
    .fl_wr_req(b_wr), .fl_wr_data(b_wr_data)
  );

  ac97_frame_rx u_rx (
    .bit_clk(ac97_bit_clk), .rst(brst), .sync(ac97_sync), .bit_count, .sdata_in(ac97_sdata_in),
    .pcm_left(rx_l), .pcm_right(rx_r), .valid_left(vl), .valid_right(vr),
    .req_left(ql), .req_right(qr), .frame_done(rx_done)
  );

  ac97_frame_tx u_tx (
    .bit_clk(ac97_bit_clk), .rst(brst), .bit_count, .pcm_left(tx_l), .pcm_right(tx_r),
    .req_left(ql), .req_right(qr), .sdata_out(ac97_sdata_out), .frame_count()  // command progress is not needed outside the transmitter
  );

  pulse_sync u_ps_start (.src_clk(ac97_bit_clk), .src_rst(brst), .src_pulse(b_start),
                         .dst_clk(clk), .dst_rst(rst), .dst_pulse(fl_start));
  pulse_sync u_ps_rd    (.src_clk(ac97_bit_clk), .src_rst(brst), .src_pulse(b_rd),
                         .dst_clk(clk), .dst_rst(rst), .dst_pulse(fl_rd_req));
  pulse_sync u_ps_wr    (.src_clk(ac97_bit_clk), .src_rst(brst), .src_pulse(b_wr),
                         .dst_clk(clk), .dst_rst(rst), .dst_pulse(fl_wr_req));
  pulse_sync u_ps_rdv   (.src_clk(clk), .src_rst(rst), .src_pulse(fl_rd_valid),
                         .dst_clk(ac97_bit_clk), .dst_rst(brst), .dst_pulse(b_rdv));

  always_ff @(posedge clk) begin
    if (rst)              rd_hold <= '0;
    else if (fl_rd_valid) rd_hold <= fl_rd_data;
  end

  assign fl_wr_data = b_wr_data;
endmodule
