// ac97_frame_rx: receives AC97 input frames from the codec.
//
// Runs on the falling edge of the AC97 bit clock, so it samples 'sdata_in' half
// a bit after the codec changed it on the rising edge. 'bit_count' (from
// ac97_controller, counting on the rising edge and restarting at 0 with each
// frame sync) tells which frame bit is on the line; at the bit_count values
// below the receiver stores bits into temporary registers:
//   4, 5      PCM left / right valid tags
//   25, 26    left / right data request
//   57..76    slot 3, PCM left, MSB first (20 bits)
//   77..96    slot 4, PCM right, MSB first
// PCM bits go to the temporary registers only when that frame's valid tag was
// set. On the rising edge of 'sync' (the start of the next frame) the
// temporary registers are copied to the outputs. 'data_valid' and the request
// flags are active high. The bit positions follow the source design's frame
// table (one bit_count later than the transmit positions, because of the
// falling-edge sampling); that the request bits are active high is also as the
// source design describes them.
module ac97_frame_rx (
  input  logic        bit_clk,
  input  logic        rst,
  input  logic        sync,
  input  logic [7:0]  bit_count,
  input  logic        sdata_in,
  output logic [19:0] pcm_left,
  output logic [19:0] pcm_right,
  output logic        valid_left,
  output logic        valid_right,
  output logic        req_left,
  output logic        req_right,
  output logic        frame_done    // one bit_clk cycle per received frame
);
  logic [19:0] l_t, r_t;
  logic        vl_t, vr_t, ql_t, qr_t, sync_q;

  always_ff @(negedge bit_clk) begin
    if (rst) begin
      l_t <= '0; r_t <= '0; vl_t <= 1'b0; vr_t <= 1'b0; ql_t <= 1'b0; qr_t <= 1'b0;
      pcm_left <= '0; pcm_right <= '0; valid_left <= 1'b0; valid_right <= 1'b0;
      req_left <= 1'b0; req_right <= 1'b0; sync_q <= 1'b0; frame_done <= 1'b0;
    end else begin
      sync_q     <= sync;
      frame_done <= 1'b0;
      if (sync && !sync_q) begin
        pcm_left    <= l_t;
        pcm_right   <= r_t;
        valid_left  <= vl_t;
        valid_right <= vr_t;
        req_left    <= ql_t;
        req_right   <= qr_t;
        frame_done  <= 1'b1;
      end
      if (bit_count == 8'd4)  vl_t <= sdata_in;
      if (bit_count == 8'd5)  vr_t <= sdata_in;
      if (bit_count == 8'd25) ql_t <= sdata_in;
      if (bit_count == 8'd26) qr_t <= sdata_in;
      if (vl_t && bit_count >= 8'd57 && bit_count <= 8'd76) l_t <= {l_t[18:0], sdata_in};
      if (vr_t && bit_count >= 8'd77 && bit_count <= 8'd96) r_t <= {r_t[18:0], sdata_in};
    end
  end
endmodule
