// ac97_frame_tx: builds AC97 output frames for the codec, one bit per clock.
//
// Runs on the rising edge of the AC97 bit clock; the codec samples on the
// falling edge. At bit_count 0 the transmitter latches the PCM samples of the
// requested channels ('req_left', 'req_right' from the receiver) and sets their
// valid tags; a channel not requested is sent invalid and zero. At each clock
// it registers on 'sdata_out' the frame bit that belongs to the current
// bit_count:
//   0 frame valid, 1 command address valid, 2 command data valid,
//   3, 4 PCM left / right valid, 16..35 command address, 36..55 command data,
//   56..75 PCM left, 76..95 PCM right (all MSB first), 0 elsewhere.
// A 15-bit frame counter starts at zero on reset, advances at the end of each
// frame it sent (not for the partial count before the first frame) and wraps. Frames 0..8 carry the nine configuration writes below, in
// this order, and every other frame reads the vendor ID register (0x7C), which
// changes nothing; the sequence thus repeats each time the counter wraps.
//   0x02<=0x0000 unmute line out       0x04<=0x0000 unmute headphones
//   0x0C<=0xFFFF mute line in to mix 2 0x0E<=0xFFFF mute mic
//   0x10<=0xFFFF mute line in to mix 1 0x1A<=0x0404 record select = line in
//   0x1C<=0x0000 record gain 0 dB      0x18<=0x0808 DAC out, slight attenuation
//   0x20<=0x8000 bypass 3D
// Slot positions and commands follow the source design; the vendor-ID read in
// the remaining frames is its idle command too.
module ac97_frame_tx (
  input  logic        bit_clk,
  input  logic        rst,
  input  logic [7:0]  bit_count,
  input  logic [19:0] pcm_left,
  input  logic [19:0] pcm_right,
  input  logic        req_left,
  input  logic        req_right,
  output logic        sdata_out,
  output logic [14:0] frame_count
);
  logic [19:0] l_t, r_t;
  logic        vl, vr;
  logic        started;   // a frame has begun since reset
  logic [23:0] command;
  logic [19:0] cmd_addr, cmd_data;

  always_comb begin
    unique case (frame_count)
      15'd0:   command = 24'h02_0000;
      15'd1:   command = 24'h04_0000;
      15'd2:   command = 24'h0C_FFFF;
      15'd3:   command = 24'h0E_FFFF;
      15'd4:   command = 24'h10_FFFF;
      15'd5:   command = 24'h1A_0404;
      15'd6:   command = 24'h1C_0000;
      15'd7:   command = 24'h18_0808;
      15'd8:   command = 24'h20_8000;
      default: command = 24'hFC_0000;   // read (bit 7) of register 0x7C
    endcase
  end
  assign cmd_addr = {command[23:16], 12'h000};
  assign cmd_data = {command[15:0], 4'h0};

  always_ff @(posedge bit_clk) begin
    if (rst) begin
      l_t <= '0; r_t <= '0; vl <= 1'b0; vr <= 1'b0;
      sdata_out <= 1'b0; frame_count <= '0; started <= 1'b0;
    end else begin
      if (bit_count == 8'd255 && started) frame_count <= frame_count + 1'b1;
      if (bit_count == 8'd0) begin
        started <= 1'b1;
        vl  <= req_left;
        vr  <= req_right;
        l_t <= req_left  ? pcm_left  : 20'd0;
        r_t <= req_right ? pcm_right : 20'd0;
      end
      if (bit_count <= 8'd2)                          sdata_out <= 1'b1;
      else if (bit_count == 8'd3)                     sdata_out <= vl;
      else if (bit_count == 8'd4)                     sdata_out <= vr;
      else if (bit_count >= 8'd16 && bit_count <= 8'd35) sdata_out <= cmd_addr[35 - bit_count];
      else if (bit_count >= 8'd36 && bit_count <= 8'd55) sdata_out <= cmd_data[55 - bit_count];
      else if (bit_count >= 8'd56 && bit_count <= 8'd75) sdata_out <= vl && l_t[75 - bit_count];
      else if (bit_count >= 8'd76 && bit_count <= 8'd95) sdata_out <= vr && r_t[95 - bit_count];
      else                                            sdata_out <= 1'b0;
    end
  end
endmodule
