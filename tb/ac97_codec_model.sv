// ac97_codec_model: behavioural model of the AC97 codec's digital link, for
// testbenches only.
//
// Generates the bit clock (period BIT_PERIOD). On each rising edge it counts
// frame bit positions, restarting at 0 on the first edge that sees SYNC high,
// and drives input-frame bit 'pos' on 'sdata_in': frame valid (bit 0), PCM
// left/right valid tags (3, 4), left/right data request (24, 25, active high),
// and 20-bit PCM left (56..75) and right (76..95), MSB first. The samples
// sent are adc_left/adc_right; every frame adc_left grows by 16 (one step of
// its upper 16 bits) and adc_right falls by one.
// On each falling edge it samples 'sdata_out' at the same position and, at the
// end of each frame, publishes what it received: command address and data,
// and the PCM samples with their valid tags.
module ac97_codec_model #(
  parameter realtime BIT_PERIOD = 80ns
) (
  output logic        bit_clk,
  input  logic        sync,
  input  logic        sdata_out,
  output logic        sdata_in,
  output logic [19:0] adc_left,
  output logic [19:0] adc_right,
  output logic [19:0] dac_left,
  output logic [19:0] dac_right,
  output logic        dac_valid_left,
  output logic        dac_valid_right,
  output logic [19:0] cmd_addr,
  output logic [19:0] cmd_data,
  output int          frames
);
  logic sync_q = 0;
  int pos = 255;
  logic [255:0] txf, rxf;

  initial begin
    bit_clk = 0; sdata_in = 0; frames = 0;
    adc_left = 20'h12345; adc_right = 20'hABCDE;
    dac_left = 0; dac_right = 0; dac_valid_left = 0; dac_valid_right = 0;
    cmd_addr = 0; cmd_data = 0; txf = '0; rxf = '0;
    forever #(BIT_PERIOD / 2) bit_clk = !bit_clk;
  end

  function automatic logic [255:0] make_frame(input logic [19:0] l, r);
    logic [255:0] f; f = '0;
    f[0] = 1; f[3] = 1; f[4] = 1; f[24] = 1; f[25] = 1;
    for (int i = 0; i < 20; i++) begin f[56 + i] = l[19 - i]; f[76 + i] = r[19 - i]; end
    return f;
  endfunction

  always @(posedge bit_clk) begin
    sync_q <= sync;
    if (sync && !sync_q) begin
      // publish the previous frame, start a new one
      if (pos > 100) begin
        frames <= frames + 1;
        dac_valid_left  <= rxf[3];
        dac_valid_right <= rxf[4];
        for (int i = 0; i < 20; i++) begin
          cmd_addr[19 - i]  <= rxf[16 + i];
          cmd_data[19 - i]  <= rxf[36 + i];
          dac_left[19 - i]  <= rxf[56 + i];
          dac_right[19 - i] <= rxf[76 + i];
        end
        adc_left  <= adc_left + 20'h10;
        adc_right <= adc_right - 1;
      end
      txf = make_frame(adc_left, adc_right);
      pos = 0;
    end else if (pos < 255) pos = pos + 1;
    sdata_in <= txf[pos];
  end

  always @(negedge bit_clk) rxf[pos] <= sdata_out;
endmodule
