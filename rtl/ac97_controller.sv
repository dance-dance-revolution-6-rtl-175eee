// ac97_controller: frame timing and mode control of the audio unit.
//
// Runs on the AC97 bit clock. An 8-bit 'bit_count' counts the 256 bits of each
// frame and 'sync' is high for bit_count 0..15, so bit_count restarts with
// every rising edge of sync. Both go to the frame receiver and transmitter.
//
// Once per received frame ('rx_done') the controller fills the transmit
// register according to the mode, chosen from the 'record' and 'play' inputs
// (record has priority):
//   PASS   (neither): the received samples are copied to the transmit register
//          unchanged (digital loopback through the codec's ADC and DAC).
//   PLAY:  the transmit register gets the latest flash sample on both channels
//          and the next sample is requested ('fl_rd_req'); each rising edge of
//          'play' restarts playback from the first sample ('fl_start').
//   RECORD: the upper 16 bits of the received left sample go to the flash with
//          a 'fl_wr_req' pulse; the transmit register is silent.
// Flash samples are 16 bits and are widened to 20 bits with zero LSBs. The
// three modes follow the source design; the one-request-per-frame pacing, the
// left-channel recording and the 16-bit sample width are this design's choices.
module ac97_controller (
  input  logic        bit_clk,
  input  logic        rst,
  input  logic        play,
  input  logic        record,
  output logic        sync,
  output logic [7:0]  bit_count,
  input  logic        rx_done,
  input  logic [19:0] rx_left,
  input  logic [19:0] rx_right,
  output logic [19:0] tx_left,
  output logic [19:0] tx_right,
  output logic [1:0]  mode,        // 0 pass-through, 1 play, 2 record
  output logic        fl_start,
  output logic        fl_rd_req,
  input  logic        fl_rd_valid,
  input  logic [15:0] fl_rd_data,
  output logic        fl_wr_req,
  output logic [15:0] fl_wr_data
);
  typedef enum logic [1:0] {M_PASS = 2'd0, M_PLAY = 2'd1, M_RECORD = 2'd2} amode_t;
  amode_t cur;
  logic [15:0] sample;
  logic        play_q, rx_done_q;

  assign cur  = record ? M_RECORD : (play ? M_PLAY : M_PASS);
  assign mode = 2'(cur);

  always_ff @(posedge bit_clk) begin
    if (rst) begin
      bit_count <= 8'd255;
      sync      <= 1'b0;
      tx_left   <= '0;
      tx_right  <= '0;
      sample    <= '0;
      play_q    <= 1'b0;
      rx_done_q <= 1'b0;
      fl_start  <= 1'b0;
      fl_rd_req <= 1'b0;
      fl_wr_req <= 1'b0;
      fl_wr_data <= '0;
    end else begin
      bit_count <= bit_count + 1'b1;
      sync      <= (8'(bit_count + 1'b1) < 8'd16);
      play_q    <= play;
      rx_done_q <= rx_done;
      fl_start  <= 1'b0;
      fl_rd_req <= 1'b0;
      fl_wr_req <= 1'b0;
      if (play && !play_q) begin
        fl_start <= 1'b1;
        sample   <= '0;
      end else if (fl_rd_valid) begin
        sample <= fl_rd_data;
      end
      if (rx_done && !rx_done_q) begin
        unique case (cur)
          M_PASS: begin
            tx_left  <= rx_left;
            tx_right <= rx_right;
          end
          M_PLAY: begin
            tx_left   <= {sample, 4'h0};
            tx_right  <= {sample, 4'h0};
            fl_rd_req <= 1'b1;
          end
          default: begin
            tx_left    <= '0;
            tx_right   <= '0;
            fl_wr_data <= rx_left[19:4];
            fl_wr_req  <= 1'b1;
          end
        endcase
      end
    end
  end
endmodule
