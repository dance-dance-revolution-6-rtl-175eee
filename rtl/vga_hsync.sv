// vga_hsync: horizontal (minor) FSM of the VGA video unit.
//
// Once 'run' is high the FSM repeats lines of ACTIVE (H_ACTIVE clocks), front
// porch, sync pulse and back porch, and pulses 'line_done' in the last back-
// porch clock so that the vertical FSM can count lines. Each 32-bit frame-buffer
// word holds two pixels of 15 bits (R,G,B 5 bits each: bits 31:17 and 15:1;
// bits 16 and 0 unused), and every pixel is shown for two clocks, so one word
// covers four clocks and 160 words make a 640-clock line from a 320-pixel row.
// Each frame-buffer row is shown on two screen lines (row = line/2).
//
// Fetch: in the first clock of each four-clock group g the word address
// fb_base + row*FB_WORDS + g goes out on 'vid_addr' and is held for the group;
// the word must arrive within two clocks, and is taken in the group's last clock.
// The pixels of word g are therefore shown during group g+1, so the blanking,
// sync and line-active flags go through a matching four-stage delay line. The
// colour, 'blank_n' and 'hsync_n' outputs are registered once more, so all are
// five clocks behind the internal counter and aligned with each other. Colour
// outputs are 8 bits with the three low bits zero; colour is 0 while blanking.
// Sync and blank are active low.
//
// Line order, two clocks per pixel and the 2-clock fetch budget follow the
// source design; the porch and sync lengths are standard 640x480 VGA values.
module vga_hsync #(
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int FB_WORDS = 160      // words per frame-buffer row
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        line_active,  // current line shows frame-buffer data
  input  logic [9:0]  line,         // current display line (0..479)
  input  logic [15:0] fb_base,      // word address of the frame buffer
  output logic [15:0] vid_addr,
  input  logic [31:0] vid_data,
  output logic [7:0]  r, g, b,
  output logic        hsync_n,
  output logic        blank_n,
  output logic        line_done
);
  typedef enum logic [2:0] {H_IDLE, H_OUT, H_FPORCH, H_SYNCP, H_BPORCH} hstate_t;
  hstate_t state;
  logic [9:0]  count;
  logic [31:0] cur;
  logic [3:0]  act_d, sync_d;
  logic [1:0]  ph_d [4];
  logic [14:0] pix;
  logic [15:0] line_base;

  assign line_base = fb_base + 16'(line[9:1]) * 16'(FB_WORDS);
  assign vid_addr  = line_base + 16'(count[9:2]);
  assign line_done = (state == H_BPORCH) && (count == 10'(H_BP - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= H_IDLE;
      count <= '0;
    end else begin
      count <= count + 1'b1;
      unique case (state)
        H_IDLE:   begin count <= '0; if (run) state <= H_OUT; end
        H_OUT:    if (count == 10'(H_ACTIVE - 1)) begin count <= '0; state <= H_FPORCH; end
        H_FPORCH: if (count == 10'(H_FP - 1))     begin count <= '0; state <= H_SYNCP;  end
        H_SYNCP:  if (count == 10'(H_SYNC - 1))   begin count <= '0; state <= H_BPORCH; end
        H_BPORCH: if (count == 10'(H_BP - 1))     begin count <= '0; state <= run ? H_OUT : H_IDLE; end
        default:  state <= H_IDLE;
      endcase
    end
  end

  // fetch register and alignment delay line
  always_ff @(posedge clk) begin
    if (rst) begin
      cur    <= '0;
      act_d  <= '0;
      sync_d <= '0;
      for (int i = 0; i < 4; i++) ph_d[i] <= '0;
    end else begin
      if (state == H_OUT && count[1:0] == 2'd3) cur <= vid_data;
      act_d  <= {act_d[2:0], (state == H_OUT) && line_active};
      sync_d <= {sync_d[2:0], state == H_SYNCP};
      ph_d[0] <= count[1:0];
      for (int i = 1; i < 4; i++) ph_d[i] <= ph_d[i-1];
    end
  end

  assign pix = ph_d[3][1] ? cur[15:1] : cur[31:17];

  always_ff @(posedge clk) begin
    if (rst) begin
      r <= '0; g <= '0; b <= '0;
      hsync_n <= 1'b1;
      blank_n <= 1'b0;
    end else begin
      r       <= act_d[3] ? {pix[14:10], 3'b000} : 8'd0;
      g       <= act_d[3] ? {pix[9:5],   3'b000} : 8'd0;
      b       <= act_d[3] ? {pix[4:0],   3'b000} : 8'd0;
      hsync_n <= !sync_d[3];
      blank_n <= act_d[3];
    end
  end
endmodule
