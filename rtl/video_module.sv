// video_module: VGA video unit showing a 320x240, 15-bit frame buffer at 640x480.
//
// Combines the vertical (major) FSM vga_vsync and the horizontal (minor) FSM
// vga_hsync. The horizontal FSM reads frame-buffer words through 'vid_addr' /
// 'vid_data' (the RAM's video port; data within two clocks) and produces
// 8-bit R, G, B and an active-low blank for the VGA DAC. The vertical sync is
// delayed to line up with those outputs, and both sync signals, which go to the
// VGA connector directly rather than through the DAC, are delayed by
// SYNC_DELAY more clocks to match the DAC's pipeline. 'fb_base' is the word
// address of the frame buffer in RAM.
module video_module #(
  parameter int H_ACTIVE   = 640,
  parameter int H_FP       = 16,
  parameter int H_SYNC     = 96,
  parameter int H_BP       = 48,
  parameter int V_ACTIVE   = 480,
  parameter int V_FP       = 10,
  parameter int V_SYNC     = 2,
  parameter int V_BP       = 33,
  parameter int FB_WORDS   = 160,
  parameter int SYNC_DELAY = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] fb_base,
  output logic [15:0] vid_addr,
  input  logic [31:0] vid_data,
  output logic [7:0]  vga_r, vga_g, vga_b,
  output logic        vga_blank_n,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic        frame_start
);
  localparam int ALIGN = 5;   // clocks from vga_hsync's counter to its outputs

  logic run, line_active, line_done, vs_n, hs_n, blank_h;
  logic [9:0] line;
  logic [ALIGN+SYNC_DELAY-1:0] vs_pipe;
  logic [SYNC_DELAY-1:0]       hs_pipe;

  vga_vsync #(.V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_v (
    .clk, .rst, .line_done, .run, .line_active, .line, .vsync_n(vs_n), .frame_start
  );

  vga_hsync #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
              .FB_WORDS(FB_WORDS)) u_h (
    .clk, .rst, .run, .line_active, .line, .fb_base, .vid_addr, .vid_data,
    .r(vga_r), .g(vga_g), .b(vga_b), .hsync_n(hs_n), .blank_n(blank_h), .line_done
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      vs_pipe <= '1;
      hs_pipe <= '1;
    end else begin
      vs_pipe <= {vs_pipe[ALIGN+SYNC_DELAY-2:0], vs_n};
      hs_pipe <= {hs_pipe[SYNC_DELAY-2:0], hs_n};
    end
  end

  assign vga_blank_n = blank_h;
  assign vga_hsync_n = hs_pipe[SYNC_DELAY-1];
  assign vga_vsync_n = vs_pipe[ALIGN+SYNC_DELAY-1];
endmodule
