// ddr_system: the complete Dance Dance Revolution game system.
//
// A Beta RISC computer (betaputer: CPU, cooperative bus arbiter, shared bus,
// RAM controller with 56320 x 32-bit block RAM, 100 Hz timer interrupt) runs
// the game software. The other hardware units are peripherals around it:
//   - pad_controller, bus device PAD_DEV: when the kernel stores PAD_DEV to the
//     bus access vector, it writes the ten synchronized pad buttons to the RAM
//     word at PAD_ADDR and yields the bus back to the CPU;
//   - video_module reads the 320x240 frame buffer at word address FB_BASE
//     through the RAM's second port and drives a VGA DAC at 640x480;
//   - audio_module runs the AC97 codec link; bit PLAY_BIT of the CPU's direct
//     output register is its 'play' line and the 'record_sw' switch selects
//     recording;
//   - flash_rom_controller stores recorded samples to, and plays them back
//     from, the external flash; 'erase_sw' erases the whole flash.
// Bus devices other than the CPU (0) and the pad are absent: their requests
// are idle and they never yield. External interrupt lines 6..1 are ports.
// Everything except the AC97 frame logic runs on the 27 MHz system clock 'clk';
// reset is synchronous and active high.
module ddr_system
  import ddr_pkg::*;
#(
  parameter int          WORDS    = 56320,
  parameter int unsigned CLK_HZ   = 27_000_000,
  parameter int unsigned IRQ_HZ   = 100,
  parameter int          PAD_DEV  = 3,
  parameter logic [31:0] PAD_ADDR = 32'h0000_6000,
  parameter logic [15:0] FB_BASE  = 16'h45FC,       // byte address 0x117F0
  parameter int          PLAY_BIT = 2,
  parameter int          H_ACTIVE = 640,
  parameter int          H_FP     = 16,
  parameter int          H_SYNC   = 96,
  parameter int          H_BP     = 48,
  parameter int          V_ACTIVE = 480,
  parameter int          V_FP     = 10,
  parameter int          V_SYNC   = 2,
  parameter int          V_BP     = 33,
  parameter int          NBLOCKS  = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [6:1]  irq_ext,
  // dance pad
  input  logic [9:0]  pad_in,
  // VGA DAC and connector
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_blank_n,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  // AC97 codec
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  // switches
  input  logic        record_sw,
  input  logic        erase_sw,
  // flash chip
  output logic [23:0] fl_addr,
  output logic        fl_ce_b,
  output logic        fl_oe_b,
  output logic        fl_we_b,
  output logic        fl_rp_b,
  output logic [15:0] fl_dout,
  output logic        fl_doe,
  input  logic [15:0] fl_din,
  input  logic        fl_sts,
  // observation
  output logic [3:0]  direct_io,
  output logic [31:0] dbg_pc,
  output logic        dbg_retire,
  output logic        pad_sample,
  output logic        frame_start,
  output logic [1:0]  audio_mode
);
  bus_req_t        dev_req [NDEV];
  bus_req_t        pad_req;
  bus_rsp_t        bus_rsp;
  logic [NDEV-1:0] dev_en, dev_yield;
  logic            pad_yield, erase_q;
  logic [15:0]     vid_addr;
  logic [31:0]     vid_data, dbg_instr;
  logic            fl_start, fl_rd_req, fl_rd_valid, fl_wr_req, fl_busy, fl_erase_done;
  logic [15:0]     fl_rd_data, fl_wr_data;

  always_comb begin
    for (int i = 0; i < NDEV; i++) dev_req[i] = '0;
    dev_req[PAD_DEV] = pad_req;
    dev_yield = '0;
    dev_yield[PAD_DEV] = pad_yield;
  end

  betaputer #(.WORDS(WORDS), .AW(16), .CLK_HZ(CLK_HZ), .IRQ_HZ(IRQ_HZ)) u_computer (
    .clk, .rst, .irq_ext, .dev_req, .dev_yield, .dev_en, .bus_rsp,
    .vid_addr, .vid_data, .direct_io, .dbg_pc, .dbg_instr, .dbg_retire
  );

  pad_controller #(.PAD_ADDR(PAD_ADDR), .NBTN(10)) u_pad (
    .clk, .rst, .pad_in, .bus_en(dev_en[PAD_DEV]), .bus_req(pad_req),
    .bus_yield(pad_yield), .sample_strobe(pad_sample)
  );

  video_module #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
                 .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_video (
    .clk, .rst, .fb_base(FB_BASE), .vid_addr, .vid_data,
    .vga_r, .vga_g, .vga_b, .vga_blank_n, .vga_hsync_n, .vga_vsync_n, .frame_start
  );

  audio_module u_audio (
    .clk, .rst, .ac97_bit_clk, .ac97_sdata_in, .ac97_sync, .ac97_sdata_out,
    .play(direct_io[PLAY_BIT]), .record(record_sw), .mode(audio_mode),
    .fl_start, .fl_rd_req, .fl_rd_valid, .fl_rd_data, .fl_wr_req, .fl_wr_data
  );

  always_ff @(posedge clk) begin
    if (rst) erase_q <= 1'b0;
    else     erase_q <= erase_sw;
  end

  flash_rom_controller #(.NBLOCKS(NBLOCKS)) u_flash (
    .clk, .rst, .erase_all(erase_sw && !erase_q), .start(fl_start),
    .wr_req(fl_wr_req), .wr_data(fl_wr_data), .rd_req(fl_rd_req),
    .rd_valid(fl_rd_valid), .rd_data(fl_rd_data), .busy(fl_busy), .erase_done(fl_erase_done),
    .fl_addr, .fl_ce_b, .fl_oe_b, .fl_we_b, .fl_rp_b, .fl_dout, .fl_doe, .fl_din, .fl_sts
  );
endmodule
