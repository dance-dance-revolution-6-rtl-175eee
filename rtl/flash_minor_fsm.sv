// flash_minor_fsm: drives the pins of an Intel 28F128J3A flash in x16 mode.
//
// Takes one operation at a time ('go' with 'op', word address 'addr', data
// 'wdata') and performs it as a sequence of chip bus cycles:
//   ERASE       write 0x20 then 0xD0 to an address in the block, then wait for
//               STS to go low (busy) and back high (ready)
//   PROGRAM     write 0x40 then the data word to the address, wait on STS
//   READ_ARRAY  write 0xFF (puts the chip in read-array mode)
//   READ        hold CE# and OE# low for READ_CYC clocks, then take the word
// Every chip write cycle is: CE# low for one clock, then WE# low for five
// clocks with the data on the bus for the last four, then two clocks with
// everything released. 'done' pulses for one clock at the end of every
// operation except READ_ARRAY, as in the source design; 'busy' is high from
// 'go' until the FSM is idle again. The address goes out as a byte address
// {addr, 0}. RP# is held high. 'fl_doe' enables the FPGA's data drivers.
module flash_minor_fsm #(
  parameter int READ_CYC = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        go,
  input  logic [1:0]  op,          // 0 erase, 1 program, 2 read array, 3 read
  input  logic [22:0] addr,
  input  logic [15:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  // chip pins
  output logic [23:0] fl_addr,
  output logic        fl_ce_b,
  output logic        fl_oe_b,
  output logic        fl_we_b,
  output logic        fl_rp_b,
  output logic [15:0] fl_dout,
  output logic        fl_doe,
  input  logic [15:0] fl_din,
  input  logic        fl_sts
);
  localparam logic [1:0] OP_ERASE = 2'd0, OP_PROG = 2'd1, OP_RDARR = 2'd2, OP_READ = 2'd3;

  typedef enum logic [2:0] {F_IDLE, F_CE, F_WE, F_REC, F_WAITLOW, F_WAITHIGH, F_READ, F_DONE} fstate_t;
  fstate_t state;

  logic [1:0]  op_r;
  logic [22:0] addr_r;
  logic [15:0] wdata_r, cmd;
  logic        second;
  logic [4:0]  cnt;

  always_comb begin
    if (!second) begin
      unique case (op_r)
        OP_ERASE: cmd = 16'h0020;
        OP_PROG:  cmd = 16'h0040;
        default:  cmd = 16'h00FF;
      endcase
    end else begin
      cmd = (op_r == OP_ERASE) ? 16'h00D0 : wdata_r;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= F_IDLE;
      op_r    <= '0;
      addr_r  <= '0;
      wdata_r <= '0;
      second  <= 1'b0;
      cnt     <= '0;
      rdata   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        F_IDLE: if (go) begin
          op_r    <= op;
          addr_r  <= addr;
          wdata_r <= wdata;
          second  <= 1'b0;
          cnt     <= '0;
          state   <= (op == OP_READ) ? F_READ : F_CE;
        end
        F_CE:  begin cnt <= '0; state <= F_WE; end
        F_WE:  if (cnt == 5'd4) begin cnt <= '0; state <= F_REC; end
        F_REC: if (cnt == 5'd1) begin
          cnt <= '0;
          if (op_r == OP_RDARR)  state <= F_IDLE;
          else if (!second)      begin second <= 1'b1; state <= F_CE; end
          else                   state <= F_WAITLOW;
        end
        F_WAITLOW:  if (!fl_sts) state <= F_WAITHIGH;
        F_WAITHIGH: if (fl_sts)  state <= F_DONE;
        F_READ: if (cnt == 5'(READ_CYC - 1)) begin
          rdata <= fl_din;
          state <= F_DONE;
        end
        F_DONE:  state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end

  assign busy    = (state != F_IDLE);
  assign done    = (state == F_DONE);
  assign fl_addr = {addr_r, 1'b0};
  assign fl_ce_b = !(state inside {F_CE, F_WE, F_READ});
  assign fl_we_b = !(state == F_WE);
  assign fl_oe_b = !(state == F_READ);
  assign fl_doe  = (state == F_WE) && (cnt != 5'd0);
  assign fl_dout = cmd;
  assign fl_rp_b = 1'b1;
endmodule
