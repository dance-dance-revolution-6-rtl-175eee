// sysram_busintf: RAM controller on the shared memory bus.
//
// Serves reads and writes from whichever device owns the bus, using the block
// RAM sysmem_dp, and passes a second, read-only port through to the video unit.
// Bus protocol: a one-cycle read or write strobe with the byte address (and
// write data). Exactly three cycles after the strobe the controller answers
// with a one-cycle 'done' and, for reads, the data word.
//
// Reads may start at any byte. The controller always reads two neighbouring
// words, the one holding the addressed byte (lo) and the next one (hi), and
// returns the 32 bits starting at the addressed byte: ({hi, lo} >> 8*offset).
// That is little-endian byte order, as the CPU's memory model requires. Writes
// must be word aligned: the two low address bits are ignored, since the RAM has
// no byte enables. Only address bits [AW+1:2] select a word; higher bus address
// bits are discarded.
//
// States: IDLE -> RD_LO -> RD_HI -> IDLE (done) for reads, IDLE -> WRITE ->
// WRDELAY0 -> IDLE (done) for writes, so both take three cycles and the
// controller is idle again when 'done' is seen. Strobes arriving while the
// controller is busy are ignored.
module sysram_busintf
  import ddr_pkg::*;
#(
  parameter int WORDS = 56320,
  parameter int AW    = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  bus_req_t      bus_req,
  output bus_rsp_t      bus_rsp,
  input  logic [AW-1:0] vid_addr,
  output logic [31:0]   vid_data
);
  typedef enum logic [2:0] {M_IDLE, M_RD_LO, M_RD_HI, M_WRITE, M_WRDELAY0} mstate_t;
  mstate_t state;

  logic [AW-1:0] word_addr;
  logic [1:0]    byte_off;
  logic [31:0]   wr_data, lo_word, ram_dout;
  logic [AW-1:0] ram_addr;
  logic [63:0]   both;

  always_comb begin
    unique case (state)
      M_IDLE:  ram_addr = bus_req.addr[AW+1:2];
      M_RD_LO: ram_addr = word_addr + 1'b1;
      default: ram_addr = word_addr;
    endcase
  end

  sysmem_dp #(.WORDS(WORDS), .AW(AW)) u_mem (
    .clk,
    .addra(ram_addr), .dina(wr_data), .wea(state == M_WRITE), .douta(ram_dout),
    .addrb(vid_addr), .doutb(vid_data)
  );

  assign both = {ram_dout, lo_word};

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= M_IDLE;
      word_addr <= '0;
      byte_off  <= '0;
      wr_data   <= '0;
      lo_word   <= '0;
      bus_rsp   <= '0;
    end else begin
      bus_rsp.done <= 1'b0;
      unique case (state)
        M_IDLE: begin
          word_addr <= bus_req.addr[AW+1:2];
          byte_off  <= bus_req.addr[1:0];
          wr_data   <= bus_req.data;
          if (bus_req.re)      state <= M_RD_LO;
          else if (bus_req.we) state <= M_WRITE;
        end
        M_RD_LO: begin
          lo_word <= ram_dout;
          state   <= M_RD_HI;
        end
        M_RD_HI: begin
          bus_rsp.data <= 32'(both >> {byte_off, 3'b000});
          bus_rsp.done <= 1'b1;
          state        <= M_IDLE;
        end
        M_WRITE:    state <= M_WRDELAY0;
        M_WRDELAY0: begin
          bus_rsp.done <= 1'b1;
          state        <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
