// flash_rom_controller: major FSM of the flash ROM controller.
//
// Accepts high-level requests and runs them through flash_minor_fsm, which
// drives the chip. It keeps a word pointer into the flash:
//   erase_all  erase every one of the NBLOCKS blocks in turn (block b starts at
//              word b*BLOCK_WORDS; the block is named by the top 7 address
//              bits), waiting for each erase to finish before the next
//   start      set the pointer back to the first word
//   wr_req     program 'wr_data' at the pointer, then advance it
//   rd_req     read the word at the pointer into 'rd_data' (one-clock
//              'rd_valid'), then advance it. After an erase or program the
//              chip is in status mode, so a read-array command is issued first
//              whenever the last operation was not a read.
// Requests arriving while the controller is busy are dropped: the chip's
// program time is far longer than an audio sample period, so only a few
// samples per second are actually stored. 'busy' is high while an operation
// runs; 'erase_done' pulses when the whole erase is finished.
// The major/minor split, the erase loop and the read-array rule follow the
// source design; the pointer-based sequencing is this design's choice.
module flash_rom_controller #(
  parameter int NBLOCKS     = 128,
  parameter int BLOCK_WORDS = 65536,
  parameter int READ_CYC    = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        erase_all,
  input  logic        start,
  input  logic        wr_req,
  input  logic [15:0] wr_data,
  input  logic        rd_req,
  output logic        rd_valid,
  output logic [15:0] rd_data,
  output logic        busy,
  output logic        erase_done,
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
  typedef enum logic [2:0] {J_IDLE, J_ERASE, J_ERASE_WAIT, J_WRITE_WAIT, J_SETUP_WAIT, J_READ, J_READ_WAIT} jstate_t;
  jstate_t state;

  logic        go, m_busy, m_done, read_mode;
  logic [1:0]  op;
  logic [22:0] ptr, m_addr;
  logic [15:0] m_wdata, m_rdata;
  logic [7:0]  blk;

  flash_minor_fsm #(.READ_CYC(READ_CYC)) u_minor (
    .clk, .rst, .go, .op, .addr(m_addr), .wdata(m_wdata), .busy(m_busy), .done(m_done),
    .rdata(m_rdata), .fl_addr, .fl_ce_b, .fl_oe_b, .fl_we_b, .fl_rp_b, .fl_dout, .fl_doe,
    .fl_din, .fl_sts
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= J_IDLE;
      go         <= 1'b0;
      op         <= '0;
      m_addr     <= '0;
      m_wdata    <= '0;
      ptr        <= '0;
      blk        <= '0;
      read_mode  <= 1'b0;
      rd_valid   <= 1'b0;
      rd_data    <= '0;
      erase_done <= 1'b0;
    end else begin
      go         <= 1'b0;
      rd_valid   <= 1'b0;
      erase_done <= 1'b0;
      unique case (state)
        J_IDLE: begin
          if (erase_all) begin
            blk   <= '0;
            state <= J_ERASE;
          end else if (start) begin
            ptr <= '0;
          end else if (wr_req) begin
            go <= 1'b1; op <= 2'd1; m_addr <= ptr; m_wdata <= wr_data;
            read_mode <= 1'b0;
            state <= J_WRITE_WAIT;
          end else if (rd_req) begin
            if (read_mode) begin
              state <= J_READ;
            end else begin
              go <= 1'b1; op <= 2'd2; m_addr <= ptr;
              read_mode <= 1'b1;
              state <= J_SETUP_WAIT;
            end
          end
        end
        J_ERASE: begin
          go <= 1'b1; op <= 2'd0;
          m_addr <= 23'(int'(blk) * BLOCK_WORDS);
          read_mode <= 1'b0;
          state <= J_ERASE_WAIT;
        end
        J_ERASE_WAIT: if (m_done) begin
          if (int'(blk) == NBLOCKS - 1) begin
            erase_done <= 1'b1;
            state      <= J_IDLE;
          end else begin
            blk   <= blk + 1'b1;
            state <= J_ERASE;
          end
        end
        J_WRITE_WAIT: if (m_done) begin
          ptr   <= ptr + 1'b1;
          state <= J_IDLE;
        end
        J_SETUP_WAIT: if (!go && !m_busy) state <= J_READ;
        J_READ: begin
          go <= 1'b1; op <= 2'd3; m_addr <= ptr;
          state <= J_READ_WAIT;
        end
        J_READ_WAIT: if (m_done) begin
          rd_data  <= m_rdata;
          rd_valid <= 1'b1;
          ptr      <= ptr + 1'b1;
          state    <= J_IDLE;
        end
        default: state <= J_IDLE;
      endcase
    end
  end

  assign busy = (state != J_IDLE);
endmodule
