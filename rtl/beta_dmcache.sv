// beta_dmcache: direct-mapped, write-through unified cache for the Beta CPU.
//
// Sits between the control FSM and the bus access client and has the same
// request/ready interface on both sides. 512 lines of one word each; a line
// is 53 bits, a 21-bit tag (address bits 31:11) and the 32-bit word, indexed
// by address bits 10:2; a separate register holds one valid bit per line.
//   Read hit:  the request is seen in IDLE, the line is read in LOOKUP, and
//              ready is given in DONE, two cycles after the request.
//   Read miss: the read goes to the bus client; the word it returns is written
//              into the line (tag, valid) and passed on.
//   Write:     the line is invalidated and the write goes through to the bus;
//              ready is given only when the bus client has finished it.
// Unaligned reads are passed through without being cached. A store to the bus
// access vector hands the bus to another master that may write RAM, so it
// clears every valid bit. Size, line format, hit timing and the write-through
// policy follow the source design, which disabled the cache once main memory
// moved to block RAM (beta_cpu keeps it off by default); the invalidate-all on
// a bus hand-over is this design's choice.
module beta_dmcache
  import ddr_pkg::*;
#(
  parameter int LINES = 512
) (
  input  logic        clk,
  input  logic        rst,
  // from the control FSM
  input  logic        ifetch_req,
  input  logic        memop_req,
  input  logic        wr,
  input  logic        rd,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        ifetch_ready,
  output logic        memop_ready,
  output logic [31:0] rdata,
  // to the bus access client
  output logic        d_ifetch_req,
  output logic        d_memop_req,
  output logic        d_wr,
  output logic        d_rd,
  output logic [31:0] d_addr,
  output logic [31:0] d_wdata,
  input  logic        d_ifetch_ready,
  input  logic        d_memop_ready,
  input  logic [31:0] d_rdata
);
  localparam int IW = $clog2(LINES);
  localparam int TW = 32 - IW - 2;

  typedef enum logic [1:0] {K_IDLE, K_LOOKUP, K_DOWN, K_DONE} kstate_t;
  kstate_t state;

  logic [TW+31:0]  lines [LINES];
  logic [TW+31:0]  line_q;
  logic [LINES-1:0] valid;
  logic            is_fetch, op_wr, op_rd, hit;
  logic [31:0]     op_addr, op_data;
  logic [IW-1:0]   idx;
  logic [TW-1:0]   tag;
  logic            fill;

  assign idx = op_addr[IW+1:2];
  assign tag = op_addr[31:IW+2];
  assign hit = valid[idx] && line_q[TW+31:32] == tag;

  // line storage: one synchronous read and one write port
  always_ff @(posedge clk) begin
    if (fill) lines[idx] <= {tag, d_rdata};
    line_q <= lines[addr[IW+1:2]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= K_IDLE;
      valid    <= '0;
      is_fetch <= 1'b0;
      op_wr    <= 1'b0;
      op_rd    <= 1'b0;
      op_addr  <= '0;
      op_data  <= '0;
      rdata    <= '0;
    end else begin
      unique case (state)
        K_IDLE: if (ifetch_req || memop_req) begin
          is_fetch <= ifetch_req;
          op_wr    <= !ifetch_req && wr;
          op_rd    <= ifetch_req || rd;
          op_addr  <= addr;
          op_data  <= wdata;
          if (!ifetch_req && wr) begin
            if (addr == BAXV_ADDR) valid <= '0;
            else                   valid[addr[IW+1:2]] <= 1'b0;
            state <= K_DOWN;
          end else if ((ifetch_req || rd) && addr[1:0] == 2'b00) begin
            state <= K_LOOKUP;
          end else begin
            state <= K_DOWN;
          end
        end
        K_LOOKUP: begin
          if (hit) begin
            rdata <= line_q[31:0];
            state <= K_DONE;
          end else begin
            state <= K_DOWN;
          end
        end
        K_DOWN: if (d_ifetch_ready || d_memop_ready) begin
          rdata <= d_rdata;
          if (op_rd && op_addr[1:0] == 2'b00) valid[idx] <= 1'b1;
          state <= K_DONE;
        end
        K_DONE:  state <= K_IDLE;
        default: state <= K_IDLE;
      endcase
    end
  end

  assign fill = (state == K_DOWN) && (d_ifetch_ready || d_memop_ready) && op_rd && op_addr[1:0] == 2'b00;

  assign d_ifetch_req = (state == K_DOWN) && is_fetch;
  assign d_memop_req  = (state == K_DOWN) && !is_fetch;
  assign d_wr         = op_wr;
  assign d_rd         = op_rd && !is_fetch;
  assign d_addr       = op_addr;
  assign d_wdata      = op_data;
  assign ifetch_ready = (state == K_DONE) && is_fetch;
  assign memop_ready  = (state == K_DONE) && !is_fetch;
endmodule
