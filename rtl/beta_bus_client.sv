// beta_bus_client: the Beta CPU's access client on the shared memory bus.
//
// Serves instruction fetches and data loads/stores from the control FSM. A
// request waits in IDLE while the CPU does not own the bus ('bus_en' low).
// Once it does, the client drives a one-cycle read or write strobe with the
// address (and data) in ISSUE, waits in WAIT for the memory's 'done' strobe,
// and reports completion for one cycle in DONE (ifetch_ready or memop_ready,
// with the read word on 'rdata').
//
// Two store addresses never reach the bus. A store to BAXV_ADDR (the bus access
// vector) sends the low four data bits to the bus arbiter as the new owner with
// a one-cycle 'baxv_chg' pulse; the store then completes only after the bus has
// been taken away and handed back to the CPU (at once if the new owner is the
// CPU itself, device 0). A store to DIRECTIO_ADDR loads the 4-bit 'direct_io'
// output register (used as the audio "play" line) and completes at once.
// Both addresses and the BAXv behaviour follow the source design; the 'done'
// strobe replaces a fixed wait count and is this design's choice.
module beta_bus_client
  import ddr_pkg::*;
(
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
  // shared bus
  input  logic        bus_en,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp,
  // arbiter control and direct I/O
  output logic        baxv_chg,
  output logic [3:0]  baxv,
  output logic [3:0]  direct_io
);
  typedef enum logic [2:0] {C_IDLE, C_ISSUE, C_WAIT, C_BAX_DROP, C_BAX_BACK, C_DONE} cstate_t;
  cstate_t state;

  logic        is_fetch;
  logic        op_we;
  logic [31:0] op_addr, op_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_IDLE;
      is_fetch  <= 1'b0;
      op_we     <= 1'b0;
      op_addr   <= '0;
      op_data   <= '0;
      rdata     <= '0;
      baxv_chg  <= 1'b0;
      baxv      <= '0;
      direct_io <= '0;
    end else begin
      baxv_chg <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (ifetch_req || memop_req) begin
            is_fetch <= ifetch_req;
            op_we    <= !ifetch_req && wr;
            op_addr  <= addr;
            op_data  <= wdata;
            if (!ifetch_req && wr && addr == BAXV_ADDR) begin
              baxv_chg <= 1'b1;
              baxv     <= wdata[3:0];
              state    <= (wdata[3:0] == 4'd0) ? C_DONE : C_BAX_DROP;
            end else if (!ifetch_req && wr && addr == DIRECTIO_ADDR) begin
              direct_io <= wdata[3:0];
              state     <= C_DONE;
            end else if (bus_en && (ifetch_req || rd || wr)) begin
              state <= C_ISSUE;
            end
          end
        end
        C_ISSUE: state <= C_WAIT;
        C_WAIT: begin
          if (bus_rsp.done) begin
            rdata <= bus_rsp.data;
            state <= C_DONE;
          end
        end
        C_BAX_DROP: if (!bus_en) state <= C_BAX_BACK;
        C_BAX_BACK: if (bus_en)  state <= C_DONE;
        C_DONE:     state <= C_IDLE;
        default:    state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_req      = '0;
    bus_req.re   = (state == C_ISSUE) && !op_we;
    bus_req.we   = (state == C_ISSUE) && op_we;
    bus_req.addr = op_addr[BUS_AW-1:0];
    bus_req.data = op_data;
  end

  assign ifetch_ready = (state == C_DONE) && is_fetch;
  assign memop_ready  = (state == C_DONE) && !is_fetch;
endmodule
