// pad_controller: stores the dance pad's state into shared RAM over the bus.
//
// The ten button lines are synchronized (pad_sync) and then sampled by a small
// FSM. It waits in WAIT_SAMPLE until the bus arbiter grants it the bus (a rising
// edge of 'bus_en', caused by the kernel storing this device's number to the
// bus access vector). It then writes the synchronized buttons, zero-extended to
// 32 bits, to the word at PAD_ADDR: the write strobe, address and data are held
// for two cycles (STORE0, STORE1; the RAM controller acts on the first). Seven
// wait states (WAIT0..WAIT6) cover the RAM controller's write latency so that
// it is idle again when the bus changes hands. The FSM then raises 'bus_yield'
// for two cycles (YIELD0, YIELD1), stalls for two (STALL0, STALL1) and returns
// to WAIT_SAMPLE. After yielding it never drives the bus again until the next
// grant; acting on the rising edge of the grant keeps one grant from causing
// two samples.
//
// The state sequence and cycle counts follow the source design. PAD_ADDR (the
// game's step buffer address) and the edge-triggered start are this design's
// choices. The bus request's address, read strobe and upper data bits are
// constant by design; only the write strobe and the low NBTN data bits change.
module pad_controller
  import ddr_pkg::*;
#(
  parameter logic [31:0] PAD_ADDR = 32'h0000_6000,
  parameter int          NBTN     = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NBTN-1:0] pad_in,
  input  logic            bus_en,
  output bus_req_t        bus_req,
  output logic            bus_yield,
  output logic            sample_strobe   // one cycle per stored sample
);
  typedef enum logic [3:0] {
    P_WAIT_SAMPLE, P_STORE0, P_STORE1,
    P_WAIT0, P_WAIT1, P_WAIT2, P_WAIT3, P_WAIT4, P_WAIT5, P_WAIT6,
    P_YIELD0, P_YIELD1, P_STALL0, P_STALL1
  } pstate_t;
  pstate_t state;

  logic [NBTN-1:0] btn, sample;
  logic            bus_en_q;

  pad_sync #(.W(NBTN)) u_sync (.clk, .rst, .d(pad_in), .q(btn));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= P_WAIT_SAMPLE;
      sample   <= '0;
      bus_en_q <= 1'b0;
    end else begin
      bus_en_q <= bus_en;
      unique case (state)
        P_WAIT_SAMPLE: if (bus_en && !bus_en_q) begin
          sample <= btn;
          state  <= P_STORE0;
        end
        P_STALL1: state <= P_WAIT_SAMPLE;
        default:  state <= pstate_t'(state + 1'b1);
      endcase
    end
  end

  always_comb begin
    bus_req      = '0;
    bus_req.we   = (state == P_STORE0) || (state == P_STORE1);
    bus_req.addr = PAD_ADDR[BUS_AW-1:0];
    bus_req.data = 32'(sample);
  end

  assign bus_yield     = (state == P_YIELD0) || (state == P_YIELD1);
  assign sample_strobe = (state == P_STORE0);

  a_no_drive_after_yield: assert property (@(posedge clk) disable iff (rst)
    (state inside {P_YIELD0, P_YIELD1, P_STALL0, P_STALL1}) |-> !bus_req.we);
endmodule
