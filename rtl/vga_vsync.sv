// vga_vsync: vertical (major) FSM of the VGA video unit.
//
// Counts the lines that the horizontal FSM finishes ('line_done') and walks
// through front porch, sync pulse, back porch and V_ACTIVE display lines, then
// starts again at the front porch. After reset it holds 'run' low for one clock
// and then keeps it high, which starts the horizontal FSM. 'line_active' and
// 'line' (0..V_ACTIVE-1) tell the horizontal FSM whether the current line
// shows frame-buffer data and which one. 'vsync_n' (active low) and
// 'frame_start' (one clock at the start of the display lines) change at line
// boundaries. State order follows the source design; porch and sync lengths are
// standard 640x480 VGA values.
module vga_vsync #(
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       line_done,
  output logic       run,
  output logic       line_active,
  output logic [9:0] line,
  output logic       vsync_n,
  output logic       frame_start
);
  typedef enum logic [1:0] {V_FPORCH, V_SYNCP, V_BPORCH, V_OUT} vstate_t;
  vstate_t state;
  logic [9:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= V_FPORCH;
      count       <= '0;
      run         <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      run         <= 1'b1;
      frame_start <= 1'b0;
      if (line_done) begin
        count <= count + 1'b1;
        unique case (state)
          V_FPORCH: if (count == 10'(V_FP - 1))     begin count <= '0; state <= V_SYNCP;  end
          V_SYNCP:  if (count == 10'(V_SYNC - 1))   begin count <= '0; state <= V_BPORCH; end
          V_BPORCH: if (count == 10'(V_BP - 1))     begin count <= '0; state <= V_OUT; frame_start <= 1'b1; end
          V_OUT:    if (count == 10'(V_ACTIVE - 1)) begin count <= '0; state <= V_FPORCH; end
          default:  state <= V_FPORCH;
        endcase
      end
    end
  end

  assign line_active = (state == V_OUT);
  assign line        = (state == V_OUT) ? count : 10'd0;
  assign vsync_n     = (state != V_SYNCP);
endmodule
