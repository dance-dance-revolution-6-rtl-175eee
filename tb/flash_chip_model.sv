// flash_chip_model: behavioural model of an Intel 28F128J3A flash in x16 mode,
// for testbenches only. It is clocked by the system clock and looks at the
// pins once per clock, on the falling edge.
//
// A chip write happens when WE# goes high after being low with CE# low; the
// value that was on the data pins in the last low cycle is taken, and the
// FPGA must have been driving them then. Commands: 0xFF read array,
// 0x20 + 0xD0 block erase (all words of the 64K-word block become 0xFFFF),
// 0x40 + data word program (bits can only be cleared, as in a real flash).
// After an erase or program, STS goes low for ERASE_BUSY / PROG_BUSY clocks and
// the chip is left in status mode: reads return the status register (0x80 when
// ready) until a read-array command. Reads need CE# and OE# low; data is
// returned from an array that starts erased. Protocol errors (writes while
// busy, undriven data, a wrong confirm code, WE# pulses shorter than
// MIN_WE clocks, address changes during WE#) are counted in 'errors'.
module flash_chip_model #(
  parameter int ERASE_BUSY = 300,
  parameter int PROG_BUSY  = 40,
  parameter int MIN_WE     = 3
) (
  input  logic        clk,
  input  logic [23:0] fl_addr,
  input  logic        fl_ce_b,
  input  logic        fl_oe_b,
  input  logic        fl_we_b,
  input  logic        fl_rp_b,
  input  logic [15:0] fl_dout,
  input  logic        fl_doe,
  output logic [15:0] fl_din,
  output logic        fl_sts,
  output int          errors,
  output int          n_erase,
  output int          n_prog,
  output int          n_rdarr
);
  logic [15:0] mem [int];
  typedef enum {C_ARRAY, C_STATUS, C_ERASE1, C_PROG1} cmode_t;
  cmode_t cm = C_ARRAY;
  int busy = 0, we_len = 0;
  logic we_q = 1, doe_q = 0;
  logic [15:0] d_q;
  logic [23:0] a_q, a_we;
  int erased_blocks [int];

  initial begin errors = 0; n_erase = 0; n_prog = 0; n_rdarr = 0; end

  function automatic logic [15:0] rd(input int w);
    return mem.exists(w) ? mem[w] : 16'hFFFF;
  endfunction

  assign fl_sts = (busy == 0);
  always_comb begin
    if (fl_ce_b || fl_oe_b)  fl_din = 16'hDEAD;   // not driven by the chip
    else if (cm == C_ARRAY)  fl_din = rd(int'(fl_addr[23:1]));
    else                     fl_din = (busy == 0) ? 16'h0080 : 16'h0000;
  end

  always @(negedge clk) begin
    if (busy > 0) busy <= busy - 1;
    if (!fl_we_b && !fl_ce_b) begin
      if (we_q) a_we <= fl_addr;
      else if (fl_addr != a_we) errors <= errors + 1;
      we_len <= we_len + 1;
    end
    if (fl_we_b && !we_q) begin
      we_len <= 0;
      if (!doe_q || we_len < MIN_WE || busy > 0 || !fl_rp_b) begin
        errors <= errors + 1;
        $display("flash model: bad write cycle (doe %b len %0d busy %0d) at %0t", doe_q, we_len, busy, $time);
      end
      unique case (cm)
        C_ERASE1: begin
          if (d_q == 16'h00D0) begin
            int doomed [$];
            foreach (mem[w]) if (w / 65536 == int'(a_q[23:17])) doomed.push_back(w);
            foreach (doomed[i]) mem.delete(doomed[i]);
            n_erase <= n_erase + 1;
            erased_blocks[int'(a_q[23:17])] = 1;
            busy <= ERASE_BUSY;
          end else errors <= errors + 1;
          cm <= C_STATUS;
        end
        C_PROG1: begin
          mem[int'(a_q[23:1])] = rd(int'(a_q[23:1])) & d_q;
          n_prog <= n_prog + 1;
          busy <= PROG_BUSY;
          cm <= C_STATUS;
        end
        default: begin
          if (d_q == 16'h00FF) begin cm <= C_ARRAY; n_rdarr <= n_rdarr + 1; end
          else if (d_q == 16'h0020) cm <= C_ERASE1;
          else if (d_q == 16'h0040) cm <= C_PROG1;
          else if (d_q == 16'h0070) cm <= C_STATUS;
          else errors <= errors + 1;
        end
      endcase
    end
    we_q  <= fl_we_b;
    doe_q <= fl_doe;
    d_q   <= fl_dout;
    a_q   <= fl_addr;
  end
endmodule
