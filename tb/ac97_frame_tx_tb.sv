// ac97_frame_tx_tb: drives the transmitter with a free-running bit_count and
// decodes its output serially, the way a codec would (the bit registered at
// bit_count p is read while bit_count is p+1). Over more than nine frames it
// checks the slot-0 tags, the command address/data of each frame against the
// nine-entry configuration table and the vendor-ID read that follows, and the
// PCM slots with and without data requests.
module ac97_frame_tx_tb;
  logic bit_clk = 0, rst = 1, req_left = 0, req_right = 0, sdata_out;
  logic [7:0] bit_count = 8'd255;
  logic [19:0] pcm_left = 0, pcm_right = 0;
  logic [14:0] frame_count;
  logic [255:0] f;
  int checks = 0, failures = 0;
  logic [23:0] table_cmds [9] = '{24'h02_0000, 24'h04_0000, 24'h0C_FFFF, 24'h0E_FFFF, 24'h10_FFFF,
                                  24'h1A_0404, 24'h1C_0000, 24'h18_0808, 24'h20_8000};

  ac97_frame_tx dut (.*);
  always #40 bit_clk = !bit_clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge bit_clk) if (!rst) bit_count <= 8'(bit_count + 1);

  initial begin
    logic [23:0] exp; logic [19:0] a, d, l, r; logic vl, vr;
    int fr;
    fr = -1;
    repeat (2) @(negedge bit_clk); rst = 0;
    forever begin
      @(negedge bit_clk);
      f[8'(bit_count - 1)] = sdata_out;
      if (bit_count == 8'd0) begin
        if (fr >= 0) begin
          for (int i = 0; i < 20; i++) begin a[19-i] = f[16+i]; d[19-i] = f[36+i]; l[19-i] = f[56+i]; r[19-i] = f[76+i]; end
          exp = (fr < 9) ? table_cmds[fr] : 24'hFC_0000;
          chk(f[0] && f[1] && f[2], "slot 0 valid tags");
          chk(f[3] == vl && f[4] == vr, "PCM valid tags");
          chk(a == {exp[23:16], 12'h0} && d == {exp[15:0], 4'h0}, $sformatf("frame %0d command %h %h", fr, a, d));
          chk(l == (vl ? pcm_left : 0) && r == (vr ? pcm_right : 0), "PCM slots");
          chk(f[255:96] == 0, "unused slots zero");
          chk(dut.frame_count == 15'(fr + 1), "frame counter");
        end
        fr++;
        if (fr == 12) break;
        vl = 1'($urandom); vr = 1'($urandom);
        req_left = vl; req_right = vr;
        pcm_left = 20'($urandom); pcm_right = 20'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
