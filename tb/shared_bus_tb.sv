// shared_bus_tb: random requests from all sixteen masters with a random one-hot
// grant; the slave side must see exactly the granted master's request.
module shared_bus_tb;
  import ddr_pkg::*;
  bus_req_t m_req [NDEV];
  bus_req_t s_req;
  logic [NDEV-1:0] dev_en;
  int checks = 0, failures = 0;

  shared_bus dut (.m_req, .dev_en, .s_req);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int k;
      for (int i = 0; i < NDEV; i++) m_req[i] = {$urandom, $urandom};
      k = $urandom_range(0, NDEV - 1);
      dev_en = NDEV'(1) << k;
      #1;
      checks++;
      if (s_req != m_req[k]) failures++;
    end
    dev_en = '0; #1 checks++; if (s_req != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
