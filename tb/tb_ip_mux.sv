// tb_ip_mux: random vectors on both input groups; the output must equal the
// group chosen by test_sel.
module tb_ip_mux;
  logic       test_sel, t_rd, t_wr, n_rd, n_wr, m_rd, m_wr;
  logic [3:0] t_addr, n_addr, m_addr;
  logic [0:0] t_data, n_data, m_data;
  int checks = 0, failures = 0;

  ip_mux dut (.test_sel, .t_addr, .t_data, .t_rd, .t_wr, .n_addr, .n_data,
              .n_rd, .n_wr, .m_addr, .m_data, .m_rd, .m_wr);

  initial begin
    for (int i = 0; i < 500; i++) begin
      {test_sel, t_rd, t_wr, n_rd, n_wr} = 5'($urandom);
      t_addr = 4'($urandom); n_addr = 4'($urandom);
      t_data = 1'($urandom); n_data = 1'($urandom);
      #1;
      checks++;
      if (test_sel ? (m_addr !== t_addr || m_data !== t_data || m_rd !== t_rd || m_wr !== t_wr)
                   : (m_addr !== n_addr || m_data !== n_data || m_rd !== n_rd || m_wr !== n_wr)) begin
        failures++; $display("FAIL vector %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
