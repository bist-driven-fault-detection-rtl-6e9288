// tb_op_mux: random vectors; the output must be the redundant data on a hit
// and the memory data otherwise.
module tb_op_mux;
  logic       rl_hit;
  logic [7:0] rl_data, mem_out, mux_out;
  int checks = 0, failures = 0;

  op_mux #(.DATA_W(8)) dut (.rl_hit, .rl_data, .mem_out, .mux_out);

  initial begin
    for (int i = 0; i < 300; i++) begin
      rl_hit = 1'($urandom); rl_data = 8'($urandom); mem_out = 8'($urandom);
      #1;
      checks++;
      if (mux_out !== (rl_hit ? rl_data : mem_out)) begin failures++; $display("FAIL %0d", i); end
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
