// tb_sew_gate: random vectors against s_out = ~o & s_prev, plus the
// identity case o = 0.
module tb_sew_gate;
  localparam int N = 32;
  logic [N-1:0] o, s_prev, s_out;
  int checks = 0, failures = 0;

  sew_gate #(.N(N)) dut (.o, .s_prev, .s_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      o = (n == 0) ? '0 : N'($urandom); s_prev = N'($urandom);
      #1;
      for (int i = 0; i < N; i++)
        check(s_out[i] == (o[i] ? 1'b0 : s_prev[i]), $sformatf("bit %0d", i));
      if (n == 0) check(s_out == s_prev, "identity when no neuron fires");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
