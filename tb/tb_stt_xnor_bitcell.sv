// tb_stt_xnor_bitcell: writes both weight values and checks the cell's
// XNOR truth table for every word-line / bit-line / enable combination,
// and that a write is ignored unless word line and column are both on.
module tb_stt_xnor_bitcell;
  logic clk = 0, wl = 0, bl0 = 0, bl1 = 0, bl_act = 0, wr = 0;
  logic xnor_out, w;
  int checks = 0, failures = 0;

  stt_xnor_bitcell dut (.clk, .wl, .bl0, .bl1, .bl_act, .wr, .xnor_out, .w);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input bit val, input bit wlv, input bit act);
    @(negedge clk);
    wl = wlv; bl_act = act; bl0 = val; bl1 = !val; wr = 1;
    @(negedge clk);
    wr = 0; wl = 0; bl_act = 0;
  endtask

  bit wv, s;

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      wv = rep[0];
      write(wv, 1, 1);
      check(w == wv, "write stores BL0");
      write(!wv, 0, 1);
      check(w == wv, "write without word line ignored");
      write(!wv, 1, 0);
      check(w == wv, "write on an inactive column ignored");
      for (int c = 0; c < 8; c++) begin
        s = c[0]; wl = c[1]; bl_act = c[2];
        bl0 = s; bl1 = !s;
        #1;
        check(xnor_out == (wl && bl_act && (wv == s)),
              $sformatf("w=%0d s=%0d wl=%0d act=%0d out=%0d", wv, s, wl, bl_act, xnor_out));
      end
      wl = 0; bl_act = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
