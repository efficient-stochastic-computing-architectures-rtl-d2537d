// tb_sc_counter: drives random streams with a known number of ones into
// the stochastic-to-binary counter and checks the count, that done comes
// exactly LENGTH cycles after start and lasts one cycle, that busy is high
// only inside the window, and that ones outside the window are ignored.
module tb_sc_counter;
  localparam int L = 1024;
  logic clk = 0, rst_n = 0, start = 0, bit_in = 0;
  logic [10:0] count;
  logic done, busy;
  int checks = 0, failures = 0;

  sc_counter #(.LENGTH(L)) dut (.clk, .rst_n, .start, .bit_in, .count, .done, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int ones, cyc, thr [4] = '{0, 100, 700, 1000};
  bit b;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    foreach (thr[k]) begin
      ones = 0;
      // window: start is high with the first bit
      for (int i = 0; i < L; i++) begin
        b = (k == 3) ? 1'b1 : (($urandom % 1000) < thr[k]);
        if (k == 0) b = 0;
        start = (i == 0); bit_in = b; ones += int'(b);
        @(negedge clk);
        check(done == (i == L - 1), $sformatf("done wrong after bit %0d", i));
        check(busy == (i < L - 1), $sformatf("busy wrong at %0d", i));
      end
      check(count == 11'(ones), $sformatf("count %0d expected %0d", count, ones));
      start = 0; bit_in = 1;  // ones after the window must not count
      check(count == 11'(ones), $sformatf("count %0d expected %0d", count, ones));
      @(negedge clk);
      check(done == 1'b0, "done longer than one cycle");
      check(count == 11'(ones), "count not held");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
