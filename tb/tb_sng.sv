// tb_sng: checks the stochastic number generator.  Random (value, rnd)
// pairs are compared with the rule bit = (rnd <= value); then an LFSR
// sweeps all 1023 non-zero random numbers once, so the number of ones must
// equal the encoded value exactly (P = value / 1023).
module tb_sng;
  logic clk = 0, rst_n = 0;
  logic [9:0] value, rnd, lrnd;
  logic bit_out, lbit;
  int checks = 0, failures = 0;

  sng #(.WIDTH(10)) dut  (.value(value), .rnd(rnd),  .bit_out(bit_out));
  sng #(.WIDTH(10)) dut2 (.value(value), .rnd(lrnd), .bit_out(lbit));
  lfsr #(.WIDTH(10), .SEED(10'h2A3)) u_l (.clk, .rst_n, .en(1'b1), .state(lrnd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int ones;
  int vals [6] = '{0, 1, 123, 512, 1000, 1023};

  initial begin
    for (int i = 0; i < 2000; i++) begin
      value = 10'($urandom); rnd = 10'($urandom);
      #1;
      check(bit_out == (int'(rnd) <= int'(value)), $sformatf("v=%0d r=%0d", value, rnd));
    end
    rnd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (vals[k]) begin
      value = 10'(vals[k]);
      ones = 0;
      for (int i = 0; i < 1023; i++) begin
        @(negedge clk);
        ones += int'(lbit);
      end
      check(ones == vals[k], $sformatf("value %0d gave %0d ones in 1023", vals[k], ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
