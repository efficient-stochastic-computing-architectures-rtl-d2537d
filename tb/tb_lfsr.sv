// tb_lfsr: checks the 10-bit LFSR against an independent reference model
// of the x^10+x^7+1 recurrence (new bit = s[9] ^ s[6], shifted in at bit
// 0), that the state never reaches 0, that the period is exactly 1023,
// that every non-zero value occurs once per period, and that en = 0 holds
// the state.
module tb_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] state;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(10), .SEED(10'h155)) dut (.clk, .rst_n, .en, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic [9:0] model;
  bit seen [1024];
  int period;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 10'h155, "reset loads seed");
    model = 10'h155;
    // hold
    repeat (3) @(negedge clk);
    check(state == 10'h155, "en=0 holds state");
    en = 1;
    period = 0;
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 1023; i++) begin
      @(negedge clk);
      model = {model[8:0], model[9] ^ model[6]};
      check(state == model, $sformatf("state %0d mismatch %h vs %h", i, state, model));
      check(state != 0, "state zero");
      check(!seen[state], "value repeated within period");
      seen[state] = 1;
    end
    check(state == 10'h155, "period is 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
