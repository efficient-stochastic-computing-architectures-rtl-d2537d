// tb_bl_driver: checks the bit-line driver one cycle after each request:
// MAC drives every column with (BL0, BL1) = (s, ~s) and all columns
// active; a write activates only the addressed column, carrying the data
// on BL0 and its complement on BL1; an idle cycle drives nothing.
module tb_bl_driver;
  localparam int M = 288;
  logic clk = 0, rst_n = 0, mac_en = 0, wr_en = 0, wr_data = 0;
  logic [M-1:0] spikes, bl0, bl1, bl_act;
  logic [8:0] wr_col;
  int checks = 0, failures = 0;

  bl_driver #(.M(M)) dut (.clk, .rst_n, .mac_en, .spikes, .wr_en, .wr_col, .wr_data, .bl0, .bl1, .bl_act);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [M-1:0] exp_act, s_q;
  int kind, col;
  bit d;

  initial begin
    spikes = '0; wr_col = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      kind = $urandom % 3;
      mac_en = (kind == 0); wr_en = (kind == 1);
      for (int w = 0; w < M; w += 32) spikes[w +: 32] = $urandom;
      col = $urandom % M; wr_col = 9'(col); d = 1'($urandom); wr_data = d;
      s_q = spikes;
      @(negedge clk);
      case (kind)
        0: begin
          check(bl0 == s_q && bl1 == ~s_q && bl_act == '1, "MAC encoding");
        end
        1: begin
          exp_act = '0; exp_act[col] = 1'b1;
          check(bl_act == exp_act, $sformatf("write activates only column %0d", col));
          check(bl0[col] == d && bl1[col] == !d, "write data on BL pair");
          check((bl0 & ~exp_act) == '0 && (bl1 & ~exp_act) == '0, "other columns idle");
        end
        default: check(bl_act == '0 && bl0 == '0 && bl1 == '0, "idle");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
