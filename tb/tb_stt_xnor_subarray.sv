// tb_stt_xnor_subarray: writes a random 32 x 288 weight matrix one cell
// at a time through the word-line / bit-line write path, then applies
// random spike vectors (plus all-zero and all-one vectors) and checks every
// row count K_i = popcount(~(w_i ^ s)) against a reference matrix.  Also
// checks that K is 0 when no word line is raised.
module tb_stt_xnor_subarray;
  localparam int N = 32, M = 288;
  logic clk = 0, wr = 0;
  logic [N-1:0] wl;
  logic [M-1:0] bl0, bl1, bl_act;
  logic [N-1:0][8:0] k_out;
  int checks = 0, failures = 0;

  stt_xnor_subarray #(.N(N), .M(M)) dut (.clk, .wl, .bl0, .bl1, .bl_act, .wr, .k_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  bit wref [N][M];
  logic [M-1:0] s;
  int kexp;

  initial begin
    wl = '0; bl0 = '0; bl1 = '0; bl_act = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        wref[i][j] = 1'($urandom);
        @(negedge clk);
        wl = '0; wl[i] = 1'b1; bl_act = '0; bl_act[j] = 1'b1;
        bl0 = '0; bl1 = '0; bl0[j] = wref[i][j]; bl1[j] = !wref[i][j]; wr = 1;
      end
    @(negedge clk);
    wr = 0; wl = '0; bl_act = '0;
    for (int n = 0; n < 40; n++) begin
      if (n == 0) s = '0;
      else if (n == 1) s = '1;
      else for (int w = 0; w < M; w += 32) s[w +: 32] = $urandom;
      wl = '1; bl_act = '1; bl0 = s; bl1 = ~s;
      #1;
      for (int i = 0; i < N; i++) begin
        kexp = 0;
        for (int j = 0; j < M; j++) kexp += int'(wref[i][j] == s[j]);
        check(int'(k_out[i]) == kexp, $sformatf("row %0d K=%0d expected %0d", i, k_out[i], kexp));
      end
      @(negedge clk);
    end
    wl = '0; #1;
    for (int i = 0; i < N; i++) check(k_out[i] == '0, "no word line, no current");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
