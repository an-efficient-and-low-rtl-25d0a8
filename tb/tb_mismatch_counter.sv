// tb_mismatch_counter: self-checking test of a pair mismatch counter: random
// streams counted up, then the same streams counted down back to zero, an
// extra mismatch during down counting raising the underflow flag, saturation
// and the synchronous clear.
module tb_mismatch_counter;
  localparam int CW = 3;
  logic clk = 0, rst_n = 0, clear = 0, up = 0, down = 0, a = 0, b = 0;
  logic [CW-1:0] count;
  logic underflow;
  int checks = 0, failures = 0;
  int n;
  logic [7:0] sa, sb;

  mismatch_counter #(.CW(CW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(count == 0 && !underflow, "reset");
    for (int t = 0; t < 40; t++) begin
      sa = 8'($urandom); sb = 8'($urandom);
      n = 0;
      for (int i = 0; i < 5; i++) if (sa[i] != sb[i]) n++;
      clear = 1; @(posedge clk); #1; clear = 0;
      check(count == 0 && !underflow, "clear");
      up = 1;
      for (int i = 0; i < 5; i++) begin a = sa[i]; b = sb[i]; @(posedge clk); #1; end
      up = 0;
      check(int'(count) == n, $sformatf("up count %0d exp %0d", count, n));
      down = 1;
      for (int i = 0; i < 5; i++) begin a = sa[i]; b = sb[i]; @(posedge clk); #1; end
      down = 0;
      check(count == 0 && !underflow, "down count back to zero");
      // one more mismatch while counting down
      down = 1; a = 1; b = 0; @(posedge clk); #1; down = 0;
      check(count == 0 && underflow, "underflow flagged");
    end
    // saturation
    clear = 1; @(posedge clk); #1; clear = 0;
    up = 1; a = 1; b = 0;
    repeat (10) @(posedge clk);
    #1; up = 0;
    check(count == '1, "saturates at maximum");
    // no counting without a mismatch or without a mode
    a = 1; b = 1; up = 1; @(posedge clk); #1; up = 0;
    a = 0; b = 1; @(posedge clk); #1;
    check(count == '1, "holds when idle or equal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
