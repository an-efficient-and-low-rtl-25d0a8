// tb_scan_module: self-checking test of one scan-equipped redundant module.
// Checks the functional accumulation against a model, that L_SC shifts with
// the chain closed on itself leave the state unchanged, that a pattern shifted
// in through sci appears at sco L_SC cycles later and loads the state in the
// documented bit order, and both fault-injection inputs.
module tb_scan_module;
  localparam int W = 4;
  localparam int L = W + 1;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0;
  logic c_in = 0, hold = 0, sce = 0, sci = 0, sco;
  logic [W:0] q, fi_flip = '0, fi_sa1 = '0;
  int checks = 0, failures = 0;
  logic [W:0] model, saved, pat;

  scan_module #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    check(q == 0, "reset state");
    // functional accumulation
    for (int i = 0; i < 50; i++) begin
      d = W'($urandom); c_in = 1'($urandom);
      @(posedge clk); #1;
      model = {1'b0, model[W-1:0]} + {1'b0, d} + (W+1)'(c_in);
      check(q == model, $sformatf("accumulate step %0d q=%h exp=%h", i, q, model));
    end
    // hold keeps the state whatever the inputs
    saved = q;
    hold = 1;
    repeat (4) begin d = W'($urandom); c_in = 1; @(posedge clk); #1; end
    check(q == saved, "hold keeps the state");
    hold = 0;
    // circular shift keeps the state
    saved = q;
    sce = 1;
    for (int i = 0; i < L; i++) begin
      check(sco == saved[i], $sformatf("sco bit %0d", i));
      sci = sco;
      @(posedge clk); #1;
    end
    sce = 0;
    check(q == saved, "state after L_SC rotations");
    // shift a pattern in: after L_SC shifts the state equals the pattern
    pat = (W+1)'($urandom);
    sce = 1;
    for (int i = 0; i < L; i++) begin
      sci = pat[i];
      @(posedge clk); #1;
    end
    sce = 0;
    check(q == pat, $sformatf("scanned-in state %h exp %h", q, pat));
    // bit flip
    model = q;
    d = '0; c_in = 0;
    fi_flip = (W+1)'(1 << 2);
    @(posedge clk); #1;
    fi_flip = '0;
    model = ({1'b0, model[W-1:0]}) ^ (W+1)'(1 << 2);
    check(q == model, $sformatf("bit flip q=%h exp=%h", q, model));
    // stuck-at-1
    fi_sa1 = (W+1)'(1);
    #1;
    check(q[0] == 1'b1 && sco == 1'b1, "stuck-at-1 visible");
    fi_sa1 = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
