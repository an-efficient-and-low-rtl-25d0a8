// tb_fmr_reg: self-checking test of the faulty modules register: load of
// every set, hold, clear, and the two module-number views.
module tb_fmr_reg;
  import smertmr_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, clear = 0;
  mod_set_t faulty_in, f;
  mod_num_t fmr1, fmr2;
  int checks = 0, failures = 0;

  fmr_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected numbers per set: {fmr1, fmr2}
    logic [3:0] exp [8];
    exp[0] = {2'd0, 2'd0}; exp[1] = {2'd1, 2'd0}; exp[2] = {2'd2, 2'd0};
    exp[3] = {2'd1, 2'd2}; exp[4] = {2'd3, 2'd0}; exp[5] = {2'd1, 2'd3};
    exp[6] = {2'd2, 2'd3}; exp[7] = {2'd1, 2'd3};
    faulty_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(f == 0 && fmr1 == 0 && fmr2 == 0, "reset");
    for (int s = 0; s < 8; s++) begin
      faulty_in = 3'(s); load = 1;
      @(posedge clk); #1; load = 0;
      faulty_in = ~3'(s);
      check(f == 3'(s), "load");
      check({fmr1, fmr2} == exp[s], $sformatf("numbers for set %b: %0d %0d", 3'(s), fmr1, fmr2));
      @(posedge clk); #1;
      check(f == 3'(s), "hold");
      clear = 1; @(posedge clk); #1; clear = 0;
      check(f == 0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
