// tb_perm_fault_monitor: self-checking test of the MRFM/NCF permanent-fault
// monitor: alternating modules never reach the limit, clean or double-fault
// rounds reset the count, NCF_LIMIT consecutive rounds on one module declare
// it permanent, and the declaration is held.
module tb_perm_fault_monitor;
  import smertmr_pkg::*;
  localparam int LIM = 3;
  logic clk = 0, rst_n = 0, update = 0;
  mod_set_t faulty = '0;
  mod_num_t mrfm, perm_mod;
  logic [$clog2(LIM+1)-1:0] ncf;
  logic perm_valid;
  int checks = 0, failures = 0;

  perm_fault_monitor #(.NCF_LIMIT(LIM)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic round(input mod_set_t s);
    faulty = s; update = 1;
    @(posedge clk); #1;
    update = 0; faulty = '0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(mrfm == 0 && ncf == 0 && !perm_valid, "reset");
    round(3'b001); check(mrfm == 1 && ncf == 1, "first fault in I");
    round(3'b010); check(mrfm == 2 && ncf == 1, "fault moves to II");
    round(3'b010); check(mrfm == 2 && ncf == 2, "II again");
    round(3'b000); check(ncf == 0 && !perm_valid, "clean round resets NCF");
    round(3'b010); round(3'b010);
    check(ncf == 2 && !perm_valid, "two in a row");
    round(3'b011); check(ncf == 0 && !perm_valid, "double fault resets NCF");
    // update low must not count
    faulty = 3'b100; repeat (5) @(posedge clk); #1; faulty = '0;
    check(ncf == 0, "no update, no count");
    for (int r = 1; r <= LIM; r++) begin
      check(!perm_valid, "not yet permanent");
      round(3'b100);
      check(int'(ncf) == r && mrfm == 3, "counting module III");
    end
    check(perm_valid && perm_mod == 3, "permanent fault in III declared");
    round(3'b001); round(3'b001); round(3'b001); round(3'b001);
    check(perm_valid && perm_mod == 3, "declaration held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
