// tb_sci_mux: exhaustive check of the scan-input multiplexer against its
// truth table (off-line test input first, then the fault-free source for a
// faulty module in recovery, otherwise the module's own scan output).
module tb_sci_mux;
  logic own_sco, src_sco, test_si, recovery, faulty, offline_test, sci;
  int checks = 0, failures = 0;

  sci_mux dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 64; v++) begin
      {own_sco, src_sco, test_si, recovery, faulty, offline_test} = 6'(v);
      #1;
      exp = offline_test ? test_si : ((recovery && faulty) ? src_sco : own_sco);
      checks++;
      if (sci !== exp) begin
        failures++;
        $display("FAIL: vector %b sci=%b exp=%b", 6'(v), sci, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
