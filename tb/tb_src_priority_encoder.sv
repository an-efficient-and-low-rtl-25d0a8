// tb_src_priority_encoder: exhaustive check that the lowest-numbered module
// not flagged faulty is chosen as recovery source and its scan output routed.
module tb_src_priority_encoder;
  import smertmr_pkg::*;
  mod_set_t f;
  logic [2:0] sco;
  mod_num_t src;
  logic src_sco;
  int checks = 0, failures = 0;

  src_priority_encoder dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 64; v++) begin
      {f, sco} = 6'(v);
      #1;
      e = 0;
      for (int k = 2; k >= 0; k--) if (!f[k]) e = k + 1;
      checks++;
      if (int'(src) != e || (e != 0 && src_sco != sco[e-1]) || (e == 0 && src_sco != 0)) begin
        failures++;
        $display("FAIL: f=%b sco=%b src=%0d src_sco=%b", f, sco, src, src_sco);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
