// tb_tmr_voter: self-checking test of the voter. Random module outputs with
// zero, one or two corrupted copies are checked against a bit-level majority
// model and the error flag; then each master/checker configuration.
module tb_tmr_voter;
  import smertmr_pkg::*;
  localparam int W = 5;
  logic [W-1:0] in1, in2, in3, out;
  logic perm_valid;
  mod_num_t perm_mod;
  logic error;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] good, exp;
    perm_valid = 0; perm_mod = 0;
    for (int i = 0; i < 300; i++) begin
      good = W'($urandom);
      in1 = good; in2 = good; in3 = good;
      case (i % 4)
        1: in1 = good ^ W'($urandom_range(1, 31));
        2: in2 = good ^ W'($urandom_range(1, 31));
        3: in3 = good ^ W'($urandom_range(1, 31));
        default: ;
      endcase
      #1;
      check(out == good, $sformatf("single corruption masked (case %0d)", i % 4));
      check(error == (i % 4 != 0), "error flag");
    end
    // two modules corrupted in different bits: per-bit majority still holds
    in1 = 5'b00000; in2 = 5'b00011; in3 = 5'b01100; #1;
    exp = 5'b00000;
    check(out == exp && error, "two disjoint corruptions");
    // master/checker
    perm_valid = 1;
    for (int m = 1; m <= 3; m++) begin
      perm_mod = 2'(m);
      good = W'($urandom);
      in1 = good; in2 = good; in3 = good;
      case (m)
        1: in1 = ~good;
        2: in2 = ~good;
        default: in3 = ~good;
      endcase
      #1;
      check(out == good && !error, $sformatf("faulty module %0d ignored", m));
      // a mismatch between the two remaining modules is reported
      case (m)
        1: begin in2 = good; in3 = good ^ 5'b1; end
        2: begin in1 = good; in3 = good ^ 5'b1; end
        default: begin in1 = good; in2 = good ^ 5'b1; end
      endcase
      #1;
      check(error, $sformatf("master/checker mismatch reported (%0d)", m));
      check(out == good, $sformatf("master drives output (%0d)", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
