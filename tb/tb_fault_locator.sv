// tb_fault_locator: self-checking test of the fault locator unit. Random
// module states are built from a golden state and error masks whose ground
// truth is known (which modules are corrupted, and whether two corrupted
// modules share an erroneous flip-flop). The pairwise Hamming distances are
// fed to the unit and its verdict is compared with the ground truth. When one
// corrupted module's error mask contains the other's, the three states are
// exactly those of two disjoint faults seen from a different reference module
// (or of a single fault, if the masks are equal); no locator can tell these
// apart, so such draws are left out. Master/checker mode is checked separately.
module tb_fault_locator;
  import smertmr_pkg::*;
  localparam int CW = 3;
  localparam int L = 5;
  logic [CW-1:0] c12, c13, c23;
  logic mc_mode;
  mod_num_t perm_mod;
  mod_set_t faulty;
  logic unrecoverable;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_overlap = 0;

  fault_locator #(.CW(CW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int popc(logic [L-1:0] v);
    int n = 0;
    for (int i = 0; i < L; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] m [3];
    int i, j;
    mc_mode = 0; perm_mod = 0;
    for (int t = 0; t < 2000; t++) begin
      m[0] = '0; m[1] = '0; m[2] = '0;
      i = $urandom_range(0, 2);
      j = (i + $urandom_range(1, 2)) % 3;
      case (t % 3)
        0: ;
        1: m[i] = L'($urandom_range(1, 31));
        default: begin
          m[i] = L'($urandom_range(1, 31));
          m[j] = L'($urandom_range(1, 31));
        end
      endcase
      // If one error mask contains the other, the same states also arise from
      // two disjoint faults relative to another reference module: skipped.
      if (t % 3 == 2 && ((m[i] & m[j]) == m[i] || (m[i] & m[j]) == m[j])) continue;
      c12 = CW'(popc(m[0] ^ m[1]));
      c13 = CW'(popc(m[0] ^ m[2]));
      c23 = CW'(popc(m[1] ^ m[2]));
      #1;
      if (t % 3 == 0) begin
        check(faulty == 3'b000 && !unrecoverable, "fault-free");
      end else if (t % 3 == 1) begin
        n_single++;
        check(faulty == mod_set_t'(1 << i) && !unrecoverable,
              $sformatf("single fault in module %0d: got %b", i + 1, faulty));
      end else if ((m[i] & m[j]) == '0) begin
        n_double++;
        check(faulty == mod_set_t'((1 << i) | (1 << j)) && !unrecoverable,
              $sformatf("two disjoint faults %0d,%0d: got %b", i + 1, j + 1, faulty));
      end else begin
        n_overlap++;
        check(unrecoverable && faulty == '0,
              $sformatf("overlapping faults %0d,%0d must be unrecoverable", i + 1, j + 1));
      end
    end
    // three corrupted modules with pairwise distances 1,1,1
    c12 = 1; c13 = 1; c23 = 1; #1;
    check(unrecoverable, "three faulty modules");
    // master/checker: only the pair without perm_mod counts
    mc_mode = 1;
    for (int p = 1; p <= 3; p++) begin
      perm_mod = 2'(p);
      c12 = (p == 3) ? 3'd0 : 3'd2;
      c13 = (p == 2) ? 3'd0 : 3'd2;
      c23 = (p == 1) ? 3'd0 : 3'd2;
      #1;
      check(!unrecoverable && faulty == 0, $sformatf("m/c pair clean (%0d)", p));
      c12 = 1; c13 = 1; c23 = 1; #1;
      check(unrecoverable && faulty == 0, $sformatf("m/c pair mismatch (%0d)", p));
    end
    check(n_single > 100 && n_double > 100 && n_overlap > 20, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
