// tb_fault_campaign: fault-injection campaign on the full SMERTMR system at
// its default size, in the spirit of the coverage figures quoted for the
// technique (every fault in one module recovered; almost every fault pair in
// two modules recovered).
//
// Each trial resets the system, runs a few random input cycles, holds the
// inputs at zero, and flips state bits of the sum register in one or two
// modules in the same cycle. It then waits for the controller to finish and
// classifies the result by reading the three module states:
//   recovered      all three states equal the golden model
//   unrecoverable  the controller raised the unrecoverable condition
//   silent         all three agree on a wrong state
// Ground truth per trial: one faulty module, or two with disjoint erroneous
// flip-flops, must be recovered; two with a common erroneous flip-flop where
// neither error set contains the other must be declared unrecoverable; when
// one error set contains the other, the states are indistinguishable from a
// recoverable pattern seen from another reference module and the outcome is
// only counted. Coverage figures are printed at the end.
module tb_fault_campaign;
  import smertmr_pkg::*;
  localparam int W = 4;
  localparam int L = W + 1;
  localparam int TRIALS = 1500;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0;
  logic c_in = 0, checkpoint = 0, offline_test = 0;
  logic [2:0] test_si = '0, test_so;
  logic [3*L-1:0] fi_flip = '0, fi_sa1 = '0;
  logic [W:0] tmr_out;
  logic tmr_valid, comparison, recovery, mc_mode, unrecoverable;
  mod_num_t fmr1, fmr2, mrfm;
  logic [1:0] ncf;

  smertmr_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W:0] golden;
  int n1 = 0, n1_rec = 0;
  int n2 = 0, n2_rec = 0, n2_unrec = 0, n2_silent = 0;
  int n_disjoint = 0, n_overlap = 0, n_alias = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk)
    if (rst_n && tmr_valid) golden <= {1'b0, golden[W-1:0]} + {1'b0, d} + (W+1)'(c_in);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < TRIALS; t++) begin
      logic [W-1:0] ma, mb;
      int i, j, nfault, guard;
      bit rec, silent;
      rst_n = 0; golden = '0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      repeat ($urandom_range(1, 6)) begin
        d = W'($urandom); c_in = 1'($urandom);
        @(negedge clk);
      end
      d = '0; c_in = 0;
      @(negedge clk);
      nfault = (t % 2) + 1;
      i = $urandom_range(0, 2);
      j = (i + $urandom_range(1, 2)) % 3;
      // single-bit upsets in half of the trials, multi-bit masks otherwise
      if (t % 4 < 2) begin
        ma = W'(1 << $urandom_range(0, W - 1));
        mb = W'(1 << $urandom_range(0, W - 1));
      end else begin
        ma = W'($urandom_range(1, (1 << W) - 1));
        mb = W'($urandom_range(1, (1 << W) - 1));
      end
      fi_flip[i*L +: L] = {1'b0, ma};
      if (nfault == 2) fi_flip[j*L +: L] = {1'b0, mb};
      @(negedge clk);
      fi_flip = '0;
      @(negedge clk);
      guard = 0;
      while (!tmr_valid && !unrecoverable && guard < 100) begin @(negedge clk); guard++; end
      rec    = !unrecoverable && dut.g_mod[0].u_mod.q == golden &&
               dut.g_mod[1].u_mod.q == golden && dut.g_mod[2].u_mod.q == golden;
      silent = !unrecoverable && !rec &&
               dut.g_mod[0].u_mod.q == dut.g_mod[1].u_mod.q &&
               dut.g_mod[1].u_mod.q == dut.g_mod[2].u_mod.q;
      check(rec || unrecoverable || silent, "controller left the modules in disagreement");
      if (nfault == 1) begin
        n1++;
        if (rec) n1_rec++;
        check(rec, $sformatf("single fault in module %0d mask %b not recovered", i + 1, ma));
      end else begin
        n2++;
        if (rec) n2_rec++;
        if (unrecoverable) n2_unrec++;
        if (silent) n2_silent++;
        if ((ma & mb) == '0) begin
          n_disjoint++;
          check(rec, $sformatf("disjoint faults %0d/%0d (%b,%b) not recovered", i + 1, j + 1, ma, mb));
        end else if ((ma & mb) != ma && (ma & mb) != mb) begin
          n_overlap++;
          check(unrecoverable, $sformatf("overlapping faults %0d/%0d (%b,%b) not flagged", i + 1, j + 1, ma, mb));
        end else begin
          n_alias++;
        end
      end
    end
    $display("single faulty module: %0d trials, %0d recovered (%0d.%01d%%)",
             n1, n1_rec, (n1_rec * 100) / n1, ((n1_rec * 1000) / n1) % 10);
    $display("two faulty modules: %0d trials, %0d recovered (%0d.%01d%%), %0d unrecoverable, %0d silent",
             n2, n2_rec, (n2_rec * 100) / n2, ((n2_rec * 1000) / n2) % 10, n2_unrec, n2_silent);
    $display("  error sets: %0d disjoint, %0d overlapping, %0d one containing the other",
             n_disjoint, n_overlap, n_alias);
    check(n_disjoint > 0 && n_overlap > 0 && n_alias > 0, "every class of fault pair drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
