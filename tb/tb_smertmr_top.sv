// tb_smertmr_top: end-to-end test of the SMERTMR system at its default size.
// A golden accumulator model runs beside the design and every valid TMR
// output is compared with it. Faults are injected through the fault-injection
// ports and each recovery mechanism is driven at least once:
//   - voter masking of a single-module upset and the error-triggered round
//   - a checkpoint-triggered comparison
//   - roll-forward recovery of one faulty module and of two faulty modules
//   - a fault striking during recovery, which forces a new comparison
//   - a stuck-at fault found in the same module NCF_LIMIT times in a row,
//     declared permanent, and the switch to master/checker
//   - a master/checker mismatch and two overlapping faults, both
//     unrecoverable
//   - off-line scan access through test_si/test_so
// Every round out of normal operation must last 2*L_SC+2 cycles when it
// recovers and L_SC+1 when it finds nothing. A mechanism that never happened
// counts as a failure.
module tb_smertmr_top;
  import smertmr_pkg::*;
  localparam int W   = 4;       // defaults of smertmr_top
  localparam int L   = W + 1;
  localparam int LIM = 3;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0;
  logic c_in = 0, checkpoint = 0, offline_test = 0;
  logic [2:0] test_si = '0, test_so;
  logic [3*L-1:0] fi_flip = '0, fi_sa1 = '0;
  logic [W:0] tmr_out;
  logic tmr_valid, comparison, recovery, mc_mode, unrecoverable;
  mod_num_t fmr1, fmr2, mrfm;
  logic [$clog2(LIM+1)-1:0] ncf;

  smertmr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W:0] golden = '0;
  bit check_out = 1;
  bit traffic = 1;
  bit watch = 1;      // round watcher enabled

  // mechanism counters
  int n_masked = 0, n_err_round = 0, n_ckpt_round = 0, n_single = 0, n_double = 0;
  int n_retry = 0, n_perm = 0, n_unrec = 0, n_offline = 0, n_clean = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // golden model and output check
  always @(posedge clk) begin
    if (rst_n && tmr_valid)
      golden <= {1'b0, golden[W-1:0]} + {1'b0, d} + (W+1)'(c_in);
  end
  always @(negedge clk) begin
    if (rst_n && tmr_valid && check_out && !offline_test)
      check(tmr_out == golden, $sformatf("tmr_out %h golden %h", tmr_out, golden));
  end

  // random inputs while enabled
  always @(negedge clk) if (traffic) begin
    d    <= W'($urandom);
    c_in <= 1'($urandom);
  end

  // watch rounds: length, type and retries
  int  round_len = 0;
  bit  in_round = 0, saw_rec = 0, saw_retry = 0;
  mod_num_t r_fmr1, r_fmr2;
  always @(negedge clk) begin
    if (!rst_n) begin
      in_round = 0;
    end else if (!watch) begin
      in_round = 0;
    end else if (!tmr_valid && !unrecoverable) begin
      if (!in_round) begin in_round = 1; round_len = 0; saw_rec = 0; saw_retry = 0; end
      round_len++;
      if (recovery) begin saw_rec = 1; r_fmr1 = fmr1; r_fmr2 = fmr2; end
      if (comparison && saw_rec && !saw_retry) begin saw_retry = 1; n_retry++; end
    end else if (in_round && tmr_valid) begin
      in_round = 0;
      if (!saw_retry) begin
        if (saw_rec) check(round_len == 2 * L + 2, $sformatf("recovery round took %0d cycles", round_len));
        else         check(round_len == L + 1, $sformatf("clean round took %0d cycles", round_len));
      end
      if (saw_rec && r_fmr2 == 0) n_single++;
      if (saw_rec && r_fmr2 != 0) n_double++;
      if (!saw_rec) n_clean++;
    end
  end

  task automatic wait_valid();
    int n = 0;
    @(negedge clk);
    while (!tmr_valid && !unrecoverable && n < 200) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
  endtask

  task automatic inject(input int m, input logic [L-1:0] mask);
    fi_flip[m*L +: L] = mask;
    @(negedge clk);
    fi_flip[m*L +: L] = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    check(tmr_valid && !mc_mode && !unrecoverable, "running after reset");

    // single upset in module I: masked by the voter, then recovered
    inject(0, 5'b00100);
    check(tmr_valid && tmr_out == golden, "voter masks single upset");
    n_masked++;
    n_err_round++;
    wait_valid();
    check(fmr1 == 0 && mrfm == 1 && ncf == 1, "module I recorded as most recent faulty module");
    check(r_fmr1 == 1 && r_fmr2 == 0, "FMR named module I");

    // checkpoint with no fault: comparison only
    @(negedge clk); checkpoint = 1; @(negedge clk); checkpoint = 0;
    n_ckpt_round++;
    wait_valid();
    check(ncf == 0, "clean comparison resets NCF");

    // checkpoint together with an upset in module II
    fi_flip[1*L +: L] = 5'b00010; checkpoint = 1;
    @(negedge clk);
    fi_flip = '0; checkpoint = 0;
    n_ckpt_round++;
    wait_valid();
    check(r_fmr1 == 2 && mrfm == 2, "checkpoint round recovered module II");

    // two faulty modules with disjoint erroneous flip-flops (inputs held at 0
    // so the accumulation does not spread the errors before the comparison)
    traffic = 0; d = '0; c_in = 0;
    @(negedge clk);
    fi_flip[0*L +: L] = 5'b00011;
    fi_flip[2*L +: L] = 5'b01000;
    @(negedge clk);
    fi_flip = '0;
    n_err_round++;
    wait_valid();
    check(r_fmr1 == 1 && r_fmr2 == 3, "two faulty modules I and III recovered");
    traffic = 1;
    repeat (20) @(negedge clk);

    // fault in module III while module I is being recovered from module II
    inject(0, 5'b00001);
    while (!recovery) @(negedge clk);
    @(negedge clk);
    fi_flip[2*L +: L] = 5'b00001;
    @(negedge clk);
    fi_flip = '0;
    wait_valid();
    check(n_retry == 1, "fault during recovery caused a new comparison");
    repeat (20) @(negedge clk);

    // stuck-at-1 in module II: found again and again, then declared permanent
    fi_sa1[1*L +: L] = 5'b01000;
    begin
      int guard = 0;
      while (!mc_mode && guard < 3000) begin @(negedge clk); guard++; end
    end
    check(mc_mode && mrfm == 2, "permanent fault in module II, master/checker");
    if (mc_mode) n_perm++;
    repeat (50) @(negedge clk);
    check(tmr_valid, "master/checker keeps running with module II ignored");

    // master/checker: an upset in the master cannot be located
    check_out = 0;
    inject(0, 5'b00001);
    begin
      int guard = 0;
      while (!unrecoverable && guard < 100) begin @(negedge clk); guard++; end
    end
    check(unrecoverable, "master/checker mismatch is unrecoverable");
    if (unrecoverable) n_unrec++;

    // reset: two modules with a common erroneous flip-flop
    fi_sa1 = '0;
    rst_n = 0; golden = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!mc_mode && !unrecoverable, "reset leaves the degraded modes");
    traffic = 0; d = '0; c_in = 0;
    repeat (5) @(negedge clk);
    fi_flip[0*L +: L] = 5'b00011;
    fi_flip[1*L +: L] = 5'b00110;
    @(negedge clk);
    fi_flip = '0;
    begin
      int guard = 0;
      while (!unrecoverable && guard < 100) begin @(negedge clk); guard++; end
    end
    check(unrecoverable, "overlapping double fault is unrecoverable");
    if (unrecoverable) n_unrec++;

    // off-line testing: shift a pattern in and read the old state out
    rst_n = 0; golden = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the scanned-in patterns are not a consistent state: output and round
    // checks are off from here on
    check_out = 0;
    watch = 0;
    @(negedge clk);
    offline_test = 1;
    @(negedge clk);
    begin
      logic [L-1:0] pat [3];
      logic [L-1:0] got [3];
      for (int m = 0; m < 3; m++) pat[m] = L'($urandom);
      for (int b = 0; b < L; b++) begin
        test_si = {pat[2][b], pat[1][b], pat[0][b]};
        got[0][b] = test_so[0]; got[1][b] = test_so[1]; got[2][b] = test_so[2];
        if (b == L - 1) offline_test = 0;
        @(negedge clk);
      end
      for (int m = 0; m < 3; m++) check(got[m] == '0, "scan-out of reset state");
      // the loaded patterns now disagree: the voter output is their majority
      check(tmr_out == ((pat[0] & pat[1]) | (pat[0] & pat[2]) | (pat[1] & pat[2])),
            "patterns loaded through the scan chains");
      n_offline++;
    end
    repeat (2) @(negedge clk);

    $display("mechanisms: masked=%0d error_rounds=%0d checkpoint_rounds=%0d clean=%0d single=%0d double=%0d retry=%0d permanent=%0d unrecoverable=%0d offline=%0d",
             n_masked, n_err_round, n_ckpt_round, n_clean, n_single, n_double, n_retry, n_perm, n_unrec, n_offline);
    check(n_masked > 0, "voter masking happened");
    check(n_err_round > 0, "error-triggered round happened");
    check(n_ckpt_round > 0 && n_clean > 0, "checkpoint comparison happened");
    check(n_single > 0, "single-module recovery happened");
    check(n_double > 0, "two-module recovery happened");
    check(n_retry > 0, "recovery retry happened");
    check(n_perm > 0, "permanent fault / master-checker happened");
    check(n_unrec >= 2, "unrecoverable condition happened");
    check(n_offline > 0, "off-line test happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
