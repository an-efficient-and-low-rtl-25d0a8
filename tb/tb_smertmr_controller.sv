// tb_smertmr_controller: self-checking test of the SMERTMR controller. The
// three module scan chains are modelled here as plain shift registers, so the
// test sees exactly what the controller does with SCI and SCE. Scenarios:
// a clean checkpoint, one and two faulty modules, a fault striking during
// recovery (retry), repeated faults in one module (permanent fault and
// master/checker), a mismatch in master/checker mode (unrecoverable), two
// overlapping faults (unrecoverable) and off-line scan access. Cycle counts
// of each round are checked against L_SC+1 (no fault) and 2*L_SC+2.
module tb_smertmr_controller;
  import smertmr_pkg::*;
  localparam int L = 5;
  localparam int LIM = 3;

  logic clk = 0, rst_n = 0;
  logic error = 0, checkpoint = 0, offline_test = 0;
  logic [2:0] test_si = '0, sco, sci, sce;
  logic perm_valid, mc_mode, unrecoverable, normal, comparison, recovery;
  mod_num_t perm_mod, fmr1, fmr2, mrfm;
  logic [$clog2(LIM+1)-1:0] ncf;
  logic [L-1:0] st [3];
  logic [L-1:0] flip [3];
  int checks = 0, failures = 0;
  int cycles;
  mod_num_t seen1, seen2;
  logic [L-1:0] golden;

  smertmr_controller #(.L_SC(L), .NCF_LIMIT(LIM)) dut (.*);

  always #5 clk = ~clk;

  // scan chain models: sci enters the top bit, sco is bit 0
  for (genvar i = 0; i < 3; i++) begin : g_chain
    assign sco[i] = st[i][0];
    always_ff @(posedge clk)
      if (sce[i]) st[i] <= {sci[i], st[i][L-1:1]} ^ flip[i];
      else        st[i] <= st[i] ^ flip[i];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_all(input logic [L-1:0] v);
    @(negedge clk);
    st[0] = v; st[1] = v; st[2] = v;
  endtask

  // Pulse a trigger and wait until the controller is back in NORMAL (or
  // stuck in UNREC); returns the cycles spent outside NORMAL.
  task automatic run_round(input bit use_error);
    @(negedge clk);
    if (use_error) error = 1; else checkpoint = 1;
    @(negedge clk);
    error = 0; checkpoint = 0;
    cycles = 0; seen1 = 0; seen2 = 0;
    while (!normal && !unrecoverable && cycles < 100) begin
      if (recovery) begin seen1 = fmr1; seen2 = fmr2; end
      cycles++;
      @(negedge clk);
    end
  endtask

  task automatic flip_now(input int m, input logic [L-1:0] mask);
    @(negedge clk);
    flip[m] = mask;
    @(negedge clk);
    flip[m] = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flip[0] = '0; flip[1] = '0; flip[2] = '0;
    golden = 5'b10110;
    st[0] = golden; st[1] = golden; st[2] = golden;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    check(normal && sce == 0, "idle after reset");

    // 1) clean checkpoint: comparison only
    run_round(0);
    check(cycles == L + 1, $sformatf("clean round cycles %0d", cycles));
    check(st[0] == golden && st[1] == golden && st[2] == golden, "states kept by rotation");
    check(ncf == 0, "clean round leaves NCF at 0");

    // 2) one faulty module (II), two erroneous flip-flops
    st[1] = golden ^ 5'b01001;
    run_round(1);
    check(cycles == 2 * L + 2, $sformatf("single-fault round cycles %0d", cycles));
    check(seen1 == 2 && seen2 == 0, $sformatf("FMR during recovery %0d %0d", seen1, seen2));
    check(st[0] == golden && st[1] == golden && st[2] == golden, "module II recovered");
    check(mrfm == 2 && ncf == 1, "MRFM/NCF after first fault");

    // 3) two faulty modules (I and III) with disjoint errors
    st[0] = golden ^ 5'b00011;
    st[2] = golden ^ 5'b10000;
    run_round(1);
    check(cycles == 2 * L + 2, $sformatf("double-fault round cycles %0d", cycles));
    check(seen1 == 1 && seen2 == 3, $sformatf("FMR %0d %0d", seen1, seen2));
    check(st[0] == golden && st[1] == golden && st[2] == golden, "modules I and III recovered");
    check(ncf == 0, "double fault resets NCF");

    // 4) fault hits module III while module I is being recovered from II: retry
    st[0] = golden ^ 5'b00100;
    fork
      run_round(1);
      begin
        wait (recovery);
        @(negedge clk);
        flip[2] = 5'b00001;   // lands on the bit that III shifts out next
        @(negedge clk);
        flip[2] = '0;
      end
    join
    check(cycles > 2 * L + 2, $sformatf("retry round took %0d cycles", cycles));
    check(st[0] == golden && st[1] == golden && st[2] == golden, "all recovered after retry");
    check(mrfm == 3 && ncf == 1, "retry located module III");
    run_round(0);
    check(ncf == 0, "clean checkpoint resets NCF");

    // 5) permanent fault: module III found faulty LIM rounds in a row
    golden = st[0];
    for (int r = 0; r < LIM; r++) begin
      st[2] = golden ^ 5'b00010;
      run_round(1);
      check(st[2] == golden, $sformatf("III recovered r=%0d st=%b %b %b g=%b cyc=%0d", r, st[0], st[1], st[2], golden, cycles));
    end
    check(perm_valid && perm_mod == 3 && mc_mode, "permanent fault in III, master/checker");
    // in master/checker mode a fault in III alone is ignored
    st[2] = ~golden;
    run_round(0);
    check(normal && !unrecoverable, "ignored module III not compared");
    // a mismatch between I and II cannot be located
    st[0] = golden ^ 5'b00001;
    run_round(1);
    check(unrecoverable && !normal, "master/checker mismatch is unrecoverable");
    repeat (3) @(negedge clk);
    check(unrecoverable, "unrecoverable held");

    // 6) overlapping faults in two modules: unrecoverable
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(!mc_mode && !perm_valid, "reset clears master/checker");
    st[0] = golden ^ 5'b00011;
    st[1] = golden ^ 5'b00110;
    st[2] = golden;
    run_round(1);
    check(unrecoverable, "overlapping double fault is unrecoverable");

    // 7) off-line testing: chains shift from test_si
    rst_n = 0; @(negedge clk); rst_n = 1;
    offline_test = 1;
    @(negedge clk);
    check(sce == 3'b111, "SCE in off-line testing");
    for (int b = 0; b < L; b++) begin
      test_si = {3{golden[b] ^ 1'b1}};
      // the chains follow offline_test one cycle late: drop it with the last bit
      if (b == L - 1) offline_test = 0;
      @(negedge clk);
    end
    check(st[0] == ~golden && st[1] == ~golden && st[2] == ~golden, "pattern scanned in off-line");
    check(normal, "back to normal after off-line test");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
