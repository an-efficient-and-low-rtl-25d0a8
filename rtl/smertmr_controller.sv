// smertmr_controller: the SMERTMR controller. It watches the voter's error
// signal and the checkpoint input, compares the internal states of the three
// redundant modules through their scan chains, locates the faulty modules
// and copies the state of a fault-free module into them (roll-forward
// recovery), and degrades the system to master/checker after a permanent
// fault.
//
// Modes and timing (L_SC = scan chain length):
//   NORMAL   scan chains idle, counters held at zero. A voter error or a
//            checkpoint starts a comparison; offline_test enters OFFLINE.
//   COMPARE  L_SC cycles. All chains are enabled and rotate (SCI = own SCO),
//            and Counter12/13/23 count up on every differing pair of SCO bits.
//            After L_SC shifts every module holds its old state again.
//   LOCATE   1 cycle. The fault locator reads the counters. No faulty module:
//            back to NORMAL. One or two: load the faulty modules register
//            (FMR) and go to RECOVER. Otherwise: UNREC.
//   RECOVER  L_SC cycles. Fault-free modules rotate; every faulty module takes
//            its SCI from the SCO of the fault-free module picked by the
//            priority encoder. The SCO streams are compared again and the
//            counters count down on every mismatch.
//   CHECK    1 cycle. All counters zero without underflow: the recovery is
//            good, the permanent-fault monitor records the round, the FMR is
//            cleared and NORMAL resumes. Otherwise a fault struck during
//            recovery and a new comparison starts.
//   UNREC    the unrecoverable condition, held until reset.
//   OFFLINE  off-line testing: chains enabled, SCI from test_si, as long as
//            offline_test stays high.
// An error-triggered round therefore takes 2*L_SC+2 cycles from NORMAL back to
// NORMAL. SCE = recovery OR comparison OR off-line testing, as in the
// scheme's block diagrams; the retry after a bad check, the hold of UNREC and
// the exact mode encoding are this design's own choices.
//
// The two assertions at the end use rst_n in 'disable iff'; a linter may
// note that rst_n is then used both as an asynchronous reset and as a
// synchronous signal. Only the assertions use it synchronously.
module smertmr_controller
  import smertmr_pkg::*;
#(
  parameter int unsigned L_SC      = 5,
  parameter int unsigned NCF_LIMIT = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       error,
  input  logic       checkpoint,
  input  logic       offline_test,
  input  logic [2:0] test_si,
  input  logic [2:0] sco,
  output logic [2:0] sci,
  output logic [2:0] sce,
  output logic       perm_valid,
  output mod_num_t   perm_mod,
  output logic       mc_mode,
  output logic       unrecoverable,
  output logic       normal,
  output logic       comparison,
  output logic       recovery,
  output mod_num_t   fmr1,
  output mod_num_t   fmr2,
  output mod_num_t   mrfm,
  output logic [$clog2(NCF_LIMIT+1)-1:0] ncf
);

  localparam int unsigned CW = $clog2(L_SC + 1);   // counters hold 0..L_SC
  localparam int unsigned SW = $clog2(L_SC);

  ctrl_state_t state, state_next;
  logic [SW-1:0] shift_cnt;
  logic          last_shift;

  logic [CW-1:0] c12, c13, c23;
  logic          uf12, uf13, uf23;
  logic          cnt_clear, cnt_up, cnt_down;

  mod_set_t flu_faulty, f;
  logic     flu_unrec;
  logic     fmr_load, fmr_clear;
  mod_num_t src;
  logic     src_sco;
  logic     mon_update;
  logic     check_ok;
  logic     offline;

  // ---------------- mode sequencing ----------------
  assign last_shift = (shift_cnt == SW'(L_SC - 1));
  assign check_ok   = (c12 == '0) && (c13 == '0) && (c23 == '0) && !uf12 && !uf13 && !uf23;

  always_comb begin
    state_next = state;
    unique case (state)
      ST_NORMAL:  if (offline_test)              state_next = ST_OFFLINE;
                  else if (error || checkpoint)  state_next = ST_COMPARE;
      ST_COMPARE: if (last_shift)                state_next = ST_LOCATE;
      ST_LOCATE:  if (flu_unrec)                 state_next = ST_UNREC;
                  else if (flu_faulty != '0)     state_next = ST_RECOVER;
                  else                           state_next = ST_NORMAL;
      ST_RECOVER: if (last_shift)                state_next = ST_CHECK;
      ST_CHECK:   state_next = check_ok ? ST_NORMAL : ST_COMPARE;
      ST_UNREC:   state_next = ST_UNREC;
      ST_OFFLINE: if (!offline_test)             state_next = ST_NORMAL;
      default:    state_next = ST_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_NORMAL;
      shift_cnt <= '0;
    end else begin
      state <= state_next;
      if ((state == ST_COMPARE || state == ST_RECOVER) && !last_shift)
        shift_cnt <= shift_cnt + 1'b1;
      else
        shift_cnt <= '0;
    end
  end

  assign normal        = (state == ST_NORMAL);
  assign comparison    = (state == ST_COMPARE);
  assign recovery      = (state == ST_RECOVER);
  assign offline       = (state == ST_OFFLINE);
  assign unrecoverable = (state == ST_UNREC);
  assign sce           = {3{recovery | comparison | offline}};

  assign cnt_clear  = (state == ST_NORMAL) || (state == ST_CHECK);
  assign cnt_up     = comparison;
  assign cnt_down   = recovery;
  assign fmr_load   = (state == ST_LOCATE) && !flu_unrec && (flu_faulty != '0);
  assign fmr_clear  = (state == ST_CHECK);
  assign mon_update = ((state == ST_LOCATE) && !flu_unrec && (flu_faulty == '0)) ||
                      ((state == ST_CHECK) && check_ok);

  // ---------------- mismatch counters ----------------
  mismatch_counter #(.CW(CW)) u_cnt12 (
    .clk, .rst_n, .clear(cnt_clear), .up(cnt_up), .down(cnt_down),
    .a(sco[0]), .b(sco[1]), .count(c12), .underflow(uf12));
  mismatch_counter #(.CW(CW)) u_cnt13 (
    .clk, .rst_n, .clear(cnt_clear), .up(cnt_up), .down(cnt_down),
    .a(sco[0]), .b(sco[2]), .count(c13), .underflow(uf13));
  mismatch_counter #(.CW(CW)) u_cnt23 (
    .clk, .rst_n, .clear(cnt_clear), .up(cnt_up), .down(cnt_down),
    .a(sco[1]), .b(sco[2]), .count(c23), .underflow(uf23));

  // ---------------- fault location and FMR ----------------
  fault_locator #(.CW(CW)) u_flu (
    .c12, .c13, .c23, .mc_mode, .perm_mod,
    .faulty(flu_faulty), .unrecoverable(flu_unrec));

  fmr_reg u_fmr (
    .clk, .rst_n, .load(fmr_load), .clear(fmr_clear),
    .faulty_in(flu_faulty), .f, .fmr1, .fmr2);

  // The FMR is built from the same set that is recorded at the end of recovery.
  perm_fault_monitor #(.NCF_LIMIT(NCF_LIMIT)) u_perm (
    .clk, .rst_n, .update(mon_update), .faulty((state == ST_CHECK) ? f : mod_set_t'('0)),
    .mrfm, .ncf, .perm_valid, .perm_mod);

  assign mc_mode = perm_valid;

  // ---------------- scan routing ----------------
  src_priority_encoder u_pe (.f, .sco, .src, .src_sco);

  for (genvar i = 0; i < 3; i++) begin : g_mux
    sci_mux u_mux (
      .own_sco(sco[i]), .src_sco, .test_si(test_si[i]),
      .recovery, .faulty(f[i]), .offline_test(offline),
      .sci(sci[i]));
  end

  // ---------------- rules ----------------
  // Recovery needs at least one faulty and one fault-free module.
  a_recover_src: assert property (@(posedge clk) disable iff (!rst_n)
    recovery |-> (f != '0) && (src != 2'd0));
  // The unrecoverable condition is never left without a reset.
  a_unrec_hold: assert property (@(posedge clk) disable iff (!rst_n)
    unrecoverable |=> unrecoverable);

endmodule
