// smertmr_top: scan-chain based multiple error recovery TMR system.
//
// Three identical redundant modules (scan_module) get the same inputs d and
// c_in; the voter (tmr_voter) forms the TMR output from their outputs and
// raises an error on any disagreement. The SMERTMR controller drives the
// modules' scan chains (SCI, SCE) and reads their scan outputs (SCO): on a
// voter error or a checkpoint it compares the internal states, locates up to
// two faulty modules and copies a fault-free state into them; repeated faults
// in one module are treated as permanent, announced to the voter, which then
// ignores that module (master/checker, mc_mode high).
//
// Interface: tmr_out is meaningful when tmr_valid is high. While the states
// are being compared or recovered (2*(WIDTH+1)+2 cycles per round) the modules
// do not compute, inputs are not taken and tmr_valid is low; the surrounding
// system holds its inputs back meanwhile. unrecoverable is the sticky
// unrecoverable condition; comparison and recovery show the current mode.
// fmr1/fmr2 show the faulty modules found by the
// current round; mrfm/ncf are the permanent-fault registers (most
// recent faulty module, number of consecutive faults). offline_test gives direct scan access through test_si and
// test_so for production testing. fi_flip/fi_sa1 are fault-injection inputs,
// WIDTH+1 bits per module (module I in the lowest bits); tie them to zero in
// normal use.
module smertmr_top
  import smertmr_pkg::*;
#(
  parameter int unsigned WIDTH     = 4,
  parameter int unsigned NCF_LIMIT = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WIDTH-1:0]     d,
  input  logic                 c_in,
  input  logic                 checkpoint,
  input  logic                 offline_test,
  input  logic [2:0]           test_si,
  output logic [2:0]           test_so,
  input  logic [3*(WIDTH+1)-1:0] fi_flip,
  input  logic [3*(WIDTH+1)-1:0] fi_sa1,
  output logic [WIDTH:0]       tmr_out,
  output logic                 tmr_valid,
  output logic                 comparison,
  output logic                 recovery,
  output logic                 mc_mode,
  output logic                 unrecoverable,
  output mod_num_t             fmr1,
  output mod_num_t             fmr2,
  output mod_num_t             mrfm,
  output logic [$clog2(NCF_LIMIT+1)-1:0] ncf
);

  localparam int unsigned L_SC = WIDTH + 1;

  logic [WIDTH:0] q [3];
  logic [2:0]     sco, sci, sce;
  logic           error, perm_valid, normal;
  mod_num_t       perm_mod;

  for (genvar i = 0; i < 3; i++) begin : g_mod
    scan_module #(.WIDTH(WIDTH)) u_mod (
      .clk, .rst_n, .d, .c_in, .hold(~normal),
      .sce(sce[i]), .sci(sci[i]), .sco(sco[i]), .q(q[i]),
      .fi_flip(fi_flip[i*(WIDTH+1) +: WIDTH+1]),
      .fi_sa1(fi_sa1[i*(WIDTH+1) +: WIDTH+1]));
  end

  tmr_voter #(.W(WIDTH+1)) u_voter (
    .in1(q[0]), .in2(q[1]), .in3(q[2]),
    .perm_valid, .perm_mod, .out(tmr_out), .error);

  smertmr_controller #(.L_SC(L_SC), .NCF_LIMIT(NCF_LIMIT)) u_ctrl (
    .clk, .rst_n, .error, .checkpoint, .offline_test, .test_si,
    .sco, .sci, .sce, .perm_valid, .perm_mod, .mc_mode, .unrecoverable,
    .normal, .comparison, .recovery, .fmr1, .fmr2, .mrfm, .ncf);

  assign test_so   = sco;
  assign tmr_valid = normal;

endmodule
