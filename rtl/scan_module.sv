// scan_module: one of the three redundant modules of the TMR system, with
// all of its state flip-flops stitched into a scan chain.
//
// The protection scheme works for any sequential module whose flip-flops form
// a scan chain; the function of the module itself is this design's own
// choice. It is a WIDTH-bit accumulator with carry: every functional cycle
//   {carry, sum} <= sum + d + c_in
// so the state is WIDTH+1 flip-flops and the chain length is L_SC = WIDTH+1.
// The output q = {carry, sum} is registered. While hold is high (and sce
// low) the state is kept: the controller holds the modules in the cycles
// between scan passes, so no input is taken while the system is not in
// normal operation. hold is this design's addition; scan flip-flops alone
// have only the SCE multiplexer.
//
// Scan chain: while sce is high the functional update stops and the chain
// shifts by one position per clock: sci enters the carry flip-flop, then the
// bits move through sum[WIDTH-1] down to sum[0], and sco is sum[0]. After
// L_SC shifts with sci tied to sco the state is back where it started.
//
// Fault injection (for experiments): a high bit of fi_flip inverts the
// corresponding flip-flop at the next clock edge (a single-event upset), a
// high bit of fi_sa1 holds the flip-flop output at 1 (a permanent stuck-at-1
// fault). Bit WIDTH is the carry, bits WIDTH-1..0 the sum.
module scan_module #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  input  logic             c_in,
  input  logic             hold,
  input  logic             sce,
  input  logic             sci,
  output logic             sco,
  output logic [WIDTH:0]   q,
  input  logic [WIDTH:0]   fi_flip,
  input  logic [WIDTH:0]   fi_sa1
);

  logic [WIDTH:0] state_q;  // flip-flop contents
  logic [WIDTH:0] state;    // flip-flop outputs as seen by the logic
  logic [WIDTH:0] next;

  assign state = state_q | fi_sa1;

  always_comb begin
    if (sce)       next = {sci, state[WIDTH:1]};
    else if (hold) next = state;
    else           next = {1'b0, state[WIDTH-1:0]} + {1'b0, d} + (WIDTH+1)'(c_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= '0;
    else        state_q <= next ^ fi_flip;
  end

  assign q   = state;
  assign sco = state[0];

endmodule
