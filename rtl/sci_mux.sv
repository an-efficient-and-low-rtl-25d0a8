// sci_mux: scan-input multiplexer in front of one redundant module.
//
// In comparison mode, and for a fault-free module in recovery mode, the
// module's own scan output is fed back to its scan input, so the chain
// rotates and the state is unchanged after L_SC shifts. In recovery mode a
// module flagged faulty in the faulty-modules register (recovery AND F(i))
// takes the scan output of the chosen fault-free module instead, which copies
// that module's state into it. During off-line testing the scan input comes
// from the external test pin. Purely combinational.
module sci_mux (
  input  logic own_sco,
  input  logic src_sco,
  input  logic test_si,
  input  logic recovery,
  input  logic faulty,
  input  logic offline_test,
  output logic sci
);

  always_comb begin
    if (offline_test)           sci = test_si;
    else if (recovery && faulty) sci = src_sco;
    else                        sci = own_sco;
  end

endmodule
