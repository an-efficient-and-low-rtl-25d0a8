// fault_locator: the fault locator unit (FLU). From the three pairwise
// mismatch counts collected in comparison mode it decides which modules are
// faulty.
//
// With Counter_ij the number of differing flip-flops between modules i and j:
//   all three zero                         -> no faulty module
//   c_ij = c_ik > 0 and c_jk = 0           -> module i alone is faulty
//   c_ij = c_ik + c_jk with c_ik, c_jk > 0  -> modules i and j are faulty with
//                                             disjoint erroneous flip-flops,
//                                             module k is fault-free
//   anything else                          -> unrecoverable (all three modules
//                                             faulty, or two faulty modules
//                                             sharing an erroneous flip-flop)
// In master/checker mode (one module already disregarded for a permanent
// fault) only the remaining pair counts: a mismatch there cannot be located
// and is unrecoverable. Purely combinational.
module fault_locator
  import smertmr_pkg::*;
#(
  parameter int unsigned CW = 3
) (
  input  logic [CW-1:0] c12,
  input  logic [CW-1:0] c13,
  input  logic [CW-1:0] c23,
  input  logic          mc_mode,
  input  mod_num_t      perm_mod,
  output mod_set_t      faulty,
  output logic          unrecoverable
);

  logic [CW:0] s12, s13, s23;   // counts widened so sums cannot overflow
  logic        z12, z13, z23;
  logic [CW-1:0] pair;

  assign s12 = {1'b0, c12};
  assign s13 = {1'b0, c13};
  assign s23 = {1'b0, c23};
  assign z12 = (c12 == '0);
  assign z13 = (c13 == '0);
  assign z23 = (c23 == '0);

  always_comb begin
    unique case (perm_mod)
      2'd1:    pair = c23;
      2'd2:    pair = c13;
      default: pair = c12;
    endcase
  end

  always_comb begin
    faulty        = 3'b000;
    unrecoverable = 1'b0;
    if (mc_mode) begin
      unrecoverable = (pair != '0);
    end else if (z12 && z13 && z23) begin
      faulty = 3'b000;
    end else if (!z12 && c12 == c13 && z23) begin
      faulty = 3'b001;
    end else if (!z12 && c12 == c23 && z13) begin
      faulty = 3'b010;
    end else if (!z13 && c13 == c23 && z12) begin
      faulty = 3'b100;
    end else if (!z13 && !z23 && s12 == s13 + s23) begin
      faulty = 3'b011;
    end else if (!z12 && !z23 && s13 == s12 + s23) begin
      faulty = 3'b101;
    end else if (!z12 && !z13 && s23 == s12 + s13) begin
      faulty = 3'b110;
    end else begin
      unrecoverable = 1'b1;
    end
  end

endmodule
