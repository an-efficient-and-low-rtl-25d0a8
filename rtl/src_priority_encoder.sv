// src_priority_encoder: chooses the fault-free module whose state is copied
// into the faulty modules during recovery, and selects its scan output.
//
// From the faulty flags f (bit i-1 for module i) the lowest-numbered module
// that is not flagged becomes the source: src is its number (0 if all three
// are flagged) and src_sco its scan output. Purely combinational.
module src_priority_encoder
  import smertmr_pkg::*;
(
  input  mod_set_t   f,
  input  logic [2:0] sco,
  output mod_num_t   src,
  output logic       src_sco
);

  assign src = lowest(~f);

  always_comb begin
    unique case (src)
      2'd1:    src_sco = sco[0];
      2'd2:    src_sco = sco[1];
      2'd3:    src_sco = sco[2];
      default: src_sco = 1'b0;
    endcase
  end

endmodule
