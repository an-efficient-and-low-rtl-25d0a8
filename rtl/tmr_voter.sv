// tmr_voter: output voter of the TMR system with error reporting and the
// master/checker fallback.
//
// In TMR operation (perm_valid low) out is the bitwise majority of the three
// module outputs and error is high whenever any bit differs between any two
// modules. Once the controller announces a permanent fault (perm_valid high,
// perm_mod = 1..3 names the faulty module) that module is disregarded: the
// lower-numbered remaining module is the master and drives out, the other is
// the checker, and error is high when master and checker disagree.
// Purely combinational.
module tmr_voter
  import smertmr_pkg::*;
#(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic         perm_valid,
  input  mod_num_t     perm_mod,
  output logic [W-1:0] out,
  output logic         error
);

  logic [W-1:0] majority;
  logic [W-1:0] master, chk;

  assign majority = (in1 & in2) | (in1 & in3) | (in2 & in3);

  always_comb begin
    unique case (perm_mod)
      2'd1:    begin master = in2; chk = in3; end
      2'd2:    begin master = in1; chk = in3; end
      default: begin master = in1; chk = in2; end
    endcase
  end

  always_comb begin
    if (perm_valid && perm_mod != 2'd0) begin
      out   = master;
      error = (master != chk);
    end else begin
      out   = majority;
      error = (in1 != in2) || (in1 != in3);
    end
  end

endmodule
