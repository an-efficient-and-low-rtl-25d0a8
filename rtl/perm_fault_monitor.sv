// perm_fault_monitor: permanent-fault detection with the MRFM (most recent
// faulty module) and NCF (number of consecutive faults) registers.
//
// At the end of every comparison round (update high for one cycle, faulty =
// set of modules found faulty) the monitor looks at the result:
//   - exactly one faulty module equal to MRFM: NCF is incremented;
//   - exactly one faulty module different from MRFM: MRFM takes its number and
//     NCF restarts at 1;
//   - no faulty module, or two: NCF returns to 0.
// When NCF reaches NCF_LIMIT the module in MRFM is taken to hold a permanent
// fault: perm_valid rises and perm_mod names it. That announcement degrades
// the TMR system to master/checker and is held until reset. NCF_LIMIT is this
// design's choice; the scheme only calls for a predefined number. Results are
// visible the cycle after update.
module perm_fault_monitor
  import smertmr_pkg::*;
#(
  parameter int unsigned NCF_LIMIT = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     update,
  input  mod_set_t faulty,
  output mod_num_t mrfm,
  output logic [$clog2(NCF_LIMIT+1)-1:0] ncf,
  output logic     perm_valid,
  output mod_num_t perm_mod
);

  localparam int unsigned NW = $clog2(NCF_LIMIT + 1);

  mod_num_t f_num;
  logic     single;
  logic [NW-1:0] ncf_next;

  assign single = (set_count(faulty) == 2'd1);
  assign f_num  = lowest(faulty);

  always_comb begin
    if (!single)            ncf_next = '0;
    else if (f_num == mrfm) ncf_next = (ncf == NW'(NCF_LIMIT)) ? ncf : ncf + 1'b1;
    else                    ncf_next = NW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mrfm       <= '0;
      ncf        <= '0;
      perm_valid <= 1'b0;
      perm_mod   <= '0;
    end else if (update && !perm_valid) begin
      ncf <= ncf_next;
      if (single) mrfm <= f_num;
      if (single && ncf_next == NW'(NCF_LIMIT)) begin
        perm_valid <= 1'b1;
        perm_mod   <= f_num;
      end
    end
  end

endmodule
