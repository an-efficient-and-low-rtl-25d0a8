// fmr_reg: the faulty modules register (FMR).
//
// load captures the faulty-module set found by the fault locator; clear
// empties it (load wins if both are high). f is the stored set, one flag
// F(i) per module, which steers the scan-input multiplexers and the source
// priority encoder during recovery. The same contents are also given as two
// module numbers: fmr1 is the lowest-numbered faulty module and fmr2 the
// second one when two modules are faulty, 0 meaning none.
module fmr_reg
  import smertmr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  logic     clear,
  input  mod_set_t faulty_in,
  output mod_set_t f,
  output mod_num_t fmr1,
  output mod_num_t fmr2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     f <= '0;
    else if (load)  f <= faulty_in;
    else if (clear) f <= '0;
  end

  assign fmr1 = lowest(f);
  assign fmr2 = (set_count(f) >= 2'd2) ? highest(f) : 2'd0;

endmodule
