// mismatch_counter: counts mismatches between the scan outputs of a pair of
// redundant modules (Counter12, Counter13 or Counter23).
//
// Each clock with up high and a != b the count goes up by one (comparison
// mode); each clock with down high and a != b it goes down by one (recovery
// mode, where the same mismatches reappear while the states are shifted out a
// second time, so a clean recovery ends with the count back at zero). A down
// count at zero stays at zero and sets the sticky underflow flag, which marks
// a mismatch that was not there during comparison, i.e. a fault that struck
// during recovery. Up counting saturates at the maximum. clear empties the
// count and the flag synchronously. One cycle latency from a/b to count.
module mismatch_counter #(
  parameter int unsigned CW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          up,
  input  logic          down,
  input  logic          a,
  input  logic          b,
  output logic [CW-1:0] count,
  output logic          underflow
);

  logic mismatch;
  assign mismatch = a ^ b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      underflow <= 1'b0;
    end else if (clear) begin
      count     <= '0;
      underflow <= 1'b0;
    end else if (mismatch) begin
      if (up) begin
        if (count != '1) count <= count + 1'b1;
      end else if (down) begin
        if (count != '0) count <= count - 1'b1;
        else             underflow <= 1'b1;
      end
    end
  end

endmodule
