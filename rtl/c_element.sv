// c_element -- two-input Muller C-element.
//
// The output copies the inputs when they agree and keeps its value while they
// differ. In an APCDP fork it merges the done signals of the fork's
// successors, so the forking stage is told to precharge only when both
// successors have evaluated, and to evaluate again only when both have
// precharged.
// Timing: one tick (one gate delay). INIT is the value after reset; done
// signals start at 1 (empty pipeline, every stage evaluates).
module c_element #(
  parameter logic INIT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= INIT;
    else        y <= (a & b) | (y & (a | b));
  end

endmodule
