// enc_conv -- single-rail to dual-rail encoding converter.
//
// Bridges a single-rail domino signal into a dual-rail (SLG/SLGL) input.
// Truth table: precharge (pc_n = 0) -> (out, out_b) = (0,1), a dual-rail 0;
// evaluate with in = 0 -> stays (0,1); evaluate with in = 1 -> (1,0).
// A single-rail signal has no spacer, so the converter shows a (possibly
// stale) data 0 during precharge: the SLGL that receives it must be enabled by
// the critical path, and the converter must be valid before that enable.
// As in the fast converter structure, a rising input pulls the false rail
// down directly and the true rail follows within the same gate delay; the
// data-0 case needs no transition at all.
// Interface: pc_n is the precharge/evaluate control of the stage that holds
// the converter (the producer of `in`). Timing: data 1 appears one tick
// after `in` rises; precharge restores data 0 one tick after pc_n falls.
module enc_conv
  import apcdp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic pc_n,
  input  logic in,
  output dr_t  out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= DR_ZERO;
    end else if (!pc_n) begin
      out <= DR_ZERO;
    end else if (in) begin
      // in pulls the false rail low; the true rail follows
      out <= DR_ONE;
    end
  end

endmodule
