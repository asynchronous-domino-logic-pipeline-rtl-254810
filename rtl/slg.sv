// slg -- synchronizing logic gate (SLG): a dual-rail domino gate whose
// pull-down network has exactly one path per input pattern.
//
// How it works: for every pattern p of the N dual-rail inputs there is one
// series path of N transistors (input i contributes its true rail when bit i of
// p is 1, its false rail otherwise). Paths of patterns with TT[p] = 1 discharge
// the true-rail dynamic node, the others the false-rail node. No path conducts
// while any input is still a spacer, so the gate cannot start evaluating before
// every input is valid, and every path has the same stack height, so the delay
// does not depend on the data. For N = 2 and TT = 4'b1000 this is the
// synchronizing AND gate: out_t = a_t.b_t, out_f = a_t.b_f + a_f.(b_t + b_f).
//
// Interface: pc_n = 0 precharges (output spacer one tick later); pc_n = 1
// evaluates. The output stays valid (implicit domino latch) until the next
// precharge, even if the inputs return to spacer.
// Timing: the output becomes valid DELAY ticks after a path starts
// conducting. The default DELAY = N (one tick per transistor in the stack)
// models the delay assumption that a taller stack is slower; the tick-level
// delay values are this model's choice.
module slg
  import apcdp_pkg::*;
#(
  parameter int unsigned N     = 2,          // number of dual-rail inputs
  parameter logic [2**N-1:0] TT = 4'b1000,   // truth table, bit p = f(pattern p)
  parameter int unsigned DELAY = N           // evaluation delay in ticks
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pc_n,       // 0: precharge, 1: evaluate
  input  dr_t [N-1:0]   x,          // dual-rail inputs
  output dr_t           y           // dual-rail output
);

  logic pd_t, pd_f;   // pull-down network of the true / false rail conducts
  logic [$clog2(DELAY+1)-1:0] cnt;

  always_comb begin
    pd_t = 1'b0;
    pd_f = 1'b0;
    for (int unsigned p = 0; p < 2**N; p++) begin
      logic path;
      path = 1'b1;
      for (int unsigned i = 0; i < N; i++)
        path = path & (p[i] ? x[i].t : x[i].f);
      if (TT[p]) pd_t = pd_t | path;
      else       pd_f = pd_f | path;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= DR_SPACER;
      cnt <= '0;
    end else if (!pc_n) begin
      y   <= DR_SPACER;
      cnt <= '0;
    end else if (!dr_valid(y)) begin
      if (pd_t || pd_f) begin
        if (32'(cnt) + 1 >= DELAY) y <= '{t: pd_t, f: pd_f};
        else                       cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
      end
    end
  end

endmodule
