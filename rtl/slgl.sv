// slgl -- synchronizing logic gate with a latch function (SLGL).
//
// How it works: an SLG (one series pull-down path per input pattern, see slg)
// with an additional dual-rail enable pair (en_t, en_f) in series with every
// path. While the enable is a spacer the gate is opaque: it cannot start
// evaluating whatever its data inputs show. Once either enable rail is high the
// gate is transparent and evaluates like an SLG. In an APCDP stage the enable
// is the critical (SLG/SLGL) output of the stage before, which links the
// critical data path through a stage whose Lin gate is not fed by that output.
// Only the enable's validity matters, not its value.
//
// Interface: pc_n = 0 precharges (output spacer one tick later); pc_n = 1
// evaluates; the output holds until the next precharge.
// Timing: output valid DELAY ticks after the enabled path starts conducting;
// default DELAY = N + 1 since the enable adds one transistor to the stack.
module slgl
  import apcdp_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter logic [2**N-1:0] TT = 4'b1000,
  parameter int unsigned DELAY = N + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pc_n,       // 0: precharge, 1: evaluate
  input  dr_t           en,         // dual-rail enable (critical input)
  input  dr_t [N-1:0]   x,          // dual-rail data inputs
  output dr_t           y
);

  logic pd_t, pd_f;
  logic [$clog2(DELAY+1)-1:0] cnt;

  always_comb begin
    pd_t = 1'b0;
    pd_f = 1'b0;
    for (int unsigned p = 0; p < 2**N; p++) begin
      logic path;
      path = en.t | en.f;   // enable transistor pair at the foot of the stack
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
