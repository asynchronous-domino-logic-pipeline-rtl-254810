// apcdp_mult8x8 -- 8x8 unsigned array multiplier, pipelined at gate level as
// an asynchronous domino pipeline with a constructed critical data path.
//
// Structure: 16 apcdp_stage instances in a linear pipeline, each one domino
// gate deep, with no latches between them.
//   stage 0      first partial-product row a & b0 (critical gate: SLG AND on
//                the operand bits a0, b0; gives p[0])
//   stages 1..7  one carry-save full-adder row each, adding a & bk (critical
//                gate: SLGL computing the column-0 sum, which is p[k])
//   stage 8      vector-merge adder bit 0 (critical gate: SLGL carry c1)
//   stages 9..15 vector-merge adder bits 1..7 (critical gate: SLG majority,
//                linked to the previous carry)
// The critical outputs of all stages form one dual-rail chain. Each stage has
// a single NOR completion detector (nor_cd) on its critical output; its done
// signal is the precharge/evaluate control of the stage before, which gives
// the PS0 protocol: a stage precharges when its successor has evaluated and
// evaluates again when its successor has precharged.
//
// Environment interface (four-phase, domino convention):
//   input side  - the source presents in_a/in_b (single-rail) together with
//                 the dual-rail copies in_a0/in_b0 while in_pc_n = 1, and
//                 returns all of them to 0 / spacer once in_pc_n = 0;
//   output side - out_p is valid when out_crit is valid (dual-rail, the final
//                 carry, always data 0); the sink answers on out_pc_n like a
//                 next stage's done (0 = precharge the last stage).
// crit_valid shows which stages hold an evaluated token (observation only).
// Timing is in ticks of clk, one tick per unit gate delay (see apcdp_pkg).
module apcdp_mult8x8
  import apcdp_pkg::*;
#(
  parameter int unsigned NOR_DLY = 1,   // static NOR delay, ticks
  parameter int unsigned BUF_DLY = 1    // drive buffer chain delay, ticks
) (
  input  logic                clk,
  input  logic                rst_n,
  // source side
  input  logic [MW-1:0]       in_a,
  input  logic [MW-1:0]       in_b,
  input  dr_t                 in_a0,
  input  dr_t                 in_b0,
  output logic                in_pc_n,
  // sink side
  output logic [2*MW-1:0]     out_p,
  output dr_t                 out_crit,
  input  logic                out_pc_n,
  // observation
  output logic [NSTAGES-1:0]  crit_valid
);

  tok_t              tok  [NSTAGES+1];
  dr_t               crit [NSTAGES+1];
  dr_t [MAXOPS-1:0]  ops  [NSTAGES+1];
  logic              done [NSTAGES+1];   // done[n]: completion of stage n-1
  logic              pc_n [NSTAGES];

  // source acts as stage "-1"
  always_comb begin
    tok[0]   = '0;
    tok[0].a = in_a;
    tok[0].b = in_b;
    crit[0]  = DR_SPACER;
    ops[0]   = '{default: DR_SPACER};
    ops[0][0] = in_a0;
    ops[0][1] = in_b0;
  end

  for (genvar n = 0; n < NSTAGES; n++) begin : g_stage
    apcdp_stage #(.STAGE(n)) u_stage (
      .clk, .rst_n,
      .pc_n     (pc_n[n]),
      .tok_in   (tok[n]),
      .crit_in  (crit[n]),
      .ops_in   (ops[n]),
      .tok_out  (tok[n+1]),
      .crit_out (crit[n+1]),
      .ops_out  (ops[n+1])
    );

    nor_cd #(.NOR_DLY(NOR_DLY), .BUF_DLY(BUF_DLY)) u_cd (
      .clk, .rst_n, .crit(crit[n+1]), .done(done[n+1]));

    if (n + 1 < NSTAGES) begin : g_pc
      assign pc_n[n] = done[n+2];
    end else begin : g_pc_last
      assign pc_n[n] = out_pc_n;
    end

    assign crit_valid[n] = dr_valid(crit[n+1]);
  end

  assign done[0]  = 1'b1;   // unused slot
  assign in_pc_n  = done[1];
  assign out_p    = tok[NSTAGES].p;
  assign out_crit = crit[NSTAGES];

endmodule
