// apcdp_stage -- one stage of the APCDP gate-level pipelined multiplier.
//
// A stage holds no latch or register in the real circuit: its domino gates
// keep their evaluated outputs until they are precharged (implicit latching).
// It contains
//   * the noncritical single-rail domino gates: all token bits of the stage
//     function apcdp_pkg::stage_fn, precharged to 0 and evaluating
//     monotonically (a bit that has risen stays high until precharge);
//   * one critical gate, the stage's Lin gate (most inputs), redesigned as a
//     synchronizing gate:  stage 0  - SLG on the environment's dual-rail
//     operands; stages 1..8 - SLGL enabled by the previous critical output
//     (the previous Lin gate does not feed this one); stages 9..15 - SLG
//     linked directly to the previous critical output (the ripple carry);
//   * the encoding converters that present the single-rail bits needed by the
//     next stage's critical gate in dual-rail form.
// The critical outputs of all stages form the constructed critical data path;
// the stage's only completion detector (nor_cd, outside) watches that one
// dual-rail pair.
//
// Modelling of the single-rail gates: they evaluate when the previous
// critical output is valid (stage 0: when the environment's operands are).
// This encodes the design's timing assumption that the noncritical bits of a
// stage are never slower than its detected critical bit, i.e. the critical
// path acts as a matching delay for them; it also makes the noncritical
// function free to contain inversions (sum bits), whose single-rail domino
// form is left open. The assertions check the two timing constraints of the
// stage: noncritical bits and converter outputs are settled when the critical
// output becomes valid.
//
// Interface: pc_n = 0 precharges, 1 evaluates (driven by the next stage's
// completion detector). Timing (ticks): single-rail outputs 1 tick after the
// critical input, converters 1 tick later, critical output after the gate's
// stack delay (2..5 ticks).
module apcdp_stage
  import apcdp_pkg::*;
#(
  parameter int unsigned STAGE = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pc_n,
  input  tok_t              tok_in,    // single-rail data from the previous stage
  input  dr_t               crit_in,   // previous critical output (enable / linked operand)
  input  dr_t [MAXOPS-1:0]  ops_in,    // converted operands for this stage's critical gate
  output tok_t              tok_out,   // single-rail data to the next stage
  output dr_t               crit_out,  // this stage's critical output
  output dr_t [MAXOPS-1:0]  ops_out    // converted operands for the next stage's critical gate
);

  localparam crit_kind_e  KIND  = crit_kind(STAGE);
  localparam int unsigned NOPS  = crit_nops(STAGE);
  localparam logic [2**MAXOPS-1:0] TT_FULL = crit_tt(STAGE);
  localparam logic [2**NOPS-1:0]   TT      = TT_FULL[2**NOPS-1:0];
  localparam int          PBIT  = crit_pbit(STAGE);
  localparam int unsigned NCONV_NEXT = (STAGE + 1 < NSTAGES) ? crit_nconv(STAGE + 1) : 0;

  // ---- noncritical single-rail domino gates --------------------------------
  logic fire;
  tok_t sr_q;
  logic sr_done;

  always_comb begin
    if (KIND == CG_SLG_ENV) begin
      fire = 1'b1;
      for (int unsigned i = 0; i < NOPS; i++) fire = fire & dr_valid(ops_in[i]);
    end else begin
      fire = dr_valid(crit_in);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q    <= '0;
      sr_done <= 1'b0;
    end else if (!pc_n) begin
      sr_q    <= '0;
      sr_done <= 1'b0;
    end else if (fire) begin
      sr_q    <= sr_q | stage_fn(STAGE, tok_in, crit_in.t);
      sr_done <= 1'b1;
    end
  end

  always_comb begin
    tok_out = sr_q;
    if (PBIT >= 0) tok_out.p[PBIT] = crit_out.t;
  end

  // ---- critical gate --------------------------------------------------------
  generate
    if (KIND == CG_SLG_ENV) begin : g_slg_env
      slg #(.N(NOPS), .TT(TT)) u_crit (
        .clk, .rst_n, .pc_n, .x(ops_in[NOPS-1:0]), .y(crit_out));
    end else if (KIND == CG_SLGL) begin : g_slgl
      slgl #(.N(NOPS), .TT(TT)) u_crit (
        .clk, .rst_n, .pc_n, .en(crit_in), .x(ops_in[NOPS-1:0]), .y(crit_out));
    end else begin : g_slg_linked
      slg #(.N(NOPS), .TT(TT)) u_crit (
        .clk, .rst_n, .pc_n, .x({ops_in[NOPS-2:0], crit_in}), .y(crit_out));
    end
  endgenerate

  // ---- encoding converters for the next stage's critical gate -----------------
  for (genvar i = 0; i < MAXOPS; i++) begin : g_conv
    if (i < NCONV_NEXT) begin : g_used
      logic cbit;
      assign cbit = conv_bit(STAGE, ($clog2(MAXOPS))'(i), sr_q.a[0], sr_q.b, sr_q.s, sr_q.c);
      enc_conv u_conv (.clk, .rst_n, .pc_n, .in(cbit), .out(ops_out[i]));

      // converter timing constraint: its output is settled when this stage's
      // critical output (the next stage's enable / linked operand) is valid
      always_ff @(posedge clk) begin
        if (pc_n && dr_valid(crit_out))
          assert (ops_out[i] == dr_enc(cbit))
            else $error("stage %0d: converter %0d slower than the critical path", STAGE, i);
      end
    end else begin : g_unused
      assign ops_out[i] = DR_SPACER;
    end
  end

  // ---- timing constraint of the constructed critical path -------------------
  // The detected bit must be the last one: when the critical output turns
  // valid, the noncritical gates of the stage have evaluated.
  always_ff @(posedge clk) begin
    if (pc_n && dr_valid(crit_out))
      assert (sr_done)
        else $error("stage %0d: critical output valid before noncritical gates", STAGE);
  end

endmodule
