// apcdp_fork_join -- APCDP fork and join structures, combined into one
// four-stage diamond: A forks to B and C, which join again at D.
//
//            +--> B --+
//   src --> A         +--> D --> sink
//            +--> C --+
//
// Each stage has single-rail noncritical gates for a W-bit word and one
// synchronizing gate on the dual-rail critical path:
//   A  SLG XOR of the two dual-rail source bits u, v      word: wa = w
//   B  SLG dual-rail buffer linked to A's critical output  word: wb = ~wa
//   C  SLG dual-rail buffer linked to A's critical output  word: wc = wa rotated right by 1
//   D  SLG AND joining the critical outputs of B and C     word: wd = wb ^ wc
// so out_w = ~w ^ ror(w, 1) and out_crit = u ^ v.
// Fork: the done signals of B and C (one NOR detector each) are merged by a
// C-element into A's precharge/evaluate control. Join: D's done signal drives
// the controls of both B and C. The critical data paths of B and C meet at
// D's SLG, which cannot evaluate before both have arrived.
// The structure follows the fork/join description; the stage functions and
// word width are this design's own choices (the structure carries no
// computation of its own in the source description).
//
// Interface: like apcdp_mult8x8 -- the source presents in_w, in_u, in_v while
// in_pc_n = 1 and removes them when in_pc_n = 0; out_w is valid while
// out_crit is valid; out_pc_n is the sink's done signal, which must not
// return to 1 before B and C have precharged (PS0 delay assumption).
// Timing in ticks: SLG delay = number of inputs, except C's, which is
// C_DELAY = 3 so that the two branches differ and the fork's C-element
// really has to wait for the slower one; NOR + buffer 2, C-element 1.
module apcdp_fork_join
  import apcdp_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter int unsigned C_DELAY = 3    // C's buffer is slower than B's (sized down)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  in_w,
  input  dr_t           in_u,
  input  dr_t           in_v,
  output logic          in_pc_n,
  output logic [W-1:0]  out_w,
  output dr_t           out_crit,
  input  logic          out_pc_n,
  output logic [3:0]    crit_valid   // observation: A, B, C, D evaluated
);

  dr_t  ca, cb, cc, cd;
  logic done_a, done_b, done_c, done_d;
  logic pc_a, pc_b, pc_c, pc_d;
  logic [W-1:0] wa, wb, wc, wd;

  // ---- handshake network -----------------------------------------------------
  c_element u_fork_c (.clk, .rst_n, .a(done_b), .b(done_c), .y(pc_a));   // fork
  assign pc_b    = done_d;                                               // join
  assign pc_c    = done_d;
  assign pc_d    = out_pc_n;
  assign in_pc_n = done_a;

  nor_cd u_cd_a (.clk, .rst_n, .crit(ca), .done(done_a));
  nor_cd u_cd_b (.clk, .rst_n, .crit(cb), .done(done_b));
  nor_cd u_cd_c (.clk, .rst_n, .crit(cc), .done(done_c));
  nor_cd u_cd_d (.clk, .rst_n, .crit(cd), .done(done_d));

  // ---- critical data path ----------------------------------------------------
  slg #(.N(2), .TT(4'b0110)) u_slg_a (.clk, .rst_n, .pc_n(pc_a), .x({in_v, in_u}), .y(ca));
  slg #(.N(1), .TT(2'b10))   u_slg_b (.clk, .rst_n, .pc_n(pc_b), .x(ca),           .y(cb));
  slg #(.N(1), .TT(2'b10), .DELAY(C_DELAY)) u_slg_c (.clk, .rst_n, .pc_n(pc_c), .x(ca),           .y(cc));
  slg #(.N(2), .TT(4'b1000)) u_slg_d (.clk, .rst_n, .pc_n(pc_d), .x({cc, cb}),     .y(cd));

  // ---- noncritical single-rail words (domino: precharge to 0, rise once) ------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; wb <= '0; wc <= '0; wd <= '0;
    end else begin
      if (!pc_a) wa <= '0;
      else if (dr_valid(in_u) && dr_valid(in_v)) wa <= wa | in_w;
      if (!pc_b) wb <= '0;
      else if (dr_valid(ca)) wb <= wb | ~wa;
      if (!pc_c) wc <= '0;
      else if (dr_valid(ca)) wc <= wc | {wa[0], wa[W-1:1]};
      if (!pc_d) wd <= '0;
      else if (dr_valid(cb) && dr_valid(cc)) wd <= wd | (wb ^ wc);
    end
  end

  assign out_w      = wd;
  assign out_crit   = cd;
  assign crit_valid = {dr_valid(cd), dr_valid(cc), dr_valid(cb), dr_valid(ca)};

endmodule
