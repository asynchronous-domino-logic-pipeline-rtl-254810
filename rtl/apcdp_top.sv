// apcdp_top -- the two APCDP structures side by side:
//   * mul_*  the 8x8 array multiplier, a 16-stage linear APCDP pipeline
//            (apcdp_mult8x8), the main design;
//   * fj_*   a fork/join diamond of four APCDP stages (apcdp_fork_join),
//            showing the C-element fork and the shared-acknowledge join.
// The two share only clk (the unit-delay time base of the model) and rst_n;
// each keeps its own four-phase source and sink ports, with the conventions
// described in apcdp_mult8x8 and apcdp_fork_join.
module apcdp_top
  import apcdp_pkg::*;
#(
  parameter int unsigned NOR_DLY = 1,   // static NOR delay of the detectors, ticks
  parameter int unsigned BUF_DLY = 1,   // drive buffer delay, ticks
  parameter int unsigned FJ_W    = 8    // word width of the fork/join structure
) (
  input  logic                clk,
  input  logic                rst_n,
  // multiplier
  input  logic [MW-1:0]       mul_a,
  input  logic [MW-1:0]       mul_b,
  input  dr_t                 mul_a0,
  input  dr_t                 mul_b0,
  output logic                mul_in_pc_n,
  output logic [2*MW-1:0]     mul_p,
  output dr_t                 mul_out_crit,
  input  logic                mul_out_pc_n,
  output logic [NSTAGES-1:0]  mul_crit_valid,
  // fork / join
  input  logic [FJ_W-1:0]     fj_w,
  input  dr_t                 fj_u,
  input  dr_t                 fj_v,
  output logic                fj_in_pc_n,
  output logic [FJ_W-1:0]     fj_out_w,
  output dr_t                 fj_out_crit,
  input  logic                fj_out_pc_n,
  output logic [3:0]          fj_crit_valid
);

  apcdp_mult8x8 #(.NOR_DLY(NOR_DLY), .BUF_DLY(BUF_DLY)) u_mult (
    .clk, .rst_n,
    .in_a     (mul_a),
    .in_b     (mul_b),
    .in_a0    (mul_a0),
    .in_b0    (mul_b0),
    .in_pc_n  (mul_in_pc_n),
    .out_p    (mul_p),
    .out_crit (mul_out_crit),
    .out_pc_n (mul_out_pc_n),
    .crit_valid (mul_crit_valid)
  );

  apcdp_fork_join #(.W(FJ_W)) u_fork_join (
    .clk, .rst_n,
    .in_w      (fj_w),
    .in_u      (fj_u),
    .in_v      (fj_v),
    .in_pc_n   (fj_in_pc_n),
    .out_w     (fj_out_w),
    .out_crit  (fj_out_crit),
    .out_pc_n  (fj_out_pc_n),
    .crit_valid (fj_crit_valid)
  );

endmodule
