// tb_apcdp_workload -- the multiplier under the data patterns and workloads
// of the evaluation: switching activity per token and per unit of time.
//
// Domino energy goes where gate outputs discharge and are precharged again,
// so the test counts rising edges on every gate output of the pipeline:
// the single-rail noncritical gates, both rails of every critical gate, and
// the true rail of every encoding converter. Everything is precharged between
// tokens, so the count for a token depends only on its operands.
//   1. Data patterns ff*00, ff*0f, ff*ff: one token alone, then a stream of
//      ten. Checked: the critical path always contributes one rising rail per
//      stage (16 per token, whatever the data), the stream costs exactly ten
//      times the single token, and the single-rail activity orders the
//      patterns ff*00 < ff*0f < ff*ff (the single-rail gates do not toggle for
//      a 0, which is where the design saves energy).
//   2. Workloads N/(N+M): windows of N injection cycles followed by M empty
//      cycles, with operands alternating ff*ff <-> ff*00 (and ff*0f <-> ff*00).
//      One injection cycle is 22 ticks, 90% of the pipeline's peak rate of
//      one token per 20 ticks. Checked: every token enters at its slot
//      without stalling, every product is right, the activity of a run is
//      exactly the sum of its tokens' activities, and activity per tick
//      falls with the workload.
module tb_apcdp_workload;
  import apcdp_pkg::*;

  localparam int CYCLE    = 22;    // ticks per injection cycle
  localparam int WINDOW   = 10;    // N + M cycles
  localparam int NWIN     = 4;     // windows per workload
  localparam int WATCHDOG = 100000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [7:0]  in_a, in_b;
  dr_t         in_a0, in_b0;
  logic        in_pc_n;
  logic [15:0] out_p;
  dr_t         out_crit;
  logic        out_pc_n;
  logic [15:0] crit_valid;

  apcdp_mult8x8 dut (.*);

  int checks = 0, failures = 0;
  int ticks = 0;
  always @(posedge clk) ticks <= ticks + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- switching activity ----------------
  // rising edges per stage, sampled at negedge (away from the gate updates)
  int sr_rise [NSTAGES];
  int cr_rise [NSTAGES];
  int cv_rise [NSTAGES];

  function automatic int conv_rises(input dr_t [MAXOPS-1:0] now, input dr_t [MAXOPS-1:0] prev);
    int r = 0;
    for (int i = 0; i < MAXOPS; i++) r += int'(now[i].t & ~prev[i].t);
    return r;
  endfunction

  for (genvar n = 0; n < NSTAGES; n++) begin : g_act
    tok_t             sr_d;
    dr_t              cr_d;
    dr_t [MAXOPS-1:0] cv_d;
    always @(negedge clk) begin
      sr_d <= dut.g_stage[n].u_stage.sr_q;
      cr_d <= dut.g_stage[n].u_stage.crit_out;
      cv_d <= dut.g_stage[n].u_stage.ops_out;
      if (rst_n) begin
        sr_rise[n] <= sr_rise[n] + $countones(dut.g_stage[n].u_stage.sr_q & ~sr_d);
        cr_rise[n] <= cr_rise[n]
                      + int'(dut.g_stage[n].u_stage.crit_out.t & ~cr_d.t)
                      + int'(dut.g_stage[n].u_stage.crit_out.f & ~cr_d.f);
        cv_rise[n] <= cv_rise[n] + conv_rises(dut.g_stage[n].u_stage.ops_out, cv_d);
      end
    end
  end

  function automatic int sum_sr();
    int s = 0;
    for (int n = 0; n < NSTAGES; n++) s += sr_rise[n];
    return s;
  endfunction
  function automatic int sum_cr();
    int s = 0;
    for (int n = 0; n < NSTAGES; n++) s += cr_rise[n];
    return s;
  endfunction
  function automatic int sum_cv();
    int s = 0;
    for (int n = 0; n < NSTAGES; n++) s += cv_rise[n];
    return s;
  endfunction
  function automatic int act_all();
    return sum_sr() + sum_cr() + sum_cv();
  endfunction

  // ---------------- source ----------------
  logic [15:0] exp_q[$];
  int          n_sent = 0, n_recv = 0, n_stall = 0;

  // present one token at tick 'slot' (or at once for slot < 0)
  task automatic send_at(input logic [7:0] a, input logic [7:0] b, input int slot);
    while (ticks < slot) @(negedge clk);
    while (!in_pc_n) begin
      if (slot >= 0) n_stall++;
      @(negedge clk);
    end
    in_a  = a;  in_b  = b;
    in_a0 = dr_enc(a[0]);
    in_b0 = dr_enc(b[0]);
    exp_q.push_back(16'(a) * 16'(b));
    n_sent++;
    while (in_pc_n) @(negedge clk);
    in_a = '0; in_b = '0; in_a0 = DR_SPACER; in_b0 = DR_SPACER;
  endtask

  // ---------------- sink: eager, behaves like a next stage ----------------
  logic [15:0] got, want;
  initial begin
    out_pc_n = 1'b1;
    forever begin
      @(negedge clk);
      if (dr_valid(out_crit)) begin
        got = out_p;
        n_recv++;
        if (exp_q.size() == 0) begin
          check(1'b0, "product with no operands sent");
        end else begin
          want = exp_q.pop_front();
          check(got == want, $sformatf("product %0d: got %h want %h", n_recv, got, want));
        end
        repeat (2) @(negedge clk);
        out_pc_n = 1'b0;
        while (dr_valid(out_crit) || crit_valid[NSTAGES-2]) @(negedge clk);
        out_pc_n = 1'b1;
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (sent %0d, received %0d)", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain();
    while (n_recv != n_sent) @(negedge clk);
    repeat (100) @(negedge clk);
  endtask

  // ---------------- part 1: data patterns ----------------
  int e_sr [3];   // single-rail rises per token
  int e_all[3];   // all rises per token

  task automatic pattern(input int k, input logic [7:0] a, input logic [7:0] b);
    int sr0, cr0, all0, all1, crit;
    sr0 = sum_sr(); cr0 = sum_cr(); all0 = act_all();
    send_at(a, b, -1);
    drain();
    e_sr[k]  = sum_sr() - sr0;
    e_all[k] = act_all() - all0;
    crit     = sum_cr() - cr0;
    check(crit == NSTAGES,
          $sformatf("%h*%h: %0d critical rail rises per token, expected %0d", a, b, crit, NSTAGES));
    all1 = act_all();
    for (int i = 0; i < 10; i++) send_at(a, b, -1);
    drain();
    check(act_all() - all1 == 10 * e_all[k],
          $sformatf("%h*%h: stream of 10 costs %0d rises, expected %0d",
                    a, b, act_all() - all1, 10 * e_all[k]));
    $display("pattern %h*%h: single-rail rises %0d, all rises %0d per token", a, b, e_sr[k], e_all[k]);
  endtask

  // ---------------- part 2: workloads ----------------
  real pw_prev;

  task automatic workload(input int nact, input logic [7:0] b_hi, input int e_hi, input int e_lo);
    int  all0, t0, slot, nhi, nlo, stall0;
    real pw;
    all0   = act_all();
    stall0 = n_stall;
    nhi = 0; nlo = 0;
    @(negedge clk);
    t0 = ticks + 2;
    for (int w = 0; w < NWIN; w++)
      for (int c = 0; c < nact; c++) begin
        slot = t0 + (w * WINDOW + c) * CYCLE;
        if (c % 2 == 0) begin send_at(8'hff, b_hi, slot); nhi++; end
        else            begin send_at(8'hff, 8'h00, slot); nlo++; end
      end
    drain();
    check(n_stall == stall0,
          $sformatf("workload %0d/%0d: source stalled %0d times", nact, WINDOW, n_stall - stall0));
    check(act_all() - all0 == nhi * e_hi + nlo * e_lo,
          $sformatf("workload %0d/%0d: %0d rises, expected %0d", nact, WINDOW,
                    act_all() - all0, nhi * e_hi + nlo * e_lo));
    pw = real'(act_all() - all0) / real'(NWIN * WINDOW * CYCLE);
    $display("workload %0d/%0d (ff*%h <-> ff*00): %0.2f rises per tick", nact, WINDOW, b_hi, pw);
    check(pw < pw_prev, $sformatf("workload %0d/%0d: activity per tick did not fall", nact, WINDOW));
    pw_prev = pw;
  endtask

  initial begin
    for (int n = 0; n < NSTAGES; n++) begin
      sr_rise[n] = 0; cr_rise[n] = 0; cv_rise[n] = 0;
    end
    in_a = '0; in_b = '0; in_a0 = DR_SPACER; in_b0 = DR_SPACER;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    pattern(0, 8'hff, 8'h00);
    pattern(1, 8'hff, 8'h0f);
    pattern(2, 8'hff, 8'hff);
    check(e_sr[0] < e_sr[1] && e_sr[1] < e_sr[2],
          $sformatf("single-rail activity ff*00 %0d, ff*0f %0d, ff*ff %0d not increasing",
                    e_sr[0], e_sr[1], e_sr[2]));

    pw_prev = 1.0e9;
    for (int nact = WINDOW; nact >= 2; nact -= 2) workload(nact, 8'hff, e_all[2], e_all[0]);
    pw_prev = 1.0e9;
    for (int nact = WINDOW; nact >= 2; nact -= 2) workload(nact, 8'h0f, e_all[1], e_all[0]);

    check(exp_q.size() == 0, "every operand pair produced a product");
    $display("tokens %0d", n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
