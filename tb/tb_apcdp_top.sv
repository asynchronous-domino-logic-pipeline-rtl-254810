// tb_apcdp_top -- end-to-end test of the whole design at its default
// parameters: the APCDP 8x8 multiplier and the fork/join diamond, run at the
// same time on their own sources and sinks.
//
// Multiplier part: a four-phase source feeds operand pairs (the data patterns
// ff*00, ff*ff, ff*0f, corner cases and random pairs); a four-phase sink
// compares every product with a*b. Phases:
//   1. one token through the empty pipeline: the forward latency must equal
//      the sum of the critical gates' stack delays (61 ticks);
//   2. a burst with an eager source and sink: the steady-state token period
//      must match the PS0 cycle of the slowest stage triple, eq. (1):
//      3 t_eval + 2 t_CD + t_prech = 20 ticks;
//   3. random gaps at the source and random sink delays.
// Fork/join part: random words and bit pairs, random sink delays; every
// output word ~w ^ ror(w,1) and bit u ^ v is checked.
// Mechanisms counted (each must occur): SLGL opaque while its converted
// operands are present, linked-SLG evaluations, converter data-1 outputs,
// stage precharges, source stalls, sink back-pressure, fork C-element waits,
// join evaluations, hold margins. Hold margin, eq. (2): after a multiplier
// stage's critical output turns valid, its input (the previous critical
// output) must stay valid exactly t_NOR + t_Buf + t_prech = 3 ticks more.
module tb_apcdp_top;
  import apcdp_pkg::*;

  localparam int NRAND      = 100;
  localparam int WATCHDOG   = 200000;
  localparam int EXP_LAT    = 2 + 7 * 5 + 3 + 7 * 3;   // stack delays: SLG 2, SLGL 4+1, SLGL 2+1, SLG 3
  // PS0 cycle of the slowest triple (stages 1..7, t_eval = 5), t_CD = NOR + buffer = 2,
  // t_prech = 1
  localparam int EXP_PERIOD = 3 * 5 + 2 * 2 + 1;
  localparam int EXP_MARGIN = 1 + 1 + 1;   // NOR + drive buffer + precharge

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

  logic [7:0]  fj_w, fj_out_w;
  dr_t         fj_u, fj_v, fj_out_crit;
  logic        fj_in_pc_n, fj_out_pc_n;
  logic [3:0]  fj_crit_valid;

  apcdp_top dut (
    .clk, .rst_n,
    .mul_a (in_a), .mul_b (in_b), .mul_a0 (in_a0), .mul_b0 (in_b0), .mul_in_pc_n (in_pc_n),
    .mul_p (out_p), .mul_out_crit (out_crit), .mul_out_pc_n (out_pc_n), .mul_crit_valid (crit_valid),
    .fj_w, .fj_u, .fj_v, .fj_in_pc_n, .fj_out_w, .fj_out_crit, .fj_out_pc_n, .fj_crit_valid
  );

  int checks = 0, failures = 0;
  int ticks = 0;
  always @(posedge clk) ticks <= ticks + 1;

  // expected products, in order
  logic [15:0] exp_q[$];
  int          n_sent = 0, n_recv = 0;

  // mechanism counters
  int c_slgl_opaque = 0, c_linked_eval = 0, c_conv_one = 0, c_precharge = 0;
  int c_src_stall = 0, c_backpressure = 0;

  // source and sink behaviour knobs
  int  src_gap_max  = 0;
  int  sink_dly_max = 0;
  logic src_want = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- source ----------------
  task automatic send(input logic [7:0] a, input logic [7:0] b);
    int gap;
    src_want = 1'b1;
    @(negedge clk);
    while (!in_pc_n) begin
      c_src_stall++;
      @(negedge clk);
    end
    in_a  = a;  in_b  = b;
    in_a0 = dr_enc(a[0]);
    in_b0 = dr_enc(b[0]);
    exp_q.push_back(16'(a) * 16'(b));
    n_sent++;
    while (in_pc_n) @(negedge clk);
    in_a = '0; in_b = '0; in_a0 = DR_SPACER; in_b0 = DR_SPACER;
    src_want = 1'b0;
    gap = (src_gap_max > 0) ? int'($urandom_range(0, src_gap_max)) : 0;
    repeat (gap) @(negedge clk);
  endtask

  // ---------------- sink ----------------
  logic [15:0] got, want;
  initial begin
    out_pc_n = 1'b1;
    forever begin
      @(negedge clk);
      if (dr_valid(out_crit)) begin
        got = out_p;
        n_recv++;
        if (exp_q.size() == 0) begin
          check(1'b0, "product without an operand pair");
        end else begin
          want = exp_q.pop_front();
          check(got == want, $sformatf("product %0d: got %h want %h", n_recv, got, want));
          check(out_crit == DR_ZERO, "final carry must be data 0");
        end
        if (sink_dly_max > 0) begin
          int d;
          d = int'($urandom_range(0, sink_dly_max));
          if (d > 0) c_backpressure++;
          repeat (d) @(negedge clk);
        end
        // the sink behaves like a next stage: its done falls after its own
        // NOR + buffer delay, and it re-enables the last stage only once that
        // stage's predecessor has precharged (PS0 delay assumption)
        repeat (2) @(negedge clk);
        out_pc_n = 1'b0;
        while (dr_valid(out_crit) || crit_valid[NSTAGES-2]) @(negedge clk);
        out_pc_n = 1'b1;
      end
    end
  end

  // ---------------- mechanism monitors ----------------
  // hold margin of stages 1..14, sampled at negedge away from gate updates
  int          age [NSTAGES];
  logic [15:0] cv_n;
  int          c_hold = 0;
  always @(negedge clk) begin
    cv_n <= crit_valid;
    if (rst_n) begin
      for (int n = 0; n < NSTAGES; n++)
        age[n] <= (crit_valid[n] && cv_n[n]) ? age[n] + 1 : 0;
      for (int n = 1; n < NSTAGES - 1; n++)
        if (cv_n[n-1] && !crit_valid[n-1]) begin
          c_hold++;
          check(cv_n[n] && age[n] + 1 == EXP_MARGIN,
                $sformatf("stage %0d: input held %0d ticks after its output, expected %0d",
                          n, cv_n[n] ? age[n] + 1 : 0, EXP_MARGIN));
        end
    end
  end

  logic [15:0] crit_valid_d;
  always @(posedge clk) begin
    crit_valid_d <= crit_valid;
    if (rst_n) begin
      c_precharge   += $countones(crit_valid_d & ~crit_valid);
      c_linked_eval += $countones(crit_valid[15:9] & ~crit_valid_d[15:9]);
      // an SLGL stage in evaluation whose converted operands already hold
      // data while its enable (the previous critical output) is still a spacer
      if (dut.u_mult.g_stage[3].u_stage.pc_n && !dr_valid(dut.u_mult.g_stage[3].u_stage.crit_in)
          && dut.u_mult.g_stage[3].u_stage.ops_in[3] == DR_ONE)
        c_slgl_opaque++;
      if (dut.u_mult.g_stage[2].u_stage.ops_out[0] == DR_ONE) c_conv_one++;
    end
  end

  // ---------------- fork / join structure ----------------
  typedef struct packed { logic [7:0] w; logic c; } fj_exp_t;
  fj_exp_t fj_q[$];
  int fj_sent = 0, fj_recv = 0, c_fork_wait = 0, c_join = 0;
  logic fj_done = 1'b0;
  logic [3:0] fj_cv_d;

  task automatic fj_send(input logic [7:0] w, input logic u, input logic v);
    @(negedge clk);
    while (!fj_in_pc_n) @(negedge clk);
    fj_w = w; fj_u = dr_enc(u); fj_v = dr_enc(v);
    fj_q.push_back('{w: ~w ^ {w[0], w[7:1]}, c: u ^ v});
    fj_sent++;
    while (fj_in_pc_n) @(negedge clk);
    fj_w = '0; fj_u = DR_SPACER; fj_v = DR_SPACER;
  endtask

  initial begin
    fj_exp_t e;
    fj_out_pc_n = 1'b1;
    forever begin
      @(negedge clk);
      if (dr_valid(fj_out_crit)) begin
        fj_recv++;
        if (fj_q.size() == 0) check(1'b0, "fork/join: token without a source word");
        else begin
          e = fj_q.pop_front();
          check(fj_out_w == e.w && fj_out_crit == dr_enc(e.c),
                $sformatf("fork/join token %0d: %h/%b expected %h/%b", fj_recv, fj_out_w, fj_out_crit, e.w, dr_enc(e.c)));
        end
        repeat (2 + $urandom_range(0, 10)) @(negedge clk);
        fj_out_pc_n = 1'b0;
        while (dr_valid(fj_out_crit) || fj_crit_valid[1] || fj_crit_valid[2]) @(negedge clk);
        fj_out_pc_n = 1'b1;
      end
    end
  end

  always @(posedge clk) begin
    fj_cv_d <= fj_crit_valid;
    if (rst_n) begin
      if (fj_crit_valid[0] && (dut.u_fork_join.done_b != dut.u_fork_join.done_c)) c_fork_wait++;
      if (fj_crit_valid[3] && !fj_cv_d[3]) c_join++;
    end
  end

  initial begin
    fj_w = '0; fj_u = DR_SPACER; fj_v = DR_SPACER;
    wait (rst_n);
    repeat (10) @(negedge clk);
    for (int i = 0; i < 200; i++) fj_send(8'($urandom), 1'($urandom), 1'($urandom));
    wait (fj_recv == fj_sent);
    fj_done = 1'b1;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (sent %0d, received %0d)", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int t_start, t_first, t_last;
  int period;
  initial begin
    in_a = '0; in_b = '0; in_a0 = DR_SPACER; in_b0 = DR_SPACER;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. latency through the empty pipeline
    @(negedge clk);
    fork
      send(8'hff, 8'h00);
    join_none
    // count clock edges from the operands' arrival until the product
    do @(posedge clk); while (!dr_valid(in_a0));
    t_start = 0;
    do begin
      @(negedge clk);
      t_start++;
    end while (!dr_valid(out_crit) && t_start < 1000);
    check(t_start == EXP_LAT,
          $sformatf("latency %0d ticks, expected %0d", t_start, EXP_LAT));
    wait (n_recv == 1);
    wait (!src_want);
    repeat (100) @(negedge clk);

    // 2. throughput with an eager source and sink
    fork
      begin
        send(8'hff, 8'hff);
        send(8'hff, 8'h0f);
        send(8'hff, 8'h00);
        for (int i = 0; i < 29; i++) send(8'($urandom), 8'($urandom));
      end
    join_none
    wait (n_recv == 2 + 16);
    @(posedge clk); t_first = ticks;
    wait (n_recv == 2 + 26);
    @(posedge clk); t_last = ticks;
    period = (t_last - t_first) / 10;
    check(period == EXP_PERIOD && (t_last - t_first) == 10 * EXP_PERIOD,
          $sformatf("steady-state period %0d ticks (10 tokens in %0d), expected %0d",
                    period, t_last - t_first, EXP_PERIOD));
    wait (n_recv == 33);

    // 3. random operands with bubbles and back pressure
    src_gap_max  = 30;
    sink_dly_max = 60;
    send(8'h00, 8'h00);
    send(8'h01, 8'h01);
    send(8'h80, 8'h80);
    send(8'hff, 8'h01);
    for (int i = 0; i < NRAND; i++) send(8'($urandom), 8'($urandom));
    wait (n_recv == n_sent);
    repeat (100) @(negedge clk);   // longer than the sink's largest hold

    wait (fj_done);
    check(exp_q.size() == 0, "every operand pair produced a product");
    check(fj_q.size() == 0, "fork/join: every word delivered");
    check(c_fork_wait > 0, $sformatf("fork C-element waits %0d", c_fork_wait));
    check(c_join == fj_sent, $sformatf("join evaluations %0d of %0d", c_join, fj_sent));
    check(crit_valid == '0, $sformatf("pipeline drained (%b)", crit_valid));
    check(c_slgl_opaque  > 0, $sformatf("SLGL held opaque %0d", c_slgl_opaque));
    check(c_linked_eval  > 0, $sformatf("linked SLG evaluations %0d", c_linked_eval));
    check(c_conv_one     > 0, $sformatf("converter data-1 outputs %0d", c_conv_one));
    check(c_hold         > 0, $sformatf("hold margins measured %0d", c_hold));
    check(c_precharge    > 0, $sformatf("stage precharges %0d", c_precharge));
    check(c_src_stall    > 0, $sformatf("source stalls %0d", c_src_stall));
    check(c_backpressure > 0, $sformatf("sink back-pressure events %0d", c_backpressure));
    $display("fork/join tokens %0d, fork waits %0d, joins %0d", fj_recv, c_fork_wait, c_join);
    $display("tokens %0d, SLGL opaque %0d, linked evals %0d, conv data1 %0d, precharges %0d, src stalls %0d, backpressure %0d",
             n_recv, c_slgl_opaque, c_linked_eval, c_conv_one, c_precharge, c_src_stall, c_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
