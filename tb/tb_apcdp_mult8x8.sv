// tb_apcdp_mult8x8 -- end-to-end test of the APCDP 8x8 multiplier at its
// default parameters.
//
// A four-phase source feeds operand pairs (the data patterns ff*00, ff*ff,
// ff*0f, corner cases and random pairs); a four-phase sink captures every
// product when the final critical output turns valid and compares it with a*b
// computed here. Phases:
//   1. one token through the empty pipeline: the forward latency must equal
//      the sum of the critical gates' stack delays (61 ticks);
//   2. a burst with an eager source and sink: the steady-state token period
//      must match the PS0 cycle of the slowest stage triple, eq. (1):
//      3 t_eval + 2 t_CD + t_prech;
//   3. random gaps at the source and random sink delays (bubbles, back
//      pressure).
// Mechanisms counted (each must occur): SLGL opaque while its converted
// operands are present, linked-SLG evaluations, converter data-1 outputs,
// stage precharges, source stalls, sink back-pressure.
// Hold margin, eq. (2): after a stage's critical output turns valid, the
// previous stage's critical output (this stage's input) must stay valid for
// exactly t_NOR + t_Buf + t_prech = 3 ticks before it is precharged away.
module tb_apcdp_mult8x8;
  import apcdp_pkg::*;

  localparam int NRAND      = 200;
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

  apcdp_mult8x8 dut (.*);

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
  logic [15:0] crit_valid_d;
  always @(posedge clk) begin
    crit_valid_d <= crit_valid;
    if (rst_n) begin
      c_precharge   += $countones(crit_valid_d & ~crit_valid);
      c_linked_eval += $countones(crit_valid[15:9] & ~crit_valid_d[15:9]);
      // an SLGL stage in evaluation whose converted operands already hold
      // data while its enable (the previous critical output) is still a spacer
      if (dut.g_stage[3].u_stage.pc_n && !dr_valid(dut.g_stage[3].u_stage.crit_in)
          && dut.g_stage[3].u_stage.ops_in[3] == DR_ONE)
        c_slgl_opaque++;
      if (dut.g_stage[2].u_stage.ops_out[0] == DR_ONE) c_conv_one++;
    end
  end

  // hold margin of each stage's inputs (stages 1..14, whose successor is a
  // stage of the pipeline); sampled at negedge, away from the gate updates
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

    check(exp_q.size() == 0, "every operand pair produced a product");
    check(crit_valid == '0, $sformatf("pipeline drained (%b)", crit_valid));
    check(c_slgl_opaque  > 0, $sformatf("SLGL held opaque %0d", c_slgl_opaque));
    check(c_linked_eval  > 0, $sformatf("linked SLG evaluations %0d", c_linked_eval));
    check(c_conv_one     > 0, $sformatf("converter data-1 outputs %0d", c_conv_one));
    check(c_hold         > 0, $sformatf("hold margins measured %0d", c_hold));
    check(c_precharge    > 0, $sformatf("stage precharges %0d", c_precharge));
    check(c_src_stall    > 0, $sformatf("source stalls %0d", c_src_stall));
    check(c_backpressure > 0, $sformatf("sink back-pressure events %0d", c_backpressure));
    $display("tokens %0d, SLGL opaque %0d, linked evals %0d, conv data1 %0d, precharges %0d, src stalls %0d, backpressure %0d",
             n_recv, c_slgl_opaque, c_linked_eval, c_conv_one, c_precharge, c_src_stall, c_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
