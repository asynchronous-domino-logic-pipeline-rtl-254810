// tb_apcdp_fork_join -- self-checking test of the APCDP fork/join diamond.
//
// A four-phase source sends random words and dual-rail bit pairs; the sink
// checks out_w = ~w ^ ror(w, 1) and out_crit = u ^ v for every token, in
// order. Sink delays are random, so tokens back up and the fork's C-element
// has to wait for the slower of B and C. Counted and required: tokens,
// fork waits (A held precharged although one of B/C has already precharged
// or evaluated while the other has not), join evaluations (D evaluates only
// after both B and C evaluated), source stalls. The forward latency of one
// token through the empty structure is checked: SLG A 2 + slower branch C 3 + D 2 = 7
// ticks. Precharge delivery is timed for every token: A precharges
// NOR + buffer + C-element + precharge = 4 ticks after the later of B and C
// turns valid (eq. 4 plus the precharge), and B and C precharge
// NOR + buffer + precharge = 3 ticks after D turns valid (eq. 5).
module tb_apcdp_fork_join;
  import apcdp_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;

  logic [W-1:0] in_w, out_w;
  dr_t          in_u, in_v, out_crit;
  logic         in_pc_n, out_pc_n;
  logic [3:0]   crit_valid;

  apcdp_fork_join #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed { logic [W-1:0] w; logic c; } exp_t;
  exp_t exp_q[$];
  int n_sent = 0, n_recv = 0, c_stall = 0, c_fork_wait = 0, c_join = 0;
  int sink_dly_max = 0;

  task automatic send(input logic [W-1:0] w, input logic u, input logic v);
    @(negedge clk);
    while (!in_pc_n) begin
      c_stall++;
      @(negedge clk);
    end
    in_w = w; in_u = u ? DR_ONE : DR_ZERO; in_v = v ? DR_ONE : DR_ZERO;
    exp_q.push_back('{w: ~w ^ {w[0], w[W-1:1]}, c: u ^ v});
    n_sent++;
    while (in_pc_n) @(negedge clk);
    in_w = '0; in_u = DR_SPACER; in_v = DR_SPACER;
  endtask

  // sink
  initial begin
    exp_t e;
    out_pc_n = 1'b1;
    forever begin
      @(negedge clk);
      if (dr_valid(out_crit)) begin
        n_recv++;
        if (exp_q.size() == 0) check(1'b0, "token without a source word");
        else begin
          e = exp_q.pop_front();
          check(out_w == e.w, $sformatf("token %0d: word %h expected %h", n_recv, out_w, e.w));
          check(out_crit == (e.c ? DR_ONE : DR_ZERO), $sformatf("token %0d: critical bit", n_recv));
        end
        repeat (2 + ((sink_dly_max > 0) ? $urandom_range(0, sink_dly_max) : 0)) @(negedge clk);
        out_pc_n = 1'b0;
        while (dr_valid(out_crit) || crit_valid[1] || crit_valid[2]) @(negedge clk);
        out_pc_n = 1'b1;
      end
    end
  end

  // mechanism monitors
  logic [3:0] cv_d;
  always @(posedge clk) begin
    cv_d <= crit_valid;
    if (rst_n) begin
      // fork: B and C disagree in their done state while A still holds a token
      if (crit_valid[0] && (dut.done_b != dut.done_c)) c_fork_wait++;
      // join: D turns valid, both B and C valid at that moment
      if (crit_valid[3] && !cv_d[3]) begin
        c_join++;
        check(cv_d[1] && cv_d[2], "join evaluated without both inputs");
      end
    end
  end

  // precharge delivery times, sampled at negedge away from the gate updates
  localparam int EXP_FORK_DEL = 1 + 1 + 1 + 1;   // NOR, buffer, C-element, precharge
  localparam int EXP_JOIN_DEL = 1 + 1 + 1;       // NOR, buffer, precharge
  int         age [4];
  logic [3:0] cv_n;
  int         c_fork_del = 0, c_join_del = 0;
  always @(negedge clk) begin
    cv_n <= crit_valid;
    if (rst_n) begin
      for (int i = 0; i < 4; i++)
        age[i] <= (crit_valid[i] && cv_n[i]) ? age[i] + 1 : 0;
      if (cv_n[0] && !crit_valid[0]) begin
        c_fork_del++;
        check(cv_n[1] && cv_n[2] && ((age[1] < age[2]) ? age[1] : age[2]) + 1 == EXP_FORK_DEL,
              $sformatf("A precharged %0d ticks after the later branch, expected %0d",
                        ((age[1] < age[2]) ? age[1] : age[2]) + 1, EXP_FORK_DEL));
      end
      for (int i = 1; i <= 2; i++)
        if (cv_n[i] && !crit_valid[i]) begin
          c_join_del++;
          check(cv_n[3] && age[3] + 1 == EXP_JOIN_DEL,
                $sformatf("branch %0d precharged %0d ticks after D, expected %0d",
                          i, cv_n[3] ? age[3] + 1 : 0, EXP_JOIN_DEL));
        end
    end
  end

  int lat;
  initial begin
    in_w = '0; in_u = DR_SPACER; in_v = DR_SPACER;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    fork send(8'h5a, 1'b1, 1'b0); join_none
    do @(posedge clk); while (!dr_valid(in_u));
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!dr_valid(out_crit) && lat < 100);
    check(lat == 7, $sformatf("latency %0d ticks, expected 7", lat));
    wait (n_recv == 1);
    repeat (20) @(negedge clk);
    sink_dly_max = 12;
    for (int i = 0; i < 300; i++) send(W'($urandom), 1'($urandom), 1'($urandom));
    wait (n_recv == n_sent);
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all tokens delivered");
    check(c_stall > 0, $sformatf("source stalls %0d", c_stall));
    check(c_fork_wait > 0, $sformatf("fork C-element waits %0d", c_fork_wait));
    check(c_fork_del == n_sent, $sformatf("fork precharge deliveries %0d of %0d", c_fork_del, n_sent));
    check(c_join_del == 2 * n_sent, $sformatf("join precharge deliveries %0d of %0d", c_join_del, 2 * n_sent));
    check(c_join == n_sent, $sformatf("join evaluations %0d of %0d", c_join, n_sent));
    $display("tokens %0d, stalls %0d, fork waits %0d, joins %0d", n_recv, c_stall, c_fork_wait, c_join);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
