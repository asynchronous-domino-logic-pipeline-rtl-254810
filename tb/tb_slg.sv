// tb_slg -- self-checking test of the synchronizing logic gate.
//
// Two instances: the synchronizing AND gate (N = 2) and a 3-input XOR built
// the same way. For every input pattern the test
//   * applies the inputs one at a time and checks that the output stays a
//     spacer while any input is still a spacer (input synchronisation);
//   * checks that the output turns valid exactly DELAY ticks after the last
//     input arrives, for every pattern (data-independent delay), with the
//     dual-rail value of the expected function;
//   * returns the inputs to spacer and checks the output holds (implicit
//     latch), then precharges and checks the spacer one tick later;
//   * checks that a precharged gate does not evaluate.
// Expected values: AND per the code table, XOR3 per parity, worked out here.
module tb_slg;
  import apcdp_pkg::*;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic pc_n;

  dr_t [1:0] xa;
  dr_t       ya;
  dr_t [2:0] xx;
  dr_t       yx;

  slg #(.N(2), .TT(4'b1000)) u_and (.clk, .rst_n, .pc_n, .x(xa), .y(ya));
  slg #(.N(3), .TT(8'b1001_0110)) u_xor (.clk, .rst_n, .pc_n, .x(xx), .y(yx));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive inputs at negedge, observe at negedge
  task automatic run_and(input logic a, input logic b);
    int lat;
    dr_t want;
    want = dr_enc(a & b);
    xa = '{DR_SPACER, DR_SPACER};
    pc_n = 1'b1;
    @(negedge clk);
    xa[0] = dr_enc(a);
    repeat (5) begin
      @(negedge clk);
      check(ya == DR_SPACER, $sformatf("AND(%0b,%0b) evaluated with b spacer", a, b));
    end
    xa[1] = dr_enc(b);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (ya == DR_SPACER && lat < 20);
    check(lat == 2, $sformatf("AND(%0b,%0b) delay %0d, expected 2", a, b, lat));
    check(ya == want, $sformatf("AND(%0b,%0b) = %b, expected %b", a, b, ya, want));
    xa = '{DR_SPACER, DR_SPACER};
    repeat (3) @(negedge clk);
    check(ya == want, "AND output not held after inputs returned to spacer");
    pc_n = 1'b0;
    @(negedge clk);
    check(ya == DR_SPACER, "AND not precharged");
  endtask

  task automatic run_xor(input logic [2:0] v);
    int lat;
    dr_t want;
    want = dr_enc(^v);
    xx = '{DR_SPACER, DR_SPACER, DR_SPACER};
    pc_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      xx[i] = dr_enc(v[i]);
      if (i < 2) begin
        repeat (4) begin
          @(negedge clk);
          check(yx == DR_SPACER, $sformatf("XOR(%b) evaluated early", v));
        end
      end
    end
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (yx == DR_SPACER && lat < 20);
    check(lat == 3, $sformatf("XOR(%b) delay %0d, expected 3", v, lat));
    check(yx == want, $sformatf("XOR(%b) = %b, expected %b", v, yx, want));
    pc_n = 1'b0;
    @(negedge clk);
    check(yx == DR_SPACER, "XOR not precharged");
  endtask

  initial begin
    pc_n = 1'b0;
    xa = '{DR_SPACER, DR_SPACER};
    xx = '{DR_SPACER, DR_SPACER, DR_SPACER};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 4; p++) run_and(p[0], p[1]);
    for (int p = 0; p < 8; p++) run_xor(3'(p));
    // a precharged gate ignores valid inputs
    pc_n = 1'b0;
    xa = '{DR_ONE, DR_ONE};
    repeat (5) @(negedge clk);
    check(ya == DR_SPACER, "AND evaluated during precharge");
    // the output never shows the unused (1,1) code
    check(ya != '{t: 1'b1, f: 1'b1}, "illegal code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
