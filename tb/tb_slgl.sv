// tb_slgl -- self-checking test of the synchronizing logic gate with latch
// function (2-input AND data function).
//
// For every data pattern: the data inputs are valid but the enable is a
// spacer, so the gate must stay opaque (spacer output) for many ticks; then the
// enable (either value) arrives and the output must turn valid exactly
// DELAY = 3 ticks later with a AND b. The test also checks that the enable
// alone does not evaluate the gate while a data input is a spacer, that the
// output is held when enable and data return to spacer, and the precharge.
module tb_slgl;
  import apcdp_pkg::*;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic pc_n;
  dr_t       en;
  dr_t [1:0] x;
  dr_t       y;

  slgl #(.N(2), .TT(4'b1000)) dut (.clk, .rst_n, .pc_n, .en, .x, .y);

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

  task automatic run(input logic a, input logic b, input logic env);
    int lat;
    dr_t want;
    want = dr_enc(a & b);
    pc_n = 1'b1;
    // enable first, one data input missing: no evaluation
    en = dr_enc(env);
    x  = '{DR_SPACER, dr_enc(a)};
    repeat (4) begin
      @(negedge clk);
      check(y == DR_SPACER, "evaluated with a data input spacer");
    end
    // data complete, enable removed: opaque
    en = DR_SPACER;
    x  = '{dr_enc(b), dr_enc(a)};
    repeat (6) begin
      @(negedge clk);
      check(y == DR_SPACER, $sformatf("opaque gate evaluated (a=%0b b=%0b)", a, b));
    end
    en = dr_enc(env);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (y == DR_SPACER && lat < 20);
    check(lat == 3, $sformatf("delay %0d, expected 3", lat));
    check(y == want, $sformatf("a=%0b b=%0b en=%0b: y=%b expected %b", a, b, env, y, want));
    en = DR_SPACER;
    x  = '{DR_SPACER, DR_SPACER};
    repeat (3) @(negedge clk);
    check(y == want, "output not held");
    pc_n = 1'b0;
    @(negedge clk);
    check(y == DR_SPACER, "not precharged");
  endtask

  initial begin
    pc_n = 1'b0;
    en = DR_SPACER;
    x = '{DR_SPACER, DR_SPACER};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 8; p++) run(p[0], p[1], p[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
