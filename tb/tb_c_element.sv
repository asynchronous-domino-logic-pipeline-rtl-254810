// tb_c_element -- self-checking test of the Muller C-element: random input
// sequences; the output must follow the inputs one tick later when they
// agree and hold its previous value when they differ (reference model here),
// and start at 1 after reset.
module tb_c_element;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic a, b, y;

  c_element dut (.clk, .rst_n, .a, .b, .y);

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

  logic model;
  int   holds = 0;
  initial begin
    a = 1'b0; b = 1'b0;
    repeat (2) @(negedge clk);
    check(y == 1'b1, "reset value");
    rst_n = 1'b1;
    model = 1'b1;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      if (a == b) model = a;
      else holds++;
      @(negedge clk);
      check(y == model, $sformatf("step %0d: a=%0b b=%0b y=%0b expected %0b", i, a, b, y, model));
    end
    check(holds > 0, "hold case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
