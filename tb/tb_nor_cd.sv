// tb_nor_cd -- self-checking test of the NOR completion detector with its
// drive buffer chain. A random sequence of spacer / data-0 / data-1 codes is
// applied; done must equal NOR(t, f) of the input seen NOR_DLY + BUF_DLY
// ticks earlier, i.e. D - 1 negedge samples before (reference delay line kept here), and be 1 after reset.
module tb_nor_cd;
  import apcdp_pkg::*;

  localparam int D = 2;   // default NOR_DLY + BUF_DLY

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  dr_t  crit;
  logic done;

  nor_cd dut (.clk, .rst_n, .crit, .done);

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

  logic hist [$];
  initial begin
    crit = DR_SPACER;
    repeat (2) @(negedge clk);
    check(done == 1'b1, "done after reset");
    rst_n = 1'b1;
    for (int i = 0; i < D - 1; i++) hist.push_back(1'b1);
    for (int i = 0; i < 300; i++) begin
      case ($urandom_range(0, 2))
        0: crit = DR_SPACER;
        1: crit = DR_ZERO;
        default: crit = DR_ONE;
      endcase
      hist.push_back(!(crit.t || crit.f));
      @(negedge clk);
      check(done == hist.pop_front(), $sformatf("step %0d: done=%0b", i, done));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
