// tb_enc_conv -- self-checking test of the single-rail to dual-rail encoding
// converter against its truth table: precharge -> (0,1); evaluate with
// in = 0 -> (0,1); evaluate with in = 1 -> (1,0) one tick after `in` rises.
// The output must never be a spacer in the data-0 cases and never (1,1).
module tb_enc_conv;
  import apcdp_pkg::*;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;
  logic pc_n, in;
  dr_t  out;

  enc_conv dut (.clk, .rst_n, .pc_n, .in, .out);

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

  initial begin
    pc_n = 1'b0;
    in   = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      logic v;
      v = 1'($urandom);
      // precharge phase: data 0 whatever the input shows
      pc_n = 1'b0;
      in   = 1'($urandom);
      @(negedge clk);
      check(out == DR_ZERO, $sformatf("precharge: out=%b", out));
      in = 1'b0;
      @(negedge clk);
      check(out == DR_ZERO, "precharge with in=0");
      // evaluate with in = 0: keeps data 0
      pc_n = 1'b1;
      repeat (2) begin
        @(negedge clk);
        check(out == DR_ZERO, "evaluate in=0 must keep data 0");
      end
      // single-rail input rises (or stays 0)
      in = v;
      @(negedge clk);
      check(out == dr_enc(v), $sformatf("evaluate in=%0b: out=%b", v, out));
      // domino input held: output held
      @(negedge clk);
      check(out == dr_enc(v), "evaluate: output not held");
      check(out != '{t: 1'b1, f: 1'b1}, "illegal code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
