// tb_apcdp_stage -- self-checking test of single APCDP stages in isolation.
//
// Two stages are tested, with the neighbouring stages played by the test:
//   * stage 1, a carry-save row with an SLGL critical gate: the converted
//     operands are presented first and the critical output must stay a spacer
//     until the enable (previous critical output) arrives; then the
//     single-rail outputs must show the carry-save row s + c + (a & b1) one
//     tick after the enable, the critical output p[1] = s1 ^ c0 ^ (a0 & b1)
//     five ticks after it (4-input stack + enable), and the converters must
//     hold b2, a0, c'0, s'1 for stage 2.
//   * stage 9, a vector-merge bit with a linked SLG: the carry in is the
//     linked dual-rail operand; the sum bit p[9] and the carry out must match,
//     the carry three ticks after the carry in.
// Both stages must hold their outputs when their inputs return to spacer and
// clear them one tick after precharge. Reference values are computed here
// with plain integer arithmetic.
module tb_apcdp_stage;
  import apcdp_pkg::*;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n = 1'b0;

  logic              pc1, pc9;
  tok_t              tin1, tout1, tin9, tout9;
  dr_t               cin1, cout1, cin9, cout9;
  dr_t [MAXOPS-1:0]  oin1, oout1, oin9, oout9;

  apcdp_stage #(.STAGE(1)) u_s1 (.clk, .rst_n, .pc_n(pc1), .tok_in(tin1), .crit_in(cin1),
                                 .ops_in(oin1), .tok_out(tout1), .crit_out(cout1), .ops_out(oout1));
  apcdp_stage #(.STAGE(9)) u_s9 (.clk, .rst_n, .pc_n(pc9), .tok_in(tin9), .crit_in(cin9),
                                 .ops_in(oin9), .tok_out(tout9), .crit_out(cout9), .ops_out(oout9));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dr_t enc(logic v);
    return v ? DR_ONE : DR_ZERO;
  endfunction

  // ---------------- stage 1 ----------------
  task automatic run_s1(input logic [7:0] a, input logic [7:0] b,
                        input logic [7:0] s, input logic [7:0] c, input logic p0);
    logic [7:0] pp, sh, s_n, c_n;
    logic       crit;
    int         lat;
    pp = a & {8{b[1]}};
    sh = s >> 1;
    for (int j = 0; j < 8; j++) begin
      s_n[j] = sh[j] ^ c[j] ^ pp[j];
      c_n[j] = (sh[j] & c[j]) | (sh[j] & pp[j]) | (c[j] & pp[j]);
    end
    crit = s_n[0];
    pc1 = 1'b1;
    // previous stage evaluates: single-rail data, then converted operands
    tin1 = '0;
    tin1.a = a; tin1.b = b; tin1.s = s; tin1.c = c; tin1.p[0] = p0;
    @(negedge clk);
    oin1 = '{enc(b[1]), enc(a[0]), enc(c[0]), enc(s[1])};
    repeat (4) begin
      @(negedge clk);
      check(cout1 == DR_SPACER, "stage 1: SLGL evaluated without enable");
    end
    // the previous critical output arrives
    cin1 = enc(p0);
    @(negedge clk);
    check(tout1.s == s_n && tout1.c == c_n,
          $sformatf("stage 1: carry-save row s=%h c=%h, expected s=%h c=%h", tout1.s, tout1.c, s_n, c_n));
    check(tout1.a == a && tout1.b == b && tout1.p[0] == p0, "stage 1: buffered bits");
    lat = 1;
    while (cout1 == DR_SPACER && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 5, $sformatf("stage 1: critical delay %0d, expected 5", lat));
    check(cout1 == enc(crit) && tout1.p[1] == crit, "stage 1: critical bit p[1]");
    check(oout1[0] == enc(s_n[1]) && oout1[1] == enc(c_n[0]) &&
          oout1[2] == enc(a[0]) && oout1[3] == enc(b[2]), "stage 1: converters for stage 2");
    // previous stage precharges: outputs held
    tin1 = '0; cin1 = DR_SPACER; oin1 = '{default: DR_ZERO};
    repeat (3) @(negedge clk);
    check(cout1 == enc(crit) && tout1.s == s_n && tout1.c == c_n, "stage 1: outputs not held");
    // precharge
    pc1 = 1'b0;
    @(negedge clk);
    check(cout1 == DR_SPACER && tout1 == '0, "stage 1: not precharged");
    check(oout1[0] == DR_ZERO && oout1[3] == DR_ZERO, "stage 1: converters must show data 0 in precharge");
    oin1 = '{default: DR_SPACER};
    @(negedge clk);
  endtask

  // ---------------- stage 9 ----------------
  task automatic run_s9(input logic [7:0] s, input logic [7:0] c, input logic carry);
    logic x, y, sum, cout;
    int lat;
    x = s[2]; y = c[1];
    sum  = x ^ y ^ carry;
    cout = (x & y) | (x & carry) | (y & carry);
    pc9 = 1'b1;
    tin9 = '0; tin9.s = s; tin9.c = c;
    oin9 = '{DR_SPACER, DR_SPACER, enc(y), enc(x)};
    repeat (3) begin
      @(negedge clk);
      check(cout9 == DR_SPACER, "stage 9: evaluated before the linked carry");
    end
    cin9 = enc(carry);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (cout9 == DR_SPACER && lat < 20);
    check(lat == 3, $sformatf("stage 9: carry delay %0d, expected 3", lat));
    check(cout9 == enc(cout), $sformatf("stage 9: carry out %b expected %b", cout9, enc(cout)));
    check(tout9.p[9] == sum, "stage 9: sum bit p[9]");
    check(oout9[0] == enc(s[3]) && oout9[1] == enc(c[2]), "stage 9: converters for stage 10");
    tin9 = '0; cin9 = DR_SPACER;
    repeat (2) @(negedge clk);
    check(cout9 == enc(cout) && tout9.p[9] == sum, "stage 9: outputs not held");
    pc9 = 1'b0;
    @(negedge clk);
    check(cout9 == DR_SPACER && tout9 == '0, "stage 9: not precharged");
  endtask

  initial begin
    pc1 = 1'b0; pc9 = 1'b0;
    tin1 = '0; tin9 = '0;
    cin1 = DR_SPACER; cin9 = DR_SPACER;
    oin1 = '{default: DR_SPACER};
    oin9 = '{default: DR_SPACER};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_s1(8'hff, 8'hff, 8'hff, 8'hff, 1'b1);
    run_s1(8'h00, 8'h00, 8'h00, 8'h00, 1'b0);
    for (int i = 0; i < 60; i++)
      run_s1(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), 1'($urandom));
    for (int i = 0; i < 60; i++)
      run_s9(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
