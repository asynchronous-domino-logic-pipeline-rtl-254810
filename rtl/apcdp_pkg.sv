// apcdp_pkg -- shared types, encodings and stage functions of the APCDP
// (asynchronous pipeline based on a constructed critical data path) model.
//
// Timing model used by every block: the design is asynchronous, so the RTL
// describes it on a fine time base `clk`, one tick standing for one unit gate
// delay. Every gate output is a flip-flop updated on that tick, so the
// handshake loops of the pipeline never form combinational loops. Gate delays
// are expressed in ticks.
//
// Four-phase dual-rail code (both rails of a pair): (t,f) = (0,0) spacer,
// (1,0) data 1, (0,1) data 0, (1,1) unused.
//
// The stage functions describe one gate-level pipelined 8x8 unsigned array
// multiplier: stage 0 forms the first partial-product row, stages 1..7 each add
// one partial-product row in carry-save form (one full-adder level each),
// stages 8..15 are the ripple-carry vector-merge adder, one carry per stage.
// The multiplier's internal organisation is this design's own choice; only
// "8x8 array style multiplier, one domino gate per stage" is given.
package apcdp_pkg;

  // one dual-rail wire pair
  typedef struct packed {
    logic t;   // true rail
    logic f;   // false rail
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_ZERO   = '{t: 1'b0, f: 1'b1};
  localparam dr_t DR_ONE    = '{t: 1'b1, f: 1'b0};

  function automatic logic dr_valid(dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic dr_t dr_enc(logic v);
    return v ? DR_ONE : DR_ZERO;
  endfunction

  // ---------------------------------------------------------------------------
  // Multiplier organisation
  // ---------------------------------------------------------------------------
  localparam int unsigned MW       = 8;          // operand width
  localparam int unsigned NSTAGES  = 2 * MW;     // 8 carry-save + 8 ripple stages
  localparam int unsigned MAXOPS   = 4;          // operands of the widest critical gate

  // single-rail token carried by the noncritical data paths
  typedef struct packed {
    logic [MW-1:0]   a;   // multiplicand (buffered down the pipeline)
    logic [MW-1:0]   b;   // multiplier   (buffered down the pipeline)
    logic [MW-1:0]   s;   // carry-save sum vector
    logic [MW-1:0]   c;   // carry-save carry vector
    logic [2*MW-1:0] p;   // product bits already final
  } tok_t;

  // kind of the critical (Lin) gate of a stage
  typedef enum logic [1:0] {
    CG_SLG_ENV,    // SLG fed by the dual-rail operands of the environment (stage 0)
    CG_SLGL,       // SLGL: enabled by previous critical output, operands from converters
    CG_SLG_LINKED  // SLG: previous critical output is one of its data operands
  } crit_kind_e;

  function automatic crit_kind_e crit_kind(int unsigned n);
    if (n == 0)       return CG_SLG_ENV;
    else if (n <= MW) return CG_SLGL;        // stages 1..8
    else              return CG_SLG_LINKED;  // stages 9..15
  endfunction

  // number of data operands of the critical gate (linked operand included)
  function automatic int unsigned crit_nops(int unsigned n);
    if (n == 0)       return 2;   // a0 & b0
    else if (n < MW)  return 4;   // s1 ^ c0 ^ (a0 & bk)
    else if (n == MW) return 2;   // carry c1 = x0 & y0
    else              return 3;   // carry c(r+1) = maj(c_r, x_r, y_r)
  endfunction

  // number of operands that come through encoding converters of the stage before
  function automatic int unsigned crit_nconv(int unsigned n);
    return (crit_kind(n) == CG_SLG_LINKED) ? crit_nops(n) - 1 : crit_nops(n);
  endfunction

  // critical gate function on its operand vector (operand 0 first)
  function automatic logic crit_fn(int unsigned n, logic [MAXOPS-1:0] o);
    if (n == 0)       return o[0] & o[1];
    else if (n < MW)  return o[0] ^ o[1] ^ (o[2] & o[3]);
    else if (n == MW) return o[0] & o[1];
    else              return (o[0] & o[1]) | (o[0] & o[2]) | (o[1] & o[2]);
  endfunction

  // truth table of the critical gate over its NOPS operands, bit index = pattern
  function automatic logic [2**MAXOPS-1:0] crit_tt(int unsigned n);
    logic [2**MAXOPS-1:0] tt;
    tt = '0;
    for (int unsigned p = 0; p < 2**crit_nops(n); p++)
      tt[p] = crit_fn(n, MAXOPS'(p));
    return tt;
  endfunction

  // product bit written by the critical gate of stage n, -1: none (a carry)
  function automatic int crit_pbit(int unsigned n);
    return (n < MW) ? int'(n) : -1;
  endfunction

  // carry-save operand x of the vector-merge adder: s shifted right by one
  function automatic logic merge_x(logic [MW-1:0] s, int unsigned r);
    return (r + 1 < MW) ? s[r+1] : 1'b0;
  endfunction

  // single-rail bits that stage n's converters must provide for the critical
  // gate of stage n+1 (converter operands only, in operand order)
  function automatic logic [MAXOPS-1:0] conv_bits(int unsigned n, logic a0,
                                                  logic [MW-1:0] b, logic [MW-1:0] s,
                                                  logic [MW-1:0] c);
    logic [MAXOPS-1:0] o;
    int unsigned nx;
    o  = '0;
    nx = n + 1;
    if (nx < MW)       o = {b[nx % MW], a0, c[0], s[1]};
    else if (nx == MW) o[1:0] = {c[0], s[1]};
    else if (nx < NSTAGES) o[1:0] = {c[(nx-MW) % MW], merge_x(s, nx - MW)};
    return o;
  endfunction

  // operand i of conv_bits
  function automatic logic conv_bit(int unsigned n, logic [$clog2(MAXOPS)-1:0] i, logic a0,
                                    logic [MW-1:0] b, logic [MW-1:0] s, logic [MW-1:0] c);
    logic [MAXOPS-1:0] o;
    o = conv_bits(n, a0, b, s, c);
    return o[i];
  endfunction

  // noncritical (single-rail) logic of stage n. cin is the true rail of the
  // previous stage's critical output (the ripple carry in the merge stages).
  // The critical gate's own result is not produced here.
  function automatic tok_t stage_fn(int unsigned n, tok_t t, logic cin);
    tok_t o;
    logic [MW-1:0] pp;
    logic          sin;
    o = t;
    if (n == 0) begin
      o.s = t.a & {MW{t.b[0]}};
      o.c = '0;
      o.p = '0;
    end else if (n < MW) begin
      pp = t.a & {MW{t.b[n % MW]}};
      for (int unsigned j = 0; j < MW; j++) begin
        sin    = (j + 1 < MW) ? t.s[j+1] : 1'b0;
        o.s[j] = sin ^ t.c[j] ^ pp[j];
        o.c[j] = (sin & t.c[j]) | (sin & pp[j]) | (t.c[j] & pp[j]);
      end
      o.p[n % MW] = 1'b0;   // written by the critical gate
    end else begin
      // merge stage r = n - MW: sum bit of the ripple-carry adder
      o.p[n] = merge_x(t.s, n - MW) ^ t.c[(n - MW) % MW] ^ ((n == MW) ? 1'b0 : cin);
    end
    return o;
  endfunction

endpackage
