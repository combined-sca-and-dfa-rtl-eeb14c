// dpl_pkg -- shared types and constants of the dual-rail with precharge (DPL)
// logic style "WDDL without early evaluation".
//
// Every logical bit a is carried by a pair of wires (a.t, a.f), the "true" and
// "false" halves. (0,0) and (1,1) are the NULL tokens NULL0 and NULL1 used as
// spacers; (1,0) is VALID1 and (0,1) is VALID0, so a.t holds the value of a
// when the pair is VALID. This design precharges with NULL0.
//
// The package also computes the two 16-bit LUT4 masks of a two-input gate of
// this style from the truth table of its single-rail function. The LUT address
// is {a.t, a.f, b.t, b.f} with a.t as the most significant bit. The rules:
//   * both inputs VALID              -> VALID f(a,b)
//   * otherwise the output is NULL, of the type of the first NULL input
//     (a before b); an input pair that is VALID never decides the NULL type.
// For AND these rules give the masks 16'hFC80 (true rail) and 16'hFAE0 (false
// rail). The rule for the two "faulty" rows (a NULL0 with b NULL1 and the
// reverse), where the output is any NULL, is taken from the AND mask table; the
// extension of that table to other functions is this design's choice.
package dpl_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;

  localparam dr_t DR_NULL0 = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_NULL1 = '{t: 1'b1, f: 1'b1};

  // Single-rail truth tables, indexed by {a, b}.
  localparam logic [3:0] FN_AND  = 4'b1000;
  localparam logic [3:0] FN_OR   = 4'b1110;
  localparam logic [3:0] FN_XOR  = 4'b0110;
  localparam logic [3:0] FN_NAND = 4'b0111;
  localparam logic [3:0] FN_NOR  = 4'b0001;
  localparam logic [3:0] FN_XNOR = 4'b1001;

  // Output pair of the gate for one LUT address {a.t, a.f, b.t, b.f}.
  function automatic dr_t noee_eval(logic [3:0] func, logic [3:0] addr);
    logic at, af, bt, bf, y;
    dr_t  r;
    {at, af, bt, bf} = addr;
    if ((at ^ af) && (bt ^ bf)) begin
      y = func[{at, bt}];
      r = '{t: y, f: ~y};
    end else if (!(at ^ af)) begin
      r = '{t: at, f: at};
    end else begin
      r = '{t: bt, f: bt};
    end
    return r;
  endfunction

  function automatic logic [15:0] noee_mask_t(logic [3:0] func);
    logic [15:0] m;
    for (int i = 0; i < 16; i++) begin
      dr_t r;
      r = noee_eval(func, 4'(i));
      m[i] = r.t;
    end
    return m;
  endfunction

  function automatic logic [15:0] noee_mask_f(logic [3:0] func);
    logic [15:0] m;
    for (int i = 0; i < 16; i++) begin
      dr_t r;
      r = noee_eval(func, 4'(i));
      m[i] = r.f;
    end
    return m;
  endfunction

  // Encode a single-rail bit as a VALID token.
  function automatic dr_t dr_encode(logic x);
    return '{t: x, f: ~x};
  endfunction

  function automatic logic dr_is_valid(dr_t x);
    return x.t ^ x.f;
  endfunction

  // x * X in GF(2^8) modulo the AES polynomial X^8 + X^4 + X^3 + X + 1.
  function automatic logic [7:0] gf_xtime(logic [7:0] v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1B : 8'h00);
  endfunction

  // X^k reduced modulo the AES polynomial (used to build the XOR networks).
  function automatic logic [7:0] gf_xpow(int k);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 0; i < k; i++) v = gf_xtime(v);
    return v;
  endfunction

  // ---- GF(2^4) with X^4 + X + 1 (subfield of the composite-field S-box) ----

  function automatic logic [3:0] gf16_xpow(int k);
    logic [3:0] v;
    v = 4'h1;
    for (int i = 0; i < k; i++) v = {v[2:0], 1'b0} ^ (v[3] ? 4'h3 : 4'h0);
    return v;
  endfunction

  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [3:0] p;
    p = 4'h0;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= a;
      a = {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

endpackage
