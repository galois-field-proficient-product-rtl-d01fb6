// gf_ref_pkg: reference models for the testbenches, written independently of
// the RTL.
//
// GF(2^8) products are formed through logarithm and antilogarithm tables for
// the generator 03h over x^8+x^4+x^3+x+1: a*b = exp(log a + log b). The
// tables are built by repeated multiplication by 03h (x XOR xtime(x)).
// The cellular automaton is modelled cell by cell from the list of rule
// numbers 90-90-150-90-150-90-150-90 (first entry on bit 7), with zero
// outside both ends.
package gf_ref_pkg;

  logic [7:0] exp_t [512];
  logic [7:0] log_t [256];
  bit         tables_ready = 1'b0;

  function automatic void build_tables();
    logic [7:0] x;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i]       = x;
      exp_t[i + 255] = x;
      log_t[x]       = 8'(i);
      x = x ^ {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    exp_t[510] = exp_t[0];
    exp_t[511] = exp_t[1];
    log_t[0]   = 8'h00;
    tables_ready = 1'b1;
  endfunction

  function automatic logic [7:0] gf_mul_ref(logic [7:0] a, logic [7:0] b);
    if (!tables_ready) build_tables();
    if (a == 0 || b == 0) return 8'h00;
    return exp_t[int'(log_t[a]) + int'(log_t[b])];
  endfunction

  // Rule number of the cell on bit position `bitpos`.
  function automatic int ca_rule(int bitpos);
    int rules [8] = '{90, 90, 150, 90, 150, 90, 150, 90};
    return rules[7 - bitpos];
  endfunction

  function automatic logic [7:0] ca_step_ref(logic [7:0] s);
    logic [7:0] n;
    for (int b = 0; b < 8; b++) begin
      logic l, r;
      l = (b == 7) ? 1'b0 : s[b + 1];
      r = (b == 0) ? 1'b0 : s[b - 1];
      n[b] = (ca_rule(b) == 150) ? (l ^ s[b] ^ r) : (l ^ r);
    end
    return n;
  endfunction

  // Per-pixel key of the variable-key mode: XOR on even, XNOR on odd pixels.
  function automatic logic [7:0] mix_ref(logic [7:0] key, logic [7:0] pix, int idx);
    return (idx % 2 == 0) ? (key ^ pix) : ~(key ^ pix);
  endfunction

endpackage
