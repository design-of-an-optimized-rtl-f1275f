// sel_ref_pkg: testbench-side reference model of the integrated multiplier's
// unit selection, shared by the logic-block and end-to-end testbenches.
package sel_ref_pkg;

  // Reference model of the integrated multiplier's unit selection, written
  // with plain comparisons (not the gate-level tests of the logic block):
  // base b = 2^(N-1), threshold Th = 2^TS - 1, "above" = (b, b+Th],
  // "below" = [b-Th, b). Returns the S2S1S0 code.
  function automatic logic [2:0] sel_model(input logic [127:0] x, input logic [127:0] y,
                                           input int n, input int ts);
    logic [128:0] b, th, hi, lo;
    logic up_hi, up_lo, dn_hi, dn_lo;
    b  = 129'd1 << (n - 1);
    th = (129'd1 << ts) - 1;
    hi = (x >= y) ? 129'(x) : 129'(y);
    lo = (x >= y) ? 129'(y) : 129'(x);
    up_hi = (hi > b) && (hi <= b + th);
    up_lo = (lo > b) && (lo <= b + th);
    dn_hi = (hi < b) && (hi >= b - th);
    dn_lo = (lo < b) && (lo >= b - th);
    if (129'(x) == b)          return 3'b111;
    if (129'(y) == b)          return 3'b110;
    if (x == y)                return 3'b101;
    if (up_hi && dn_lo)        return 3'b100;
    if (dn_hi && dn_lo)        return 3'b011;
    if (up_hi && up_lo)        return 3'b010;
    if (x != 0 && y != 0)      return 3'b001;
    return 3'b000;
  endfunction

endpackage
