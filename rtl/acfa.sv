// acfa: accuracy-configurable full adder.
//
// A mirror full adder whose carry block can be cut off from the carry-in.
// Two mode-selection inputs give three modes:
//   em=1        exact mode (EM):   Cout = (A+B)Cin + AB
//   em=0, sm=1  positive approx (PAM): Cout = A+B   (errs +1 for A,B,Cin = 010, 100)
//   em=0, sm=0  negative approx (NAM): Cout = AB    (errs -1 for A,B,Cin = 011, 101)
// In both approximate modes Cout no longer depends on Cin, which breaks the
// ripple-carry chain. The sum is always formed as in a mirror adder,
// S = A.B.Cin + (A+B+Cin).~Cout, from whatever the carry block produced, so in
// the exact mode it equals A^B^Cin.
// The gating enables are EN = ~em & sm and EP = em | sm: EN=0/EP=1 is exact,
// EN=1/EP=1 positive and EN=0/EP=0 negative approximate. The transistor-level
// power gating that produces these functions is represented only by its
// logic. Purely combinational.
module acfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic em,    // 1: exact mode
  input  logic sm,    // approximate-mode polarity: 1 positive, 0 negative
  output logic s,
  output logic cout
);
  logic en, ep;

  assign en = ~em & sm;
  assign ep =  em | sm;

  always_comb begin
    unique case ({ep, en})
      2'b10:   cout = ((a | b) & cin) | (a & b); // exact
      2'b11:   cout = a | b;                     // PUN path only (positive)
      2'b00:   cout = a & b;                     // PDN path only (negative)
      default: cout = ((a | b) & cin) | (a & b); // EP=0, EN=1 cannot occur
    endcase
    s = (a & b & cin) | ((a | b | cin) & ~cout);
  end
endmodule
