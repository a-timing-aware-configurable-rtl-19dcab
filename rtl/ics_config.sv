// ics_config: improved configuration scheme (ICS) for an n-bit ACFA adder.
//
// Turns an approximation level k (0..N) into the per-bit em/sm masks of an
// acfa_adder. Instead of making the k low bits approximate, the ICS makes
// only a few bits approximate, placed so that the longest carry chain is no
// longer than with k approximate low bits (n-k+1 stages):
//   k = 0          : all bits exact
//   1 <= k < n     : bits p = k-1 - j*(n-k+1), j = 0,1,..., with p > 0
//                    (bit k-1 is always approximate), so m = ceil((k-1)/(n-k+1))
//                    bits for k > n/2+1 and one bit (k-1) otherwise
//   k = n          : all bits approximate
// For n = 8 and 16 this gives exactly the bit positions tabulated for the
// scheme (e.g. n=16, k=14: bits 1, 4, 7, 10, 13). The table over k is built at
// elaboration from taca_pkg::ics_approx_mask; at run time the block is a
// (N+1)-entry lookup. sm_pol sets the polarity of every approximate bit
// (0: negative, as used for the accuracy comparisons; 1: positive).
// Levels k > N are treated as k = N. Combinational.
module ics_config #(
  parameter int unsigned N  = 16,
  localparam int unsigned KW = $clog2(N + 1)
) (
  input  logic [KW-1:0] k,
  input  logic          sm_pol,
  output logic [N-1:0]  em,
  output logic [N-1:0]  sm,
  output logic [KW-1:0] m      // number of approximate bits
);
  import taca_pkg::*;

  logic [N-1:0]  approx_tab [N+1];
  logic [KW-1:0] count_tab  [N+1];

  for (genvar g = 0; g <= N; g++) begin : g_tab
    localparam logic [63:0] MASK = ics_approx_mask(N, g);
    assign approx_tab[g] = MASK[N-1:0];
    assign count_tab[g]  = KW'($countones(MASK));
  end

  logic [KW-1:0] ksat;
  assign ksat = (k > KW'(N)) ? KW'(N) : k;

  assign em = ~approx_tab[ksat];
  assign sm = sm_pol ? approx_tab[ksat] : '0;
  assign m  = count_tab[ksat];
endmodule
