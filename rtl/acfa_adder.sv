// acfa_adder: n-bit ripple-carry adder built from ACFAs.
//
// Bit i is an acfa whose mode is set by em[i]/sm[i]. Each approximate bit
// computes its carry-out from its own operands only, so the longest carry
// chain runs between two approximate bits. With every em bit set the adder is
// an exact ripple-carry adder. Purely combinational.
module acfa_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic [N-1:0] em,   // per-bit exact-mode enable
  input  logic [N-1:0] sm,   // per-bit approximate polarity
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    acfa u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .em  (em[i]),
      .sm  (sm[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
