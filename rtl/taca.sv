// taca: n-bit timing-aware configurable adder with registered result.
//
// n ACFAs form a ripple-carry adder whose result is stored in an n+1 bit
// output register. The register bit of the monitored adder, bit t with
// t = floor(n/2) - 1 (the first adder after the middle of the carry chain),
// is a tedc timing-error detector instead of a plain flip-flop. All ACFAs
// work in the exact mode except bit t+1, whose em input is the inverted
// timing-error signal: when the monitored sum arrives late (after the
// falling clock edge), bit t+1 switches to an approximate mode and cuts the
// carry chain in half, so the upper half settles in time. am_sm chooses the
// approximate polarity of that bit (0 negative, 1 positive). Only one
// monitored point and one configurable bit exist (m = 1), as in the main
// configuration of the design.
// Timing: when en=1 the sum of a, b and cin appears on sum_q/cout_q after
// the next rising edge (latency 1). clr clears the register. approx_q tells
// whether the stored result was produced with bit t+1 approximate.
module taca #(
  parameter int unsigned N = 16,
  localparam int unsigned T = N / 2 - 1   // index of the monitored bit
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic         am_sm,
  output logic [N-1:0] sum_q,
  output logic         cout_q,
  output logic         err,       // timing-error signal of the TEDC
  output logic         approx_q   // stored result came from the approximate mode
);
  logic [N-1:0] em, sm, sum;
  logic         cout;
  logic         tedc_q;

  always_comb begin
    em       = '1;
    sm       = '0;
    em[T+1]  = ~err;
    sm[T+1]  = am_sm;
  end

  acfa_adder #(.N(N)) u_add (
    .a(a), .b(b), .cin(cin), .em(em), .sm(sm), .sum(sum), .cout(cout)
  );

  tedc u_tedc (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr),
    .d(sum[T]), .q(tedc_q), .err(err), .err_q()
  );

  logic [N-1:0] reg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_q    <= '0;
      cout_q   <= 1'b0;
      approx_q <= 1'b0;
    end else if (clr) begin
      reg_q    <= '0;
      cout_q   <= 1'b0;
      approx_q <= 1'b0;
    end else if (en) begin
      reg_q    <= sum;
      cout_q   <= cout;
      approx_q <= err;
    end
  end

  always_comb begin
    sum_q    = reg_q;
    sum_q[T] = tedc_q;
  end

  initial assert (N >= 4) else $error("taca: N must be at least 4");
endmodule
