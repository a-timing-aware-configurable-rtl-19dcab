// taca_check: stimulus and checks for one N-bit timing-aware configurable
// adder; taca_tb runs it for the 16-bit and the 8-bit adder.
// Operands applied early in the cycle must give the exact sum one cycle
// later. Operands that change during the negative clock phase emulate a
// carry chain too slow for the supply voltage: if the monitored sum bit
// (bit t = N/2-1) changes late, the timing error must switch bit t+1 to the
// approximate mode for that operation, and the following operation must
// also be approximate (registered error), after which the adder returns to
// the exact mode. Approximate results are checked against a bit-level model
// with bit t+1 in the selected polarity. Both polarities are used.
module taca_check #(
  parameter int N = 16
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int T = N / 2 - 1;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0, cin = 1'b0, am_sm = 1'b0;
  logic [N-1:0] a = '0, b = '0, sum_q;
  logic cout_q, err, approx_q;
  int n_late = 0, n_am = 0, n_exact = 0;

  taca #(.N(N)) dut (.clk, .rst_n, .en, .clr, .a, .b, .cin, .am_sm,
                     .sum_q, .cout_q, .err, .approx_q);

  always #5 clk = ~clk;


  // {cout, sum} with bit ab approximate (ab < 0: exact)
  function automatic logic [N:0] model(logic [N-1:0] x, logic [N-1:0] y, logic c,
                                       int ab, logic pol);
    logic [N-1:0] s;
    logic [2:0] v;
    logic [1:0] r;
    for (int i = 0; i < N; i++) begin
      v = {x[i], y[i], c};
      r = 2'(x[i]) + 2'(y[i]) + 2'(c);
      if (i == ab &&  pol && (v == 3'b010 || v == 3'b100)) r = 2'b10;
      if (i == ab && !pol && (v == 3'b011 || v == 3'b101)) r = 2'b01;
      s[i] = r[0]; c = r[1];
    end
    return {c, s};
  endfunction

  task automatic check(string what, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [N-1:0] na, nb;
    logic [N:0]   exp;
    logic         late, was_late, bit_t_changed;
    int           latency;
    finished = 1'b0; checks = 0; failures = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    en = 1'b1;
    was_late = 1'b0;
    for (int it = 0; it < 3000; it++) begin
      na = N'($urandom); nb = N'($urandom);
      late = ($urandom % 4) == 0;
      if (it % 1000 == 0) am_sm = 1'($urandom);
      if (!late) begin
        a = na; b = nb;                          // early: right after the rising edge
        bit_t_changed = 1'b0;
      end else begin
        logic [N:0] prev_sum;
        // settle some operands first, then replace them late
        a = ~na; b = nb;
        prev_sum = model(a, b, 1'b0, -1, 1'b0);
        @(negedge clk); #1;
        a = na; b = nb;
        bit_t_changed = (prev_sum[T] != model(na, nb, 1'b0, -1, 1'b0)[T]);
        #1;
        if (bit_t_changed) begin
          checks++;
          if (!err) begin failures++; $display("FAIL no timing error at %0t", $time); end
        end
      end
      // the operation is approximate if the chain was late now or it was flagged last cycle
      exp = model(na, nb, 1'b0, (bit_t_changed || was_late) ? T + 1 : -1, am_sm);
      @(posedge clk); #1;
      check("sum", {cout_q, sum_q}, exp);
      checks++;
      if (approx_q !== (bit_t_changed || was_late)) begin
        failures++; $display("FAIL approx flag at %0t got %0d late=%0d was=%0d", $time, approx_q, bit_t_changed, was_late);
      end
      if (bit_t_changed) n_late++;
      if (approx_q) n_am++; else n_exact++;
      was_late = bit_t_changed;
    end
    // latency: a single early operation appears after exactly one rising edge
    @(posedge clk); #1;
    a = N'(16'h1234); b = N'(16'h1111);
    latency = 0;
    do begin @(posedge clk); #1; latency++; end while (sum_q !== N'(16'h2345) && latency < 5);
    checks++;
    if (latency != 1) begin failures++; $display("FAIL latency %0d", latency); end
    // en = 0 holds, clr clears
    en = 1'b0; a = N'(16'h0F0F); b = N'(16'h0101);
    @(posedge clk); #1 check("hold", {cout_q, sum_q}, {1'b0, N'(16'h2345)});
    clr = 1'b1;
    @(posedge clk); #1 check("clear", {cout_q, sum_q}, '0);
    clr = 1'b0;
    checks++;
    if (n_late < 100 || n_am < 100 || n_exact < 100) begin
      failures++; $display("FAIL coverage late=%0d am=%0d exact=%0d", n_late, n_am, n_exact);
    end
    $display("N=%0d late=%0d approximate=%0d exact=%0d", N, n_late, n_am, n_exact);
    finished = 1'b1;
  end
endmodule
