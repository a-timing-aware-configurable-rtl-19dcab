// tedc: timing-error detection flip-flop for the monitored adder output.
//
// Replaces the ordinary result flip-flop of the monitored full adder, which
// sits at the middle of the carry chain. With a 50% duty-cycle clock that
// output must have settled by the middle of the cycle (the falling clock
// edge) for the whole chain to settle by the next rising edge. The block
//   * stores d on the rising edge like the flip-flop it replaces (q),
//   * samples d on the falling edge into a shadow bit,
//   * flags a late transition when d differs from the shadow sample while the
//     clock is low (err_live), i.e. during the negative phase,
//   * registers that comparison on the rising edge (err_q), so the flag also
//     covers the start of the next cycle.
// err = err_live | err_q is the timing-error signal used to switch an ACFA
// to an approximate mode. The original cell is a nine-transistor
// error-tolerant flip-flop; this double-sampling form is a logic-level
// equivalent. The detection window (the negative clock phase) comes from a
// pair of flip-flops on opposite edges (win = pos_t ^ neg_t is 1 from the
// falling to the next rising edge), not from the clock net itself, so the
// window is still open for every flip-flop sampling on that rising edge.
// clr synchronously clears q and err_q; detection is only active when en=1.
module tedc (
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // the replaced flip-flop loads this cycle
  input  logic clr,     // synchronous clear of q and the error flag
  input  logic d,
  output logic q,
  output logic err,     // timing-error signal (live | registered)
  output logic err_q    // late transition seen in the previous cycle
);
  logic shadow;
  logic err_live;
  logic pos_t, neg_t, win;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= 1'b0;
      neg_t  <= 1'b0;
    end else begin
      shadow <= d;
      neg_t  <= ~pos_t;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos_t <= 1'b0;
    else        pos_t <= neg_t;
  end

  assign win      = pos_t ^ neg_t;
  assign err_live = en & win & (d != shadow);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= 1'b0;
      err_q <= 1'b0;
    end else if (clr) begin
      q     <= 1'b0;
      err_q <= 1'b0;
    end else begin
      if (en) q <= d;
      err_q <= en & (d != shadow);
    end
  end

  assign err = err_live | err_q;
endmodule
