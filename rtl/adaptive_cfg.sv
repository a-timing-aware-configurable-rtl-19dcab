// adaptive_cfg: adaptive configuration unit of the accelerator.
//
// Gathers the timing-error signals of all TACAs. An OR over all of them
// (any_err) says that at least one path is being corrected; a population
// count gives how many. When the count exceeds the programmable threshold
// the timing violations are too many to be absorbed by the approximate mode
// alone, and the unit asks the (external) adaptive voltage regulator to raise
// the supply (vdd_up_req) or the adaptive clock generator to lower the
// frequency (freq_down_req); act_sel chooses which. The request is
// registered and follows the error count cycle by cycle.
// For the host it keeps statistics: the number of cycles with any error
// (saturating), sticky any/over flags and the peak count. clr clears them.
module adaptive_cfg #(
  parameter int unsigned NERR = 128,
  localparam int unsigned CW  = $clog2(NERR + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NERR-1:0] err,
  input  logic [CW-1:0]   thresh,
  input  logic            act_sel,     // 0: raise voltage, 1: lower frequency
  input  logic            clr,
  output logic            any_err,
  output logic [CW-1:0]   err_cnt,
  output logic            vdd_up_req,
  output logic            freq_down_req,
  output logic [31:0]     events,
  output logic            sticky_any,
  output logic            sticky_over,
  output logic [CW-1:0]   peak_cnt
);
  logic over;

  always_comb begin
    err_cnt = '0;
    for (int unsigned i = 0; i < NERR; i++) err_cnt = err_cnt + CW'(err[i]);
  end

  assign any_err = |err;
  assign over    = err_cnt > thresh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdd_up_req    <= 1'b0;
      freq_down_req <= 1'b0;
      events        <= '0;
      sticky_any    <= 1'b0;
      sticky_over   <= 1'b0;
      peak_cnt      <= '0;
    end else begin
      vdd_up_req    <= over & ~act_sel;
      freq_down_req <= over &  act_sel;
      if (clr) begin
        events      <= '0;
        sticky_any  <= 1'b0;
        sticky_over <= 1'b0;
        peak_cnt    <= '0;
      end else begin
        if (any_err && events != '1) events <= events + 32'd1;
        if (any_err) sticky_any  <= 1'b1;
        if (over)    sticky_over <= 1'b1;
        if (err_cnt > peak_cnt) peak_cnt <= err_cnt;
      end
    end
  end
endmodule
