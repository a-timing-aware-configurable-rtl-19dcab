// out_buffer: output map buffer.
//
// DEPTH words of DW bits holding the partial sums drained from the PE
// arrays, together with one flag bit per word that records whether that
// result was produced while its TACA was in the approximate mode. One write
// port (from the sequencer) and one registered read port (host side, one
// cycle latency).
module out_buffer #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned DW    = 16,
  localparam int unsigned XW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [XW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          wflag,
  input  logic          re,
  input  logic [XW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic          rflag
);
  logic [DW:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wflag, wdata};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  {rflag, rdata} <= '0;
    else if (re) {rflag, rdata} <= mem[raddr];
  end
endmodule
