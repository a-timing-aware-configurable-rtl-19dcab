// pe: processing element of the CNN accelerator.
//
// Input registers hold an activation (moving right) and a weight (moving
// down), each with a valid bit, so PEs can be chained into a systolic array.
// A signed DW x DW multiplier forms the product of the registered operands
// and a TACA adds it to the PE's partial sum. The TACA's output register is
// the PEsum register, so it contains the timing-error detector.
// Timing: operands are registered on the rising edge; one cycle later, if
// both were valid, psum takes psum + a*w on the next rising edge.
// clr clears the partial sum. am_seen is set when an accumulation was made
// with the TACA in the approximate mode and stays set until clr. The product is sign-extended or truncated to
// AW bits and the accumulator wraps modulo 2^AW.
module pe #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          am_sm,
  input  logic [DW-1:0] a_in,
  input  logic          a_vld_in,
  input  logic [DW-1:0] w_in,
  input  logic          w_vld_in,
  output logic [DW-1:0] a_out,
  output logic          a_vld_out,
  output logic [DW-1:0] w_out,
  output logic          w_vld_out,
  output logic [AW-1:0] psum,
  output logic          err,
  output logic          am_seen
);
  logic signed [DW-1:0]   a_q, w_q;
  logic signed [2*DW-1:0] prod;
  logic [AW-1:0]          prod_ext;
  logic                   mac_en;
  logic                   cout_unused, approx_unused;  // carry-out wraps; flag kept sticky below

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; w_q <= '0; a_vld_out <= 1'b0; w_vld_out <= 1'b0;
    end else begin
      a_q <= a_in;  a_vld_out <= a_vld_in;
      w_q <= w_in;  w_vld_out <= w_vld_in;
    end
  end

  assign a_out  = a_q;
  assign w_out  = w_q;
  assign prod   = a_q * w_q;
  assign mac_en = a_vld_out & w_vld_out;

  if (AW > 2 * DW) begin : g_ext
    assign prod_ext = {{(AW - 2 * DW){prod[2*DW-1]}}, prod};
  end else begin : g_trunc
    assign prod_ext = prod[AW-1:0];
  end

  taca #(.N(AW)) u_acc (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .clr(clr),
    .a(prod_ext), .b(psum), .cin(1'b0), .am_sm(am_sm),
    .sum_q(psum), .cout_q(cout_unused), .err(err), .approx_q(approx_unused)
  );

  // sticky record of approximate accumulations (same condition as approx_q)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             am_seen <= 1'b0;
    else if (clr)           am_seen <= 1'b0;
    else if (mac_en && err) am_seen <= 1'b1;
  end
endmodule
