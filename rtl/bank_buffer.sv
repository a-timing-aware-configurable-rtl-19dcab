// bank_buffer: banked on-chip buffer, used as the input map buffer (one bank
// per PE-array row) and as the weight buffer (one bank per PE-array column).
//
// BANKS independent memories of DEPTH words of DW bits. The host side has one
// write port and one read port (bank + address). The array side has one read
// port per bank, each with its own address and enable, so a skewed stream
// can be fed to every row or column at once. All reads are registered (one
// cycle latency); a disabled array-side read returns zero with valid low.
module bank_buffer #(
  parameter int unsigned BANKS = 8,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned DW    = 8,
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned XW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host port
  input  logic                    h_we,
  input  logic                    h_re,
  input  logic [BW-1:0]           h_bank,
  input  logic [XW-1:0]           h_addr,
  input  logic [DW-1:0]           h_wdata,
  output logic [DW-1:0]           h_rdata,
  // array port
  input  logic [BANKS-1:0]        p_en,
  input  logic [BANKS-1:0][XW-1:0] p_addr,
  output logic [BANKS-1:0][DW-1:0] p_data,
  output logic [BANKS-1:0]        p_vld
);
  logic [BANKS-1:0][DW-1:0] h_bank_q;  // per-bank host read register
  logic [BW-1:0]            h_sel_q;

  for (genvar g = 0; g < BANKS; g++) begin : g_bank
    logic [DW-1:0] mem [DEPTH];
    logic          hit;

    assign hit = (h_bank == BW'(g));

    always_ff @(posedge clk) begin
      if (h_we && hit) mem[h_addr] <= h_wdata;
      if (h_re && hit) h_bank_q[g] <= mem[h_addr];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        p_data[g] <= '0;
        p_vld[g]  <= 1'b0;
      end else begin
        p_data[g] <= p_en[g] ? mem[p_addr[g]] : '0;
        p_vld[g]  <= p_en[g];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    h_sel_q <= '0;
    else if (h_re) h_sel_q <= h_bank;
  end

  assign h_rdata = h_bank_q[h_sel_q];
endmodule
