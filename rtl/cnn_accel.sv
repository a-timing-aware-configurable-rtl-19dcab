// cnn_accel: CNN accelerator built from TACA-based processing elements.
//
// Two 8x8 PE arrays share one activation stream and take different weight
// columns, so one run produces an 8 x 16 block of output-map values
// O[r][n] = sum_k A[r][k]*W[n][k] (a convolution mapped onto a matrix
// product by the host). Around the arrays:
//   * input map buffer (8 banks, one per row) and weight buffer (16 banks,
//     one per output column), loaded by the host,
//   * output map buffer (128 words + approximate-mode flag), read by the host,
//   * accel_ctrl, which sequences clear / feed / flush / drain,
//   * adaptive_cfg, which clusters the 128 TACA timing-error signals and
//     raises voltage/frequency requests above a threshold,
//   * an AHB-Lite slave through which the host reaches all of it.
// Address map (byte address, 32-bit words, see taca_pkg): HADDR[17:16]
// selects registers / input buffer / weight buffer / output buffer; in a
// buffer, word index bits [XW-1:0] are the entry and the bits above the bank.
// Reads of any region take one wait state.
// Partial sums are 16 bits and wrap. The approximate-mode polarity of all
// TACAs is a control bit.
module cnn_accel
  import taca_pkg::*;
#(
  parameter int unsigned DIM   = ARRAY_DIM,   // PE array rows = columns
  parameter int unsigned NA    = NUM_ARRAYS,  // number of PE arrays
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned AW    = ACC_W,
  parameter int unsigned DEPTH = BUF_DEPTH,
  localparam int unsigned NPE  = NA * DIM * DIM,
  localparam int unsigned NB   = NA * DIM,
  localparam int unsigned XW   = $clog2(DEPTH),
  localparam int unsigned OW   = $clog2(NPE),
  localparam int unsigned CW   = $clog2(NPE + 1)
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  output logic        timing_err,     // any TACA flags a timing error
  output logic        vdd_up_req,     // to the adaptive voltage regulator
  output logic        freq_down_req,  // to the adaptive clock generator
  output logic        busy,
  output logic        done
);

  localparam int unsigned RAW = 18;

  // ---------------- bus front end ----------------
  logic           req_we, req_re;
  logic [RAW-1:0] req_addr;
  logic [31:0]    req_wdata, rsp_rdata;

  ahb_slave #(.AW(RAW)) u_ahb (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata,
    .req_we, .req_re, .req_addr, .req_wdata, .rsp_rdata
  );

  logic [1:0]  region;
  logic [13:0] widx;
  assign region = req_addr[17:16];
  assign widx   = req_addr[15:2];

  // ---------------- control registers ----------------
  logic          am_sm, act_sel, start, err_clr;
  logic [XW:0]   klen;
  logic [CW-1:0] thresh;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      am_sm   <= 1'b0;
      act_sel <= 1'b0;
      klen    <= (XW+1)'(1);
      thresh  <= CW'(NPE / 2);
    end else if (req_we && region == REGION_REGS) begin
      unique case (widx[3:0])
        REG_CTRL:   begin am_sm <= req_wdata[1]; act_sel <= req_wdata[2]; end
        REG_KLEN:   klen   <= req_wdata[XW:0];
        REG_THRESH: thresh <= req_wdata[CW-1:0];
        default: ;
      endcase
    end
  end

  assign start   = req_we && region == REGION_REGS && widx[3:0] == REG_CTRL && req_wdata[0];
  assign err_clr = req_we && region == REGION_REGS && widx[3:0] == REG_ERRCLR;

  // ---------------- sequencer ----------------
  logic                 pe_clr, out_we;
  logic [DIM-1:0]          in_en;
  logic [DIM-1:0][XW-1:0]  in_addr;
  logic [NB-1:0]           w_en;
  logic [NB-1:0][XW-1:0]   w_addr;
  logic [OW-1:0]           out_addr;

  accel_ctrl #(.R(DIM), .C(DIM), .NA(NA), .DEPTH(DEPTH)) u_ctrl (
    .clk(hclk), .rst_n(hresetn), .start, .klen, .busy, .done, .pe_clr,
    .in_en, .in_addr, .w_en, .w_addr, .out_we, .out_addr
  );

  // ---------------- buffers ----------------
  logic [DIM-1:0][DW-1:0] a_feed;
  logic [DIM-1:0]         a_vld;
  logic [NB-1:0][DW-1:0]  w_feed;
  logic [NB-1:0]          w_vld;
  logic [DW-1:0]          ibuf_rdata, wbuf_rdata;
  logic [AW-1:0]          obuf_rdata;
  logic                   obuf_rflag;

  bank_buffer #(.BANKS(DIM), .DEPTH(DEPTH), .DW(DW)) u_ibuf (
    .clk(hclk), .rst_n(hresetn),
    .h_we(req_we && region == REGION_IBUF), .h_re(req_re && region == REGION_IBUF),
    .h_bank(widx[XW +: $clog2(DIM)]), .h_addr(widx[XW-1:0]), .h_wdata(req_wdata[DW-1:0]),
    .h_rdata(ibuf_rdata),
    .p_en(in_en), .p_addr(in_addr), .p_data(a_feed), .p_vld(a_vld)
  );

  bank_buffer #(.BANKS(NB), .DEPTH(DEPTH), .DW(DW)) u_wbuf (
    .clk(hclk), .rst_n(hresetn),
    .h_we(req_we && region == REGION_WBUF), .h_re(req_re && region == REGION_WBUF),
    .h_bank(widx[XW +: $clog2(NB)]), .h_addr(widx[XW-1:0]), .h_wdata(req_wdata[DW-1:0]),
    .h_rdata(wbuf_rdata),
    .p_en(w_en), .p_addr(w_addr), .p_data(w_feed), .p_vld(w_vld)
  );

  // ---------------- PE arrays ----------------
  logic [NA-1:0][DIM*DIM-1:0][AW-1:0] psum;
  logic [NA-1:0][DIM*DIM-1:0]         pe_err, pe_approx;

  for (genvar g = 0; g < NA; g++) begin : g_arr
    pe_array #(.R(DIM), .C(DIM), .DW(DW), .AW(AW)) u_arr (
      .clk(hclk), .rst_n(hresetn), .clr(pe_clr), .am_sm(am_sm),
      .a_left(a_feed), .a_vld(a_vld),
      .w_top(w_feed[g*DIM +: DIM]), .w_vld(w_vld[g*DIM +: DIM]),
      .psum(psum[g]), .err(pe_err[g]), .am_seen(pe_approx[g])
    );
  end

  // drain mux: output word r*NB + n comes from array n/DIM, PE (r, n%DIM)
  logic [AW-1:0] drain_data;
  logic          drain_flag;
  always_comb begin
    int unsigned r, n, arr, c;
    r   = 32'(out_addr) / NB;
    n   = 32'(out_addr) % NB;
    arr = n / DIM;
    c   = n % DIM;
    drain_data = psum[arr][r*DIM + c];
    drain_flag = pe_approx[arr][r*DIM + c];
  end

  out_buffer #(.DEPTH(NPE), .DW(AW)) u_obuf (
    .clk(hclk), .rst_n(hresetn),
    .we(out_we), .waddr(out_addr), .wdata(drain_data), .wflag(drain_flag),
    .re(req_re && region == REGION_OBUF), .raddr(widx[OW-1:0]),
    .rdata(obuf_rdata), .rflag(obuf_rflag)
  );

  // ---------------- adaptive configuration unit ----------------
  logic [CW-1:0] err_cnt, peak_cnt;
  logic [31:0]   events;
  logic          sticky_any, sticky_over;

  adaptive_cfg #(.NERR(NPE)) u_acu (
    .clk(hclk), .rst_n(hresetn), .err(pe_err), .thresh, .act_sel, .clr(err_clr),
    .any_err(timing_err), .err_cnt, .vdd_up_req, .freq_down_req,
    .events, .sticky_any, .sticky_over, .peak_cnt
  );

  // ---------------- read data ----------------
  logic [1:0]  rd_region_q;
  logic [31:0] reg_rdata_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      rd_region_q <= '0;
      reg_rdata_q <= '0;
    end else if (req_re) begin
      rd_region_q <= region;
      unique case (widx[3:0])
        REG_CTRL:   reg_rdata_q <= {29'd0, act_sel, am_sm, 1'b0};
        REG_STATUS: reg_rdata_q <= {30'd0, done, busy};
        REG_KLEN:   reg_rdata_q <= 32'(klen);
        REG_THRESH: reg_rdata_q <= 32'(thresh);
        REG_EVENTS: reg_rdata_q <= events;
        REG_FLAGS:  reg_rdata_q <= {8'd0, 16'(peak_cnt), 6'd0, sticky_over, sticky_any};
        default:    reg_rdata_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rd_region_q)
      REGION_REGS: rsp_rdata = reg_rdata_q;
      REGION_IBUF: rsp_rdata = 32'(ibuf_rdata);
      REGION_WBUF: rsp_rdata = 32'(wbuf_rdata);
      default:     rsp_rdata = {15'd0, obuf_rflag, obuf_rdata};
    endcase
  end

  a_no_start_busy: assert property (@(posedge hclk) disable iff (!hresetn) !(start && busy))
    else $warning("cnn_accel: start while busy is ignored");
endmodule
