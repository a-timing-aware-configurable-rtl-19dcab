// ahb_slave: AHB-Lite slave front end of the accelerator.
//
// Converts AHB-Lite transfers into a simple register/memory request port.
// An accepted address phase (HSEL, NONSEQ or SEQ, HREADY) is held for its
// data phase. A write is issued in its data phase (req_we with HWDATA) with
// no wait state. A read is issued in its data phase (req_re) and completes
// one cycle later, after one wait state, with the target's registered data
// (rsp_rdata). Only 32-bit transfers are supported; HRESP is always OKAY.
module ahb_slave #(
  parameter int unsigned AW = 18
) (
  input  logic          hclk,
  input  logic          hresetn,
  input  logic          hsel,
  input  logic [31:0]   haddr,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [2:0]    hsize,
  input  logic [31:0]   hwdata,
  input  logic          hready,
  output logic          hreadyout,
  output logic          hresp,
  output logic [31:0]   hrdata,
  // request port
  output logic          req_we,
  output logic          req_re,
  output logic [AW-1:0] req_addr,
  output logic [31:0]   req_wdata,
  input  logic [31:0]   rsp_rdata
);
  import taca_pkg::*;

  logic          dp_valid, dp_write, rd_wait;
  logic [AW-1:0] dp_addr;
  logic          accept;

  assign accept = hsel & hready & (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
      rd_wait  <= 1'b0;
    end else begin
      if (hready) begin
        dp_valid <= accept;
        dp_write <= hwrite;
        dp_addr  <= haddr[AW-1:0];
      end
      rd_wait <= req_re;
    end
  end

  assign req_we    = dp_valid & dp_write;
  assign req_re    = dp_valid & ~dp_write & ~rd_wait;
  assign req_addr  = dp_addr;
  assign req_wdata = hwdata;
  assign hreadyout = ~req_re;
  assign hresp     = 1'b0;
  assign hrdata    = rsp_rdata;

  // only word transfers are supported
  a_word_only: assert property (@(posedge hclk) disable iff (!hresetn)
                                accept |-> hsize == 3'd2)
    else $error("ahb_slave: only 32-bit transfers are supported");
endmodule
