// taca_pkg: shared types, sizes and the register map of the timing-aware
// configurable adder (TACA) design and its CNN accelerator.
//
// The ACFA operating modes follow the mode-selection signals em/sm: em=1
// selects the exact mode; with em=0, sm=1 selects the positive approximate
// mode (carry = A|B) and sm=0 the negative approximate mode (carry = A&B).
// The accelerator sizes (two 8x8 PE arrays, 16-bit accumulating adder) follow
// the described CNN accelerator; the 8-bit operand width, buffer depth and the
// bus register map are choices of this design.
package taca_pkg;

  // ACFA operating mode, decoded from {em, sm}
  typedef enum logic [1:0] {
    MODE_NAM = 2'b00,   // em=0 sm=0: negative approximate (Cout = A&B)
    MODE_PAM = 2'b01,   // em=0 sm=1: positive approximate (Cout = A|B)
    MODE_EM  = 2'b10,   // em=1: exact
    MODE_EM1 = 2'b11    // em=1 sm=1: also exact
  } acfa_mode_e;

  // Accelerator dimensions
  localparam int unsigned ARRAY_DIM  = 8;   // each PE array is 8x8
  localparam int unsigned NUM_ARRAYS = 2;   // two PE arrays
  localparam int unsigned DATA_W     = 8;   // activation / weight width
  localparam int unsigned ACC_W      = 16;  // TACA (accumulator) width
  localparam int unsigned BUF_DEPTH  = 512; // entries per buffer bank

  // AHB-Lite transfer types
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Address map: region = HADDR[17:16], word index = HADDR[15:2]
  localparam logic [1:0] REGION_REGS = 2'd0;
  localparam logic [1:0] REGION_IBUF = 2'd1;
  localparam logic [1:0] REGION_WBUF = 2'd2;
  localparam logic [1:0] REGION_OBUF = 2'd3;

  // Control/status registers (word index inside REGION_REGS)
  localparam logic [3:0] REG_CTRL    = 4'd0; // W: bit0 start, bit1 AM polarity (sm), bit2 action select
  localparam logic [3:0] REG_STATUS  = 4'd1; // R: bit0 busy, bit1 done
  localparam logic [3:0] REG_KLEN    = 4'd2; // RW: reduction length K
  localparam logic [3:0] REG_THRESH  = 4'd3; // RW: timing-error count threshold
  localparam logic [3:0] REG_EVENTS  = 4'd4; // R: cycles in which any timing error was flagged
  localparam logic [3:0] REG_FLAGS   = 4'd5; // R: bit0 sticky any-error, bit1 sticky over-threshold, [23:8] peak count
  localparam logic [3:0] REG_ERRCLR  = 4'd6; // W: clear error statistics

  // Improved configuration scheme: which bits are approximate for level k
  // of an n-bit adder. Bit p is approximate when p = k-1-j*(n-k+1) for some
  // j >= 0 with p > 0 (p = k-1 is always kept), and all bits for k = n.
  function automatic logic [63:0] ics_approx_mask(int unsigned n, int unsigned k);
    logic [63:0] mask;
    int unsigned l;
    mask = '0;
    if (k >= n) begin
      for (int unsigned p = 0; p < n; p++) mask[p] = 1'b1;
    end else if (k > 0) begin
      l = n - k + 1;
      mask[k-1] = 1'b1;
      for (int unsigned j = 1; j * l < k - 1; j++) mask[k-1-j*l] = 1'b1;
    end
    return mask;
  endfunction

endpackage
