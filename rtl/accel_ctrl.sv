// accel_ctrl: sequencer of the CNN accelerator.
//
// One run computes, on NA arrays of R x C PEs, the R x (NA*C) product
// O[r][n] = sum_{k<klen} A[r][k] * W[n][k], with A in the input map buffer
// (bank r, address k) and W in the weight buffer (bank n, address k).
// Phases: CLEAR (one cycle, partial sums cleared) -> FEED (klen+max(R,C)-1
// cycles; row r reads address s-r and column bank n reads s-(n mod C) at
// step s, which produces the skew of the systolic arrays) -> FLUSH (R+C+2
// cycles for the last operands to reach the far PE) -> DRAIN (one result per
// cycle into the output buffer, word r*NA*C+n) -> IDLE with done set.
// A run therefore takes 1 + klen + max(R,C) - 1 + R + C + 2 + R*NA*C cycles
// from the start pulse to done. start is ignored while busy.
module accel_ctrl #(
  parameter int unsigned R     = 8,
  parameter int unsigned C     = 8,
  parameter int unsigned NA    = 2,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned XW   = $clog2(DEPTH),
  localparam int unsigned OW   = $clog2(R * NA * C),
  localparam int unsigned NB   = NA * C
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [XW:0]           klen,     // 1..DEPTH
  output logic                  busy,
  output logic                  done,
  output logic                  pe_clr,
  output logic [R-1:0]          in_en,
  output logic [R-1:0][XW-1:0]  in_addr,
  output logic [NB-1:0]         w_en,
  output logic [NB-1:0][XW-1:0] w_addr,
  output logic                  out_we,
  output logic [OW-1:0]         out_addr
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_FEED, S_FLUSH, S_DRAIN} state_e;

  localparam int unsigned MAXRC = (R > C) ? R : C;
  localparam int unsigned FLUSH = R + C + 2;
  localparam int unsigned SW    = XW + 2 + $clog2(MAXRC + FLUSH + 1);

  state_e        state;
  logic [SW-1:0] step;
  logic [SW-1:0] feed_last;

  assign feed_last = SW'(klen) + SW'(MAXRC) - SW'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) begin
                   state <= S_CLEAR;
                   done  <= 1'b0;
                 end
        S_CLEAR: begin state <= S_FEED; step <= '0; end
        S_FEED:  if (step == feed_last) begin state <= S_FLUSH; step <= '0; end
                 else step <= step + 1'b1;
        S_FLUSH: if (step == SW'(FLUSH - 1)) begin state <= S_DRAIN; step <= '0; end
                 else step <= step + 1'b1;
        S_DRAIN: if (step == SW'(R * NB - 1)) begin
                   state <= S_IDLE; step <= '0; done <= 1'b1;
                 end else step <= step + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign pe_clr = (state == S_CLEAR);

  always_comb begin
    for (int unsigned r = 0; r < R; r++) begin
      in_en[r]   = (state == S_FEED) && (step >= SW'(r)) && (step < SW'(r) + SW'(klen));
      in_addr[r] = XW'(step - SW'(r));
    end
    for (int unsigned n = 0; n < NB; n++) begin
      w_en[n]   = (state == S_FEED) && (step >= SW'(n % C)) && (step < SW'(n % C) + SW'(klen));
      w_addr[n] = XW'(step - SW'(n % C));
    end
  end

  assign out_we   = (state == S_DRAIN);
  assign out_addr = OW'(step);
endmodule
