// pe_array_tb: 8x8 systolic array. Two products of random signed matrices
// (K = 20 and K = 7) are fed with the row/column skew; after the flush every
// PE must hold sum_k A[r][k]*W[c][k] (mod 2^16). The array is cleared
// between the runs. No timing errors may be flagged in this zero-delay run.
module pe_array_tb;
  localparam int R = 8, C = 8, DW = 8, AW = 16, KMAX = 20;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, am_sm = 1'b0;
  logic [R-1:0][DW-1:0] a_left;
  logic [R-1:0]         a_vld;
  logic [C-1:0][DW-1:0] w_top;
  logic [C-1:0]         w_vld;
  logic [R*C-1:0][AW-1:0] psum;
  logic [R*C-1:0] err, am_seen;
  int checks = 0, failures = 0;

  pe_array #(.R(R), .C(C), .DW(DW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [DW-1:0] A [R][KMAX];
  logic signed [DW-1:0] W [C][KMAX];

  task automatic run(int K);
    logic [AW-1:0] e;
    for (int r = 0; r < R; r++) for (int k = 0; k < K; k++) A[r][k] = DW'($urandom);
    for (int c = 0; c < C; c++) for (int k = 0; k < K; k++) W[c][k] = DW'($urandom);
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    for (int s = 0; s < K + R + C; s++) begin
      for (int r = 0; r < R; r++) begin
        a_vld[r]  = (s >= r) && (s - r < K);
        a_left[r] = a_vld[r] ? A[r][s-r] : DW'($urandom);
      end
      for (int c = 0; c < C; c++) begin
        w_vld[c] = (s >= c) && (s - c < K);
        w_top[c] = w_vld[c] ? W[c][s-c] : DW'($urandom);
      end
      @(negedge clk);
      checks++;
      if (err !== '0) begin failures++; $display("FAIL unexpected timing error"); end
    end
    a_vld = '0; w_vld = '0;
    repeat (R + C + 2) @(negedge clk);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        e = '0;
        for (int k = 0; k < K; k++) e = e + AW'(A[r][k] * W[c][k]);
        checks++;
        if (psum[r*C+c] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d PE(%0d,%0d) %h exp %h", K, r, c, psum[r*C+c], e);
        end
      end
  endtask

  initial begin
    a_left = '0; a_vld = '0; w_top = '0; w_vld = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(20);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
