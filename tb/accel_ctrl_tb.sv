// accel_ctrl_tb: runs the sequencer for several reduction lengths. Each
// cycle of the feed phase the buffer enables and addresses must follow the
// skew rule (row r reads k = step - r, column bank n reads k = step - n%8,
// only for 0 <= k < klen); the drain must write the 128 output words in
// order; done must rise 1 + klen + 7 + 18 + 128 cycles after the edge that
// samples start.
module accel_ctrl_tb;
  localparam int R = 8, C = 8, NA = 2, DEPTH = 512, XW = 9, OW = 7, NB = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [XW:0] klen = '0;
  logic busy, done, pe_clr, out_we;
  logic [R-1:0] in_en;
  logic [R-1:0][XW-1:0] in_addr;
  logic [NB-1:0] w_en;
  logic [NB-1:0][XW-1:0] w_addr;
  logic [OW-1:0] out_addr;
  int checks = 0, failures = 0;

  accel_ctrl #(.R(R), .C(C), .NA(NA), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int K);
    int cyc = 0, feed = 0, drained = 0, clears = 0;
    klen = (XW+1)'(K);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0; cyc = 1;
    while (!done && cyc < 5000) begin
      if (pe_clr) clears++;
      if (in_en != '0 || w_en != '0 || (feed > 0 && feed < K + 7)) begin
        // feed step 'feed'
        for (int r = 0; r < R; r++) begin
          logic e = (feed >= r) && (feed - r < K);
          checks++;
          if (in_en[r] !== e || (e && in_addr[r] !== XW'(feed - r))) begin
            failures++; $display("FAIL K=%0d step %0d row %0d", K, feed, r);
          end
        end
        for (int n = 0; n < NB; n++) begin
          logic e = (feed >= n % C) && (feed - n % C < K);
          checks++;
          if (w_en[n] !== e || (e && w_addr[n] !== XW'(feed - n % C))) begin
            failures++; $display("FAIL K=%0d step %0d col %0d", K, feed, n);
          end
        end
        feed++;
      end
      if (out_we) begin
        checks++;
        if (out_addr !== OW'(drained)) failures++;
        drained++;
      end
      @(negedge clk); cyc++;
    end
    checks++;
    if (cyc != 2 + K + 7 + 18 + 128) begin
      failures++; $display("FAIL K=%0d done after %0d cycles", K, cyc);
    end
    checks++;
    if (drained != 128 || clears != 1 || feed != K + 7) begin
      failures++; $display("FAIL K=%0d drained=%0d clears=%0d feed=%0d", K, drained, clears, feed);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(1); run(3); run(25); run(400); run(512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
