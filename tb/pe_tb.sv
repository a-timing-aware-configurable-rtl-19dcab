// pe_tb: processing element. Random signed operand pairs with random valid
// bits are fed; the partial sum must equal the running sum of the products
// of the pairs where both were valid (mod 2^16), on the second rising edge after the pair
// is presented. The forwarded operands must appear one cycle later. clr
// clears the sum.
module pe_tb;
  localparam int DW = 8, AW = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, am_sm = 1'b0;
  logic [DW-1:0] a_in = '0, w_in = '0, a_out, w_out;
  logic a_vld_in = 1'b0, w_vld_in = 1'b0, a_vld_out, w_vld_out, err, am_seen;
  logic [AW-1:0] psum;
  int checks = 0, failures = 0;

  pe #(.DW(DW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] ref_sum [$];
    logic [AW-1:0] acc;
    logic [DW+1:0] fwd [$];
    logic [DW+1:0] f;
    int n_mac = 0;
    acc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // two warm-up cycles with nothing valid
    ref_sum.push_back('0);
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      a_in = DW'($urandom); w_in = DW'($urandom);
      a_vld_in = ($urandom % 4) != 0; w_vld_in = ($urandom % 4) != 0;
      clr = (it == 500);
      fwd.push_back({a_vld_in, w_vld_in, a_in});
      if (clr) acc = '0;
      if (a_vld_in && w_vld_in) begin
        acc = acc + AW'(signed'(a_in) * signed'(w_in));
        n_mac++;
      end
      ref_sum.push_back(acc);
      @(posedge clk); #1;
      f = fwd.pop_front();
      checks++;
      if ({a_vld_out, w_vld_out, a_out} !== f) begin failures++; $display("FAIL forward"); end
      checks++;
      if (am_seen !== 1'b0 || err !== 1'b0) begin failures++; $display("FAIL unexpected approximate mode"); end
      checks++;
      if (w_out !== w_in) begin failures++; $display("FAIL w forward"); end
      // psum includes a pair one edge after the edge that registers it
      begin
        logic [AW-1:0] e;
        e = ref_sum.pop_front();
        if (it >= 1 && it != 500) begin
          checks++;
          if (psum !== e) begin
            failures++;
            if (failures < 10) $display("FAIL it=%0d psum %h exp %h", it, psum, e);
          end
        end
      end
    end
    checks++;
    if (n_mac < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
