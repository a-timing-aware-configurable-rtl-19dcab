// ics_config_tb: checks the improved configuration scheme against the
// tabulated approximate-bit positions for 8- and 16-bit adders, and the
// single-bit rule (bit k-1) for k <= n/2+1, for both polarities.
module ics_config_tb;
  logic [3:0]  k8;  logic [7:0]  em8,  sm8;  logic [3:0] m8;
  logic [4:0]  k16; logic [15:0] em16, sm16; logic [4:0] m16;
  logic        pol;
  int checks = 0, failures = 0;

  ics_config #(.N(8))  d8  (.k(k8),  .sm_pol(pol), .em(em8),  .sm(sm8),  .m(m8));
  ics_config #(.N(16)) d16 (.k(k16), .sm_pol(pol), .em(em16), .sm(sm16), .m(m16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk8(int k, logic [7:0] approx);
    k8 = 4'(k); #1;
    checks++;
    if (em8 !== ~approx || sm8 !== (pol ? approx : 8'h00) || m8 !== 4'($countones(approx))) begin
      failures++;
      $display("FAIL n=8 k=%0d pol=%0d em=%b sm=%b m=%0d exp approx=%b", k, pol, em8, sm8, m8, approx);
    end
  endtask

  task automatic chk16(int k, logic [15:0] approx);
    k16 = 5'(k); #1;
    checks++;
    if (em16 !== ~approx || sm16 !== (pol ? approx : 16'h0) || m16 !== 5'($countones(approx))) begin
      failures++;
      $display("FAIL n=16 k=%0d pol=%0d em=%b sm=%b m=%0d exp approx=%b", k, pol, em16, sm16, m16, approx);
    end
  endtask

  function automatic logic [15:0] bits(int p0, int p1 = -1, int p2 = -1, int p3 = -1,
                                       int p4 = -1, int p5 = -1, int p6 = -1);
    logic [15:0] r = '0;
    int p[7] = '{p0, p1, p2, p3, p4, p5, p6};
    for (int i = 0; i < 7; i++) if (p[i] >= 0) r[p[i]] = 1'b1;
    return r;
  endfunction

  initial begin
    for (int pp = 0; pp < 2; pp++) begin
      pol = pp[0];
      chk8(0, 8'h00);
      for (int k = 1; k <= 5; k++) chk8(k, 8'(bits(k - 1)));
      chk8(6, 8'(bits(2, 5)));
      chk8(7, 8'(bits(2, 4, 6)));
      chk8(8, 8'hFF);
      chk16(0, 16'h0);
      for (int k = 1; k <= 9; k++) chk16(k, bits(k - 1));
      chk16(10, bits(2, 9));
      chk16(11, bits(4, 10));
      chk16(12, bits(1, 6, 11));
      chk16(13, bits(4, 8, 12));
      chk16(14, bits(1, 4, 7, 10, 13));
      chk16(15, bits(2, 4, 6, 8, 10, 12, 14));
      chk16(16, 16'hFFFF);
      chk16(31, 16'hFFFF);   // out-of-range levels saturate at k = n
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
