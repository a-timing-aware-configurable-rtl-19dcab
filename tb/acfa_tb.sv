// acfa_tb: exhaustive check of the accuracy-configurable full adder.
// All 8 input combinations in each of the four {em, sm} settings are compared
// with the mode truth table: exact A+B+Cin in the exact mode; in the positive
// approximate mode inputs 010/100 give S=0, Cout=1; in the negative
// approximate mode inputs 011/101 give S=1, Cout=0; all other cases exact.
module acfa_tb;
  logic a, b, cin, em, sm, s, cout;
  int checks = 0, failures = 0;

  acfa dut (.a(a), .b(b), .cin(cin), .em(em), .sm(sm), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int mode = 0; mode < 4; mode++) begin
      for (int v = 0; v < 8; v++) begin
        {a, b, cin} = 3'(v);
        {em, sm}    = 2'(mode);
        #1;
        exp = 2'(a) + 2'(b) + 2'(cin);          // {cout, s}
        if (!em && sm && (v == 3'b010 || v == 3'b100)) exp = 2'b10;
        if (!em && !sm && (v == 3'b011 || v == 3'b101)) exp = 2'b01;
        checks++;
        if ({cout, s} !== exp) begin
          failures++;
          $display("FAIL em=%0d sm=%0d abc=%03b got cout,s=%b%b exp %b", em, sm, v, cout, s, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
