// acfa_adder_tb: random operands and random per-bit modes. The reference is
// a bit-serial model that looks each bit up in the mode truth table, plus a
// check that the all-exact configuration equals a + b + cin.
module acfa_adder_tb;
  localparam int N = 16;
  logic [N-1:0] a, b, em, sm, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  acfa_adder #(.N(N)) dut (.a(a), .b(b), .cin(cin), .em(em), .sm(sm), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one bit of the mode truth table: returns {cout, s}
  function automatic logic [1:0] fa_ref(logic x, logic y, logic c, logic e, logic s_m);
    logic [2:0] v = {x, y, c};
    logic [1:0] r = 2'(x) + 2'(y) + 2'(c);
    if (!e &&  s_m && (v == 3'b010 || v == 3'b100)) r = 2'b10;
    if (!e && !s_m && (v == 3'b011 || v == 3'b101)) r = 2'b01;
    return r;
  endfunction

  initial begin
    logic [N-1:0] rs;
    logic rc;
    logic [1:0] t;
    for (int it = 0; it < 4000; it++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      if (it < 500) begin em = '1; sm = N'($urandom); end
      else begin em = N'($urandom) | N'($urandom); sm = N'($urandom); end
      #1;
      rc = cin;
      for (int i = 0; i < N; i++) begin
        t = fa_ref(a[i], b[i], rc, em[i], sm[i]);
        rs[i] = t[0]; rc = t[1];
      end
      checks++;
      if ({cout, sum} !== {rc, rs}) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%0d em=%h sm=%h got %h/%0d exp %h/%0d",
                                    a, b, cin, em, sm, sum, cout, rs, rc);
      end
      if (em == '1) begin
        checks++;
        if ({cout, sum} !== (17'(a) + 17'(b) + 17'(cin))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
