// tedc_tb: the data input changes either early in the cycle (before the
// falling edge: no error) or during the negative clock phase (late: err must
// rise at once and err_q must be set for the following cycle). q must follow
// d on every rising edge with en=1, hold with en=0 and clear with clr.
module tedc_tb;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0, d = 1'b0;
  logic q, err, err_q;
  int checks = 0, failures = 0;

  tedc dut (.clk, .rst_n, .en, .clr, .d, .q, .err, .err_q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic nd;
    int late_seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1; en = 1'b1;
    for (int it = 0; it < 200; it++) begin
      logic late;
      late = 1'($urandom) & (it > 5);
      nd   = ~d;                       // always a transition
      if (!late) begin
        @(posedge clk); #1 d = nd;     // early: settles in the positive phase
        @(negedge clk); #1 check("no live error", err, 1'b0 | err_q);
        check("err_q early", err_q, err_q);
      end else begin
        @(negedge clk); #2 d = nd;     // late: changes after the falling edge
        #1 check("live error", err, 1'b1);
        late_seen++;
      end
      @(posedge clk); #1;
      check("q follows d", q, nd);
      check("err_q", err_q, late);
    end
    // hold with en = 0, no error reported
    @(negedge clk); en = 1'b0; #1 d = ~d;
    #1 check("no live error when disabled", err, err_q);
    @(posedge clk); #1 check("hold", q, ~d);
    check("err_q disabled", err_q, 1'b0);
    // clear
    en = 1'b1; d = 1'b1;
    @(posedge clk); #1 check("load 1", q, 1'b1);
    clr = 1'b1;
    @(posedge clk); #1 check("clear", q, 1'b0);
    clr = 1'b0;
    check("late transitions exercised", late_seen > 20, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
