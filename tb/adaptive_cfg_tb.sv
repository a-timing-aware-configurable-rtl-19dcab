// adaptive_cfg_tb: random timing-error vectors of varying density. Checks
// the OR cluster, the error count, the registered voltage/frequency
// requests against the threshold and action select, and the statistics
// (event count, sticky flags, peak count) including their clear.
module adaptive_cfg_tb;
  localparam int NERR = 128, CW = 8;
  logic clk = 1'b0, rst_n = 1'b0, act_sel = 1'b0, clr = 1'b0;
  logic [NERR-1:0] err = '0;
  logic [CW-1:0] thresh = 8'd10, err_cnt, peak_cnt;
  logic any_err, vdd_up_req, freq_down_req, sticky_any, sticky_over;
  logic [31:0] events;
  int checks = 0, failures = 0;

  adaptive_cfg #(.NERR(NERR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int n, ev = 0, peak = 0, n_vdd = 0, n_freq = 0;
    logic s_any = 1'b0, s_over = 1'b0, over;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      err = '0;
      n = (it % 3 == 0) ? 0 : $urandom % 24;
      for (int j = 0; j < n; j++) err[$urandom % NERR] = 1'b1;
      thresh  = CW'($urandom % 16);
      act_sel = 1'($urandom);
      clr     = (it == 600);
      #1;
      n = $countones(err);
      over = n > int'(thresh);
      check("count", err_cnt, n);
      check("any", any_err, n != 0);
      @(posedge clk); #1;
      if (clr) begin ev = 0; s_any = 0; s_over = 0; peak = 0; end
      else begin
        if (n != 0) ev++;
        s_any |= (n != 0);
        s_over |= over;
        if (n > peak) peak = n;
      end
      check("vdd_up_req", vdd_up_req, over && !act_sel);
      check("freq_down_req", freq_down_req, over && act_sel);
      check("events", events, ev);
      check("sticky_any", sticky_any, s_any);
      check("sticky_over", sticky_over, s_over);
      check("peak", peak_cnt, peak);
      n_vdd += vdd_up_req; n_freq += freq_down_req;
    end
    check("both actions seen", (n_vdd > 10) && (n_freq > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
