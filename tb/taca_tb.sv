// taca_tb: runs the TACA checks (taca_check) on the 16-bit adder used in
// the accelerator and on the 8-bit adder of the delay/energy evaluation, in
// parallel, and reports the combined result.
module taca_tb;
  logic done16, done8;
  int checks16, failures16, checks8, failures8;

  taca_check #(.N(16)) u_16 (.finished(done16), .checks(checks16), .failures(failures16));
  taca_check #(.N(8))  u_8  (.finished(done8),  .checks(checks8),  .failures(failures8));

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks8, failures16 + failures8 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done16 && done8);
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks8, failures16 + failures8);
    $finish;
  end
endmodule
