// out_buffer_tb: writes every word with random data and flag, then reads
// them back in random order (one cycle latency) and checks a scoreboard.
module out_buffer_tb;
  localparam int DEPTH = 128, DW = 16, XW = 7;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, wflag = 1'b0, re = 1'b0, rflag;
  logic [XW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  out_buffer #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW:0] model [DEPTH];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < DEPTH; x++) begin
      @(negedge clk);
      we = 1'b1; waddr = XW'(x); wdata = DW'($urandom); wflag = 1'($urandom);
      model[x] = {wflag, wdata};
    end
    @(negedge clk); we = 1'b0;
    for (int it = 0; it < 400; it++) begin
      int x;
      x = $urandom % DEPTH;
      @(negedge clk); re = 1'b1; raddr = XW'(x);
      @(negedge clk); re = 1'b0;
      checks++;
      if ({rflag, rdata} !== model[x]) begin failures++; $display("FAIL read %0d", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
