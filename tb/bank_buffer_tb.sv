// bank_buffer_tb: random host writes to all banks, then host reads (one
// cycle latency) and parallel per-bank reads with independent addresses
// and enables are compared with a scoreboard copy of the memory.
module bank_buffer_tb;
  localparam int BANKS = 8, DEPTH = 512, DW = 8, BW = 3, XW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic h_we = 1'b0, h_re = 1'b0;
  logic [BW-1:0] h_bank = '0;
  logic [XW-1:0] h_addr = '0;
  logic [DW-1:0] h_wdata = '0, h_rdata;
  logic [BANKS-1:0] p_en = '0, p_vld;
  logic [BANKS-1:0][XW-1:0] p_addr = '0;
  logic [BANKS-1:0][DW-1:0] p_data;
  int checks = 0, failures = 0;

  bank_buffer #(.BANKS(BANKS), .DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] model [BANKS][DEPTH];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // fill everything
    for (int b = 0; b < BANKS; b++)
      for (int x = 0; x < DEPTH; x++) begin
        @(negedge clk);
        h_we = 1'b1; h_bank = BW'(b); h_addr = XW'(x); h_wdata = DW'($urandom);
        model[b][x] = h_wdata;
      end
    @(negedge clk); h_we = 1'b0;
    // host reads
    for (int it = 0; it < 500; it++) begin
      int b, x;
      b = $urandom % BANKS; x = $urandom % DEPTH;
      @(negedge clk); h_re = 1'b1; h_bank = BW'(b); h_addr = XW'(x);
      @(negedge clk); h_re = 1'b0;
      checks++;
      if (h_rdata !== model[b][x]) begin failures++; $display("FAIL host read %0d/%0d", b, x); end
    end
    // parallel reads
    for (int it = 0; it < 500; it++) begin
      logic [BANKS-1:0] en;
      int xs [BANKS];
      @(negedge clk);
      en = BANKS'($urandom);
      for (int b = 0; b < BANKS; b++) begin xs[b] = $urandom % DEPTH; p_addr[b] = XW'(xs[b]); end
      p_en = en;
      @(negedge clk);
      for (int b = 0; b < BANKS; b++) begin
        checks++;
        if (p_vld[b] !== en[b] || p_data[b] !== (en[b] ? model[b][xs[b]] : '0)) begin
          failures++; $display("FAIL parallel read bank %0d", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
