// ahb_slave_tb: AHB-Lite master model against the slave with a small
// register file behind its request port (one cycle read latency). Checks
// single writes (no wait state), single reads (exactly one wait state, data
// from the register file), back-to-back pipelined writes, IDLE transfers
// being ignored and HRESP staying OKAY.
module ahb_slave_tb;
  logic hclk = 1'b0, hresetn = 1'b0;
  logic hsel = 1'b0, hwrite = 1'b0, hreadyout, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'd2;
  logic req_we, req_re;
  logic [17:0] req_addr;
  logic [31:0] req_wdata, rsp_rdata;
  int checks = 0, failures = 0;

  ahb_slave #(.AW(18)) dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
    .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .req_we, .req_re, .req_addr, .req_wdata, .rsp_rdata
  );

  always #5 hclk = ~hclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // target: 256 words, registered read
  logic [31:0] regs [256];
  int n_we;
  always_ff @(posedge hclk) begin
    if (!hresetn) n_we <= 0;
    else if (req_we) n_we <= n_we + 1;
    if (req_we) regs[req_addr[9:2]] <= req_wdata;
    if (req_re) rsp_rdata <= regs[req_addr[9:2]];
  end

  always @(posedge hclk) if (hresetn) begin
    checks++;
    if (hresp !== 1'b0) failures++;
  end

  task automatic ahb_write(logic [31:0] a, logic [31:0] d, output int cycles);
    hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = 1'b1; hsize = 3'd2;
    cycles = 0;
    do begin @(posedge hclk); cycles++; end while (!hreadyout);
    #1 htrans = 2'b00; hwdata = d;
    do begin @(posedge hclk); cycles++; end while (!hreadyout);
    #1;
  endtask

  task automatic ahb_read(logic [31:0] a, output logic [31:0] d, output int cycles);
    hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = 1'b0; hsize = 3'd2;
    cycles = 0;
    do begin @(posedge hclk); cycles++; end while (!hreadyout);
    #1 htrans = 2'b00;
    forever begin
      @(posedge hclk); cycles++;
      if (hreadyout) begin d = hrdata; break; end
    end
    #1;
  endtask

  logic [31:0] model [256];

  initial begin
    int cyc;
    logic [31:0] d;
    repeat (2) @(posedge hclk);
    #1 hresetn = 1'b1;
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      ahb_write({22'd0, 8'(i), 2'b00}, model[i], cyc);
      checks++;
      if (cyc != 2) begin failures++; $display("FAIL write took %0d cycles", cyc); end
    end
    for (int it = 0; it < 300; it++) begin
      int i;
      i = $urandom % 256;
      ahb_read({22'd0, 8'(i), 2'b00}, d, cyc);
      checks++;
      if (d !== model[i]) begin failures++; $display("FAIL read %0d got %h exp %h", i, d, model[i]); end
      checks++;
      if (cyc != 3) begin failures++; $display("FAIL read took %0d cycles", cyc); end
    end
    // pipelined writes: address phase of the second overlaps data phase of the first
    hsel = 1'b1; hwrite = 1'b1; htrans = 2'b10; haddr = 32'h10;
    @(posedge hclk); #1 haddr = 32'h14; hwdata = 32'hA5A5_0001;
    @(posedge hclk); #1 htrans = 2'b00; hwdata = 32'h5A5A_0002; haddr = 32'h18;
    @(posedge hclk); #1;
    model[4] = 32'hA5A5_0001; model[5] = 32'h5A5A_0002;
    // IDLE with HSEL must not write
    hwdata = 32'hDEAD_BEEF;
    repeat (3) @(posedge hclk);
    #1;
    foreach (model[i]) begin
      ahb_read({22'd0, 8'(i), 2'b00}, d, cyc);
      checks++;
      if (d !== model[i]) begin failures++; $display("FAIL final read %0d got %h exp %h", i, d, model[i]); end
    end
    checks++;
    if (n_we != 258) begin failures++; $display("FAIL %0d writes issued", n_we); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
