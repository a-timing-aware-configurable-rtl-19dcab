// ahb_bfm.svh: AHB-Lite single-transfer master tasks, included inside a
// testbench module that declares hclk, hsel, haddr, htrans, hwrite, hsize,
// hwdata, hrdata and hreadyout. Tasks are called just after a rising edge.
task automatic ahb_write(logic [31:0] a, logic [31:0] d);
  hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = 1'b1; hsize = 3'd2;
  do @(posedge hclk); while (!hreadyout);
  #1 htrans = 2'b00; hwdata = d;
  do @(posedge hclk); while (!hreadyout);
  #1;
endtask

task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
  hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = 1'b0; hsize = 3'd2;
  do @(posedge hclk); while (!hreadyout);
  #1 htrans = 2'b00;
  forever begin
    @(posedge hclk);
    if (hreadyout) begin d = hrdata; break; end
  end
  #1;
endtask
