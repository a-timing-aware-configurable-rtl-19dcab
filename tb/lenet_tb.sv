// lenet_tb: a whole LeNet-5 inference (five layers) on the CNN accelerator,
// driven over AHB-Lite, in exact mode and with default parameters.
//
// Layer sizes:
//   conv1 32x32x1  -> 28x28x6,  5x5 kernels, reduction K = 25
//   conv2 14x14x6  -> 10x10x16, 5x5x6 kernels, K = 150
//   conv3 5x5x16   -> 1x1x120,  5x5x16 kernels, K = 400
//   fc4   120      -> 84,       K = 120
//   fc5   84       -> 10,       K = 84
// Each layer is lowered to matrix products: a run computes 8 output
// positions (array rows, one im2col vector per input-buffer bank) by 16
// output channels (one kernel per weight bank). The host, i.e. this
// testbench, reloads the input banks for every group of 8 positions and the
// weight banks for every group of 16 channels; unused banks hold zeros.
// Between layers the host applies ReLU, a right shift and saturation to 0..127
// (8-bit activations), and 2x2 max pooling after conv1 and conv2.
// The input is a generated 32x32 digit-like pattern. The weights are
// pseudo-random in -3..3 with fixed seeds, since trained weights are not
// available.
// Every output used is checked against a software model that wraps at 16
// bits like the accumulator. Each run's latency is checked, and the runs,
// bus writes and useful multiply-accumulates are counted.
// The inference is then repeated with every TEDC reporting a late transition
// in every cycle, the worst case of an overscaled supply: every accumulation
// takes the negative approximate mode at bit 8, every output must carry the
// approximate flag and match a model with that bit approximate. The class
// scores of both passes are printed.
module lenet_tb;
  import taca_pkg::*;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic hsel = 1'b0, hwrite = 1'b0, hreadyout, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'd2;
  logic timing_err, vdd_up_req, freq_down_req, busy, done;
  int checks = 0, failures = 0;
  int n_runs = 0, n_writes = 0, n_terr = 0, n_am_out = 0, n_diff = 0;
  localparam int T = ACC_W / 2 - 1;
  longint n_macs = 0;

  cnn_accel dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
    .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .timing_err, .vdd_up_req, .freq_down_req, .busy, .done
  );

  always #5 hclk = ~hclk;

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge hclk) if (hresetn && timing_err) n_terr++;

  `include "ahb_bfm.svh"

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 40) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // layer operands, lowered: X[p][k] activations, Wt[c][k] weights
  localparam int MAXK = 400;
  int unsigned X  [784][MAXK];
  int          Wt [120][MAXK];
  logic signed [15:0] Y [784][120];    // Y[p][c], results read from the array

  // last values written into the buffers, to skip writes that change nothing
  int ibuf_img [8][MAXK];
  int wbuf_img [16][MAXK];

  task automatic put_in(int r, int k, int v);
    if (ibuf_img[r][k] != v) begin
      ahb_write({14'd1, 16'((r * BUF_DEPTH + k) * 4)}, 32'(v) & 32'hff);
      ibuf_img[r][k] = v; n_writes++;
    end
  endtask

  task automatic put_w(int n, int k, int v);
    if (wbuf_img[n][k] != v) begin
      ahb_write({14'd2, 16'((n * BUF_DEPTH + k) * 4)}, 32'(v) & 32'hff);
      wbuf_img[n][k] = v; n_writes++;
    end
  endtask

  // run one layer of P positions, C channels, reduction K
  // one accumulation with bit T+1 in the negative approximate mode when
  // approx is set (carry = A & B there)
  function automatic logic [15:0] add_model(logic [15:0] x, logic [15:0] y, bit approx);
    logic [15:0] s;
    logic c = 1'b0;
    logic [1:0] r;
    for (int i = 0; i < 16; i++) begin
      r = 2'(x[i]) + 2'(y[i]) + 2'(c);
      if (approx && i == T + 1 && r == 2'b10 && !(x[i] && y[i])) r = 2'b01;
      s[i] = r[0]; c = r[1];
    end
    return s;
  endfunction

  // Late transitions in every PE, as after a supply drop: while inject_on is
  // set, each TEDC's negative-phase detector reports one.
  logic inject_on = 1'b0;
  for (genvar ga = 0; ga < NUM_ARRAYS; ga++) begin : g_inj_a
    for (genvar gr = 0; gr < ARRAY_DIM; gr++) begin : g_inj_r
      for (genvar gc = 0; gc < ARRAY_DIM; gc++) begin : g_inj_c
        always @(inject_on) begin
          if (inject_on)
            force dut.g_arr[ga].u_arr.g_row[gr].g_col[gc].u_pe.u_acc.u_tedc.err_live = 1'b1;
          else
            release dut.g_arr[ga].u_arr.g_row[gr].g_col[gc].u_pe.u_acc.u_tedc.err_live;
        end
      end
    end
  end

  task automatic run_layer(string name, int P, int C, int K, bit approx);
    logic [31:0] d;
    int cyc;
    logic [15:0] e, x;
    ahb_write(32'h8, K);
    for (int c0 = 0; c0 < C; c0 += 16) begin
      for (int n = 0; n < 16; n++)
        for (int k = 0; k < K; k++)
          put_w(n, k, (c0 + n < C) ? Wt[c0 + n][k] : 0);
      for (int p0 = 0; p0 < P; p0 += 8) begin
        for (int r = 0; r < 8; r++)
          for (int k = 0; k < K; k++)
            put_in(r, k, (p0 + r < P) ? int'(X[p0 + r][k]) : 0);
        inject_on = approx;
        ahb_write(32'h0, 32'h1);
        cyc = 0;
        while (!done && cyc < 100000) begin @(posedge hclk); #1; cyc++; end
        inject_on = 1'b0;
        check($sformatf("%s run latency", name), cyc, K + 154);
        n_runs++;
        for (int r = 0; r < 8 && p0 + r < P; r++)
          for (int n = 0; n < 16 && c0 + n < C; n++) begin
            e = '0; x = '0;
            for (int k = 0; k < K; k++) begin
              e = add_model(e, 16'(int'(X[p0 + r][k]) * Wt[c0 + n][k]), approx);
              x = x + 16'(int'(X[p0 + r][k]) * Wt[c0 + n][k]);
            end
            ahb_read({14'd3, 16'((r * 16 + n) * 4)}, d);
            check($sformatf("%s out p=%0d c=%0d", name, p0 + r, c0 + n), d[15:0], e);
            check($sformatf("%s approximate flag", name), d[16], approx);
            if (d[16]) n_am_out++;
            if (e != x) n_diff++;
            Y[p0 + r][c0 + n] = signed'(d[15:0]);
            n_macs += K;
          end
      end
    end
    begin
      int mx = 0;
      for (int p = 0; p < P; p++) for (int c = 0; c < C; c++) if (int'(Y[p][c]) > mx) mx = int'(Y[p][c]);
      $display("%s%s: %0d positions x %0d channels, K = %0d, done after %0d runs, largest output %0d",
               approx ? "approximate " : "", name, P, C, K, n_runs, mx);
    end
  endtask

  function automatic int act(int v, int sh);
    v = (v < 0) ? 0 : v >>> sh;
    return (v > 127) ? 127 : v;
  endfunction

  // feature maps between layers, [channel][y][x]
  int fm1 [6][28][28];
  int pm1 [6][14][14];
  int fm2 [16][10][10];
  int pm2 [16][5][5];
  int v120 [120];
  int v84 [84];
  int v10 [10];
  int img [32][32];

  // pseudo-random weights in -3..3 from a fixed linear congruential sequence
  int unsigned lcg = 32'd12345;
  function automatic int rnd_w();
    lcg = lcg * 32'd1103515245 + 32'd12345;
    return int'((lcg >> 16) % 7) - 3;
  endfunction

  // the whole network; with approx set every PE sees late transitions
  task automatic run_net(bit approx, output int top);
    int best, w;
    lcg = 32'd12345;
    // ---- conv1: 28x28 positions, 6 channels, K = 25 ----
    for (int c = 0; c < 6; c++) for (int k = 0; k < 25; k++) begin w = rnd_w(); Wt[c][k] = w; end
    for (int y = 0; y < 28; y++)
      for (int x = 0; x < 28; x++)
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++)
            X[y * 28 + x][i * 5 + j] = img[y + i][x + j];
    run_layer("conv1", 784, 6, 25, approx);
    for (int c = 0; c < 6; c++)
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) fm1[c][y][x] = act(Y[y * 28 + x][c], 4);
    for (int c = 0; c < 6; c++)
      for (int y = 0; y < 14; y++)
        for (int x = 0; x < 14; x++) begin
          best = fm1[c][2 * y][2 * x];
          if (fm1[c][2 * y][2 * x + 1] > best) best = fm1[c][2 * y][2 * x + 1];
          if (fm1[c][2 * y + 1][2 * x] > best) best = fm1[c][2 * y + 1][2 * x];
          if (fm1[c][2 * y + 1][2 * x + 1] > best) best = fm1[c][2 * y + 1][2 * x + 1];
          pm1[c][y][x] = best;
        end

    // ---- conv2: 10x10 positions, 16 channels, K = 150 ----
    for (int c = 0; c < 16; c++) for (int k = 0; k < 150; k++) begin w = rnd_w(); Wt[c][k] = w; end
    for (int y = 0; y < 10; y++)
      for (int x = 0; x < 10; x++)
        for (int ci = 0; ci < 6; ci++)
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++)
              X[y * 10 + x][ci * 25 + i * 5 + j] = pm1[ci][y + i][x + j];
    run_layer("conv2", 100, 16, 150, approx);
    for (int c = 0; c < 16; c++)
      for (int y = 0; y < 10; y++)
        for (int x = 0; x < 10; x++) fm2[c][y][x] = act(Y[y * 10 + x][c], 5);
    for (int c = 0; c < 16; c++)
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++) begin
          best = fm2[c][2 * y][2 * x];
          if (fm2[c][2 * y][2 * x + 1] > best) best = fm2[c][2 * y][2 * x + 1];
          if (fm2[c][2 * y + 1][2 * x] > best) best = fm2[c][2 * y + 1][2 * x];
          if (fm2[c][2 * y + 1][2 * x + 1] > best) best = fm2[c][2 * y + 1][2 * x + 1];
          pm2[c][y][x] = best;
        end

    // ---- conv3: 1 position, 120 channels, K = 400 ----
    for (int c = 0; c < 120; c++) for (int k = 0; k < 400; k++) begin w = rnd_w(); Wt[c][k] = w; end
    for (int ci = 0; ci < 16; ci++)
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) X[0][ci * 25 + i * 5 + j] = pm2[ci][i][j];
    run_layer("conv3", 1, 120, 400, approx);
    for (int c = 0; c < 120; c++) v120[c] = act(Y[0][c], 4);

    // ---- fc4: 120 -> 84 ----
    for (int c = 0; c < 84; c++) for (int k = 0; k < 120; k++) begin w = rnd_w(); Wt[c][k] = w; end
    for (int k = 0; k < 120; k++) X[0][k] = v120[k];
    run_layer("fc4", 1, 84, 120, approx);
    for (int c = 0; c < 84; c++) v84[c] = act(Y[0][c], 5);

    // ---- fc5: 84 -> 10 ----
    for (int c = 0; c < 10; c++) for (int k = 0; k < 84; k++) begin w = rnd_w(); Wt[c][k] = w; end
    for (int k = 0; k < 84; k++) X[0][k] = v84[k];
    run_layer("fc5", 1, 10, 84, approx);
    best = 0;
    for (int c = 0; c < 10; c++) begin
      v10[c] = Y[0][c];
      if (v10[c] > v10[best]) best = c;
    end

    begin
      string sc = "";
      int nz = 0;
      foreach (v10[c]) begin
        sc = {sc, $sformatf(" %0d", v10[c])};
        if (v10[c] != 0) nz++;
      end
      $display("class scores:%s, largest at %0d", sc, best);
      if (!approx) check("class scores not all zero", nz > 0, 1);
    end
    top = best;
  endtask

  initial begin
    int top_exact, top_approx;
    repeat (3) @(posedge hclk);
    #1 hresetn = 1'b1;
    @(posedge hclk); #1;
    foreach (ibuf_img[r, k]) ibuf_img[r][k] = 0;
    foreach (wbuf_img[n, k]) wbuf_img[n][k] = 0;
    // buffers are not cleared by reset: zero every entry a layer can read
    for (int r = 0; r < 8; r++) for (int k = 0; k < MAXK; k++) begin
      ahb_write({14'd1, 16'((r * BUF_DEPTH + k) * 4)}, 0); n_writes++;
    end
    for (int n = 0; n < 16; n++) for (int k = 0; k < MAXK; k++) begin
      ahb_write({14'd2, 16'((n * BUF_DEPTH + k) * 4)}, 0); n_writes++;
    end
    // a thick "7" with a serif on a dark background
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        img[y][x] = 0;
        if (y >= 5 && y <= 8 && x >= 7 && x <= 25) img[y][x] = 120;
        if (y > 8 && y <= 27 && x >= 25 - (y - 8) / 2 - 2 && x <= 25 - (y - 8) / 2 + 1) img[y][x] = 110;
        if (y >= 16 && y <= 17 && x >= 13 && x <= 22) img[y][x] = 90;
      end

    run_net(1'b0, top_exact);
    $display("runs=%0d bus_writes=%0d useful_macs=%0d timing_error_cycles=%0d",
             n_runs, n_writes, n_macs, n_terr);
    // 98 + 13 + 8 + 6 + 1 runs
    check("number of runs", n_runs, 126);
    check("useful multiply-accumulates",
          n_macs, 64'd25 * 4704 + 64'd150 * 1600 + 64'd400 * 120 + 64'd120 * 84 + 64'd84 * 10);
    check("no timing errors in exact operation", n_terr, 0);
    // the same inference with every adder in the negative approximate mode
    n_runs = 0; n_macs = 0;
    run_net(1'b1, top_approx);
    $display("approximate pass: runs=%0d timing_error_cycles=%0d approximate_outputs=%0d, class %0d against %0d exact",
             n_runs, n_terr, n_am_out, top_approx, top_exact);
    check("approximate pass runs", n_runs, 126);
    check("timing errors seen", n_terr > 0, 1);
    check("approximation changed some outputs", n_diff > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
