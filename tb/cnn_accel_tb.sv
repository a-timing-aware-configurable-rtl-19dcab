// cnn_accel_tb: end-to-end test of the accelerator over AHB-Lite.
// Loads random signed activations (8 x K) and weights (16 x K) into the
// buffers, reads some back, programs K, runs and checks every one of the
// 128 outputs against sum_k A[r][k]*W[n][k] (mod 2^16) and the run latency.
// Then, for every PE, the TEDC's negative-phase detector is forced to report
// a late transition of the monitored sum bit for a whole run: every accumulation must then take the approximate mode, and each
// output must equal a model in which bit 8 of each accumulation is
// approximate (negative polarity in one run, positive in the next). A
// following run without late transitions must be exact again.
// The adaptive configuration unit must see the errors, raise the voltage
// request (act_sel=0) and the frequency request (act_sel=1) above the
// threshold, and report the statistics.
`define DUT_SCOPE dut
module cnn_accel_tb;
  import taca_pkg::*;
  localparam int K = 25;
  localparam int XW = 9;
  localparam int T = ACC_W / 2 - 1;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic hsel = 1'b0, hwrite = 1'b0, hreadyout, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = 2'b00;
  logic [2:0] hsize = 3'd2;
  logic timing_err, vdd_up_req, freq_down_req, busy, done;
  int checks = 0, failures = 0;
  int n_wait = 0, n_terr = 0, n_vdd = 0, n_freq = 0, n_am_out = 0, n_exact_runs = 0;
  int n_nam_runs = 0, n_pam_runs = 0, n_diff = 0;

  cnn_accel dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
    .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .timing_err, .vdd_up_req, .freq_down_req, .busy, .done
  );

  always #5 hclk = ~hclk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge hclk) if (hresetn) begin
    if (!hreadyout) n_wait++;
    if (timing_err) n_terr++;
    if (vdd_up_req) n_vdd++;
    if (freq_down_req) n_freq++;
  end

  `include "ahb_bfm.svh"

  logic signed [7:0] A [8][K];
  logic signed [7:0] W [16][K];

  function automatic logic [15:0] add_model(logic [15:0] x, logic [15:0] y, bit approx, logic pol);
    logic [15:0] s;
    logic c = 1'b0;
    logic [2:0] v;
    logic [1:0] r;
    for (int i = 0; i < 16; i++) begin
      v = {x[i], y[i], c};
      r = 2'(x[i]) + 2'(y[i]) + 2'(c);
      if (approx && i == T + 1 &&  pol && (v == 3'b010 || v == 3'b100)) r = 2'b10;
      if (approx && i == T + 1 && !pol && (v == 3'b011 || v == 3'b101)) r = 2'b01;
      s[i] = r[0]; c = r[1];
    end
    return s;
  endfunction

  // Late transitions are emulated for every PE, as after a supply drop that
  // slows all adders: while inject_on is set, each TEDC reports a late
  // transition of its monitored bit (its negative-phase detector is forced).
  logic inject_on = 1'b0;
  for (genvar ga = 0; ga < 2; ga++) begin : g_inj_a
    for (genvar gr = 0; gr < 8; gr++) begin : g_inj_r
      for (genvar gc = 0; gc < 8; gc++) begin : g_inj_c
        always @(inject_on) begin
          if (inject_on)
            force `DUT_SCOPE.g_arr[ga].u_arr.g_row[gr].g_col[gc].u_pe.u_acc.u_tedc.err_live = 1'b1;
          else
            release `DUT_SCOPE.g_arr[ga].u_arr.g_row[gr].g_col[gc].u_pe.u_acc.u_tedc.err_live;
        end
      end
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 60) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  // one run; inject = force late transitions on the selected PEs
  task automatic run(bit inject, logic pol, logic act_sel);
    int cyc;
    logic [31:0] d;
    ahb_write(32'h0, {29'd0, act_sel, pol, 1'b0});
    if (inject) inject_on = 1'b1;
    ahb_write(32'h0, {29'd0, act_sel, pol, 1'b1});            // start
    cyc = 0;
    while (!done && cyc < 100000) begin @(posedge hclk); #1; cyc++; end
    inject_on = 1'b0;
    check("run latency", cyc, K + 154);
    ahb_read(32'h4, d);
    check("status done", d[1:0], 2'b10);
    for (int r = 0; r < 8; r++)
      for (int n = 0; n < 16; n++) begin
        logic [15:0] e, x;
        bit f;
        f = inject;
        e = '0; x = '0;
        for (int k = 0; k < K; k++) begin
          e = add_model(e, 16'(A[r][k] * W[n][k]), f, pol);
          x = x + 16'(A[r][k] * W[n][k]);
        end
        ahb_read({14'd3, 16'((r * 16 + n) * 4)}, d);
        check($sformatf("out[%0d][%0d]", r, n), d[15:0], e);
        check($sformatf("flag[%0d][%0d]", r, n), d[16], f);
        if (d[16]) n_am_out++;
        if (f && e != x) n_diff++;
      end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge hclk);
    #1 hresetn = 1'b1;
    @(posedge hclk); #1;
    for (int r = 0; r < 8; r++) for (int k = 0; k < K; k++) A[r][k] = 8'($urandom);
    for (int n = 0; n < 16; n++) for (int k = 0; k < K; k++) W[n][k] = 8'($urandom);
    ahb_write(32'h8, K);           // KLEN
    ahb_write(32'hC, 2);           // THRESH: more than two PEs in error
    for (int r = 0; r < 8; r++) for (int k = 0; k < K; k++)
      ahb_write({14'd1, 16'((r * 512 + k) * 4)}, 32'(unsigned'(A[r][k])));
    for (int n = 0; n < 16; n++) for (int k = 0; k < K; k++)
      ahb_write({14'd2, 16'((n * 512 + k) * 4)}, 32'(unsigned'(W[n][k])));
    // buffer read-back
    for (int it = 0; it < 20; it++) begin
      int r, n, k;
      r = $urandom % 8; n = $urandom % 16; k = $urandom % K;
      ahb_read({14'd1, 16'((r * 512 + k) * 4)}, d);
      check("ibuf readback", d[7:0], longint'(unsigned'(A[r][k])));
      ahb_read({14'd2, 16'((n * 512 + k) * 4)}, d);
      check("wbuf readback", d[7:0], longint'(unsigned'(W[n][k])));
    end
    ahb_read(32'h8, d); check("klen", d, K);
    // exact run
    run(1'b0, 1'b0, 1'b0);
    n_exact_runs++;
    ahb_read(32'h10, d); check("no error events", d, 0);
    check("no requests", n_vdd + n_freq + n_terr, 0);
    // late transitions, negative approximate mode, voltage request
    run(1'b1, 1'b0, 1'b0);
    n_nam_runs++;
    ahb_read(32'h10, d); checks++; if (d == 0) failures++;
    ahb_read(32'h14, d);
    check("sticky any", d[0], 1); check("sticky over", d[1], 1); check("peak", d[23:8], 128);
    check("vdd request raised", n_vdd > 0, 1);
    check("no frequency request yet", n_freq, 0);
    ahb_write(32'h18, 1);          // clear statistics
    ahb_read(32'h14, d); check("flags cleared", d, 0);
    // late transitions, positive approximate mode, frequency request
    run(1'b1, 1'b1, 1'b1);
    n_pam_runs++;
    check("frequency request raised", n_freq > 0, 1);
    // exact again once the late transitions are gone
    run(1'b0, 1'b0, 1'b0);
    n_exact_runs++;
    $display("mechanisms: exact_runs=%0d nam_runs=%0d pam_runs=%0d timing_err_cycles=%0d am_outputs=%0d approx_differs=%0d vdd_req=%0d freq_req=%0d wait_states=%0d",
             n_exact_runs, n_nam_runs, n_pam_runs, n_terr, n_am_out, n_diff, n_vdd, n_freq, n_wait);
    check("mechanism: timing errors", n_terr > 0, 1);
    check("mechanism: approximate outputs", n_am_out > 0, 1);
    check("mechanism: approximation changed a result", n_diff > 0, 1);
    check("mechanism: bus wait states", n_wait > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
