// ics_accuracy_tb: accuracy workloads of the ICS-configured ACFA adder.
//
// 1. Error statistics: for 8- and 16-bit adders and every level k, uniformly
//    random operand pairs (carry-in 0) are added by the ICS adder and by the
//    same ACFA adder configured the common way (k low bits approximate), both
//    in the negative mode. Mean error distance (MED) and mean relative error
//    distance (MRED) are printed. Checked: k = 0 is exact, k = n makes both
//    schemes identical, negative-mode errors never make a sum larger, every
//    approximate ICS result differs from the exact one by a sum of distinct
//    powers of two at approximate positions. Where the ICS uses a single
//    approximate bit p = k-1 (2 <= k <= n/2+1), the MED must match the
//    analytic value (2^p - 1)/4: that bit errs when A^B = 1 and a carry
//    arrives, with probability 1/2 * (1 - 2^-p)/2, and each error costs 2^p.
// 2. Image addition: two generated 512 x 512 8-bit images are added pixel by
//    pixel with 8-bit adders for k = 2..8; the PSNR of the 9-bit sum (peak
//    510) is printed for both schemes; the ICS PSNR must fall as k grows.
// The sample count is reduced from a million to keep the run short.
module ics_accuracy_tb;
  localparam int SAMPLES = 100000;
  int checks = 0, failures = 0;

  // 8-bit adders
  logic [3:0] k8;  logic [7:0]  a8, b8, em8, sm8, s8, c_s8, cem8; logic co8, c_co8; logic [3:0] m8;
  ics_config #(.N(8)) u_cfg8 (.k(k8), .sm_pol(1'b0), .em(em8), .sm(sm8), .m(m8));
  acfa_adder #(.N(8)) u_ics8 (.a(a8), .b(b8), .cin(1'b0), .em(em8), .sm(sm8), .sum(s8), .cout(co8));
  acfa_adder #(.N(8)) u_com8 (.a(a8), .b(b8), .cin(1'b0), .em(cem8), .sm('0), .sum(c_s8), .cout(c_co8));
  assign cem8 = ~8'((9'd1 << k8) - 9'd1);

  // 16-bit adders
  logic [4:0] k16; logic [15:0] a16, b16, em16, sm16, s16, c_s16, cem16; logic co16, c_co16; logic [4:0] m16;
  ics_config #(.N(16)) u_cfg16 (.k(k16), .sm_pol(1'b0), .em(em16), .sm(sm16), .m(m16));
  acfa_adder #(.N(16)) u_ics16 (.a(a16), .b(b16), .cin(1'b0), .em(em16), .sm(sm16), .sum(s16), .cout(co16));
  acfa_adder #(.N(16)) u_com16 (.a(a16), .b(b16), .cin(1'b0), .em(cem16), .sm('0), .sum(c_s16), .cout(c_co16));
  assign cem16 = ~16'((17'd1 << k16) - 17'd1);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // generated test images: smooth gradients with texture
  function automatic logic [7:0] img1(int x, int y);
    return 8'((x / 2 + y / 4 + ((x * y) % 37)) % 256);
  endfunction
  function automatic logic [7:0] img2(int x, int y);
    return 8'((128 + 100 * ((x / 64 + y / 64) % 2) + (x ^ y) % 23) % 256);
  endfunction

  initial begin
    real med_i, med_c, mred_i, mred_c, ed, mse_i, mse_c, psnr_i, psnr_c, psnr_prev;
    longint exact, ri, rc;
    bit shape_ok;
    #1;
    // ---------------- 8-bit error statistics ----------------
    for (int k = 0; k <= 8; k++) begin
      k8 = 4'(k);
      med_i = 0; med_c = 0; mred_i = 0; mred_c = 0; shape_ok = 1;
      for (int it = 0; it < SAMPLES; it++) begin
        a8 = 8'($urandom); b8 = 8'($urandom);
        #1;
        exact = longint'(a8) + longint'(b8);
        ri = longint'({co8, s8}); rc = longint'({c_co8, c_s8});
        if (ri > exact || rc > exact) shape_ok = 0;
        if ((9'(exact - ri) & ~{1'b0, ~em8}) != 0) shape_ok = 0;
        med_i += real'(exact - ri); med_c += real'(exact - rc);
        if (exact != 0) begin
          mred_i += real'(exact - ri) / real'(exact);
          mred_c += real'(exact - rc) / real'(exact);
        end
      end
      med_i /= SAMPLES; med_c /= SAMPLES; mred_i /= SAMPLES; mred_c /= SAMPLES;
      $display("n=8  k=%2d m=%0d  MED ics %8.4f common %8.4f   MRED ics %.6f common %.6f",
               k, m8, med_i, med_c, mred_i, mred_c);
      check($sformatf("n=8 k=%0d error shape", k), shape_ok);
      if (k >= 2 && k <= 8 / 2 + 1) begin
        real ana;
        ana = (real'(longint'(1) << (k - 1)) - 1.0) / 4.0;
        check($sformatf("n=8 k=%0d MED %f vs analytic %f", k, med_i, ana),
              med_i > ana * 0.95 - 0.01 && med_i < ana * 1.05 + 0.01);
      end
      if (k == 0) check("n=8 k=0 exact", med_i == 0 && med_c == 0);
      if (k == 8) check("n=8 k=8 schemes equal", med_i == med_c);
    end
    // ---------------- 16-bit error statistics ----------------
    for (int k = 0; k <= 16; k++) begin
      k16 = 5'(k);
      med_i = 0; med_c = 0; mred_i = 0; mred_c = 0; shape_ok = 1;
      for (int it = 0; it < SAMPLES; it++) begin
        a16 = 16'($urandom); b16 = 16'($urandom);
        #1;
        exact = longint'(a16) + longint'(b16);
        ri = longint'({co16, s16}); rc = longint'({c_co16, c_s16});
        if (ri > exact || rc > exact) shape_ok = 0;
        if ((17'(exact - ri) & ~{1'b0, ~em16}) != 0) shape_ok = 0;
        med_i += real'(exact - ri); med_c += real'(exact - rc);
        if (exact != 0) begin
          mred_i += real'(exact - ri) / real'(exact);
          mred_c += real'(exact - rc) / real'(exact);
        end
      end
      med_i /= SAMPLES; med_c /= SAMPLES; mred_i /= SAMPLES; mred_c /= SAMPLES;
      $display("n=16 k=%2d m=%0d  MED ics %10.4f common %10.4f   MRED ics %.6f common %.6f",
               k, m16, med_i, med_c, mred_i, mred_c);
      check($sformatf("n=16 k=%0d error shape", k), shape_ok);
      if (k >= 2 && k <= 16 / 2 + 1) begin
        real ana;
        ana = (real'(longint'(1) << (k - 1)) - 1.0) / 4.0;
        check($sformatf("n=16 k=%0d MED %f vs analytic %f", k, med_i, ana),
              med_i > ana * 0.95 - 0.01 && med_i < ana * 1.05 + 0.01);
      end
      if (k == 0)  check("n=16 k=0 exact", med_i == 0 && med_c == 0);
      if (k == 16) check("n=16 k=16 schemes equal", med_i == med_c);
    end
    // ---------------- image addition, 512 x 512, 8-bit ----------------
    psnr_prev = 1000.0;
    for (int k = 2; k <= 8; k++) begin
      k8 = 4'(k);
      mse_i = 0; mse_c = 0;
      for (int y = 0; y < 512; y++)
        for (int x = 0; x < 512; x++) begin
          a8 = img1(x, y); b8 = img2(x, y);
          #1;
          exact = longint'(a8) + longint'(b8);
          ed = real'(exact - longint'({co8, s8}));    mse_i += ed * ed;
          ed = real'(exact - longint'({c_co8, c_s8})); mse_c += ed * ed;
        end
      mse_i /= 512.0 * 512.0; mse_c /= 512.0 * 512.0;
      psnr_i = (mse_i == 0) ? 99.0 : 10.0 * $log10(510.0 * 510.0 / mse_i);
      psnr_c = (mse_c == 0) ? 99.0 : 10.0 * $log10(510.0 * 510.0 / mse_c);
      $display("image addition k=%0d  PSNR ics %6.2f dB  common %6.2f dB", k, psnr_i, psnr_c);
      check($sformatf("image addition k=%0d PSNR falls with k", k), psnr_i < psnr_prev);
      psnr_prev = psnr_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
