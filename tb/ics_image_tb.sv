// ics_image_tb: image-processing workloads run through the ICS-configured
// ACFA adders, negative approximate mode.
//
// 1. Mean filtering. A generated 512 x 512 8-bit image receives Gaussian
//    noise (mean 0, standard deviation 0.02 of full scale) and is smoothed
//    with a 3 x 3 arithmetic mean. Each output pixel is the sum of nine
//    pixels (eight additions) divided by nine. The additions use the 8-bit
//    adder: the low byte of the running sum goes through the ICS adder, and
//    its carry-out is counted exactly into the high part, so the approximate
//    cells only touch the low byte. Border pixels repeat the edge. For
//    k = 0 and 2..8 the PSNR (peak 255) of the result is printed against the
//    exactly filtered image and against the clean image. Checked: k = 0
//    matches an integer reference pixel for pixel; approximate results are
//    never above the exact ones; the PSNR against the exact filter falls as
//    k grows.
// 2. DCT compression. A generated 256 x 256 image is split into 4 x 4
//    blocks. Each block goes through O = C I C^T, keeps the six lowest
//    frequencies (u + v < 3, 37.5 % of the coefficients) and returns through
//    I' = C^T O' C. C is the orthonormal 4-point DCT matrix scaled by 64;
//    products and the rescaling shifts are exact, and every addition
//    (4 m^2 (m - 1) = 192 per block) goes through the 16-bit ICS adder on
//    two's-complement values. For k = 0, 6, 8, 10 and 12 the PSNR against the
//    original image is printed. Checked: k = 0 matches an integer reference
//    bit for bit, and the PSNR does not rise with k.
// The test images are generated because photographs are not part of the
// sources; the absolute PSNR values therefore depend on these images.
module ics_image_tb;
  int checks = 0, failures = 0;

  logic [3:0] k8;  logic [7:0]  a8, b8, em8, sm8, s8;    logic co8;  logic [3:0] m8;
  ics_config #(.N(8)) u_cfg8 (.k(k8), .sm_pol(1'b0), .em(em8), .sm(sm8), .m(m8));
  acfa_adder #(.N(8)) u_add8 (.a(a8), .b(b8), .cin(1'b0), .em(em8), .sm(sm8), .sum(s8), .cout(co8));

  logic [4:0] k16; logic [15:0] a16, b16, em16, sm16, s16; logic co16; logic [4:0] m16;
  ics_config #(.N(16)) u_cfg16 (.k(k16), .sm_pol(1'b0), .em(em16), .sm(sm16), .m(m16));
  acfa_adder #(.N(16)) u_add16 (.a(a16), .b(b16), .cin(1'b0), .em(em16), .sm(sm16), .sum(s16), .cout(co16));

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // accumulate an 8-bit pixel into a wider sum with the 8-bit adder
  task automatic acc8(inout int sum, input logic [7:0] px);
    a8 = 8'(sum); b8 = px;
    #1;
    sum = ((sum >> 8) + int'(co8)) * 256 + int'(s8);
  endtask

  // 16-bit two's-complement addition through the ICS adder
  task automatic add16(inout int acc, input int v);
    a16 = 16'(acc); b16 = 16'(v);
    #1;
    acc = int'(signed'(s16));
  endtask

  function automatic real psnr(real mse, real peak);
    return (mse == 0.0) ? 99.0 : 10.0 * $log10(peak * peak / mse);
  endfunction

  function automatic int clamp255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // smooth generated scene with a few edges
  function automatic int scene(int x, int y, int size);
    real fx, fy, v;
    fx = real'(x) / real'(size); fy = real'(y) / real'(size);
    v = 120.0 + 60.0 * $sin(6.3 * fx + 1.0) * $cos(4.1 * fy) + 40.0 * $sin(17.0 * fx * fy);
    if ((fx - 0.6) * (fx - 0.6) + (fy - 0.4) * (fy - 0.4) < 0.03) v = v + 50.0;
    if (fx > 0.15 && fx < 0.3 && fy > 0.6) v = v - 60.0;
    return clamp255(int'(v));
  endfunction

  // standard normal sample from two uniform draws
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // ---------------- mean filtering ----------------
  localparam int FS = 512;
  byte unsigned clean [FS][FS];
  byte unsigned noisy [FS][FS];
  byte unsigned exact_f [FS][FS];

  // ---------------- DCT compression ----------------
  localparam int DS = 256;
  byte unsigned dimg [DS][DS];
  int cmat [4][4];

  // one 4 x 4 matrix product P = X * Y, additions through the adder when
  // use_adder is set, with the result shifted right by 6 with rounding
  task automatic matmul(input int x [4][4], input int y [4][4], output int p [4][4],
                        input bit use_adder);
    int acc;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        acc = x[i][0] * y[0][j];
        for (int l = 1; l < 4; l++) begin
          if (use_adder) add16(acc, x[i][l] * y[l][j]);
          else acc = int'(signed'(16'(acc + x[i][l] * y[l][j])));
        end
        p[i][j] = (acc + 32) >>> 6;
      end
  endtask

  task automatic compress_block(input int bx, input int by, input bit use_adder,
                                output int rec [4][4]);
    int blk [4][4], ct [4][4], t [4][4], o [4][4], u [4][4];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        blk[i][j] = int'(dimg[by + i][bx + j]) - 128;
        ct[i][j]  = cmat[j][i];
      end
    matmul(cmat, blk, t, use_adder);     // C I
    matmul(t, ct, o, use_adder);         // (C I) C^T
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (i + j >= 3) o[i][j] = 0;     // keep 6 of 16 coefficients
    matmul(ct, o, u, use_adder);         // C^T O'
    matmul(u, cmat, rec, use_adder);     // (C^T O') C
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        rec[i][j] = clamp255(rec[i][j] + 128);
  endtask

  initial begin
    real mse_e, mse_c, mse_o, ps, prev;
    int sum, ref_sum, ex, xi, yi, n_bad, n_above;
    int rec [4][4], rref [4][4];
    int ks [5] = '{0, 6, 8, 10, 12};
    #1;
    // ---- mean filtering ----
    for (int y = 0; y < FS; y++)
      for (int x = 0; x < FS; x++) begin
        clean[y][x] = 8'(scene(x, y, FS));
        noisy[y][x] = 8'(clamp255(int'(real'(clean[y][x]) + 0.02 * 255.0 * gauss())));
      end
    for (int y = 0; y < FS; y++)
      for (int x = 0; x < FS; x++) begin
        ref_sum = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            yi = (y + dy < 0) ? 0 : (y + dy >= FS) ? FS - 1 : y + dy;
            xi = (x + dx < 0) ? 0 : (x + dx >= FS) ? FS - 1 : x + dx;
            ref_sum += int'(noisy[yi][xi]);
          end
        exact_f[y][x] = 8'((ref_sum + 4) / 9);
      end
    prev = 1000.0;
    for (int k = 0; k <= 8; k++) begin
      if (k == 1) continue;
      k8 = 4'(k);
      mse_e = 0; mse_c = 0; n_bad = 0; n_above = 0;
      for (int y = 0; y < FS; y++)
        for (int x = 0; x < FS; x++) begin
          sum = 0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              yi = (y + dy < 0) ? 0 : (y + dy >= FS) ? FS - 1 : y + dy;
              xi = (x + dx < 0) ? 0 : (x + dx >= FS) ? FS - 1 : x + dx;
              if (dy == -1 && dx == -1) sum = int'(noisy[yi][xi]);
              else acc8(sum, noisy[yi][xi]);
            end
          ex = (sum + 4) / 9;
          if (ex != int'(exact_f[y][x])) n_bad++;
          if (ex > int'(exact_f[y][x])) n_above++;
          mse_e += real'((ex - int'(exact_f[y][x])) ** 2);
          mse_c += real'((ex - int'(clean[y][x])) ** 2);
        end
      mse_e /= real'(FS * FS); mse_c /= real'(FS * FS);
      ps = psnr(mse_e, 255.0);
      $display("mean filter k=%0d m=%0d  PSNR vs exact filter %6.2f dB  vs clean image %6.2f dB",
               k, m8, ps, psnr(mse_c, 255.0));
      if (k == 0) check("mean filter k=0 matches reference", n_bad == 0);
      else begin
        check($sformatf("mean filter k=%0d never above exact", k), n_above == 0);
        check($sformatf("mean filter k=%0d PSNR falls with k", k), ps < prev);
      end
      prev = ps;
    end

    // ---- DCT compression, 4 x 4 blocks, 16-bit adders ----
    for (int u = 0; u < 4; u++)
      for (int x = 0; x < 4; x++)
        cmat[u][x] = int'($floor(64.0 * ((u == 0) ? 0.5 : 0.70710678) *
                                 $cos(real'((2 * x + 1) * u) * 3.14159265 / 8.0) + 0.5));
    for (int y = 0; y < DS; y++)
      for (int x = 0; x < DS; x++)
        dimg[y][x] = 8'(scene(x, y, DS));
    foreach (ks[q]) begin
      k16 = 5'(ks[q]);
      mse_o = 0; n_bad = 0;
      for (int by = 0; by < DS; by += 4)
        for (int bx = 0; bx < DS; bx += 4) begin
          compress_block(bx, by, 1'b1, rec);
          if (ks[q] == 0) begin
            compress_block(bx, by, 1'b0, rref);
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++)
                if (rec[i][j] != rref[i][j]) n_bad++;
          end
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              mse_o += real'((rec[i][j] - int'(dimg[by + i][bx + j])) ** 2);
        end
      mse_o /= real'(DS * DS);
      ps = psnr(mse_o, 255.0);
      $display("DCT compression 4x4 k=%0d m=%0d  PSNR vs original %6.2f dB", ks[q], m16, ps);
      if (ks[q] == 0) begin
        check("DCT k=0 matches integer reference", n_bad == 0);
      end
      else check($sformatf("DCT k=%0d PSNR not above the previous level", ks[q]), ps <= prev + 0.01);
      prev = ps;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
