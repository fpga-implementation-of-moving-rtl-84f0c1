// Denoising workload for gaussian_filter at its default size (256x256, 8-bit).
//
// A smooth test image is corrupted with zero-mean Gaussian noise of variance
// 0.01, 0.05, 0.10, 0.15 and 0.20 (relative to a full scale of 1.0, i.e. a
// standard deviation of sqrt(v)*255 grey levels, clipped to 0..255) and sent
// through the filter, one frame per noise level. Every output pixel is
// compared with the zero-padded reference filter. PSNR = 10 log10(255^2/MSE)
// against the clean image is computed for the noisy and for the filtered
// frame: the filter must raise PSNR at every level, and the filtered PSNR
// must fall as the noise level rises.
module tb_gaussian_denoise;
  import tb_ref_pkg::*;
  localparam int W = 256, H = 256, N = W*H;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, in_valid = 0;
  logic in_ready, out_valid, out_last;
  logic [7:0] in_pix = '0, out_pix;
  int checks = 0, failures = 0, nout = 0;
  img_t clean, noisy, exp_img, got;
  real levels[5] = '{0.01, 0.05, 0.10, 0.15, 0.20};
  real prev_psnr = 1.0e9;

  gaussian_filter dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .out_valid(out_valid), .out_pix(out_pix), .out_last(out_last));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s", msg);
    end
  endtask

  function automatic real urand01();
    return (real'($urandom_range(1, 1000000))) / 1000001.0;
  endfunction

  function automatic real gauss01();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(2.0 * PI * urand01());
  endfunction

  function automatic real psnr(img_t x, img_t ref_img);
    real mse = 0.0;
    foreach (x[i]) mse += real'((x[i] - ref_img[i]) * (x[i] - ref_img[i]));
    mse = mse / real'(x.size());
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    got[nout] = int'(out_pix);
    check(int'(out_pix) == exp_img[nout],
          $sformatf("pixel %0d: got %0d expected %0d", nout, out_pix, exp_img[nout]));
    nout++;
  end

  initial begin
    clean = new[N];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        clean[r*W + c] = 128 + int'(90.0 * $sin(2.0 * PI * r / 97.0) * $cos(2.0 * PI * c / 61.0));
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (levels[l]) begin
      real p_noisy, p_filt;
      noisy = new[N];
      foreach (noisy[i]) begin
        automatic int v = clean[i] + int'(gauss01() * $sqrt(levels[l]) * 255.0);
        noisy[i] = v < 0 ? 0 : (v > 255 ? 255 : v);
      end
      exp_img = gaussian(noisy, W, H);
      got = new[N];
      nout = 0;
      for (int i = 0; i < N; ) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_pix = 8'(noisy[i]);
        #1;
        if (in_ready) i++;
      end
      @(negedge clk);
      in_valid = 0;
      while (nout < N) @(negedge clk);
      p_noisy = psnr(noisy, clean);
      p_filt  = psnr(got, clean);
      $display("noise variance %0.2f: PSNR noisy %0.2f dB, filtered %0.2f dB",
               levels[l], p_noisy, p_filt);
      check(p_filt > p_noisy, "filter did not raise PSNR");
      check(p_filt < prev_psnr, "filtered PSNR did not fall with more noise");
      prev_psnr = p_filt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
