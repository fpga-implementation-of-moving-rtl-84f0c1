// Face-matching workload for face_object_detect_top at its default size.
//
// P synthetic "persons" are drawn as 256x256 grey-scale faces on a dark,
// homogeneous background: a bright head ellipse with dark eyes and mouth
// whose sizes, spacing and brightness differ from person to person. Each
// person has a database image and a test image; the test image has a
// different lighting offset and fresh pixel noise. Every test image is
// compared with every database image (P*P comparisons, one frame pair each).
// For every comparison all object coefficients, S, the near-zero count and
// the match decision are checked against tb_ref_pkg::detector. The
// testbench then prints, for a few global thresholds, the success rate of
// genuine pairs and the acceptance rate of impostor pairs, the quantities a
// recognition-rate evaluation is built from; these rates describe the
// algorithm on this synthetic set and are printed, not checked.
module tb_face_match_workload;
  import tb_ref_pkg::*;
  localparam int W = 256, H = 256, N = W*H, NLL = N/4, P = 4;
  localparam int CNT_W = $clog2(NLL + 1);

  logic clk = 0, rst = 1, pix_valid = 0;
  logic pix_ready, out_valid, rst_out, match, match_valid;
  logic [7:0] image_in = '0, image_ref = '0;
  logic [CNT_W-1:0] gth = CNT_W'(NLL), match_count;
  logic [9:0] image_out;
  logic [12:0] s_value;

  face_object_detect_top dut (
    .clk(clk), .rst(rst), .pix_valid(pix_valid), .pix_ready(pix_ready),
    .image_in(image_in), .image_ref(image_ref), .global_threshold(gth),
    .image_out(image_out), .out_valid(out_valid), .rst_out(rst_out), .match(match),
    .match_valid(match_valid), .match_count(match_count), .s_value(s_value));

  int checks = 0, failures = 0, nout = 0;
  img_t db[P], test[P], exp_out;
  int exp_s, exp_cnt;
  int counts[P][P];

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s", msg);
    end
  endtask

  initial begin
    repeat (P*P*100000 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    check(int'(image_out) == exp_out[nout],
          $sformatf("object %0d: got %0d expected %0d", nout, image_out, exp_out[nout]));
    nout++;
  end

  function automatic bit in_ellipse(int r, int c, int cr, int cc, int ar, int ac);
    return (r-cr)*(r-cr)*ac*ac + (c-cc)*(c-cc)*ar*ar <= ar*ar*ac*ac;
  endfunction

  function automatic img_t face(int p, int light);
    img_t img = new[N];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v = 12 + int'($urandom_range(0, 4));
        if (in_ellipse(r, c, 128, 128, 95, 62 + 6*p)) begin
          v = 115 + 18*p + light + int'($urandom_range(0, 4));
          if (in_ellipse(r, c, 100 + 2*p, 128 - 24 - 3*p, 7 + p, 11) ||
              in_ellipse(r, c, 100 + 2*p, 128 + 24 + 3*p, 7 + p, 11))
            v = 35 + light;
          if (r >= 165 + 3*p && r < 173 + 3*p && c >= 128 - 15 - 4*p && c < 128 + 15 + 4*p)
            v = 50 + light;
        end
        img[r*W + c] = v < 0 ? 0 : (v > 255 ? 255 : v);
      end
    return img;
  endfunction

  initial begin
    for (int p = 0; p < P; p++) begin
      db[p]   = face(p, 0);
      test[p] = face(p, 6);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < P; t++)
      for (int d = 0; d < P; d++) begin
        detector(test[t], db[d], W, H, 10, exp_out, exp_s, exp_cnt);
        nout = 0;
        for (int i = 0; i < N; ) begin
          @(negedge clk);
          pix_valid = 1'b1;
          image_in  = 8'(test[t][i]);
          image_ref = 8'(db[d][i]);
          #1;
          if (pix_ready) i++;
        end
        @(negedge clk);
        pix_valid = 0;
        while (!match_valid) @(negedge clk);
        check(nout == NLL, "wrong number of object coefficients");
        check(int'(s_value) == exp_s, $sformatf("S %0d expected %0d", s_value, exp_s));
        check(int'(match_count) == exp_cnt,
              $sformatf("count %0d expected %0d", match_count, exp_cnt));
        check(match == (exp_cnt >= NLL), "match decision wrong");
        counts[t][d] = int'(match_count);
        $display("test %0d vs database %0d: S=%0d near-zero count=%0d of %0d", t, d,
                 s_value, match_count, NLL);
      end
    for (int k = 0; k < 4; k++) begin
      automatic int th = NLL - 64 * (1 << (2*k));   // 16320, 16128, 15360, 12288
      automatic int gen = 0, imp = 0;
      for (int t = 0; t < P; t++)
        for (int d = 0; d < P; d++)
          if (counts[t][d] >= th) begin
            if (t == d) gen++; else imp++;
          end
      $display("global threshold %0d: genuine matched %0d/%0d, impostors accepted %0d/%0d",
               th, gen, P, imp, P*(P-1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
